// Schedule testbench: a stream of task requests served by the whole system at its default
// parameters, with the queueing rule of the intended scheduler kept on the host side.
// Task types are five tasks of realistic size (CLB / BlockRAM columns, flip-flops in use):
// LDPC decoder 1/0 (44), 16-bit divider 1/0 (211), FIR filter 3/1 (944 + BlockRAM contents),
// Rijndael 7/0 (788), S-Core CPU 19/1 (2287; 19 CLB columns span one BlockRAM column on this
// device map). Feasible positions are where each column pattern recurs, ordered by the SUP
// position weight computed here with equal request probabilities.
// Requests of random type (Rijndael-sized ones more often) arrive at random times; each task executes for RATIO times its own
// allocation time (so allocation takes about 1/RATIO of the execution time) and is removed
// when it finishes, ahead of any placement. Requests wait in order in a queue: the head is
// sent to the design; if it is refused, it and all later requests wait until a task has been
// removed. The design decides between direct placement and defragmentation.
// Checked for every operation against a model kept here: a direct placement takes the first
// free position of the type's list; a defragmentation happens only when none is free and at
// least the task's width in columns is free; a refusal only when no position is free; tasks
// never overlap and the occupancy output agrees; the bytes through the configuration port are
// exactly the erase, allocation and move frames (cost 48 N_clb + 237 N_ram per moved task, also
// reported by the design); the state bits captured are those of the moved tasks; operations
// take no more cycles than their bytes plus a bounded overhead. At the end it prints the total
// time, the number of defragmentations, the longest queue and the utilization (columns of
// executing tasks over time), and fails if no request ever had to wait.
// Arrival times, RATIO and the request count are own choices.
module tb_reloc_schedule;
  import reloc_pkg::*;
  localparam int NS = 16;
  localparam int FB = FRAME_BYTES, FBITS = FRAME_BYTES * 8;
  localparam int NT = 5;
  localparam int NREQ = 50;
  localparam int RATIO = 3;

  logic clk = 0, rst_n = 0;
  always #10 clk = ~clk; // 50 MHz
  int checks = 0, failures = 0;
  longint now = 0;
  always @(posedge clk) now <= now + 1;

  logic ty_we, pos_we, loc_we;
  logic [TYPE_W-1:0] ty_waddr, pos_wtype;
  type_info_t ty_wdata;
  logic [POS_W-1:0] pos_widx;
  col_t pos_wdata;
  logic [LOC_AW-1:0] loc_waddr;
  loc_t loc_wdata;
  logic [CTX_AW-1:0] host_st_addr;
  logic [7:0] host_st_data;
  logic op_valid, op_ready, op_remove;
  logic [TYPE_W-1:0] op_type;
  logic [SLOT_AW-1:0] op_slot;
  logic resp_valid, resp_ok, resp_defrag;
  logic [SLOT_AW-1:0] resp_slot;
  col_t resp_pos;
  logic [DEV_COLS-1:0] occ;
  logic cp_cmd_valid, cp_cmd_ready, cp_rd_valid, cp_rd_ready, cp_wr_valid, cp_wr_ready;
  cp_cmd_t cp_cmd;
  logic [7:0] cp_rd_data, cp_wr_data;
  logic bs_req, bs_valid, bs_ready;
  logic [31:0] bs_addr;
  fbeat_t bs_beat;
  logic rep_out_valid, rep_out_ready, rep_in_valid, rep_in_ready;
  fbeat_t rep_out_beat, rep_in_beat;
  col_t rep_orig_col, rep_new_col;
  logic [NS-1:0] task_clk_en, task_rst;
  logic [31:0] n_placed, n_defrag, n_reloc, n_refused, n_removed, n_state_bits;
  logic [31:0] defrag_frames, defrag_tried, defrag_rejected;
  logic        busy;

  reloc_top dut (.*);

  tb_cfg_port_model #(.STALL(1'b0)) port (.clk, .rst_n, .cp_cmd_valid, .cp_cmd_ready, .cp_cmd,
                                          .cp_rd_valid, .cp_rd_ready, .cp_rd_data,
                                          .cp_wr_valid, .cp_wr_ready, .cp_wr_data);

  // ---- task types --------------------------------------------------------------------------
  string name  [NT] = '{"LDPC decoder", "16-bit divider", "FIR filter", "Rijndael", "S-Core CPU"};
  int    n_clb [NT] = '{1, 1, 3, 7, 19};
  int    n_ram [NT] = '{0, 0, 1, 0, 1};
  int    n_ff  [NT] = '{44, 211, 944, 788, 2287};
  int    ram_rel [NT] = '{-1, -1, 1, -1, 12};
  int    width [NT], st_bits [NT], orig [NT];

  function automatic bit is_ram(input int col); return DEV_RAM_MAP[col - 1]; endfunction

  // bitstream store: bs_addr = type << 24
  col_t bs_orig, bs_width;
  always_comb begin
    bs_orig  = col_t'(orig[bs_addr[26:24]]);
    bs_width = col_t'(width[bs_addr[26:24]]);
  end
  tb_bs_store_model store (.clk, .rst_n, .bs_req, .bs_addr, .orig_col(bs_orig), .width(bs_width),
                           .bs_valid, .bs_ready, .bs_beat);
  tb_replica_model replica (.in_valid(rep_out_valid), .in_ready(rep_out_ready), .in_beat(rep_out_beat),
                            .orig_col(rep_orig_col), .new_col(rep_new_col),
                            .out_valid(rep_in_valid), .out_ready(rep_in_ready), .out_beat(rep_in_beat));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (60000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int alloc_frames(input int t); return 22 * n_clb[t] + 86 * n_ram[t]; endfunction
  function automatic int move_frames(input int t);  return 48 * n_clb[t] + 237 * n_ram[t]; endfunction

  // feasible positions ordered by SUP weight
  int fpos [NT][$];
  task automatic make_positions();
    real p_pos [1:DEV_COLS];
    for (int t = 0; t < NT; t++)
      for (int x = 1; x + width[t] - 1 <= DEV_COLS; x++) begin
        bit ok = 1;
        for (int r = 0; r < width[t]; r++) if (is_ram(x + r) != (r == ram_rel[t])) ok = 0;
        if (ok) fpos[t].push_back(x);
      end
    for (int x = 1; x <= DEV_COLS; x++) begin
      p_pos[x] = 0.0;
      for (int t = 0; t < NT; t++) begin
        int o = 0;
        foreach (fpos[t][i]) if (fpos[t][i] <= x && x < fpos[t][i] + width[t]) o++;
        p_pos[x] += (1.0 / NT) * o / fpos[t].size();
      end
    end
    for (int t = 0; t < NT; t++) begin
      real w [$];
      foreach (fpos[t][i]) begin
        real s = 0.0;
        for (int c = fpos[t][i]; c < fpos[t][i] + width[t]; c++) s += p_pos[c] * p_pos[c];
        w.push_back($sqrt(s / width[t]));
      end
      for (int i = 1; i < fpos[t].size(); i++)
        for (int j = i; j > 0 && w[j] < w[j-1]; j--) begin
          real tw = w[j]; int tp = fpos[t][j];
          w[j] = w[j-1]; fpos[t][j] = fpos[t][j-1];
          w[j-1] = tw; fpos[t][j-1] = tp;
        end
      orig[t] = fpos[t][0];
    end
  endtask

  // state location runs: flip-flops spread over the 2 state frames of each CLB column, one run
  // for the contents of a BlockRAM column; same bits in the allocation stream
  task automatic load();
    int lb = 0;
    for (int t = 0; t < NT; t++) begin
      type_info_t ti = '0;
      int cf = 0, ab = 0, ninc;
      loc_t inc [$];
      ti.width = col_t'(width[t]); ti.n_ram = col_t'(n_ram[t]); ti.orig_col = col_t'(orig[t]);
      ti.n_pos = (POS_W+1)'(fpos[t].size()); ti.bs_addr = 32'(t) << 24;
      ti.cap_base = LOC_AW'(lb);
      st_bits[t] = 0;
      for (int rel = 0; rel < width[t]; rel++) begin
        if (rel == ram_rel[t]) begin
          loc_we = 1; loc_waddr = LOC_AW'(lb); loc_wdata = '{offset: LOC_OFS_W'(cf * FBITS), len: LOC_LEN_W'(64 * FBITS)};
          @(posedge clk); #1; lb++;
          inc.push_back('{offset: LOC_OFS_W'(ab * FBITS), len: LOC_LEN_W'(64 * FBITS)});
          st_bits[t] += 64 * FBITS;
          cf += 64; ab += 86;
        end else begin
          int k = n_ff[t] / n_clb[t] + ((rel == 0) ? n_ff[t] % n_clb[t] : 0);
          int span = 2 * FBITS / k;
          for (int i = 0; i < k; i++) begin
            int b = i * span + $urandom_range(0, span - 2);
            loc_we = 1; loc_waddr = LOC_AW'(lb); loc_wdata = '{offset: LOC_OFS_W'(cf * FBITS + b), len: LOC_LEN_W'(1)};
            @(posedge clk); #1; lb++;
            inc.push_back('{offset: LOC_OFS_W'((ab + 2 + b / FBITS) * FBITS + b % FBITS), len: LOC_LEN_W'(1)});
          end
          st_bits[t] += k;
          cf += 2; ab += 22;
        end
      end
      ti.cap_cnt = (LOC_AW+1)'(lb - int'(ti.cap_base));
      ti.inc_base = LOC_AW'(lb);
      ninc = inc.size();
      foreach (inc[i]) begin
        loc_we = 1; loc_waddr = LOC_AW'(lb); loc_wdata = inc[i];
        @(posedge clk); #1; lb++;
      end
      ti.inc_cnt = (LOC_AW+1)'(ninc);
      loc_we = 0;
      foreach (fpos[t][i]) begin
        pos_we = 1; pos_wtype = TYPE_W'(t); pos_widx = POS_W'(i); pos_wdata = col_t'(fpos[t][i]);
        @(posedge clk); #1;
      end
      pos_we = 0;
      ty_we = 1; ty_waddr = TYPE_W'(t); ty_wdata = ti;
      @(posedge clk); #1;
      ty_we = 0;
    end
  endtask

  // ---- model of the placed tasks -------------------------------------------------------------
  bit     s_valid [NS];
  int     s_type [NS], s_x [NS];
  longint s_end [NS];
  int n_direct_tb = 0, n_def_tb = 0, n_ref_tb = 0, n_rem_tb = 0, n_moved_tb = 0;

  function automatic logic [DEV_COLS-1:0] model_occ();
    logic [DEV_COLS-1:0] o = '0;
    for (int s = 0; s < NS; s++) if (s_valid[s])
      for (int c = s_x[s]; c < s_x[s] + width[s_type[s]]; c++) o[c-1] = 1'b1;
    return o;
  endfunction

  function automatic int n_running();
    int n = 0;
    for (int s = 0; s < NS; s++) n += int'(s_valid[s]);
    return n;
  endfunction

  function automatic int first_fit(input int t, input logic [DEV_COLS-1:0] o);
    foreach (fpos[t][i]) begin
      bit ok = 1;
      for (int c = fpos[t][i]; c < fpos[t][i] + width[t]; c++) if (o[c-1]) ok = 0;
      if (ok) return fpos[t][i];
    end
    return 0;
  endfunction

  // one operation; returns whether it was accepted
  task automatic operation(input bit rem, input int t, input int s, input longint exec, output bit ok);
    logic [DEV_COLS-1:0] o = model_occ();
    int ref_x = rem ? 0 : first_fit(t, o);
    int nfree = DEV_COLS - $countones(o);
    longint rd0 = port.rd_bytes, wr0 = port.wr_bytes, moved, exp_bytes = 0;
    int cyc = 0, mv_frames = 0, mv_bits = 0, frames = 0;
    logic [31:0] sb0 = n_state_bits;
    string tag = rem ? $sformatf("remove slot %0d", s) : $sformatf("place %s", name[t]);
    op_valid = 1; op_remove = rem; op_type = TYPE_W'(t); op_slot = SLOT_AW'(s);
    do @(posedge clk); while (!op_ready);
    #1; op_valid = 0;
    while (!resp_valid) begin @(posedge clk); #1; cyc++; end
    moved = (port.rd_bytes - rd0) + (port.wr_bytes - wr0);
    ok = resp_ok;
    if (rem) begin
      check(resp_ok, $sformatf("%s: accepted (design slot valid %0d type %0d at %0d, model type %0d at %0d)", tag,
                               dut.slots[s].valid, dut.slots[s].ttype, dut.slots[s].start, s_type[s], s_x[s]));
      if (!resp_ok) begin
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
      frames = alloc_frames(s_type[s]);
      s_valid[s] = 0;
      n_rem_tb++;
    end else if (!resp_ok) begin
      check(ref_x == 0 || n_running() == NS, $sformatf("%s: refused although position %0d is free", tag, ref_x));
      n_ref_tb++;
    end else begin
      int ns = int'(resp_slot);
      check(!s_valid[ns], $sformatf("%s: slot %0d was free", tag, ns));
      if (ref_x != 0) begin
        check(!resp_defrag && int'(resp_pos) == ref_x, $sformatf("%s: direct placement at %0d, got %0d", tag, ref_x, resp_pos));
        n_direct_tb++;
      end else begin
        check(resp_defrag && nfree >= width[t], $sformatf("%s: defragmentation only when needed and possible", tag));
        n_def_tb++;
      end
      for (int i = 0; i < NS; i++) if (s_valid[i] && int'(dut.slots[i].start) != s_x[i]) begin
        mv_frames += move_frames(s_type[i]);
        mv_bits   += st_bits[s_type[i]];
        s_x[i] = int'(dut.slots[i].start);
        s_end[i] += longint'(cyc); // the task was stopped while it moved
        n_moved_tb++;
      end
      if (resp_defrag)
        check(defrag_frames == 32'(mv_frames) && mv_frames > 0,
              $sformatf("%s: defragmentation cost %0d frames, moved tasks cost %0d", tag, defrag_frames, mv_frames));
      check(n_state_bits - sb0 == 32'(mv_bits), $sformatf("%s: state bits captured", tag));
      frames = alloc_frames(t) + mv_frames;
      s_valid[ns] = 1; s_type[ns] = t; s_x[ns] = int'(resp_pos); s_end[ns] = now + exec;
      begin
        bit f = 0;
        foreach (fpos[t][i]) if (fpos[t][i] == s_x[ns]) f = 1;
        check(f, $sformatf("%s: feasible position", tag));
      end
    end
    exp_bytes = longint'(frames) * FB;
    check(moved == exp_bytes, $sformatf("%s: %0d bytes through the port, expected %0d", tag, moved, exp_bytes));
    check(longint'(cyc) <= exp_bytes + 8 * frames + 6000, $sformatf("%s: %0d cycles for %0d bytes", tag, cyc, exp_bytes));
    begin
      logic [DEV_COLS-1:0] o2 = '0;
      bit overlap = 0;
      for (int i = 0; i < NS; i++) if (s_valid[i])
        for (int c = s_x[i]; c < s_x[i] + width[s_type[i]]; c++) begin
          if (o2[c-1]) overlap = 1;
          o2[c-1] = 1'b1;
        end
      check(!overlap && o2 == occ, $sformatf("%s: occupancy", tag));
    end
  endtask

  // ---- the schedule ----------------------------------------------------------------------------
  int     rq_type [NREQ];
  longint rq_arr [NREQ], rq_exec [NREQ];

  initial begin
    int head = 0, max_q = 0;
    bit blocked = 0;
    real busy_cols = 0.0;
    longint t0;
    ty_we = 0; pos_we = 0; loc_we = 0; ty_waddr = '0; pos_wtype = '0; ty_wdata = '0; pos_widx = '0;
    pos_wdata = '0; loc_waddr = '0; loc_wdata = '0; host_st_addr = '0;
    op_valid = 0; op_remove = 0; op_type = '0; op_slot = '0;
    foreach (s_valid[i]) begin s_valid[i] = 0; s_type[i] = 0; s_x[i] = 0; s_end[i] = 0; end
    for (int t = 0; t < NT; t++) width[t] = n_clb[t] + n_ram[t];
    make_positions();
    repeat (3) @(posedge clk);
    rst_n = 1; @(posedge clk); #1;
    load();
    t0 = now;
    for (int i = 0; i < NREQ; i++) begin
      // Rijndael-sized tasks are asked for more often, the rest equally
      rq_type[i] = ($urandom_range(0, 2) == 0) ? 3 : $urandom_range(0, NT - 1);
      rq_exec[i] = longint'(RATIO) * alloc_frames(rq_type[i]) * FB * $urandom_range(5, 15) / 10;
      rq_arr[i]  = (i == 0) ? t0 : rq_arr[i-1] + longint'($urandom_range(0, 40000));
      busy_cols += real'(width[rq_type[i]]) * real'(rq_exec[i]);
    end
    while (head < NREQ || n_running() != 0) begin
      int fin, q;
      bit ok;
      fin = -1; q = 0;
      for (int s = 0; s < NS; s++) if (fin < 0 && s_valid[s] && now >= s_end[s]) fin = s;
      for (int i = head; i < NREQ; i++) if (rq_arr[i] <= now) q++;
      if (q > max_q) max_q = q;
      if (fin >= 0) begin
        operation(1, s_type[fin], fin, 0, ok);
        blocked = 0;
      end else if (head < NREQ && !blocked && rq_arr[head] <= now) begin
        operation(0, rq_type[head], 0, rq_exec[head], ok);
        if (ok) head++; else blocked = 1;
      end else begin
        @(posedge clk); #1;
      end
    end
    $display("%0d requests: %0d direct placements, %0d defragmentations moving %0d tasks, %0d refusals (queued), %0d removals",
             NREQ, n_direct_tb, n_def_tb, n_moved_tb, n_ref_tb, n_rem_tb);
    $display("total time %0d cycles = %0.2f ms at 50 MHz, longest queue %0d, utilization %0.1f%%",
             now - t0, real'(now - t0) / 50.0e3, max_q, 100.0 * busy_cols / (real'(DEV_COLS) * real'(now - t0)));
    check(n_direct_tb + n_def_tb == NREQ && n_rem_tb == NREQ, "every request placed and removed");
    check(n_placed == 32'(NREQ) && n_defrag == 32'(n_def_tb) && n_reloc == 32'(n_moved_tb) &&
          n_refused == 32'(n_ref_tb) && n_removed == 32'(n_rem_tb), "design counters agree with the testbench");
    if (n_def_tb == 0) $display("note: this schedule needed no defragmentation");
    check(n_ref_tb > 0, "a request had to wait");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
