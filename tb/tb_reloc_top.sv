// End-to-end testbench of the relocation system at its default size: 78-column device
// (BlockRAM at 7, 20, 33, 46, 59, 72), 824-byte frames, 16 slots, 8 task types.
// Around the design: a behavioural configuration port with configuration memory, a bitstream
// store and a bitstream relocation filter model.
// Task types (all sizes chosen here): A = 10 CLB columns, B = CLB + BlockRAM + CLB (its
// context includes the 64 BlockRAM content frames), C = 2 CLB columns. Feasible positions are
// those where the type's column pattern recurs; they are ordered by the SUP position weight
// computed here with equal allocation probabilities. State location lists are random runs.
// The schedule: five A, six C (the device is then fragmented), a C that only fits after
// defragmentation (an A is moved), B requests, an A refused for lack of columns, removals,
// and requests after them. After each operation the configuration memory is checked: every
// moved task's preset bits at its new column hold exactly the state read back at its old
// column (the tb changes those states ahead of each operation, as a running task would), every
// other byte of its frames is the pre-implemented bitstream, the bytes moved through the port
// equal (48 N_clb + 237 N_ram) frames per moved task plus (22 N_clb + 86 N_ram) for the new
// one, and the operation takes no more cycles than bytes moved plus a small overhead.
// Counted mechanisms: direct placement, defragmentation, relocation, refusal, removal,
// BlockRAM context capture, run-boundary stalls in both filters, configuration port stalls.
module tb_reloc_top;
  import reloc_pkg::*;
  localparam int NT = 8, NS = 16;
  localparam int FB = FRAME_BYTES, FBITS = FRAME_BYTES * 8;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

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
    .cp_rd_valid, .cp_rd_ready, .cp_rd_data, .cp_wr_valid, .cp_wr_ready, .cp_wr_data);

  // bitstream store: bs_addr = type << 24
  col_t bs_orig, bs_width;
  int   t_width [3], t_orig [3], t_nram [3];
  always_comb begin
    bs_orig  = col_t'(t_orig[bs_addr[25:24]]);
    bs_width = col_t'(t_width[bs_addr[25:24]]);
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
    repeat (20000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- mechanism counters from inside the design ---------------------------------------------
  int n_sef_hold = 0, n_sif_hold = 0, n_port_stall = 0, n_ram_cap = 0, n_task_rst = 0;
  always @(posedge clk) if (rst_n) begin
    n_task_rst += $countones(task_rst);
    if (dut.u_sef.in_valid && dut.u_sef.hold) n_sef_hold++;
    if (dut.u_sif.in_valid && dut.u_sif.hold && dut.u_sif.active) n_sif_hold++;
    if (bs_valid && !bs_ready && dut.u_sif.active) n_port_stall++;
    if (cp_cmd_valid && cp_cmd_ready && cp_cmd.op == CP_READ && cp_cmd.nframes == 7'd64) n_ram_cap++;
  end

  // ---- task types ----------------------------------------------------------------------------
  // column pattern of each type: 1 = BlockRAM column
  function automatic bit is_ram(input int col); return DEV_RAM_MAP[col - 1]; endfunction
  function automatic bit type_ram(input int t, input int rel); return (t == 1) && (rel == 1); endfunction

  int  fpos [3][$];
  real p_pos [1:DEV_COLS];

  task automatic make_positions();
    for (int t = 0; t < 3; t++) begin
      fpos[t].delete();
      for (int x = 1; x + t_width[t] - 1 <= DEV_COLS; x++) begin
        bit ok = 1;
        for (int r = 0; r < t_width[t]; r++) if (is_ram(x + r) != type_ram(t, r)) ok = 0;
        if (ok) fpos[t].push_back(x);
      end
    end
    // static utilization probability, equal allocation probabilities
    for (int x = 1; x <= DEV_COLS; x++) begin
      p_pos[x] = 0.0;
      for (int t = 0; t < 3; t++) begin
        int o = 0;
        foreach (fpos[t][i]) if (fpos[t][i] <= x && x < fpos[t][i] + t_width[t]) o++;
        p_pos[x] += (1.0 / 3.0) * o / fpos[t].size();
      end
    end
    // order by ascending weight (root mean square), stable
    for (int t = 0; t < 3; t++) begin
      real w [$];
      foreach (fpos[t][i]) begin
        real s = 0.0;
        for (int c = fpos[t][i]; c < fpos[t][i] + t_width[t]; c++) s += p_pos[c] * p_pos[c];
        w.push_back($sqrt(s / t_width[t]));
      end
      for (int i = 1; i < fpos[t].size(); i++)
        for (int j = i; j > 0 && w[j] < w[j-1]; j--) begin
          real tw = w[j]; int tp = fpos[t][j];
          w[j] = w[j-1]; fpos[t][j] = fpos[t][j-1];
          w[j-1] = tw; fpos[t][j-1] = tp;
        end
    end
  endtask

  // state location runs of each type: capture stream offsets and allocation stream offsets
  typedef struct { int ofs; int len; } run_t;
  run_t cap_runs [3][$], inc_runs [3][$];

  function automatic int cap_frames(input int t);
    int n = 0;
    for (int r = 0; r < t_width[t]; r++) n += type_ram(t, r) ? 64 : 2;
    return n;
  endfunction

  // frame of the capture stream / allocation stream -> {relative column, minor}
  function automatic void cap_frame(input int t, input int f, output int rel, output int minor);
    for (rel = 0; rel < t_width[t]; rel++) begin
      int n = type_ram(t, rel) ? 64 : 2;
      if (f < n) begin minor = type_ram(t, rel) ? f : 2 + f; return; end
      f -= n;
    end
  endfunction
  function automatic void alloc_frame(input int t, input int f, output int rel, output int minor);
    for (rel = 0; rel < t_width[t]; rel++) begin
      int n = type_ram(t, rel) ? 86 : 22;
      if (f < n) begin minor = f; return; end
      f -= n;
    end
  endfunction

  // random single-bit and short runs between lo and hi (bits), appended to q; returns bits
  function automatic int add_runs(ref run_t q [$], input int lo, input int hi, input int n, input int lens []);
    int pos = lo, k = 0;
    int span = (hi - lo) / (n + 1);
    for (int i = 0; i < n; i++) begin
      int gap = ($urandom_range(0, 3) == 0) ? $urandom_range(0, 3) : $urandom_range(8, span);
      pos += gap;
      q.push_back('{pos, lens[i]});
      pos += lens[i];
      k += lens[i];
    end
    return k;
  endfunction

  task automatic make_runs();
    for (int t = 0; t < 3; t++) begin
      int n = (t == 0) ? 60 : 12;
      int lens [] = new[n];
      int lens2 [] = new[n];
      foreach (lens[i]) begin lens[i] = ($urandom_range(0, 4) == 0) ? $urandom_range(2, 9) : 1; lens2[i] = lens[i]; end
      cap_runs[t].delete(); inc_runs[t].delete();
      if (t == 1) begin
        // B: flip-flops in its first CLB column, the whole BlockRAM content, flip-flops in the last
        int h = n / 2;
        int l1 [] = new[h], l2 [] = new[n - h];
        foreach (l1[i]) l1[i] = lens[i];
        foreach (l2[i]) l2[i] = lens[h + i];
        void'(add_runs(cap_runs[t], 0, 2 * FBITS - 16, h, l1));
        cap_runs[t].push_back('{2 * FBITS, 64 * FBITS});
        void'(add_runs(cap_runs[t], 66 * FBITS, 68 * FBITS - 16, n - h, l2));
        void'(add_runs(inc_runs[t], 0, 22 * FBITS - 16, h, l1));
        inc_runs[t].push_back('{22 * FBITS + 5 * FBITS, 64 * FBITS});
        void'(add_runs(inc_runs[t], 108 * FBITS, 130 * FBITS - 16, n - h, l2));
      end else begin
        void'(add_runs(cap_runs[t], 0, cap_frames(t) * FBITS - 16, n, lens));
        void'(add_runs(inc_runs[t], 0, t_width[t] * 22 * FBITS - 16, n, lens2));
      end
    end
  endtask

  // ---- expected state of a placed task, read from configuration memory -----------------------
  function automatic bit mem_bit(input int col, input int minor, input int bitofs);
    logic [7:0] b = port.peek(col, minor, bitofs / 8);
    return b[bitofs % 8];
  endfunction

  typedef bit bitq_t [$];
  function automatic bitq_t read_states(input int t, input int x);
    bitq_t q;
    foreach (cap_runs[t][i])
      for (int b = cap_runs[t][i].ofs; b < cap_runs[t][i].ofs + cap_runs[t][i].len; b++) begin
        int rel, minor;
        cap_frame(t, b / FBITS, rel, minor);
        q.push_back(mem_bit(x + rel, minor, b % FBITS));
      end
    return q;
  endfunction

  // a running task changes its flip-flops and memory
  task automatic disturb(input int t, input int x);
    foreach (cap_runs[t][i]) begin
      int b0 = cap_runs[t][i].ofs, b1 = b0 + cap_runs[t][i].len;
      for (int by = b0 / 8; by <= (b1 - 1) / 8; by += (b1 - b0 > 4096) ? 61 : 1) begin
        int rel, minor;
        cap_frame(t, by / FB, rel, minor);
        port.poke(x + rel, minor, by % FB, 8'($urandom));
      end
    end
  endtask

  // check a task's frames at column x: preset bits = states, all other bits = its bitstream
  function automatic int verify(input int t, input int x, input bitq_t st, input bit with_states);
    int bad = 0, k = 0, ri = 0;
    int nfr = 0;
    for (int r = 0; r < t_width[t]; r++) nfr += type_ram(t, r) ? 86 : 22;
    for (int f = 0; f < nfr; f++) begin
      int rel, minor;
      alloc_frame(t, f, rel, minor);
      for (int by = 0; by < FB; by++) begin
        logic [7:0] e = store.pattern(32'(t) << 24, rel, minor, by);
        logic [7:0] g = port.peek(x + rel, minor, by);
        for (int k8 = 0; k8 < 8; k8++) begin
          int b = (f * FB + by) * 8 + k8;
          while (ri < inc_runs[t].size() && b >= inc_runs[t][ri].ofs + inc_runs[t][ri].len) ri++;
          if (with_states && ri < inc_runs[t].size() && b >= inc_runs[t][ri].ofs) begin
            e[k8] = st[k];
            k++;
          end
        end
        if (e != g) bad++;
      end
    end
    if (with_states && k != st.size()) bad++;
    return bad;
  endfunction

  // ---- bookkeeping of placed tasks -----------------------------------------------------------
  int  s_type [NS], s_x [NS];
  bit  s_valid [NS];
  int  b_placed, b_defrag, b_reloc, b_refused, b_removed;
  int  n_direct_tb = 0, n_def_tb = 0, n_ref_tb = 0, n_rem_tb = 0, n_moved_tb = 0;

  task automatic operation(input bit rem, input int t, input int s, input string tag);
    bitq_t snap [NS];
    longint rd0 = port.rd_bytes, wr0 = port.wr_bytes, moved, expect_bytes = 0;
    int cyc = 0, nacc = 0, mv_frames = 0;
    // running tasks change their state; remember what a capture must see
    for (int i = 0; i < NS; i++) if (s_valid[i]) begin
      disturb(s_type[i], s_x[i]);
      snap[i] = read_states(s_type[i], s_x[i]);
    end
    op_valid = 1; op_remove = rem; op_type = TYPE_W'(t); op_slot = SLOT_AW'(s);
    do @(posedge clk); while (!op_ready);
    #1; op_valid = 0;
    while (!resp_valid) begin @(posedge clk); #1; cyc++; end
    moved = (port.rd_bytes - rd0) + (port.wr_bytes - wr0);
    @(posedge clk); #1;
    check(!busy, $sformatf("%s: idle after the response", tag));
    if (rem) begin
      if (resp_ok) begin
        n_rem_tb++;
        expect_bytes = 0;
        for (int r = 0; r < t_width[s_type[s]]; r++) expect_bytes += (type_ram(s_type[s], r) ? 86 : 22) * FB;
        s_valid[s] = 0;
        check(port.peek(s_x[s], 0, 0) == 8'h00 && port.peek(s_x[s] + t_width[s_type[s]] - 1, 21, FB - 1) == 8'h00,
              $sformatf("%s: columns erased", tag));
      end
    end else if (!resp_ok) begin
      n_ref_tb++;
    end else begin
      int ns = int'(resp_slot);
      check(!s_valid[ns], $sformatf("%s: slot %0d was free", tag, ns));
      if (resp_defrag) n_def_tb++; else n_direct_tb++;
      // moved tasks
      for (int i = 0; i < NS; i++) if (s_valid[i] && int'(dut.slots[i].start) != s_x[i]) begin
        int nx = int'(dut.slots[i].start);
        int bad = verify(s_type[i], nx, snap[i], 1);
        check(resp_defrag, $sformatf("%s: task in slot %0d moved only with defragmentation", tag, i));
        check(bad == 0, $sformatf("%s: slot %0d moved %0d->%0d, %0d bytes differ from bitstream + saved state", tag, i, s_x[i], nx, bad));
        check(task_clk_en[i], $sformatf("%s: moved task runs again", tag));
        for (int r = 0; r < t_width[s_type[i]]; r++) begin
          expect_bytes += (type_ram(s_type[i], r) ? 237 : 48) * FB;
          mv_frames    += type_ram(s_type[i], r) ? 237 : 48;
        end
        s_x[i] = nx;
        n_moved_tb++;
        nacc++;
      end
      if (resp_defrag)
        check(defrag_frames == 32'(mv_frames),
              $sformatf("%s: defragmentation cost %0d frames, moved tasks cost %0d", tag, defrag_frames, mv_frames));
      s_valid[ns] = 1; s_type[ns] = t; s_x[ns] = int'(resp_pos);
      check(int'(dut.slots[ns].start) == s_x[ns] && dut.slots[ns].valid, $sformatf("%s: slot table", tag));
      check(verify(t, s_x[ns], snap[ns], 0) == 0, $sformatf("%s: new task configured at %0d", tag, s_x[ns]));
      for (int r = 0; r < t_width[t]; r++) expect_bytes += (type_ram(t, r) ? 86 : 22) * FB;
      // it must sit on one of its feasible positions
      begin
        bit f = 0;
        foreach (fpos[t][i]) if (fpos[t][i] == s_x[ns]) f = 1;
        check(f, $sformatf("%s: feasible position", tag));
      end
    end
    check(moved == expect_bytes, $sformatf("%s: %0d bytes through the port, expected %0d", tag, moved, expect_bytes));
    check(cyc <= int'(expect_bytes) + 2000 + 40 * 8 * 20, $sformatf("%s: %0d cycles for %0d bytes", tag, cyc, expect_bytes));
    // no two tasks overlap and occ agrees
    begin
      logic [DEV_COLS-1:0] o = '0;
      bit overlap = 0;
      for (int i = 0; i < NS; i++) if (s_valid[i])
        for (int c = s_x[i]; c < s_x[i] + t_width[s_type[i]]; c++) begin
          if (o[c-1]) overlap = 1;
          o[c-1] = 1'b1;
        end
      check(!overlap && o == occ, $sformatf("%s: occupancy", tag));
    end
    $display("%s: ok=%0d slot=%0d pos=%0d defrag=%0d moved=%0d, %0d bytes, %0d cycles", tag, resp_ok, resp_slot,
             resp_pos, resp_defrag, nacc, moved, cyc);
    @(posedge clk); #1;
  endtask

  // ---- configuration of the database ---------------------------------------------------------
  task automatic load();
    int lb = 0;
    for (int t = 0; t < 3; t++) begin
      type_info_t ti = '0;
      ti.width = col_t'(t_width[t]); ti.n_ram = col_t'(t_nram[t]); ti.orig_col = col_t'(t_orig[t]);
      ti.n_pos = (POS_W+1)'(fpos[t].size()); ti.bs_addr = 32'(t) << 24;
      ti.cap_base = LOC_AW'(lb); ti.cap_cnt = (LOC_AW+1)'(cap_runs[t].size());
      foreach (cap_runs[t][i]) begin
        loc_we = 1; loc_waddr = LOC_AW'(lb); loc_wdata = '{offset: LOC_OFS_W'(cap_runs[t][i].ofs), len: LOC_LEN_W'(cap_runs[t][i].len)};
        @(posedge clk); #1; lb++;
      end
      ti.inc_base = LOC_AW'(lb); ti.inc_cnt = (LOC_AW+1)'(inc_runs[t].size());
      foreach (inc_runs[t][i]) begin
        loc_we = 1; loc_waddr = LOC_AW'(lb); loc_wdata = '{offset: LOC_OFS_W'(inc_runs[t][i].ofs), len: LOC_LEN_W'(inc_runs[t][i].len)};
        @(posedge clk); #1; lb++;
      end
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

  initial begin
    ty_we = 0; pos_we = 0; loc_we = 0; ty_waddr = '0; pos_wtype = '0; ty_wdata = '0; pos_widx = '0;
    pos_wdata = '0; loc_waddr = '0; loc_wdata = '0; host_st_addr = '0;
    op_valid = 0; op_remove = 0; op_type = '0; op_slot = '0;
    foreach (s_valid[i]) begin s_valid[i] = 0; s_type[i] = 0; s_x[i] = 0; end
    t_width = '{10, 3, 2}; t_nram = '{0, 1, 0}; t_orig = '{8, 6, 1};
    make_positions();
    make_runs();
    check(fpos[0].size() == 15 && fpos[1].size() == 6, "feasible positions of A and B");
    repeat (3) @(posedge clk);
    rst_n = 1; @(posedge clk); #1;
    load();
    for (int i = 0; i < 5; i++) operation(0, 0, 0, $sformatf("place A%0d", i));
    for (int i = 0; i < 6; i++) operation(0, 2, 0, $sformatf("place C%0d", i));
    operation(0, 2, 0, "place C after fragmentation");
    operation(0, 1, 0, "place B0");
    operation(0, 1, 0, "place B1");
    operation(0, 0, 0, "place A (too few columns)");
    for (int s = 0; s < NS; s++) if (s_valid[s] && s_type[s] == 0) begin operation(1, 0, s, $sformatf("remove slot %0d", s)); break; end
    operation(1, 0, 15, "remove empty slot");
    operation(0, 1, 0, "place B2");
    operation(0, 2, 0, "place C again");
    // phase 2: restart with an empty device filled by B and A tasks first
    b_placed = n_placed; b_defrag = n_defrag; b_reloc = n_reloc; b_refused = n_refused; b_removed = n_removed;
    rst_n = 0; @(posedge clk); #1; rst_n = 1; @(posedge clk); #1;
    foreach (s_valid[i]) s_valid[i] = 0;
    load();
    for (int i = 0; i < 5; i++) operation(0, 1, 0, $sformatf("phase 2: place B%0d", i));
    for (int i = 0; i < 5; i++) operation(0, 0, 0, $sformatf("phase 2: place A%0d", i));
    for (int i = 0; i < 6 && n_refused == 0; i++) operation(0, 2, 0, $sformatf("phase 2: place C%0d", i));
    // the state of a moved task is also in its context area of the database
    check(n_state_bits > 0, "state bits captured");
    // every mechanism happened
    $display("direct placements %0d, defragmentations %0d, relocations %0d, refusals %0d, removals %0d",
             n_direct_tb, n_def_tb, n_moved_tb, n_ref_tb, n_rem_tb);
    $display("BlockRAM captures %0d, extraction run stalls %0d, inclusion run stalls %0d, bitstream stalls %0d",
             n_ram_cap, n_sef_hold, n_sif_hold, n_port_stall);
    $display("defragmentation positions since the last reset: %0d solved, %0d rejected", defrag_tried, defrag_rejected);
    check(n_ram_cap > 0, "BlockRAM context captured");
    check(defrag_tried > 0, "defragmentation found a solution at some position");
    check(n_task_rst == n_direct_tb + n_def_tb + n_moved_tb,
          $sformatf("%0d task reset pulses, one per allocation expected", n_task_rst));
    check(b_placed + n_placed == n_direct_tb + n_def_tb && b_defrag + n_defrag == n_def_tb &&
          b_reloc + n_reloc == n_moved_tb && b_refused + n_refused == n_ref_tb &&
          b_removed + n_removed == n_rem_tb, "design counters agree with the testbench");
    check(n_direct_tb > 0, "direct placement happened");
    check(n_def_tb > 0, "defragmentation happened");
    check(n_moved_tb > 0, "relocation happened");
    check(n_ref_tb > 0, "refusal happened");
    check(n_rem_tb > 0, "removal happened");
    check(n_sef_hold > 0 && n_sif_hold > 0, "run-boundary stalls happened in both filters");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
