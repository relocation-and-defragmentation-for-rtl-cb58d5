// Workload testbench: relocation of five example hardware tasks of realistic size through the
// whole system at its default parameters (78-column device, 824-byte frames).
// Task sizes (CLB / BlockRAM columns, flip-flops in use): LDPC decoder 1/0 with 44, 16-bit
// divider 1/0 with 211, FIR filter 3/1 with 944 plus its BlockRAM contents, Rijndael 7/0 with
// 788, S-Core CPU 19/0 with 2287. On this device map no 19 adjacent CLB columns exist, so the
// S-Core type spans 20 columns, one of them a BlockRAM column, and its move also carries that
// column's contents.
// For each task, after a reset: the task is placed at the first of its two feasible positions;
// a one-column task whose only position lies inside it is then requested. Placement fails, a
// defragmentation moves the big task to its second position, and the small one is allocated.
// Checked per task: the move was a defragmentation with cost (48 N_clb + 237 N_ram) frames;
// the bytes read back are (4 N_clb + 65 N_ram) * 824; all bytes through the port are the move
// plus 22 frames for the small task; the operation takes no more cycles than those bytes plus
// at most 8 cycles per frame (one byte per cycle); the state bits captured are the task's flip-flops (and
// BlockRAM bits); the task at its new column holds its old state in its preset bits and the
// pre-implemented bitstream everywhere else; its old columns are erased. The time at one byte
// per cycle and 50 MHz is printed next to the worst-case estimate of the cost formula.
// Flip-flop positions within the state frames are random (own choice).
module tb_reloc_table1;
  import reloc_pkg::*;
  localparam int NS = 16;
  localparam int FB = FRAME_BYTES, FBITS = FRAME_BYTES * 8;
  localparam int NTASK = 5;

  logic clk = 0, rst_n = 0;
  always #10 clk = ~clk; // 50 MHz
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
                                          .cp_rd_valid, .cp_rd_ready, .cp_rd_data,
                                          .cp_wr_valid, .cp_wr_ready, .cp_wr_data);

  // bitstream store: type 0 = the big task, type 1 = the one-column task
  col_t bs_orig, bs_width;
  int   t_width [2], t_orig [2];
  always_comb begin
    bs_orig  = col_t'(t_orig[bs_addr[24]]);
    bs_width = col_t'(t_width[bs_addr[24]]);
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
    repeat (8000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- the example tasks ---------------------------------------------------------------------
  string name  [NTASK] = '{"LDPC decoder", "16-bit divider", "FIR filter", "Rijndael", "S-Core CPU"};
  int    n_clb [NTASK] = '{1, 1, 3, 7, 19};
  int    n_ram [NTASK] = '{0, 0, 1, 0, 1};
  int    n_ff  [NTASK] = '{44, 211, 944, 788, 2287};
  real   est_ms[NTASK] = '{0.8, 0.8, 6.3, 5.5, 15.0}; // (48 N_clb + 237 N_ram) * 824 B / 50 MHz, CLB/RAM as listed above with S-Core 19/0

  function automatic bit is_ram(input int col); return DEV_RAM_MAP[col - 1]; endfunction

  // column pattern of the big task: BlockRAM at relative column 1 for the FIR filter, at 12
  // for the S-Core (it starts right after a BlockRAM column)
  int ram_rel, n_ram_cur;
  function automatic bit rel_ram(input int rel); return n_ram_cur > 0 && rel == ram_rel; endfunction

  int fpos [$];
  task automatic make_positions();
    fpos.delete();
    for (int x = 1; x + t_width[0] - 1 <= DEV_COLS; x++) begin
      bit ok = 1;
      for (int r = 0; r < t_width[0]; r++) if (is_ram(x + r) != rel_ram(r)) ok = 0;
      if (ok) fpos.push_back(x);
    end
  endtask

  // capture stream: per column 2 state frames (minors 2, 3) or 64 content frames (minors 0..63);
  // allocation stream: per column 22 or 86 frames, minor = frame within the column
  function automatic void cap_frame(input int f, output int rel, output int minor);
    for (rel = 0; rel < t_width[0]; rel++) begin
      int n = rel_ram(rel) ? 64 : 2;
      if (f < n) begin minor = rel_ram(rel) ? f : 2 + f; return; end
      f -= n;
    end
  endfunction
  function automatic int alloc_base(input int rel);
    int n = 0;
    for (int r = 0; r < rel; r++) n += rel_ram(r) ? 86 : 22;
    return n;
  endfunction

  // state bits of the big task as bit offsets into the capture stream and the allocation stream
  typedef struct { int ofs; int len; } run_t;
  run_t cap_runs [$], inc_runs [$];
  int   state_bits;

  task automatic make_runs(input int t);
    int cf = 0;
    cap_runs.delete(); inc_runs.delete(); state_bits = 0;
    for (int rel = 0; rel < t_width[0]; rel++) begin
      if (rel_ram(rel)) begin
        cap_runs.push_back('{cf * FBITS, 64 * FBITS});
        inc_runs.push_back('{alloc_base(rel) * FBITS, 64 * FBITS});
        state_bits += 64 * FBITS;
        cf += 64;
      end else begin
        // this column's share of the flip-flops in use, at distinct random bits of its 2 frames
        int k = n_ff[t] / n_clb[t] + ((rel == 0) ? n_ff[t] % n_clb[t] : 0);
        int span = 2 * FBITS / k;
        for (int i = 0; i < k; i++) begin
          int b = i * span + $urandom_range(0, span - 2);
          int minor = 2 + b / FBITS;
          cap_runs.push_back('{cf * FBITS + b, 1});
          inc_runs.push_back('{(alloc_base(rel) + minor) * FBITS + b % FBITS, 1});
        end
        state_bits += k;
        cf += 2;
      end
    end
  endtask

  function automatic bit mem_bit(input int col, input int minor, input int bitofs);
    logic [7:0] b = port.peek(col, minor, bitofs / 8);
    return b[bitofs % 8];
  endfunction

  typedef bit bitq_t [$];
  function automatic bitq_t read_states(input int x);
    bitq_t q;
    foreach (cap_runs[i])
      for (int b = cap_runs[i].ofs; b < cap_runs[i].ofs + cap_runs[i].len; b++) begin
        int rel, minor;
        cap_frame(b / FBITS, rel, minor);
        q.push_back(mem_bit(x + rel, minor, b % FBITS));
      end
    return q;
  endfunction

  // the running task changes its flip-flops and memory
  task automatic disturb(input int x);
    foreach (cap_runs[i]) begin
      int b0 = cap_runs[i].ofs, b1 = b0 + cap_runs[i].len;
      for (int by = b0 / 8; by <= (b1 - 1) / 8; by++) begin
        int rel, minor;
        cap_frame(by / FB, rel, minor);
        port.poke(x + rel, minor, by % FB, 8'($urandom));
      end
    end
  endtask

  // frames of the big task at column x: preset bits = states, all other bits = its bitstream
  function automatic int verify(input int x, input bitq_t st);
    int bad = 0, k = 0, ri = 0;
    for (int rel = 0; rel < t_width[0]; rel++)
      for (int minor = 0; minor < (rel_ram(rel) ? 86 : 22); minor++) begin
        int f = alloc_base(rel) + minor;
        for (int by = 0; by < FB; by++) begin
          logic [7:0] e = store.pattern(32'h0, rel, minor, by);
          logic [7:0] g = port.peek(x + rel, minor, by);
          for (int k8 = 0; k8 < 8; k8++) begin
            int b = (f * FB + by) * 8 + k8;
            while (ri < inc_runs.size() && b >= inc_runs[ri].ofs + inc_runs[ri].len) ri++;
            if (ri < inc_runs.size() && b >= inc_runs[ri].ofs) begin
              e[k8] = st[k];
              k++;
            end
          end
          if (e != g) bad++;
        end
      end
    if (k != st.size()) bad++;
    return bad;
  endfunction

  // ---- host side -------------------------------------------------------------------------------
  task automatic write_type(input int t, input type_info_t ti);
    ty_we = 1; ty_waddr = TYPE_W'(t); ty_wdata = ti;
    @(posedge clk); #1;
    ty_we = 0;
  endtask

  task automatic write_pos(input int t, input int i, input int x);
    pos_we = 1; pos_wtype = TYPE_W'(t); pos_widx = POS_W'(i); pos_wdata = col_t'(x);
    @(posedge clk); #1;
    pos_we = 0;
  endtask

  task automatic load(input int x1, input int x2, input int xk);
    type_info_t ti = '0;
    int lb = 0;
    ti.width = col_t'(t_width[0]); ti.n_ram = col_t'(n_ram_cur); ti.orig_col = col_t'(x1);
    ti.n_pos = (POS_W+1)'(2); ti.bs_addr = 32'h0;
    ti.cap_base = LOC_AW'(lb); ti.cap_cnt = (LOC_AW+1)'(cap_runs.size());
    foreach (cap_runs[i]) begin
      loc_we = 1; loc_waddr = LOC_AW'(lb); loc_wdata = '{offset: LOC_OFS_W'(cap_runs[i].ofs), len: LOC_LEN_W'(cap_runs[i].len)};
      @(posedge clk); #1; lb++;
    end
    ti.inc_base = LOC_AW'(lb); ti.inc_cnt = (LOC_AW+1)'(inc_runs.size());
    foreach (inc_runs[i]) begin
      loc_we = 1; loc_waddr = LOC_AW'(lb); loc_wdata = '{offset: LOC_OFS_W'(inc_runs[i].ofs), len: LOC_LEN_W'(inc_runs[i].len)};
      @(posedge clk); #1; lb++;
    end
    loc_we = 0;
    write_pos(0, 0, x1);
    write_pos(0, 1, x2);
    write_type(0, ti);
    ti = '0;
    ti.width = 1; ti.orig_col = col_t'(xk); ti.n_pos = 1; ti.bs_addr = 32'h0100_0000;
    write_pos(1, 0, xk);
    write_type(1, ti);
  endtask

  task automatic request(input int t, output int cyc);
    cyc = 0;
    op_valid = 1; op_remove = 0; op_type = TYPE_W'(t); op_slot = '0;
    do @(posedge clk); while (!op_ready);
    #1; op_valid = 0;
    while (!resp_valid) begin @(posedge clk); #1; cyc++; end
  endtask

  int n_moves = 0, n_ram_moves = 0;

  initial begin
    ty_we = 0; pos_we = 0; loc_we = 0; ty_waddr = '0; pos_wtype = '0; ty_wdata = '0; pos_widx = '0;
    pos_wdata = '0; loc_waddr = '0; loc_wdata = '0; host_st_addr = '0;
    op_valid = 0; op_remove = 0; op_type = '0; op_slot = '0;
    for (int t = 0; t < NTASK; t++) begin
      int x1, x2, xk, cyc;
      longint rd0, wr0, rd, moved, exp_rd, exp_moved, frames;
      bitq_t snap;
      n_ram_cur  = n_ram[t];
      t_width[0] = n_clb[t] + n_ram[t];
      t_width[1] = 1;
      ram_rel    = (t_width[0] > 12) ? 12 : 1;
      make_positions();
      check(fpos.size() >= 2, $sformatf("%s: two feasible positions on the device", name[t]));
      x1 = fpos[0]; x2 = fpos[fpos.size() - 1];
      xk = x1 + (rel_ram(0) ? 1 : 0);
      t_orig[0] = x1; t_orig[1] = xk;
      make_runs(t);
      // fresh system for each task
      rst_n = 0; repeat (2) @(posedge clk); #1; rst_n = 1; @(posedge clk); #1;
      load(x1, x2, xk);
      // place the task
      request(0, cyc);
      check(resp_ok && !resp_defrag && int'(resp_pos) == x1, $sformatf("%s: placed at %0d", name[t], x1));
      // let it run, then ask for the small task inside it
      disturb(x1);
      snap = read_states(x1);
      check(snap.size() == state_bits, $sformatf("%s: %0d state bits", name[t], state_bits));
      rd0 = port.rd_bytes; wr0 = port.wr_bytes;
      request(1, cyc);
      rd    = port.rd_bytes - rd0;
      moved = rd + (port.wr_bytes - wr0);
      frames    = 48 * n_clb[t] + 237 * n_ram[t];
      exp_rd    = longint'(4 * n_clb[t] + 65 * n_ram[t]) * FB;
      exp_moved = (frames + 22) * FB;
      check(resp_ok && resp_defrag && int'(resp_pos) == xk, $sformatf("%s: small task placed by defragmentation", name[t]));
      check(int'(dut.slots[0].start) == x2, $sformatf("%s: moved to %0d", name[t], x2));
      check(defrag_frames == 32'(frames), $sformatf("%s: cost %0d frames, expected %0d", name[t], defrag_frames, frames));
      check(rd == exp_rd, $sformatf("%s: %0d bytes read back, expected %0d", name[t], rd, exp_rd));
      check(moved == exp_moved, $sformatf("%s: %0d bytes through the port, expected %0d", name[t], moved, exp_moved));
      // one byte per cycle plus a few cycles per frame for commands and frame boundaries
      check(longint'(cyc) <= exp_moved + 8 * (frames + 22) + 200,
            $sformatf("%s: %0d cycles for %0d bytes in %0d frames", name[t], cyc, exp_moved, frames + 22));
      check(n_state_bits == 32'(state_bits), $sformatf("%s: %0d state bits captured, expected %0d", name[t], n_state_bits, state_bits));
      check(verify(x2, snap) == 0, $sformatf("%s: state and bitstream at the new column", name[t]));
      check(t_width[0] == 1 || port.peek(x1 + t_width[0] - 1, 0, 0) == 8'h00, $sformatf("%s: old columns erased", name[t]));
      check(task_clk_en[0] && task_clk_en[1], $sformatf("%s: both tasks run", name[t]));
      $display("%-15s %2d CLB / %0d BlockRAM columns: read %7d B, moved %7d B in %7d cycles = %5.2f ms at 50 MHz (estimate for the listed size %4.1f ms)",
               name[t], n_clb[t], n_ram[t], rd, moved - 22 * FB, cyc, real'(moved - 22 * FB) / 50.0e3, est_ms[t]);
      n_moves++;
      if (n_ram[t] > 0) n_ram_moves++;
    end
    check(n_moves == NTASK && n_ram_moves > 0, "every task moved, one with BlockRAM contents");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
