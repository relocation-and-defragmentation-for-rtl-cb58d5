// Testbench of the Configuration Manager, against a behavioural configuration port.
// 1) State capture of columns 4..8 of the default device (column 7 is BlockRAM): every byte
//    handed on must equal the configuration memory at the expected {column, minor, byte},
//    with correct frame tags; pad frames must not appear; the port must have sent
//    (4 * 4 + 65 * 1) * 824 bytes in 9 read accesses, and without stalls the capture must take
//    no more than those bytes plus 2 cycles per access.
// 2) The same capture with random stalls on both sides.
// 3) Erase of columns 6..8: 22 + 86 + 22 zero frames at the right addresses.
// 4) Write of a tagged frame stream: each frame lands at its own address.
module tb_config_manager;
  import reloc_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic       start_cap, start_del, start_wr;
  col_t       col_first, col_last;
  logic       busy, done;
  logic       cp_cmd_valid, cp_cmd_ready;
  cp_cmd_t    cp_cmd;
  logic       cp_rd_valid, cp_rd_ready;
  logic [7:0] cp_rd_data;
  logic       cp_wr_valid, cp_wr_ready;
  logic [7:0] cp_wr_data;
  logic       rb_valid, rb_ready;
  fbeat_t     rb_beat;
  logic       wr_valid, wr_ready;
  fbeat_t     wr_beat;

  config_manager dut (.*);

  // two port models; the second one stalls
  logic stall_sel;
  logic cmd_ready0, cmd_ready1, rd_valid0, rd_valid1, wr_ready0, wr_ready1;
  logic [7:0] rd_data0, rd_data1;
  tb_cfg_port_model #(.STALL(1'b0)) port0 (.clk, .rst_n, .cp_cmd_valid(cp_cmd_valid && !stall_sel),
    .cp_cmd_ready(cmd_ready0), .cp_cmd, .cp_rd_valid(rd_valid0), .cp_rd_ready(cp_rd_ready && !stall_sel),
    .cp_rd_data(rd_data0), .cp_wr_valid(cp_wr_valid && !stall_sel), .cp_wr_ready(wr_ready0), .cp_wr_data);
  tb_cfg_port_model #(.STALL(1'b1)) port1 (.clk, .rst_n, .cp_cmd_valid(cp_cmd_valid && stall_sel),
    .cp_cmd_ready(cmd_ready1), .cp_cmd, .cp_rd_valid(rd_valid1), .cp_rd_ready(cp_rd_ready && stall_sel),
    .cp_rd_data(rd_data1), .cp_wr_valid(cp_wr_valid && stall_sel), .cp_wr_ready(wr_ready1), .cp_wr_data);
  assign cp_cmd_ready = stall_sel ? cmd_ready1 : cmd_ready0;
  assign cp_rd_valid  = stall_sel ? rd_valid1  : rd_valid0;
  assign cp_rd_data   = stall_sel ? rd_data1   : rd_data0;
  assign cp_wr_ready  = stall_sel ? wr_ready1  : wr_ready0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [7:0] expected(input bit s, input int c, input int m, input int b);
    return s ? port1.peek(c, m, b) : port0.peek(c, m, b);
  endfunction

  // expected capture order
  typedef struct { int col; int minor; } fr_t;
  fr_t order [$];

  task automatic capture(input bit s, input int c0, input int c1, input string tag);
    int cyc = 0, nb = 0, bad = 0, fi = 0, bi = 0, n_cmd = 0, eos_seen = 0;
    longint rd0;
    order.delete();
    for (int c = c0; c <= c1; c++)
      if (DEV_RAM_MAP[c - 1]) for (int m = 0; m < 64; m++) order.push_back('{c, m});
      else begin order.push_back('{c, 2}); order.push_back('{c, 3}); n_cmd++; end
    for (int c = c0; c <= c1; c++) n_cmd++;
    stall_sel = s;
    rd0 = s ? port1.rd_bytes : port0.rd_bytes;
    col_first = col_t'(c0); col_last = col_t'(c1);
    start_cap = 1; @(posedge clk); #1; start_cap = 0; cyc = 1;
    while (!done) begin
      rb_ready = !s || ($urandom_range(0, 3) != 0);
      @(posedge clk);
      if (rb_valid && rb_ready) begin
        if (fi >= order.size() ||
            rb_beat.data != expected(s, order[fi].col, order[fi].minor, bi) ||
            rb_beat.faddr.major != col_t'(order[fi].col) || rb_beat.faddr.minor != 7'(order[fi].minor) ||
            rb_beat.first != (bi == 0) || rb_beat.last != (bi == FRAME_BYTES - 1)) bad++;
        if (rb_beat.eos) eos_seen++;
        nb++;
        if (bi == FRAME_BYTES - 1) begin bi = 0; fi++; end else bi++;
      end
      #1; cyc++;
    end
    check(bad == 0, $sformatf("%s: %0d wrong bytes", tag, bad));
    check(nb == order.size() * FRAME_BYTES, $sformatf("%s: %0d bytes handed on", tag, nb));
    check(eos_seen == 1 && fi == order.size(), $sformatf("%s: end of stream marked once", tag));
    check((s ? port1.rd_bytes : port0.rd_bytes) - rd0 ==
          longint'((4 * (c1 - c0) + 4 + 61 * $countones(DEV_RAM_MAP[c1-1 -: 5])) * FRAME_BYTES),
          $sformatf("%s: bytes read from the port", tag));
    if (!s) check(cyc <= (4 * 4 + 65) * FRAME_BYTES + 2 * n_cmd + 2,
                  $sformatf("%s: %0d cycles for %0d bytes", tag, cyc, (4 * 4 + 65) * FRAME_BYTES));
  endtask

  initial begin
    start_cap = 0; start_del = 0; start_wr = 0; col_first = '0; col_last = '0;
    rb_ready = 1; wr_valid = 0; wr_beat = '0; stall_sel = 0;
    repeat (3) @(posedge clk);
    rst_n = 1; @(posedge clk); #1;
    check(DEV_RAM_MAP[6] && !DEV_RAM_MAP[3] && !DEV_RAM_MAP[7], "column 7 is the BlockRAM column");
    capture(0, 4, 8, "capture");
    capture(1, 4, 8, "capture with stalls");

    // ---- erase ----
    begin
      int bad = 0, cyc = 0;
      longint w0 = port0.wr_bytes;
      stall_sel = 0;
      col_first = 6; col_last = 8;
      start_del = 1; @(posedge clk); #1; start_del = 0;
      while (!done) begin @(posedge clk); #1; cyc++; end
      check(port0.wr_bytes - w0 == longint'((22 + 86 + 22) * FRAME_BYTES), "erase: bytes written");
      for (int c = 6; c <= 8; c++)
        for (int m = 0; m < (c == 7 ? 86 : 22); m++)
          for (int b = 0; b < FRAME_BYTES; b += 97) if (port0.peek(c, m, b) != 8'h00) bad++;
      check(bad == 0, "erase: frames are zero");
      check(port0.peek(8, 22, 0) != 8'h00 && port0.peek(5, 0, 0) != 8'h00, "erase: neighbours untouched");
      check(cyc <= (22 + 86 + 22) * FRAME_BYTES + 8, $sformatf("erase: %0d cycles", cyc));
    end

    // ---- write a tagged stream of three frames ----
    begin
      int cols [3] = '{20, 21, 40};
      int mins [3] = '{5, 0, 17};
      logic [7:0] d [3][FRAME_BYTES];
      int f = 0, b = 0, bad = 0;
      foreach (d[i, j]) d[i][j] = 8'($urandom);
      stall_sel = 1;
      start_wr = 1; @(posedge clk); #1; start_wr = 0;
      while (f < 3) begin
        wr_valid = ($urandom_range(0, 4) != 0);
        wr_beat.data  = d[f][b];
        wr_beat.faddr = '{major: col_t'(cols[f]), minor: 7'(mins[f])};
        wr_beat.first = (b == 0);
        wr_beat.last  = (b == FRAME_BYTES - 1);
        wr_beat.eos   = (b == FRAME_BYTES - 1) && (f == 2);
        @(posedge clk);
        if (wr_valid && wr_ready) begin if (b == FRAME_BYTES - 1) begin b = 0; f++; end else b++; end
        #1;
      end
      wr_valid = 0;
      while (!done) begin @(posedge clk); #1; end
      for (int i = 0; i < 3; i++)
        for (int j = 0; j < FRAME_BYTES; j++) if (port1.peek(cols[i], mins[i], j) != d[i][j]) bad++;
      check(bad == 0, "write: frames land at their addresses");
      check(port1.n_wr_cmd == 3, "write: one write access per frame");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
