// Testbench of the State Inclusion Filter.
// Random bitstreams (bytes with frame tags), random sorted preset-bit location runs and random
// saved states. The expected output is built here bit by bit: the located bits, in order, take
// the saved state bits (LSB first from byte 0 of the context area), everything else and all
// frame tags pass unchanged. Checks every output beat, under random input and output stalls,
// the cycle count without stalls (one per byte plus one per run ending inside a byte and
// followed by another run), and that an empty location list passes the stream through.
module tb_state_inclusion_filter;
  import reloc_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic                start;
  logic [LOC_AW-1:0]   loc_base;
  logic [LOC_AW:0]     loc_cnt;
  logic [LOC_AW-1:0]   loc_addr;
  loc_t                loc_data;
  logic [STATE_AW-1:0] st_raddr;
  logic [7:0]          st_rdata0, st_rdata1;
  logic                in_valid, in_ready, out_valid, out_ready;
  fbeat_t              in_beat, out_beat;
  logic                busy, done;

  loc_t       locmem [1 << LOC_AW];
  logic [7:0] stmem  [1 << STATE_AW];
  assign loc_data  = locmem[loc_addr];
  assign st_rdata0 = stmem[st_raddr];
  assign st_rdata1 = stmem[st_raddr + 1'b1];

  state_inclusion_filter dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  fbeat_t inb [];
  logic [7:0] exp_data [];

  task automatic one(input int nbytes, input int style, input bit stalls, input bit empty, input string tag);
    int nruns = 0, holds = 0, pos, sp = 0, sent = 0, got = 0, cyc = 0, base, bad = 0;
    int total_bits = nbytes * 8;
    inb = new[nbytes];
    exp_data = new[nbytes];
    for (int i = 0; i < nbytes; i++) begin
      inb[i] = '0;
      inb[i].data = 8'($urandom);
      inb[i].faddr = '{major: col_t'($urandom_range(1, 78)), minor: 7'($urandom_range(0, 85))};
      inb[i].first = (i % 50 == 0);
      inb[i].last  = (i % 50 == 49);
      inb[i].eos   = (i == nbytes - 1);
      exp_data[i]  = inb[i].data;
    end
    foreach (stmem[i]) stmem[i] = 8'($urandom);
    base = $urandom_range(0, 2000);
    pos = $urandom_range(0, 20);
    while (!empty && pos < total_bits) begin
      int len;
      case (style)
        0: len = 1;
        1: len = $urandom_range(1, 12);
        default: len = ($urandom_range(0, 5) == 0) ? $urandom_range(100, 3000) : $urandom_range(1, 9);
      endcase
      if (pos + len > total_bits) len = total_bits - pos;
      locmem[base + nruns] = '{offset: LOC_OFS_W'(pos), len: LOC_LEN_W'(len)};
      for (int b = pos; b < pos + len; b++) begin
        exp_data[b / 8][b % 8] = stmem[sp / 8][sp % 8];
        sp++;
      end
      nruns++;
      pos += len + ((style == 0) ? $urandom_range(1, 40) : $urandom_range(0, 30));
    end
    for (int r = 0; r < nruns - 1; r++)
      if (((locmem[base + r].offset + LOC_OFS_W'(locmem[base + r].len)) % 8) != 0) holds++;
    loc_base = LOC_AW'(base);
    loc_cnt  = (LOC_AW+1)'(nruns);
    start = 1; @(posedge clk); #1; start = 0; cyc = 1;
    while (!done) begin
      in_valid  = (sent < nbytes) && (!stalls || $urandom_range(0, 3) != 0);
      out_ready = !stalls || $urandom_range(0, 3) != 0;
      if (sent < nbytes) in_beat = inb[sent];
      @(posedge clk);
      if (out_valid && out_ready) begin
        fbeat_t e = inb[got];
        e.data = exp_data[got];
        if (out_beat != e) bad++;
        got++;
      end
      if (in_valid && in_ready) sent++;
      #1; cyc++;
    end
    in_valid = 0;
    check(bad == 0, $sformatf("%s: %0d output beats differ", tag, bad));
    check(got == nbytes, $sformatf("%s: %0d beats out, expected %0d", tag, got, nbytes));
    if (!stalls) check(cyc == nbytes + holds + 1, $sformatf("%s: %0d cycles, expected %0d", tag, cyc, nbytes + holds + 1));
  endtask

  initial begin
    start = 0; loc_base = '0; loc_cnt = '0; in_valid = 0; in_beat = '0; out_ready = 1;
    foreach (locmem[i]) locmem[i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1; @(posedge clk); #1;
    one(22 * 100, 0, 0, 0, "flip-flop preset bits");
    one(8000, 2, 0, 0, "long runs");
    one(500, 1, 0, 1, "empty list passes through");
    for (int t = 0; t < 60; t++) one($urandom_range(1, 700), t % 3, t % 2 == 1, 0, $sformatf("random %0d", t));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
