// Testbench of the SUP Fit placer.
// Part 1 recomputes, independently of the RTL, the coverage of feasible positions, the static
// utilization probabilities and the position weights of the two-task example (9 columns;
// m1: 3 columns wide at 1 and 5, p = 0.4; m2: 2 wide at 1, 4, 5, 8, p = 0.6) and checks them
// against the published example values, then sorts m2's positions by weight (8, 1, 4, 5).
// Part 2 loads that order and checks the placer's choice and cycle count (k + 2 cycles for a
// hit at list index k, n + 2 for a miss) against a reference first-fit search, first for
// hand-picked occupancies, then for random lists and occupancies on the full device.
module tb_sup_fit_placer;
  import reloc_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic                start;
  logic [TYPE_W-1:0]   req_type;
  col_t                req_width;
  logic [POS_W:0]      req_npos;
  logic [DEV_COLS-1:0] occ;
  logic [TYPE_W-1:0]   rd_type;
  logic [POS_W-1:0]    rd_idx;
  col_t                rd_pos;
  logic                busy, done, found;
  col_t                pos;
  col_t                plist [DEV_COLS];

  assign rd_pos = plist[rd_idx];

  sup_fit_placer dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- part 1: the worked example ----------------------------------------------------------
  real p_pos [1:9];
  real w2 [4];
  int  x2 [4] = '{1, 4, 5, 8};
  int  x1 [2] = '{1, 5};
  int  order [4];
  real p_exp [9] = '{0.35, 0.35, 0.2, 0.15, 0.5, 0.35, 0.2, 0.15, 0.15};
  real w_exp [4] = '{0.35, 0.369, 0.432, 0.15};
  int  o1_exp [9] = '{1, 1, 1, 0, 1, 1, 1, 0, 0};
  int  o2_exp [9] = '{1, 1, 0, 1, 2, 1, 0, 1, 1};

  function automatic real absr(input real v); return v < 0.0 ? -v : v; endfunction

  task automatic example();
    int o1, o2;
    for (int x = 1; x <= 9; x++) begin
      o1 = 0; o2 = 0;
      foreach (x1[i]) if (x1[i] <= x && x < x1[i] + 3) o1++;
      foreach (x2[i]) if (x2[i] <= x && x < x2[i] + 2) o2++;
      check(o1 == o1_exp[x-1] && o2 == o2_exp[x-1], $sformatf("coverage at x=%0d", x));
      p_pos[x] = 0.4 * o1 / 2.0 + 0.6 * o2 / 4.0;
      check(absr(p_pos[x] - p_exp[x-1]) < 0.001, $sformatf("p_pos(%0d)=%f", x, p_pos[x]));
    end
    foreach (x2[i]) begin
      real s = 0.0;
      for (int c = x2[i]; c < x2[i] + 2; c++) s += p_pos[c] * p_pos[c];
      w2[i] = $sqrt(s / 2.0);
      check(absr(w2[i] - w_exp[i]) < 0.001, $sformatf("w_pos(m2,%0d)=%f", x2[i], w2[i]));
    end
    // sort by ascending weight (selection sort)
    for (int i = 0; i < 4; i++) order[i] = i;
    for (int i = 0; i < 4; i++)
      for (int j = i + 1; j < 4; j++)
        if (w2[order[j]] < w2[order[i]]) begin int t = order[i]; order[i] = order[j]; order[j] = t; end
    check(x2[order[0]] == 8 && x2[order[1]] == 1 && x2[order[2]] == 4 && x2[order[3]] == 5,
          "SUP order of m2 is 8,1,4,5");
  endtask

  // ---- part 2: the placer --------------------------------------------------------------------
  task automatic run(input col_t w, input int n, input logic [DEV_COLS-1:0] o, output bit f,
                     output col_t p, output int cyc);
    req_width = w; req_npos = (POS_W+1)'(n); occ = o; req_type = '0;
    start = 1'b1;
    @(posedge clk); #1;
    start = 1'b0;
    cyc = 1;
    while (!done) begin @(posedge clk); #1; cyc++; end
    f = found; p = pos;
  endtask

  function automatic void ref_fit(input col_t w, input int n, input logic [DEV_COLS-1:0] o,
                                  output bit f, output col_t p, output int k);
    f = 0; p = '0; k = n;
    for (int i = 0; i < n; i++) begin
      bit ok = (plist[i] != 0) && (int'(plist[i]) + int'(w) - 1 <= DEV_COLS);
      for (int c = int'(plist[i]); ok && c < int'(plist[i]) + int'(w); c++) if (o[c-1]) ok = 0;
      if (ok) begin f = 1; p = plist[i]; k = i; return; end
    end
  endfunction

  task automatic one(input col_t w, input int n, input logic [DEV_COLS-1:0] o, input string tag);
    bit f, rf; col_t p, rp; int cyc, k;
    ref_fit(w, n, o, rf, rp, k);
    run(w, n, o, f, p, cyc);
    check(f == rf && (!rf || p == rp), $sformatf("%s: found %0d pos %0d, expected %0d %0d", tag, f, p, rf, rp));
    check(cyc == k + 2, $sformatf("%s: %0d cycles, expected %0d", tag, cyc, k + 2));
  endtask

  logic [DEV_COLS-1:0] beyond9;
  initial begin
    start = 0; req_type = '0; req_width = '0; req_npos = '0; occ = '0;
    foreach (plist[i]) plist[i] = '0;
    example();
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    // the 9-column example device: everything right of column 9 is unavailable
    beyond9 = '1; beyond9[8:0] = '0;
    for (int i = 0; i < 4; i++) plist[i] = col_t'(x2[order[i]]);
    one(2, 4, beyond9, "empty device -> 8");
    check(pos == 8, "m2 first goes to column 8");
    one(2, 4, beyond9 | 78'b1_0000_0000, "col 9 busy -> 1");
    check(pos == 1, "then column 1");
    one(2, 4, beyond9 | 78'b1_0000_0011, "cols 1,2,9 busy -> 4");
    check(pos == 4, "then column 4");
    one(2, 4, beyond9 | 78'b1_0000_1011, "cols 1,2,4,9 busy -> 5");
    check(pos == 5, "then column 5");
    one(2, 4, beyond9 | 78'b1_0001_1011, "cols 1,2,4,5,9 busy -> none");
    check(!found, "no position left");
    // random lists on the full device
    for (int t = 0; t < 300; t++) begin
      automatic int n = $urandom_range(1, DEV_COLS);
      automatic col_t w = col_t'($urandom_range(1, 20));
      automatic logic [DEV_COLS-1:0] o;
      for (int i = 0; i < n; i++) plist[i] = col_t'($urandom_range(1, DEV_COLS));
      for (int c = 0; c < DEV_COLS; c++) o[c] = ($urandom_range(0, 99) < 55);
      one(w, n, o, $sformatf("random %0d", t));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
