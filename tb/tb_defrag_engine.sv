// Testbench of the partial displacement defragmentation engine.
// 1) Two-task example on a 9-column device (m1: 3 columns wide at 1 or 5; m2: 2 wide, search
//    order 8, 1, 4, 5). Two m2 tasks sit at 1 and 5; m1 fits nowhere. Worked by hand: at
//    x = 1 the m2 at 1 moves to 8 (cost 48 * 2 = 96 frames); at x = 5 the m2 at 5 moves to 8,
//    also 96, not lower, so x = 1 is kept.
// 2) Random devices of 12..30 usable columns, random task types and feasible position lists,
//    random placements until a request fails, then the engine's answer is compared with a
//    reference model of the same flow written here, including the cycle budget.
module tb_defrag_engine;
  import reloc_pkg::*;
  localparam int NT = 8, NS = 16;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic                start;
  logic [TYPE_W-1:0]   req_type;
  type_info_t          types [NT];
  slot_t               slots [NS];
  logic [DEV_COLS-1:0] occ;
  logic [TYPE_W-1:0]   rd_type;
  logic [POS_W-1:0]    rd_idx;
  col_t                rd_pos;
  logic                busy, done, success;
  col_t                x_best;
  logic [NS-1:0]       def_mask;
  col_t                new_pos [NS];
  logic [31:0]         t_min, n_tried, n_rejected;
  col_t                plist [NT][DEV_COLS];

  assign rd_pos = plist[rd_type][rd_idx];

  defrag_engine #(.NUM_TYPES(NT), .NUM_SLOTS(NS)) dut (.*);

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

  int devw;
  function automatic logic [DEV_COLS-1:0] occupancy(input slot_t s [NS]);
    logic [DEV_COLS-1:0] o = '0;
    for (int c = devw; c < DEV_COLS; c++) o[c] = 1'b1;
    for (int i = 0; i < NS; i++)
      if (s[i].valid)
        for (int c = int'(s[i].start); c < int'(s[i].start) + int'(types[s[i].ttype].width); c++) o[c-1] = 1'b1;
    return o;
  endfunction

  function automatic bit fits(input logic [DEV_COLS-1:0] o, input int x, input int w);
    if (x < 1 || x + w - 1 > DEV_COLS) return 0;
    for (int c = x; c < x + w; c++) if (o[c-1]) return 0;
    return 1;
  endfunction

  // first fit along a type's list; returns 0 if none
  function automatic int first_fit(input logic [DEV_COLS-1:0] o, input int t);
    for (int k = 0; k < int'(types[t].n_pos); k++)
      if (fits(o, int'(plist[t][k]), int'(types[t].width))) return int'(plist[t][k]);
    return 0;
  endfunction

  // reference of the flow chart
  bit           r_ok;
  int           r_x, r_tmin;
  bit [NS-1:0]  r_mask;
  int           r_new [NS];
  function automatic void reference(input int rt);
    r_ok = 0; r_tmin = 32'h7fffffff; r_mask = '0; r_x = 0;
    for (int i = 0; i < int'(types[rt].n_pos); i++) begin
      int x = int'(plist[rt][i]);
      automatic int w = int'(types[rt].width);
      logic [DEV_COLS-1:0] v = '0;
      bit [NS-1:0] mint = '0;
      int cand [NS];
      bit all = 1;
      int cost = 0;
      if (x < 1 || x + w - 1 > DEV_COLS) continue;
      for (int c = devw; c < DEV_COLS; c++) v[c] = 1'b1;
      for (int s = 0; s < NS; s++) begin
        cand[s] = 0;
        if (slots[s].valid) begin
          int a = int'(slots[s].start), b = a + int'(types[slots[s].ttype].width) - 1;
          if (a <= x + w - 1 && x <= b) mint[s] = 1;
          else for (int c = a; c <= b; c++) v[c-1] = 1'b1;
        end
      end
      for (int c = x; c < x + w; c++) v[c-1] = 1'b1;
      for (int s = 0; s < NS && all; s++) if (mint[s]) begin
        automatic int p = first_fit(v, int'(slots[s].ttype));
        if (p == 0) all = 0;
        else begin
          cand[s] = p;
          for (int c = p; c < p + int'(types[slots[s].ttype].width); c++) v[c-1] = 1'b1;
          cost += 48 * (int'(types[slots[s].ttype].width) - int'(types[slots[s].ttype].n_ram)) +
                  237 * int'(types[slots[s].ttype].n_ram);
        end
      end
      if (all && cost < r_tmin) begin
        r_ok = 1; r_tmin = cost; r_x = x; r_mask = mint;
        for (int s = 0; s < NS; s++) r_new[s] = cand[s];
      end
    end
  endfunction

  task automatic run_and_compare(input int rt, input string tag);
    int cyc = 0;
    int budget;
    req_type = TYPE_W'(rt);
    occ = occupancy(slots);
    reference(rt);
    start = 1; @(posedge clk); #1; start = 0;
    while (!done) begin @(posedge clk); #1; cyc++; end
    check(success == r_ok, $sformatf("%s: success %0d expected %0d", tag, success, r_ok));
    if (r_ok && success) begin
      check(x_best == col_t'(r_x), $sformatf("%s: x_best %0d expected %0d", tag, x_best, r_x));
      check(def_mask == r_mask, $sformatf("%s: mask %h expected %h", tag, def_mask, r_mask));
      check(t_min == 32'(r_tmin), $sformatf("%s: t_min %0d expected %0d", tag, t_min, r_tmin));
      for (int s = 0; s < NS; s++)
        if (r_mask[s]) check(new_pos[s] == col_t'(r_new[s]), $sformatf("%s: slot %0d to %0d expected %0d", tag, s, new_pos[s], r_new[s]));
    end
    // per position at most 3 cycles plus one search (n_pos + 2) per placed task
    budget = 2;
    for (int i = 0; i < int'(types[rt].n_pos); i++) begin
      budget += 3;
      for (int s = 0; s < NS; s++) if (slots[s].valid) budget += int'(types[slots[s].ttype].n_pos) + 3;
    end
    check(cyc <= budget, $sformatf("%s: %0d cycles over budget %0d", tag, cyc, budget));
  endtask

  int n_succ = 0, n_fail = 0;
  initial begin
    start = 0; req_type = '0; occ = '0;
    foreach (types[t]) types[t] = '0;
    foreach (slots[s]) slots[s] = '0;
    foreach (plist[t, k]) plist[t][k] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1; @(posedge clk); #1;

    // ---- 1) worked example ----
    devw = 9;
    types[0].width = 3; types[0].n_pos = 2; plist[0][0] = 1; plist[0][1] = 5;
    types[1].width = 2; types[1].n_pos = 4;
    plist[1][0] = 8; plist[1][1] = 1; plist[1][2] = 4; plist[1][3] = 5;
    slots[0] = '{valid: 1'b1, ttype: 3'd1, start: 7'd1};
    slots[1] = '{valid: 1'b1, ttype: 3'd1, start: 7'd5};
    run_and_compare(0, "example");
    check(success && x_best == 1 && def_mask == 16'h0001 && new_pos[0] == 8 && t_min == 96,
          "example: m1 at 1, m2 from 1 to 8, 96 frames");
    check(n_tried == 2 && n_rejected == 0, "example: both positions gave a solution");

    // ---- 2) random scenarios ----
    for (int t = 0; t < 400; t++) begin
      automatic int nt = $urandom_range(2, 5);
      devw = $urandom_range(12, 30);
      foreach (slots[s]) slots[s] = '0;
      foreach (types[i]) types[i] = '0;
      for (int i = 0; i < nt; i++) begin
        automatic int w = $urandom_range(1, 6);
        automatic int n = 0;
        types[i].width = col_t'(w);
        types[i].n_ram = col_t'($urandom_range(0, w > 1 ? 1 : 0));
        for (int x = 1; x + w - 1 <= devw; x++)
          if ($urandom_range(0, 99) < 45) begin plist[i][n] = col_t'(x); n++; end
        if (n == 0) begin plist[i][0] = 1; n = 1; end
        for (int k = n - 1; k > 0; k--) begin   // shuffle: the weight order is arbitrary here
          automatic int j = $urandom_range(0, k);
          automatic col_t tmp = plist[i][k]; plist[i][k] = plist[i][j]; plist[i][j] = tmp;
        end
        types[i].n_pos = (POS_W+1)'(n);
      end
      // place random tasks until one does not fit, then defragment for it
      for (int s = 0; s < NS; s++) begin
        automatic int rt = $urandom_range(0, nt - 1);
        automatic int p = first_fit(occupancy(slots), rt);
        if (p == 0) begin
          run_and_compare(rt, $sformatf("random %0d", t));
          if (r_ok) n_succ++; else n_fail++;
          break;
        end
        slots[s] = '{valid: 1'b1, ttype: TYPE_W'(rt), start: col_t'(p)};
        // sometimes free a random earlier slot to fragment the device
        if (s > 1 && $urandom_range(0, 2) == 0) slots[$urandom_range(0, s - 1)].valid = 1'b0;
      end
    end
    check(n_succ > 20 && n_fail > 20, $sformatf("both outcomes covered: %0d solved, %0d not", n_succ, n_fail));
    $display("defragmentations solved %0d, unsolved %0d", n_succ, n_fail);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
