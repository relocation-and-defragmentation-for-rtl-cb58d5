// Testbench of the relocation controller. The placer, the defragmentation engine, the
// Configuration Manager and both filters are replaced by responders that answer each start
// pulse with done after a few cycles; the slot table is kept here. Every start pulse is logged
// as an event string with its arguments, and the log of each operation is compared with the
// sequence worked out from the design description:
//   direct placement, placement with defragmentation moving two tasks (capture + erase of both
//   before any allocation), refusal for lack of free columns, refusal after a failed
//   defragmentation, removal, and removal of an empty slot.
module tb_reloc_controller;
  import reloc_pkg::*;
  localparam int NT = 8, NS = 16;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic                op_valid, op_ready, op_remove;
  logic [TYPE_W-1:0]   op_type;
  logic [SLOT_AW-1:0]  op_slot;
  logic                resp_valid, resp_ok, resp_defrag;
  logic [SLOT_AW-1:0]  resp_slot;
  col_t                resp_pos;
  type_info_t          types [NT];
  slot_t               slots [NS];
  logic [DEV_COLS-1:0] occ;
  logic                sl_we;
  logic [SLOT_AW-1:0]  sl_waddr, ctx_slot;
  slot_t               sl_wdata;
  logic                pl_start, pl_done, pl_found;
  logic [TYPE_W-1:0]   pl_type;
  col_t                pl_pos;
  logic                df_start, df_done, df_success;
  col_t                df_x_best;
  logic [NS-1:0]       df_def_mask;
  col_t                df_new_pos [NS];
  logic                cm_start_cap, cm_start_del, cm_start_wr, cm_done;
  col_t                cm_first, cm_last;
  logic                sef_start, sef_done, sif_start, sif_done;
  logic [LOC_AW-1:0]   sef_base, sif_base;
  logic [LOC_AW:0]     sef_cnt, sif_cnt;
  logic                bs_req;
  logic [31:0]         bs_addr;
  col_t                rep_orig_col, rep_new_col;
  logic [NS-1:0]       task_clk_en, task_rst;
  logic [31:0]         n_placed, n_defrag, n_reloc, n_refused, n_removed;

  reloc_controller #(.NUM_TYPES(NT), .NUM_SLOTS(NS)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- slot table and occupancy --------------------------------------------------------------
  always_ff @(posedge clk) if (sl_we) slots[sl_waddr] <= sl_wdata;
  logic [DEV_COLS-1:0] blocked;
  always_comb begin
    occ = blocked;
    for (int s = 0; s < NS; s++)
      if (slots[s].valid) occ |= col_mask(slots[s].start, types[slots[s].ttype].width);
  end

  // ---- responders ----------------------------------------------------------------------------
  bit   pl_ans_found;  col_t pl_ans_pos;
  int   cm_cnt = 0, sef_cnt_d = 0, sif_cnt_d = 0, pl_cnt = 0, df_cnt = 0;
  always_ff @(posedge clk) begin
    pl_done <= 0; df_done <= 0; cm_done <= 0; sef_done <= 0; sif_done <= 0;
    if (pl_start) pl_cnt <= 3;
    else if (pl_cnt > 0) begin pl_cnt <= pl_cnt - 1; if (pl_cnt == 1) begin pl_done <= 1; pl_found <= pl_ans_found; pl_pos <= pl_ans_pos; end end
    if (df_start) df_cnt <= 5;
    else if (df_cnt > 0) begin df_cnt <= df_cnt - 1; if (df_cnt == 1) df_done <= 1; end
    if (cm_start_cap || cm_start_del || cm_start_wr) cm_cnt <= 7;
    else if (cm_cnt > 0) begin cm_cnt <= cm_cnt - 1; if (cm_cnt == 1) cm_done <= 1; end
    if (sef_start) sef_cnt_d <= 4;
    else if (sef_cnt_d > 0) begin sef_cnt_d <= sef_cnt_d - 1; if (sef_cnt_d == 1) sef_done <= 1; end
    if (sif_start) sif_cnt_d <= 9;
    else if (sif_cnt_d > 0) begin sif_cnt_d <= sif_cnt_d - 1; if (sif_cnt_d == 1) sif_done <= 1; end
  end

  // ---- event log -----------------------------------------------------------------------------
  string ev [$];
  always @(posedge clk) if (rst_n) begin
    if (pl_start) ev.push_back($sformatf("place t%0d", pl_type));
    if (df_start) ev.push_back("defrag");
    if (cm_start_cap) ev.push_back($sformatf("cap %0d-%0d s%0d clk%0d sef%0d:%0d", cm_first, cm_last, ctx_slot,
                                             task_clk_en[ctx_slot], sef_base, sef_cnt));
    if (sef_start && !cm_start_cap) ev.push_back("sef alone");
    if (cm_start_del) ev.push_back($sformatf("del %0d-%0d", cm_first, cm_last));
    if (cm_start_wr) ev.push_back($sformatf("wr s%0d bs%0h %0d->%0d inc%0d:%0d sif%0d req%0d", ctx_slot, bs_addr,
                                            rep_orig_col, rep_new_col, sif_base, sif_cnt, sif_start, bs_req));
    if (task_rst != 0) ev.push_back($sformatf("rst %b", task_rst));
    if (sl_we) ev.push_back($sformatf("slot %0d %0d t%0d @%0d", sl_waddr, sl_wdata.valid, sl_wdata.ttype, sl_wdata.start));
  end

  task automatic op(input bit rem, input int t, input int s, input string tag, input string exp [],
                    input bit e_ok, input int e_slot, input int e_pos, input bit e_def);
    ev.delete();
    op_valid = 1; op_remove = rem; op_type = TYPE_W'(t); op_slot = SLOT_AW'(s);
    do @(posedge clk); while (!op_ready);
    #1; op_valid = 0;
    while (!resp_valid) begin @(posedge clk); #1; end
    check(resp_ok == e_ok && (!e_ok || rem || (resp_slot == SLOT_AW'(e_slot) && resp_pos == col_t'(e_pos))) &&
          resp_defrag == e_def,
          $sformatf("%s: response ok%0d slot%0d pos%0d def%0d", tag, resp_ok, resp_slot, resp_pos, resp_defrag));
    check(ev.size() == exp.size(), $sformatf("%s: %0d events, expected %0d", tag, ev.size(), exp.size()));
    for (int i = 0; i < ev.size() && i < exp.size(); i++)
      check(ev[i] == exp[i], $sformatf("%s: event %0d '%s', expected '%s'", tag, i, ev[i], exp[i]));
    if (ev.size() != exp.size()) foreach (ev[i]) $display("  %s", ev[i]);
    @(posedge clk); #1;
  endtask

  initial begin
    op_valid = 0; op_remove = 0; op_type = '0; op_slot = '0; blocked = '0;
    pl_found = 0; pl_pos = '0; pl_ans_found = 0; pl_ans_pos = '0;
    df_success = 0; df_x_best = '0; df_def_mask = '0;
    foreach (df_new_pos[i]) df_new_pos[i] = '0;
    foreach (slots[i]) slots[i] = '0;
    foreach (types[i]) types[i] = '0;
    types[1] = '{width: 7'd4, n_ram: 7'd1, orig_col: 7'd5, n_pos: 8'd6, bs_addr: 32'h0100_0000,
                 cap_base: 14'd10, cap_cnt: 15'd40, inc_base: 14'd100, inc_cnt: 15'd41};
    types[2] = '{width: 7'd10, n_ram: 7'd0, orig_col: 7'd8, n_pos: 8'd15, bs_addr: 32'h0200_0000,
                 cap_base: 14'd300, cap_cnt: 15'd60, inc_base: 14'd400, inc_cnt: 15'd61};
    repeat (3) @(posedge clk);
    rst_n = 1; @(posedge clk); #1;

    // direct placements: type 1 at 18 (slot 0), type 1 at 31 (slot 1)
    pl_ans_found = 1; pl_ans_pos = 18;
    op(0, 1, 0, "direct", '{"place t1", "wr s0 bs1000000 5->18 inc100:0 sif1 req1", "rst 0000000000000001",
                            "slot 0 1 t1 @18"}, 1, 0, 18, 0);
    check(task_clk_en == 16'h0001, "slot 0 runs");
    pl_ans_pos = 31;
    op(0, 1, 0, "direct 2", '{"place t1", "wr s1 bs1000000 5->31 inc100:0 sif1 req1", "rst 0000000000000010",
                              "slot 1 1 t1 @31"}, 1, 1, 31, 0);
    check(n_placed == 2, "two placed");

    // defragmentation: type 2 goes to 24, slot 0 moves to 44, slot 1 moves to 57
    pl_ans_found = 0;
    df_success = 1; df_x_best = 24; df_def_mask = 16'h0003; df_new_pos[0] = 44; df_new_pos[1] = 57;
    op(0, 2, 0, "defrag", '{"place t2", "defrag",
        "cap 18-21 s0 clk0 sef10:40", "del 18-21",
        "cap 31-34 s1 clk0 sef10:40", "del 31-34",
        "wr s0 bs1000000 5->44 inc100:41 sif1 req1", "slot 0 1 t1 @44", "rst 0000000000000001",
        "wr s1 bs1000000 5->57 inc100:41 sif1 req1", "slot 1 1 t1 @57", "rst 0000000000000010",
        "wr s2 bs2000000 8->24 inc400:0 sif1 req1", "rst 0000000000000100", "slot 2 1 t2 @24"}, 1, 2, 24, 1);
    check(task_clk_en == 16'h0007, "all three run");
    check(n_defrag == 1 && n_reloc == 2 && n_placed == 3, "counters after defragmentation");

    // refusal: not enough free columns (only 9 free, type 2 needs 10)
    blocked = '1;
    for (int c = 0; c < 9; c++) blocked[c] = 1'b0;
    for (int s = 0; s < 3; s++) for (int c = int'(slots[s].start); c < int'(slots[s].start) + int'(types[slots[s].ttype].width); c++) blocked[c-1] = 1'b1;
    op(0, 2, 0, "too few columns", '{"place t2"}, 0, 0, 0, 0);
    // refusal: enough columns, defragmentation fails
    blocked = '0;
    df_success = 0;
    op(0, 2, 0, "defrag fails", '{"place t2", "defrag"}, 0, 0, 0, 0);
    check(n_refused == 2, "two refusals");

    // removal of slot 1 (type 1 at 57), then of the now empty slot 1
    op(1, 0, 1, "remove", '{"del 57-60", "slot 1 0 t0 @0"}, 1, 1, 0, 0);
    check(task_clk_en == 16'h0005, "slot 1 stopped");
    op(1, 0, 1, "remove empty", '{}, 0, 1, 0, 0);
    check(n_removed == 1, "one removal");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
