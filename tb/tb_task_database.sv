// Testbench of the task database: type table and slot table writes and their visibility, both
// feasible position read ports, both location read ports, the state buffer (writer, the two
// neighbouring-byte read port and the host port, per context area), and the occupancy vector
// computed from the placed tasks, compared with one built here column by column.
module tb_task_database;
  import reloc_pkg::*;
  localparam int NT = 8, NS = 16;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic                ty_we;
  logic [TYPE_W-1:0]   ty_waddr;
  type_info_t          ty_wdata;
  type_info_t          types [NT];
  logic                pos_we;
  logic [TYPE_W-1:0]   pos_wtype, pa_type, pb_type;
  logic [POS_W-1:0]    pos_widx, pa_idx, pb_idx;
  col_t                pos_wdata, pa_pos, pb_pos;
  logic                sl_we;
  logic [SLOT_AW-1:0]  sl_waddr;
  slot_t               sl_wdata;
  slot_t               slots [NS];
  logic [DEV_COLS-1:0] occ;
  logic                loc_we;
  logic [LOC_AW-1:0]   loc_waddr, loca_addr, locb_addr;
  loc_t                loc_wdata, loca_data, locb_data;
  logic                st_we;
  logic [CTX_AW-1:0]   st_waddr, st_raddr, host_st_addr;
  logic [7:0]          st_wdata, st_rdata0, st_rdata1, host_st_data;

  task_database #(.NUM_TYPES(NT), .NUM_SLOTS(NS)) dut (.*);

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

  type_info_t tys [NT];
  slot_t      sls [NS];
  col_t       pl [NT][DEV_COLS];
  loc_t       lm [256];
  logic [7:0] sm [int];

  initial begin
    ty_we = 0; pos_we = 0; sl_we = 0; loc_we = 0; st_we = 0;
    ty_waddr = '0; ty_wdata = '0; pos_wtype = '0; pos_widx = '0; pos_wdata = '0;
    pa_type = '0; pa_idx = '0; pb_type = '0; pb_idx = '0; sl_waddr = '0; sl_wdata = '0;
    loc_waddr = '0; loc_wdata = '0; loca_addr = '0; locb_addr = '0;
    st_waddr = '0; st_wdata = '0; st_raddr = '0; host_st_addr = '0;
    repeat (3) @(posedge clk);
    rst_n = 1; @(posedge clk); #1;
    check(slots[3].valid == 0 && occ == '0, "reset: no task placed");
    // type table
    for (int t = 0; t < NT; t++) begin
      tys[t] = type_info_t'({$urandom, $urandom, $urandom, $urandom});
      tys[t].width = col_t'($urandom_range(1, 12));
      ty_we = 1; ty_waddr = TYPE_W'(t); ty_wdata = tys[t];
      @(posedge clk); #1;
    end
    ty_we = 0;
    for (int t = 0; t < NT; t++) check(types[t] == tys[t], $sformatf("type %0d", t));
    // positions
    for (int t = 0; t < NT; t++)
      for (int k = 0; k < DEV_COLS; k++) begin
        pl[t][k] = col_t'($urandom_range(1, 78));
        pos_we = 1; pos_wtype = TYPE_W'(t); pos_widx = POS_W'(k); pos_wdata = pl[t][k];
        @(posedge clk); #1;
      end
    pos_we = 0;
    for (int i = 0; i < 200; i++) begin
      automatic int t1 = $urandom_range(0, NT - 1), k1 = $urandom_range(0, DEV_COLS - 1);
      automatic int t2 = $urandom_range(0, NT - 1), k2 = $urandom_range(0, DEV_COLS - 1);
      pa_type = TYPE_W'(t1); pa_idx = POS_W'(k1); pb_type = TYPE_W'(t2); pb_idx = POS_W'(k2);
      #1;
      check(pa_pos == pl[t1][k1] && pb_pos == pl[t2][k2], "position read ports");
    end
    // locations
    for (int i = 0; i < 256; i++) begin
      lm[i] = loc_t'({$urandom, $urandom});
      loc_we = 1; loc_waddr = LOC_AW'(i + 100); loc_wdata = lm[i];
      @(posedge clk); #1;
    end
    loc_we = 0;
    for (int i = 0; i < 100; i++) begin
      automatic int a = $urandom_range(0, 255), b = $urandom_range(0, 255);
      loca_addr = LOC_AW'(a + 100); locb_addr = LOC_AW'(b + 100); #1;
      check(loca_data == lm[a] && locb_data == lm[b], "location read ports");
    end
    // state buffer in two context areas
    for (int s = 2; s <= 9; s += 7)
      for (int i = 0; i < 64; i++) begin
        automatic int a = (s << STATE_AW) + i;
        sm[a] = 8'($urandom);
        st_we = 1; st_waddr = CTX_AW'(a); st_wdata = sm[a];
        @(posedge clk); #1;
      end
    st_we = 0;
    for (int s = 2; s <= 9; s += 7)
      for (int i = 0; i < 63; i++) begin
        st_raddr = CTX_AW'((s << STATE_AW) + i); host_st_addr = CTX_AW'((s << STATE_AW) + 63 - i); #1;
        check(st_rdata0 == sm[(s << STATE_AW) + i] && st_rdata1 == sm[(s << STATE_AW) + i + 1] &&
              host_st_data == sm[(s << STATE_AW) + 63 - i], $sformatf("state buffer area %0d byte %0d", s, i));
      end
    // slots and occupancy
    for (int r = 0; r < 30; r++) begin
      automatic logic [DEV_COLS-1:0] e = '0;
      for (int s = 0; s < NS; s++) begin
        sls[s] = '{valid: ($urandom_range(0, 2) != 0), ttype: TYPE_W'($urandom_range(0, NT - 1)),
                   start: col_t'($urandom_range(1, 70))};
        sl_we = 1; sl_waddr = SLOT_AW'(s); sl_wdata = sls[s];
        @(posedge clk); #1;
      end
      sl_we = 0;
      for (int s = 0; s < NS; s++) begin
        check(slots[s] == sls[s], "slot read back");
        if (sls[s].valid)
          for (int c = int'(sls[s].start); c < int'(sls[s].start) + int'(tys[sls[s].ttype].width) && c <= DEV_COLS; c++)
            e[c - 1] = 1'b1;
      end
      check(occ == e, $sformatf("occupancy round %0d", r));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
