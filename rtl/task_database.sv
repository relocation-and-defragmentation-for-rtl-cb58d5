// Task database: everything the relocation machinery knows about task types and placed tasks.
//
//  * type table (NUM_TYPES entries, type_info_t): width and BlockRAM column count of each task
//    type, the column its pre-implemented bitstream was built for, the bitstream address, the
//    number of feasible positions and the two state location lists (readback and preset bits).
//    Written by the host (ty_we), all entries visible at once (types).
//  * feasible position memory: for each type up to MAX_POS leftmost columns, stored in
//    ascending position-weight order (computed off-line). Host write port, two combinational
//    read ports (pa_*, pb_*).
//  * slot table (NUM_SLOTS entries, slot_t): the tasks currently placed and their leftmost
//    column. Written by the relocation controller (sl_we), all entries visible (slots), and
//    the resulting column occupancy vector (occ, bit x-1 = column x busy).
//  * location memory (LOC_DEPTH runs of state bit offsets): host write, two combinational read
//    ports, one per filter.
//  * state buffer (STATE_BYTES bytes, one 64 KB context area per slot, address {slot, offset}):
//    written by the State Extraction Filter, read by the State Inclusion Filter (two
//    neighbouring bytes) and by the host. A context area holds all flip-flop states of a task
//    plus the contents of one BlockRAM column.
// Contents follow the database entry of the design (current location, bitstream address, state
// values); the split into tables, the sizes and the fixed context area per slot are own choices.
module task_database
  import reloc_pkg::*;
#(
  parameter int unsigned NUM_TYPES   = 8,
  parameter int unsigned NUM_SLOTS   = 16,
  parameter int unsigned MAX_POS     = DEV_COLS,
  parameter int unsigned LOC_DEPTH   = 1 << LOC_AW,
  parameter int unsigned STATE_BYTES = 1 << CTX_AW
) (
  input  logic                         clk,
  input  logic                         rst_n,
  // type table
  input  logic                         ty_we,
  input  logic [TYPE_W-1:0]            ty_waddr,
  input  type_info_t                   ty_wdata,
  output type_info_t                   types [NUM_TYPES],
  // feasible positions
  input  logic                         pos_we,
  input  logic [TYPE_W-1:0]            pos_wtype,
  input  logic [POS_W-1:0]             pos_widx,
  input  col_t                         pos_wdata,
  input  logic [TYPE_W-1:0]            pa_type,
  input  logic [POS_W-1:0]             pa_idx,
  output col_t                         pa_pos,
  input  logic [TYPE_W-1:0]            pb_type,
  input  logic [POS_W-1:0]             pb_idx,
  output col_t                         pb_pos,
  // slot table
  input  logic                         sl_we,
  input  logic [SLOT_AW-1:0]           sl_waddr,
  input  slot_t                        sl_wdata,
  output slot_t                        slots [NUM_SLOTS],
  output logic [DEV_COLS-1:0]          occ,
  // location memory
  input  logic                         loc_we,
  input  logic [LOC_AW-1:0]            loc_waddr,
  input  loc_t                         loc_wdata,
  input  logic [LOC_AW-1:0]            loca_addr,
  output loc_t                         loca_data,
  input  logic [LOC_AW-1:0]            locb_addr,
  output loc_t                         locb_data,
  // state buffer
  input  logic                         st_we,
  input  logic [CTX_AW-1:0]            st_waddr,
  input  logic [7:0]                   st_wdata,
  input  logic [CTX_AW-1:0]            st_raddr,
  output logic [7:0]                   st_rdata0,
  output logic [7:0]                   st_rdata1,
  input  logic [CTX_AW-1:0]            host_st_addr,
  output logic [7:0]                   host_st_data
);

  type_info_t types_q [NUM_TYPES];
  col_t       pos_mem [NUM_TYPES * MAX_POS];
  slot_t      slots_q [NUM_SLOTS];
  loc_t       loc_mem [LOC_DEPTH];
  logic [7:0] st_mem  [STATE_BYTES];

  // small tables: registers with reset
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int t = 0; t < NUM_TYPES; t++) types_q[t] <= '0;
      for (int s = 0; s < NUM_SLOTS; s++) slots_q[s] <= '0;
    end else begin
      if (ty_we) types_q[ty_waddr] <= ty_wdata;
      if (sl_we) slots_q[sl_waddr] <= sl_wdata;
    end
  end

  // large tables: plain memories, written by their owners before use
  always_ff @(posedge clk) begin
    if (pos_we) pos_mem[int'(pos_wtype) * MAX_POS + int'(pos_widx)] <= pos_wdata;
    if (loc_we) loc_mem[loc_waddr] <= loc_wdata;
    if (st_we)  st_mem[st_waddr]   <= st_wdata;
  end

  assign types = types_q;
  assign slots = slots_q;

  assign pa_pos       = pos_mem[int'(pa_type) * MAX_POS + int'(pa_idx)];
  assign pb_pos       = pos_mem[int'(pb_type) * MAX_POS + int'(pb_idx)];
  assign loca_data    = loc_mem[loca_addr];
  assign locb_data    = loc_mem[locb_addr];
  assign st_rdata0    = st_mem[st_raddr];
  assign st_rdata1    = st_mem[st_raddr + 1'b1];
  assign host_st_data = st_mem[host_st_addr];

  always_comb begin
    occ = '0;
    for (int s = 0; s < NUM_SLOTS; s++)
      if (slots_q[s].valid)
        occ |= col_mask(slots_q[s].start, types_q[slots_q[s].ttype].width);
  end

endmodule
