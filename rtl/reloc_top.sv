// Run-time relocation and defragmentation system for a column-configured, heterogeneous FPGA.
//
// The host asks for task types to be placed or removed (op_*/resp_*). A SUP Fit placer picks
// the free feasible position with the lowest static utilization weight; when none is free but
// enough columns are, the partial displacement defragmentation engine finds the cheapest set of
// placed tasks to move. Moving a task keeps its state: the Configuration Manager reads back only
// the frames holding its flip-flop (and BlockRAM) state, the State Extraction Filter stores the
// state bits in the task database while they stream by, the task's columns are erased, and its
// pre-implemented bitstream is rewritten with the saved states (State Inclusion Filter) and
// moved to the new column (relocation filter) on its way back into the configuration port.
//
// Outside this module: the FPGA configuration port (cp_*, one byte per cycle), the memory
// holding the pre-implemented partial bitstreams (bs_req/bs_addr requests one, bs_* delivers it
// as a frame stream), the bitstream relocation filter (rep_out_* leaves, rep_in_* returns,
// rep_orig_col/rep_new_col tell it the move), and the hardware tasks themselves
// (task_clk_en, task_rst). The host fills the type table, the feasible position lists and the
// state location lists through the *_we ports before use.
module reloc_top
  import reloc_pkg::*;
#(
  parameter int unsigned NUM_TYPES = 8,
  parameter int unsigned NUM_SLOTS = 16,
  parameter int unsigned FRAME_B   = FRAME_BYTES,
  parameter logic [DEV_COLS-1:0] RAM_MAP = DEV_RAM_MAP
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // host: configuration of the database
  input  logic                 ty_we,
  input  logic [TYPE_W-1:0]    ty_waddr,
  input  type_info_t           ty_wdata,
  input  logic                 pos_we,
  input  logic [TYPE_W-1:0]    pos_wtype,
  input  logic [POS_W-1:0]     pos_widx,
  input  col_t                 pos_wdata,
  input  logic                 loc_we,
  input  logic [LOC_AW-1:0]    loc_waddr,
  input  loc_t                 loc_wdata,
  input  logic [CTX_AW-1:0]    host_st_addr,
  output logic [7:0]           host_st_data,
  // host: requests
  input  logic                 op_valid,
  output logic                 op_ready,
  input  logic                 op_remove,
  input  logic [TYPE_W-1:0]    op_type,
  input  logic [SLOT_AW-1:0]   op_slot,
  output logic                 resp_valid,
  output logic                 resp_ok,
  output logic [SLOT_AW-1:0]   resp_slot,
  output col_t                 resp_pos,
  output logic                 resp_defrag,
  output logic [DEV_COLS-1:0]  occ,
  // configuration port (SelectMAP / ICAP)
  output logic                 cp_cmd_valid,
  input  logic                 cp_cmd_ready,
  output cp_cmd_t              cp_cmd,
  input  logic                 cp_rd_valid,
  output logic                 cp_rd_ready,
  input  logic [7:0]           cp_rd_data,
  output logic                 cp_wr_valid,
  input  logic                 cp_wr_ready,
  output logic [7:0]           cp_wr_data,
  // pre-implemented bitstream store
  output logic                 bs_req,
  output logic [31:0]          bs_addr,
  input  logic                 bs_valid,
  output logic                 bs_ready,
  input  fbeat_t               bs_beat,
  // bitstream relocation filter
  output logic                 rep_out_valid,
  input  logic                 rep_out_ready,
  output fbeat_t               rep_out_beat,
  output col_t                 rep_orig_col,
  output col_t                 rep_new_col,
  input  logic                 rep_in_valid,
  output logic                 rep_in_ready,
  input  fbeat_t               rep_in_beat,
  // hardware tasks
  output logic [NUM_SLOTS-1:0] task_clk_en,
  output logic [NUM_SLOTS-1:0] task_rst,
  // statistics
  output logic [31:0]          n_placed,
  output logic [31:0]          n_defrag,
  output logic [31:0]          n_reloc,
  output logic [31:0]          n_refused,
  output logic [31:0]          n_removed,
  output logic [31:0]          n_state_bits,
  output logic [31:0]          defrag_frames,   // relocation cost (frames) of the last defragmentation
  output logic [31:0]          defrag_tried,    // positions tried since reset whose displaced tasks all fitted
  output logic [31:0]          defrag_rejected, // positions tried since reset where one did not fit
  output logic                 busy             // an operation or one of its units is active
);

  type_info_t types [NUM_TYPES];
  slot_t      slots [NUM_SLOTS];

  logic                sl_we;
  logic [SLOT_AW-1:0]  sl_waddr;
  slot_t               sl_wdata;
  logic [SLOT_AW-1:0]  ctx_slot;

  logic [TYPE_W-1:0]   pa_type, pb_type;
  logic [POS_W-1:0]    pa_idx, pb_idx;
  col_t                pa_pos, pb_pos;

  logic [LOC_AW-1:0]   loca_addr, locb_addr;
  loc_t                loca_data, locb_data;

  logic                st_we;
  logic [STATE_AW-1:0] sef_waddr, sif_raddr;
  logic [7:0]          st_wdata, st_rdata0, st_rdata1;

  // placer / defragmentation
  logic                pl_start, pl_done, pl_found, pl_busy;
  logic [TYPE_W-1:0]   pl_type;
  col_t                pl_pos;
  logic                df_start, df_done, df_success, df_busy;
  col_t                df_x_best;
  logic [NUM_SLOTS-1:0] df_def_mask;
  col_t                df_new_pos [NUM_SLOTS];
  logic [31:0]         df_t_min, df_tried, df_rejected;

  // configuration path
  logic                cm_start_cap, cm_start_del, cm_start_wr, cm_done, cm_busy;
  col_t                cm_first, cm_last;
  logic                rb_valid, rb_ready;
  fbeat_t              rb_beat;
  logic                sef_start, sef_done, sef_busy;
  logic [LOC_AW-1:0]   sef_base, sif_base;
  logic [LOC_AW:0]     sef_cnt, sif_cnt;
  logic                sif_start, sif_done, sif_busy;
  logic [LOC_OFS_W-1:0] sef_nbits;

  task_database #(.NUM_TYPES(NUM_TYPES), .NUM_SLOTS(NUM_SLOTS)) u_db (
    .clk, .rst_n,
    .ty_we, .ty_waddr, .ty_wdata, .types,
    .pos_we, .pos_wtype, .pos_widx, .pos_wdata,
    .pa_type, .pa_idx, .pa_pos, .pb_type, .pb_idx, .pb_pos,
    .sl_we, .sl_waddr, .sl_wdata, .slots, .occ,
    .loc_we, .loc_waddr, .loc_wdata,
    .loca_addr, .loca_data, .locb_addr, .locb_data,
    .st_we, .st_waddr({ctx_slot, sef_waddr}), .st_wdata,
    .st_raddr({ctx_slot, sif_raddr}), .st_rdata0, .st_rdata1,
    .host_st_addr, .host_st_data
  );

  sup_fit_placer u_placer (
    .clk, .rst_n,
    .start     (pl_start),
    .req_type  (pl_type),
    .req_width (types[pl_type].width),
    .req_npos  (types[pl_type].n_pos),
    .occ       (occ),
    .rd_type   (pa_type),
    .rd_idx    (pa_idx),
    .rd_pos    (pa_pos),
    .busy      (pl_busy),
    .done      (pl_done),
    .found     (pl_found),
    .pos       (pl_pos)
  );

  defrag_engine #(.NUM_TYPES(NUM_TYPES), .NUM_SLOTS(NUM_SLOTS)) u_defrag (
    .clk, .rst_n,
    .start      (df_start),
    .req_type   (pl_type),
    .types, .slots, .occ,
    .rd_type    (pb_type),
    .rd_idx     (pb_idx),
    .rd_pos     (pb_pos),
    .busy       (df_busy),
    .done       (df_done),
    .success    (df_success),
    .x_best     (df_x_best),
    .def_mask   (df_def_mask),
    .new_pos    (df_new_pos),
    .t_min      (df_t_min),
    .n_tried    (df_tried),
    .n_rejected (df_rejected)
  );

  config_manager #(.FRAME_B(FRAME_B), .RAM_MAP(RAM_MAP)) u_cm (
    .clk, .rst_n,
    .start_cap (cm_start_cap),
    .start_del (cm_start_del),
    .start_wr  (cm_start_wr),
    .col_first (cm_first),
    .col_last  (cm_last),
    .busy      (cm_busy),
    .done      (cm_done),
    .cp_cmd_valid, .cp_cmd_ready, .cp_cmd,
    .cp_rd_valid, .cp_rd_ready, .cp_rd_data,
    .cp_wr_valid, .cp_wr_ready, .cp_wr_data,
    .rb_valid, .rb_ready, .rb_beat,
    .wr_valid  (rep_in_valid),
    .wr_ready  (rep_in_ready),
    .wr_beat   (rep_in_beat)
  );

  state_extraction_filter u_sef (
    .clk, .rst_n,
    .start    (sef_start),
    .loc_base (sef_base),
    .loc_cnt  (sef_cnt),
    .loc_addr (loca_addr),
    .loc_data (loca_data),
    .in_valid (rb_valid),
    .in_ready (rb_ready),
    .in_beat  (rb_beat),
    .st_we    (st_we),
    .st_waddr (sef_waddr),
    .st_wdata (st_wdata),
    .nbits    (sef_nbits),
    .busy     (sef_busy),
    .done     (sef_done)
  );

  state_inclusion_filter u_sif (
    .clk, .rst_n,
    .start     (sif_start),
    .loc_base  (sif_base),
    .loc_cnt   (sif_cnt),
    .loc_addr  (locb_addr),
    .loc_data  (locb_data),
    .st_raddr  (sif_raddr),
    .st_rdata0 (st_rdata0),
    .st_rdata1 (st_rdata1),
    .in_valid  (bs_valid),
    .in_ready  (bs_ready),
    .in_beat   (bs_beat),
    .out_valid (rep_out_valid),
    .out_ready (rep_out_ready),
    .out_beat  (rep_out_beat),
    .busy      (sif_busy),
    .done      (sif_done)
  );

  reloc_controller #(.NUM_TYPES(NUM_TYPES), .NUM_SLOTS(NUM_SLOTS)) u_ctrl (
    .clk, .rst_n,
    .op_valid, .op_ready, .op_remove, .op_type, .op_slot,
    .resp_valid, .resp_ok, .resp_slot, .resp_pos, .resp_defrag,
    .types, .slots, .occ,
    .sl_we, .sl_waddr, .sl_wdata, .ctx_slot,
    .pl_start, .pl_type, .pl_done, .pl_found, .pl_pos,
    .df_start, .df_done, .df_success, .df_x_best, .df_def_mask, .df_new_pos,
    .cm_start_cap, .cm_start_del, .cm_start_wr, .cm_first, .cm_last, .cm_done,
    .sef_start, .sef_base, .sef_cnt, .sef_done,
    .sif_start, .sif_base, .sif_cnt, .sif_done,
    .bs_req, .bs_addr, .rep_orig_col, .rep_new_col,
    .task_clk_en, .task_rst,
    .n_placed, .n_defrag, .n_reloc, .n_refused, .n_removed
  );

  // total state bits captured since reset
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)        n_state_bits <= '0;
    else if (sef_done) n_state_bits <= n_state_bits + 32'(sef_nbits);

  // cost of the last successful defragmentation, in frames through the configuration port
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)                       defrag_frames <= '0;
    else if (df_done && df_success)   defrag_frames <= df_t_min;

  assign defrag_tried    = df_tried;
  assign defrag_rejected = df_rejected;

  assign busy = !op_ready || pl_busy || df_busy || cm_busy || sef_busy || sif_busy;

endmodule
