// Relocation controller: turns host requests into placement, defragmentation and the
// configuration-port steps of context relocation.
//
// PLACE(type): take the lowest free slot, run the SUP Fit placer. If it finds a position the
// task is allocated there. If not, and at least as many columns are free as the task needs,
// the partial displacement defragmentation is run; on success the displaced tasks (def_mask)
// are moved and the requested task is allocated at x_best. Otherwise the request is answered
// with ok = 0 (the host keeps the task queued).
// Moving the displaced tasks is done in two passes so that no new position is written while an
// old task still sits there:
//   pass 1, for every displaced task: stop its clock (task_clk_en low), read back its state
//   frames (Configuration Manager + State Extraction Filter into the task's context area),
//   then erase its columns with an empty configuration;
//   pass 2, for every displaced task: record the new column, stream its pre-implemented
//   bitstream from the bitstream store through the State Inclusion Filter (saved states into
//   preset bits) and the relocation filter (new column) into the Configuration Manager, then
//   pulse task_rst so the registers take their preset values, and restart the clock.
// A newly placed task is allocated the same way with an empty preset-bit list.
// REMOVE(slot): stop the clock, erase the task's columns, free the slot.
// Every operation ends with one resp_valid pulse. Counters report how often each mechanism ran.
// The steps and their order follow the design description; the two-pass order, the slot
// bookkeeping and the host interface are own choices.
module reloc_controller
  import reloc_pkg::*;
#(
  parameter int unsigned NUM_TYPES = 8,
  parameter int unsigned NUM_SLOTS = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  // host
  input  logic                op_valid,
  output logic                op_ready,
  input  logic                op_remove,     // 0: place op_type, 1: remove op_slot
  input  logic [TYPE_W-1:0]   op_type,
  input  logic [SLOT_AW-1:0]  op_slot,
  output logic                resp_valid,
  output logic                resp_ok,
  output logic [SLOT_AW-1:0]  resp_slot,
  output col_t                resp_pos,
  output logic                resp_defrag,
  // database
  input  type_info_t          types [NUM_TYPES],
  input  slot_t               slots [NUM_SLOTS],
  input  logic [DEV_COLS-1:0] occ,
  output logic                sl_we,
  output logic [SLOT_AW-1:0]  sl_waddr,
  output slot_t               sl_wdata,
  output logic [SLOT_AW-1:0]  ctx_slot,      // context area in use
  // placer
  output logic                pl_start,
  output logic [TYPE_W-1:0]   pl_type,
  input  logic                pl_done,
  input  logic                pl_found,
  input  col_t                pl_pos,
  // defragmentation
  output logic                df_start,
  input  logic                df_done,
  input  logic                df_success,
  input  col_t                df_x_best,
  input  logic [NUM_SLOTS-1:0] df_def_mask,
  input  col_t                df_new_pos [NUM_SLOTS],
  // configuration manager
  output logic                cm_start_cap,
  output logic                cm_start_del,
  output logic                cm_start_wr,
  output col_t                cm_first,
  output col_t                cm_last,
  input  logic                cm_done,
  // state extraction filter
  output logic                sef_start,
  output logic [LOC_AW-1:0]   sef_base,
  output logic [LOC_AW:0]     sef_cnt,
  input  logic                sef_done,
  // state inclusion filter
  output logic                sif_start,
  output logic [LOC_AW-1:0]   sif_base,
  output logic [LOC_AW:0]     sif_cnt,
  input  logic                sif_done,
  // bitstream store and relocation filter
  output logic                bs_req,
  output logic [31:0]         bs_addr,
  output col_t                rep_orig_col,
  output col_t                rep_new_col,
  // hardware tasks
  output logic [NUM_SLOTS-1:0] task_clk_en,
  output logic [NUM_SLOTS-1:0] task_rst,
  // statistics
  output logic [31:0]         n_placed,
  output logic [31:0]         n_defrag,
  output logic [31:0]         n_reloc,
  output logic [31:0]         n_refused,
  output logic [31:0]         n_removed
);
  typedef enum logic [3:0] {
    S_IDLE, S_PLACE, S_DEFRAG, S_P1_NEXT, S_CAP, S_DEL, S_P2_NEXT, S_ALLOC, S_RST,
    S_RESP, S_REM
  } state_e;
  state_e state;

  logic [TYPE_W-1:0]    req_type;
  logic [SLOT_AW-1:0]   req_slot;
  col_t                 req_x;
  logic                 did_defrag, ok;
  logic [NUM_SLOTS-1:0] p1_todo, p2_todo;
  col_t                 moves [NUM_SLOTS];
  logic [SLOT_AW-1:0]   cur;        // slot being worked on
  logic                 cur_is_req; // allocation of the requested task
  col_t                 cur_x;      // column written
  logic                 cm_seen, sef_seen, sif_seen;

  // remembers whether the operation in progress is a removal
  logic op_remove_q;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) op_remove_q <= 1'b0;
    else if (state == S_IDLE && op_valid) op_remove_q <= op_remove;

  // lowest free slot
  logic [SLOT_AW-1:0] free_slot;
  logic               free_any;
  always_comb begin
    free_slot = '0;
    free_any  = 1'b0;
    for (int s = NUM_SLOTS - 1; s >= 0; s--)
      if (!slots[s].valid) begin
        free_slot = SLOT_AW'(s);
        free_any  = 1'b1;
      end
  end

  function automatic logic [SLOT_AW-1:0] lowest(input logic [NUM_SLOTS-1:0] m);
    logic [SLOT_AW-1:0] r;
    r = '0;
    for (int s = NUM_SLOTS - 1; s >= 0; s--) if (m[s]) r = SLOT_AW'(s);
    return r;
  endfunction

  logic [7:0] free_cols;
  always_comb free_cols = 8'($countones(~occ));

  type_info_t cur_ti;
  assign cur_ti = types[slots[cur].ttype];

  assign op_ready = (state == S_IDLE);
  assign pl_type  = req_type;
  assign ctx_slot = cur;
  assign sef_base = cur_ti.cap_base;
  assign sef_cnt  = cur_ti.cap_cnt;
  assign sif_base = types[cur_is_req ? req_type : slots[cur].ttype].inc_base;
  assign sif_cnt  = cur_is_req ? '0 : cur_ti.inc_cnt;
  assign bs_addr  = types[cur_is_req ? req_type : slots[cur].ttype].bs_addr;
  assign rep_orig_col = types[cur_is_req ? req_type : slots[cur].ttype].orig_col;
  assign rep_new_col  = cur_x;
  assign cm_first = (state == S_ALLOC) ? cur_x : slots[cur].start;
  assign cm_last  = cm_first + types[cur_is_req ? req_type : slots[cur].ttype].width - 1'b1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= S_IDLE;
      req_type     <= '0;
      req_slot     <= '0;
      req_x        <= '0;
      did_defrag   <= 1'b0;
      ok           <= 1'b0;
      p1_todo      <= '0;
      p2_todo      <= '0;
      cur          <= '0;
      cur_is_req   <= 1'b0;
      cur_x        <= '0;
      cm_seen      <= 1'b0;
      sef_seen     <= 1'b0;
      sif_seen     <= 1'b0;
      for (int s = 0; s < NUM_SLOTS; s++) moves[s] <= '0;
      resp_valid   <= 1'b0;
      resp_ok      <= 1'b0;
      resp_slot    <= '0;
      resp_pos     <= '0;
      resp_defrag  <= 1'b0;
      sl_we        <= 1'b0;
      sl_waddr     <= '0;
      sl_wdata     <= '0;
      pl_start     <= 1'b0;
      df_start     <= 1'b0;
      cm_start_cap <= 1'b0;
      cm_start_del <= 1'b0;
      cm_start_wr  <= 1'b0;
      sef_start    <= 1'b0;
      sif_start    <= 1'b0;
      bs_req       <= 1'b0;
      task_clk_en  <= '0;
      task_rst     <= '0;
      n_placed     <= '0;
      n_defrag     <= '0;
      n_reloc      <= '0;
      n_refused    <= '0;
      n_removed    <= '0;
    end else begin
      resp_valid   <= 1'b0;
      sl_we        <= 1'b0;
      pl_start     <= 1'b0;
      df_start     <= 1'b0;
      cm_start_cap <= 1'b0;
      cm_start_del <= 1'b0;
      cm_start_wr  <= 1'b0;
      sef_start    <= 1'b0;
      sif_start    <= 1'b0;
      bs_req       <= 1'b0;
      task_rst     <= '0;
      unique case (state)
        S_IDLE: if (op_valid) begin
          did_defrag <= 1'b0;
          cur_is_req <= 1'b0;
          if (op_remove) begin
            cur <= op_slot;
            if (slots[op_slot].valid) begin
              task_clk_en[op_slot] <= 1'b0;
              cm_start_del <= 1'b1;
              state        <= S_REM;
            end else begin
              ok    <= 1'b0;
              state <= S_RESP;
            end
            req_slot <= op_slot;
            req_x    <= '0;
          end else begin
            req_type <= op_type;
            req_slot <= free_slot;
            req_x    <= '0;
            if (free_any && types[op_type].n_pos != '0) begin
              pl_start <= 1'b1;
              state    <= S_PLACE;
            end else begin
              ok    <= 1'b0;
              state <= S_RESP;
            end
          end
        end
        S_PLACE: if (pl_done) begin
          if (pl_found) begin
            req_x      <= pl_pos;
            cur        <= req_slot;
            cur_is_req <= 1'b1;
            cur_x      <= pl_pos;
            state      <= S_ALLOC;
            cm_seen    <= 1'b0;
            sif_seen   <= 1'b0;
            cm_start_wr <= 1'b1;
            sif_start   <= 1'b1;
            bs_req      <= 1'b1;
          end else if (free_cols >= 8'(types[req_type].width)) begin
            df_start <= 1'b1;
            state    <= S_DEFRAG;
          end else begin
            ok    <= 1'b0;
            state <= S_RESP;
          end
        end
        S_DEFRAG: if (df_done) begin
          if (df_success) begin
            did_defrag <= 1'b1;
            n_defrag   <= n_defrag + 1'b1;
            req_x      <= df_x_best;
            p1_todo    <= df_def_mask;
            p2_todo    <= df_def_mask;
            for (int s = 0; s < NUM_SLOTS; s++) moves[s] <= df_new_pos[s];
            state      <= S_P1_NEXT;
          end else begin
            ok    <= 1'b0;
            state <= S_RESP;
          end
        end
        // ---- pass 1: capture and erase every displaced task ----
        S_P1_NEXT: begin
          if (p1_todo == '0) state <= S_P2_NEXT;
          else begin
            cur      <= lowest(p1_todo);
            task_clk_en[lowest(p1_todo)] <= 1'b0;
            cm_start_cap <= 1'b1;
            sef_start    <= 1'b1;
            cm_seen      <= 1'b0;
            sef_seen     <= 1'b0;
            state        <= S_CAP;
          end
        end
        S_CAP: begin
          if (cm_done)  cm_seen  <= 1'b1;
          if (sef_done) sef_seen <= 1'b1;
          if ((cm_seen || cm_done) && (sef_seen || sef_done)) begin
            cm_start_del <= 1'b1;
            state        <= S_DEL;
          end
        end
        S_DEL: if (cm_done) begin
          p1_todo[cur] <= 1'b0;
          state        <= S_P1_NEXT;
        end
        // ---- pass 2: allocate every displaced task at its new column, then the request ----
        S_P2_NEXT: begin
          cm_seen  <= 1'b0;
          sif_seen <= 1'b0;
          if (p2_todo == '0) begin
            cur        <= req_slot;
            cur_is_req <= 1'b1;
            cur_x      <= req_x;
          end else begin
            cur        <= lowest(p2_todo);
            cur_is_req <= 1'b0;
            cur_x      <= moves[lowest(p2_todo)];
            sl_we      <= 1'b1;
            sl_waddr   <= lowest(p2_todo);
            sl_wdata   <= '{valid: 1'b1, ttype: slots[lowest(p2_todo)].ttype,
                            start: moves[lowest(p2_todo)]};
          end
          cm_start_wr <= 1'b1;
          sif_start   <= 1'b1;
          bs_req      <= 1'b1;
          state       <= S_ALLOC;
        end
        S_ALLOC: begin
          if (cm_done)  cm_seen  <= 1'b1;
          if (sif_done) sif_seen <= 1'b1;
          if ((cm_seen || cm_done) && (sif_seen || sif_done)) begin
            task_rst[cur]    <= 1'b1;
            task_clk_en[cur] <= 1'b1;
            state            <= S_RST;
            if (cur_is_req) begin
              sl_we    <= 1'b1;
              sl_waddr <= cur;
              sl_wdata <= '{valid: 1'b1, ttype: req_type, start: cur_x};
            end
          end
        end
        S_RST: begin
          if (cur_is_req) begin
            ok       <= 1'b1;
            n_placed <= n_placed + 1'b1;
            state    <= S_RESP;
          end else begin
            n_reloc      <= n_reloc + 1'b1;
            p2_todo[cur] <= 1'b0;
            state        <= S_P2_NEXT;
          end
        end
        S_REM: if (cm_done) begin
          sl_we     <= 1'b1;
          sl_waddr  <= cur;
          sl_wdata  <= '0;
          ok        <= 1'b1;
          n_removed <= n_removed + 1'b1;
          state     <= S_RESP;
        end
        S_RESP: begin
          resp_valid  <= 1'b1;
          resp_ok     <= ok;
          resp_slot   <= req_slot;
          resp_pos    <= req_x;
          resp_defrag <= did_defrag;
          if (!ok && !op_remove_q) n_refused <= n_refused + 1'b1;
          state       <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
