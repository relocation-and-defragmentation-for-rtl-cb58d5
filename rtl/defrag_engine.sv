// Partial displacement defragmentation.
//
// Called when a requested task m_req cannot be placed. On a virtual copy of the occupancy it
// tries every feasible position x(i) of m_req in list order: the placed tasks intersecting
// m_req at x(i) (M_int) are removed, m_req is put at x(i), and the removed tasks are placed
// again one after another (lowest slot first) with the SUP Fit rule on the virtual map. If all
// of them find a place, the relocation cost of M_int, sum of 48 N_clb + 237 N_ram frames, is
// compared with the best so far and kept if strictly lower. The original map is then restored
// (the virtual map is rebuilt from the real one for the next i). At the end the best position
// (x_best), the tasks to move (def_mask) with their new columns (new_pos) and the cost (t_min,
// in frames) are presented, and success says whether any solution was found.
//
// Timing: start pulse; per feasible position 1 cycle to build the virtual map, per displaced
// task one SUP Fit search (entries checked + 2 cycles), 1 cycle for the cost; done pulses at
// the end. The flow follows the design's flow chart; the order in which displaced tasks are
// re-placed is own choice.
module defrag_engine
  import reloc_pkg::*;
#(
  parameter int unsigned NUM_TYPES = 8,
  parameter int unsigned NUM_SLOTS = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic [TYPE_W-1:0]   req_type,
  input  type_info_t          types [NUM_TYPES],
  input  slot_t               slots [NUM_SLOTS],
  input  logic [DEV_COLS-1:0] occ,
  output logic [TYPE_W-1:0]   rd_type,
  output logic [POS_W-1:0]    rd_idx,
  input  col_t                rd_pos,
  output logic                busy,
  output logic                done,
  output logic                success,
  output col_t                x_best,
  output logic [NUM_SLOTS-1:0] def_mask,
  output col_t                new_pos [NUM_SLOTS],
  output logic [31:0]         t_min,
  output logic [31:0]         n_tried,    // feasible positions whose displaced tasks all fitted
  output logic [31:0]         n_rejected  // feasible positions rejected (a displaced task did not fit)
);
  typedef enum logic [2:0] {S_IDLE, S_SEL, S_NEXT, S_WAIT, S_COST} state_e;
  state_e state;

  logic [TYPE_W-1:0]   rtype;
  logic [POS_W:0]      i;
  col_t                x_cur;
  logic [NUM_SLOTS-1:0] int_mask, todo;
  logic [DEV_COLS-1:0] vocc;
  col_t                cand_pos [NUM_SLOTS];
  logic                best_valid;

  // ---- embedded SUP Fit search on the virtual map --------------------------------------------
  logic                pl_start, pl_done, pl_found, pl_busy;
  col_t                pl_pos;
  logic [TYPE_W-1:0]   pl_rd_type;
  logic [POS_W-1:0]    pl_rd_idx;
  logic [$clog2(NUM_SLOTS)-1:0] j;
  logic                j_any;

  always_comb begin
    j     = '0;
    j_any = 1'b0;
    for (int s = NUM_SLOTS - 1; s >= 0; s--)
      if (todo[s]) begin
        j     = s[$clog2(NUM_SLOTS)-1:0];
        j_any = 1'b1;
      end
  end

  wire [TYPE_W-1:0] jtype = slots[j].ttype;

  sup_fit_placer u_fit (
    .clk       (clk),
    .rst_n     (rst_n),
    .start     (pl_start),
    .req_type  (jtype),
    .req_width (types[jtype].width),
    .req_npos  (types[jtype].n_pos),
    .occ       (vocc),
    .rd_type   (pl_rd_type),
    .rd_idx    (pl_rd_idx),
    .rd_pos    (rd_pos),
    .busy      (pl_busy),
    .done      (pl_done),
    .found     (pl_found),
    .pos       (pl_pos)
  );

  // the position read port serves m_req's list while selecting, the search otherwise
  assign rd_type = (state == S_SEL) ? rtype : pl_rd_type;
  assign rd_idx  = (state == S_SEL) ? i[POS_W-1:0] : pl_rd_idx;
  assign pl_start = (state == S_NEXT) && j_any;

  // ---- intersection with m_req at the selected position --------------------------------------
  logic [NUM_SLOTS-1:0] isect;
  logic [DEV_COLS-1:0]  req_cols, rem_cols;
  always_comb begin
    req_cols = col_mask(rd_pos, types[rtype].width);
    rem_cols = '0;
    for (int s = 0; s < NUM_SLOTS; s++) begin
      isect[s] = slots[s].valid &&
                 ((col_mask(slots[s].start, types[slots[s].ttype].width) & req_cols) != '0);
      if (isect[s]) rem_cols |= col_mask(slots[s].start, types[slots[s].ttype].width);
    end
  end

  logic [31:0] cost;
  always_comb begin
    cost = '0;
    for (int s = 0; s < NUM_SLOTS; s++)
      if (int_mask[s]) cost += reloc_cost(types[slots[s].ttype].width, types[slots[s].ttype].n_ram);
  end

  wire pos_ok = (rd_pos != '0) && (int'(rd_pos) + int'(types[rtype].width) - 1 <= DEV_COLS);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      rtype      <= '0;
      i          <= '0;
      x_cur      <= '0;
      int_mask   <= '0;
      todo       <= '0;
      vocc       <= '0;
      best_valid <= 1'b0;
      done       <= 1'b0;
      success    <= 1'b0;
      x_best     <= '0;
      def_mask   <= '0;
      t_min      <= '1;
      n_tried    <= '0;
      n_rejected <= '0;
      for (int s = 0; s < NUM_SLOTS; s++) begin
        cand_pos[s] <= '0;
        new_pos[s]  <= '0;
      end
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          rtype      <= req_type;
          i          <= '0;
          best_valid <= 1'b0;
          t_min      <= '1;            // "infinity"
          def_mask   <= '0;
          state      <= S_SEL;
        end
        S_SEL: begin
          if (i >= types[rtype].n_pos) begin
            success <= best_valid;
            done    <= 1'b1;
            state   <= S_IDLE;
          end else if (!pos_ok) begin
            i <= i + 1'b1;
          end else begin
            // remove M_int, allocate m_req at x(i)
            x_cur    <= rd_pos;
            int_mask <= isect;
            todo     <= isect;
            vocc     <= (occ & ~rem_cols) | req_cols;
            state    <= S_NEXT;
          end
        end
        S_NEXT: if (!j_any) state <= S_COST;
                else        state <= S_WAIT;
        S_WAIT: if (pl_done) begin
          if (pl_found) begin
            vocc        <= vocc | col_mask(pl_pos, types[jtype].width);
            cand_pos[j] <= pl_pos;
            todo[j]     <= 1'b0;
            state       <= S_NEXT;
          end else begin
            // a displaced task finds no place: restore and try the next position
            n_rejected <= n_rejected + 1'b1;
            i          <= i + 1'b1;
            state      <= S_SEL;
          end
        end
        S_COST: begin
          n_tried <= n_tried + 1'b1;
          if (cost < t_min) begin
            best_valid <= 1'b1;
            t_min      <= cost;
            x_best     <= x_cur;
            def_mask   <= int_mask;
            for (int s = 0; s < NUM_SLOTS; s++) new_pos[s] <= cand_pos[s];
          end
          i     <= i + 1'b1;
          state <= S_SEL;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

endmodule
