// SUP Fit placer (Static Utilization Probability Fit) for the 1D column placement model.
//
// Every task type has a list of feasible positions (leftmost columns where the column pattern
// of its pre-implemented bitstream recurs), sorted before run time by ascending position weight,
// i.e. the root mean square of the static utilization probabilities of the columns the position
// covers. At run time the placer only walks this list and returns the first position whose
// columns are all free in the occupancy vector `occ` (bit x-1 = column x busy); no weights are
// kept in hardware.
//
// Timing: start is a one-cycle pulse; one list entry is checked per cycle through the
// combinational position read port (rd_type/rd_idx -> rd_pos); done pulses in the cycle after
// the hit or after the last entry, with found/pos valid from then until the next start.
// A search over k entries therefore takes k+1 cycles.
// A position whose columns would run past the right edge of the device is skipped.
module sup_fit_placer
  import reloc_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic [TYPE_W-1:0]   req_type,
  input  col_t                req_width,
  input  logic [POS_W:0]      req_npos,
  input  logic [DEV_COLS-1:0] occ,
  output logic [TYPE_W-1:0]   rd_type,
  output logic [POS_W-1:0]    rd_idx,
  input  col_t                rd_pos,
  output logic                busy,
  output logic                done,
  output logic                found,
  output col_t                pos
);
  logic               active;
  logic [POS_W:0]     k;
  logic [TYPE_W-1:0]  ttype;
  col_t               width;
  logic [POS_W:0]     npos;

  assign rd_type = ttype;
  assign rd_idx  = k[POS_W-1:0];

  logic fits;
  always_comb begin
    fits = (rd_pos != '0) && (int'(rd_pos) + int'(width) - 1 <= DEV_COLS) &&
           ((occ & col_mask(rd_pos, width)) == '0);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active <= 1'b0;
      k      <= '0;
      ttype  <= '0;
      width  <= '0;
      npos   <= '0;
      done   <= 1'b0;
      found  <= 1'b0;
      pos    <= '0;
    end else begin
      done <= 1'b0;
      if (!active) begin
        if (start) begin
          active <= 1'b1;
          k      <= '0;
          ttype  <= req_type;
          width  <= req_width;
          npos   <= req_npos;
          found  <= 1'b0;
        end
      end else if (k >= npos) begin
        active <= 1'b0;
        done   <= 1'b1;
      end else if (fits) begin
        active <= 1'b0;
        done   <= 1'b1;
        found  <= 1'b1;
        pos    <= rd_pos;
      end else begin
        k <= k + 1'b1;
      end
    end
  end

  assign busy = active;

endmodule
