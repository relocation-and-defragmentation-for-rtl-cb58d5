// State Extraction Filter: picks the state bits out of the readback frames while they stream
// past, so states are extracted during the readback and not afterwards.
//
// Started with the base and length of the task's state location list (runs of consecutive bit
// offsets within the concatenated state-frame data, see loc_run_matcher), it consumes the
// readback byte stream (in_*, one byte per cycle) and packs the selected bits, in stream order,
// LSB first (unused bits of the last byte 0), into bytes written to the state buffer (st_we/st_waddr/st_wdata) from address 0.
// A byte that holds the end of one run and the start of the next is examined twice, so the
// input is stalled for one cycle per such run boundary. After the beat marked `eos` a last
// partial byte is flushed, nbits gives the number of state bits, and done pulses.
// The location memory is read combinationally through loc_addr/loc_data.
// Bit order inside a byte (bit k = offset +k) and the packing are this design's choices.
module state_extraction_filter
  import reloc_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic [LOC_AW-1:0]    loc_base,
  input  logic [LOC_AW:0]      loc_cnt,
  output logic [LOC_AW-1:0]    loc_addr,
  input  loc_t                 loc_data,
  input  logic                 in_valid,
  output logic                 in_ready,
  input  fbeat_t               in_beat,
  output logic                 st_we,
  output logic [STATE_AW-1:0]  st_waddr,
  output logic [7:0]           st_wdata,
  output logic [LOC_OFS_W-1:0] nbits,
  output logic                 busy,
  output logic                 done
);
  typedef enum logic [1:0] {S_IDLE, S_RUN, S_FLUSH} state_e;
  state_e state;

  logic [LOC_AW:0]      ptr;
  logic [LOC_AW-1:0]    base;
  logic [LOC_AW:0]      cnt;
  logic [LOC_OFS_W-1:0] byte_bit;
  logic [15:0]          acc;
  logic [4:0]           acc_n;
  logic [STATE_AW-1:0]  waddr;

  logic [7:0] mask;
  logic       advance, hold;

  assign loc_addr = base + ptr[LOC_AW-1:0];

  loc_run_matcher u_match (
    .byte_bit (byte_bit),
    .run      (loc_data),
    .run_ok   (ptr < cnt),
    .more     ((ptr + 1'b1) < cnt),
    .mask     (mask),
    .advance  (advance),
    .hold     (hold)
  );

  assign in_ready = (state == S_RUN) && !hold;
  wire   fire     = (state == S_RUN) && in_valid;

  // compaction of the selected bits onto the accumulator
  logic [15:0] nacc;
  logic [4:0]  nn;
  always_comb begin
    nacc = acc;
    nn   = acc_n;
    for (int k = 0; k < 8; k++)
      if (mask[k]) begin
        nacc[nn[3:0]] = in_beat.data[k];
        nn            = nn + 1'b1;
      end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      ptr      <= '0;
      base     <= '0;
      cnt      <= '0;
      byte_bit <= '0;
      acc      <= '0;
      acc_n    <= '0;
      waddr    <= '0;
      st_we    <= 1'b0;
      st_waddr <= '0;
      st_wdata <= '0;
      nbits    <= '0;
      done     <= 1'b0;
    end else begin
      st_we <= 1'b0;
      done  <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          state    <= S_RUN;
          base     <= loc_base;
          cnt      <= loc_cnt;
          ptr      <= '0;
          byte_bit <= '0;
          acc      <= '0;
          acc_n    <= '0;
          waddr    <= '0;
          nbits    <= '0;
        end
        S_RUN: if (fire) begin
          if (advance) ptr <= ptr + 1'b1;
          nbits <= nbits + LOC_OFS_W'($countones(mask));
          if (nn >= 5'd8) begin
            st_we    <= 1'b1;
            st_waddr <= waddr;
            st_wdata <= nacc[7:0];
            waddr    <= waddr + 1'b1;
            acc      <= {8'h00, nacc[15:8]};
            acc_n    <= nn - 5'd8;
          end else begin
            acc   <= nacc;
            acc_n <= nn;
          end
          if (!hold) begin
            byte_bit <= byte_bit + LOC_OFS_W'(8);
            if (in_beat.eos) state <= S_FLUSH;
          end
        end
        S_FLUSH: begin
          if (acc_n != '0) begin
            st_we    <= 1'b1;
            st_waddr <= waddr;
            st_wdata <= acc[7:0] & ~(8'hFF << acc_n[2:0]);  // unused bits read as 0
          end
          state <= S_IDLE;
          done  <= 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

endmodule
