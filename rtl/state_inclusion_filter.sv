// State Inclusion Filter: writes saved state values into the preset bits of a task's
// pre-implemented partial bitstream while the bitstream streams through.
//
// Started with the base and length of the task's preset-bit location list (runs of bit offsets
// within the concatenated frame data of the allocation bitstream), it replaces, byte by byte,
// every located bit with the next saved state bit, taken in order from the state buffer (two
// neighbouring bytes read combinationally at st_raddr). All other bits and all frame tags pass
// unchanged. A list of length 0 passes the bitstream through untouched (a freshly allocated
// task). One byte per cycle; one extra cycle per run that ends inside a byte where another run
// may start. `done` pulses after the beat marked `eos` has left.
// Bit order and the packed state buffer layout match the State Extraction Filter; both are this
// design's choices.
module state_inclusion_filter
  import reloc_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic [LOC_AW-1:0]   loc_base,
  input  logic [LOC_AW:0]     loc_cnt,
  output logic [LOC_AW-1:0]   loc_addr,
  input  loc_t                loc_data,
  output logic [STATE_AW-1:0] st_raddr,
  input  logic [7:0]          st_rdata0,   // byte at st_raddr
  input  logic [7:0]          st_rdata1,   // byte at st_raddr + 1
  input  logic                in_valid,
  output logic                in_ready,
  input  fbeat_t              in_beat,
  output logic                out_valid,
  input  logic                out_ready,
  output fbeat_t              out_beat,
  output logic                busy,
  output logic                done
);
  logic                 active;
  logic [LOC_AW:0]      ptr;
  logic [LOC_AW-1:0]    base;
  logic [LOC_AW:0]      cnt;
  logic [LOC_OFS_W-1:0] byte_bit;
  logic [STATE_AW+2:0]  sp;       // next state bit to insert
  logic                 held;
  logic [7:0]           hbyte;

  logic [7:0] mask;
  logic       advance, hold;

  assign loc_addr = base + ptr[LOC_AW-1:0];
  assign st_raddr = sp[STATE_AW+2:3];

  loc_run_matcher u_match (
    .byte_bit (byte_bit),
    .run      (loc_data),
    .run_ok   (ptr < cnt),
    .more     ((ptr + 1'b1) < cnt),
    .mask     (mask),
    .advance  (advance),
    .hold     (hold)
  );

  logic [15:0] win16;
  logic [7:0]  win, cur, nb;
  always_comb begin
    int j;
    win16 = {st_rdata1, st_rdata0} >> sp[2:0];
    win   = win16[7:0];
    cur   = held ? hbyte : in_beat.data;
    nb    = cur;
    j     = 0;
    for (int k = 0; k < 8; k++)
      if (mask[k]) begin
        nb[k] = win[j];
        j++;
      end
  end

  wire fire = active && in_valid && (hold || out_ready);

  always_comb begin
    out_valid     = active && in_valid && !hold;
    out_beat      = in_beat;
    out_beat.data = nb;
    in_ready      = active && !hold && out_ready;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active   <= 1'b0;
      ptr      <= '0;
      base     <= '0;
      cnt      <= '0;
      byte_bit <= '0;
      sp       <= '0;
      held     <= 1'b0;
      hbyte    <= '0;
      done     <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!active) begin
        if (start) begin
          active   <= 1'b1;
          base     <= loc_base;
          cnt      <= loc_cnt;
          ptr      <= '0;
          byte_bit <= '0;
          sp       <= '0;
          held     <= 1'b0;
        end
      end else if (fire) begin
        if (advance) ptr <= ptr + 1'b1;
        sp <= sp + (STATE_AW+3)'($countones(mask));
        if (hold) begin
          held  <= 1'b1;
          hbyte <= nb;
        end else begin
          held     <= 1'b0;
          byte_bit <= byte_bit + LOC_OFS_W'(8);
          if (in_beat.eos) begin
            active <= 1'b0;
            done   <= 1'b1;
          end
        end
      end
    end
  end

  assign busy = active;

endmodule
