// Behavioural model of the memory holding pre-implemented partial bitstreams, for simulation
// only. On bs_req it streams the bitstream of a task of `width` columns built for column
// `orig_col`: 22 frames per CLB column and 86 per BlockRAM column (RAM_MAP), each frame tagged
// with its address, `eos` on the last byte. Frame contents are pattern(addr, column offset,
// minor, byte). STALL drops valid pseudo-randomly.
module tb_bs_store_model
  import reloc_pkg::*;
#(
  parameter int unsigned         FRAME_B = FRAME_BYTES,
  parameter logic [DEV_COLS-1:0] RAM_MAP = DEV_RAM_MAP,
  parameter bit                  STALL   = 1'b0
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        bs_req,
  input  logic [31:0] bs_addr,
  input  col_t        orig_col,
  input  col_t        width,
  output logic        bs_valid,
  input  logic        bs_ready,
  output fbeat_t      bs_beat
);
  logic        active, gate;
  logic [31:0] addr;
  col_t        c0, w;
  int unsigned rel, minor, bi;

  function automatic logic [7:0] pattern(input logic [31:0] a, input int r, input int m, input int b);
    return 8'(a * 7 + 32'(r) * 53 + 32'(m) * 29 + 32'(b) * 13 + 5) ^ 8'(b >> 3);
  endfunction

  function automatic int nfr(input col_t c);
    return RAM_MAP[c - 1] ? RAM_ALLOC_FRAMES : CLB_ALLOC_FRAMES;
  endfunction

  always_ff @(posedge clk) gate <= STALL ? ($urandom_range(0, 4) != 0) : 1'b1;

  always_comb begin
    bs_valid            = active && gate;
    bs_beat.data        = pattern(addr, int'(rel), int'(minor), int'(bi));
    bs_beat.faddr.major = c0 + col_t'(rel);
    bs_beat.faddr.minor = 7'(minor);
    bs_beat.first       = (bi == 0);
    bs_beat.last        = (bi == FRAME_B - 1);
    bs_beat.eos         = bs_beat.last && (int'(minor) == nfr(c0 + col_t'(rel)) - 1) && (rel == int'(w) - 1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active <= 1'b0; rel <= 0; minor <= 0; bi <= 0; addr <= '0; c0 <= '0; w <= '0;
    end else if (!active) begin
      if (bs_req) begin
        active <= 1'b1; addr <= bs_addr; c0 <= orig_col; w <= width; rel <= 0; minor <= 0; bi <= 0;
      end
    end else if (bs_valid && bs_ready) begin
      if (bs_beat.eos) active <= 1'b0;
      else if (bs_beat.last) begin
        bi <= 0;
        if (int'(minor) == nfr(c0 + col_t'(rel)) - 1) begin minor <= 0; rel <= rel + 1; end
        else minor <= minor + 1;
      end else bi <= bi + 1;
    end
  end
endmodule
