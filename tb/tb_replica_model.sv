// Behavioural model of the bitstream relocation filter, for simulation only: passes a frame
// stream through unchanged except that every frame address moves by new_col - orig_col columns.
module tb_replica_model
  import reloc_pkg::*;
(
  input  logic   in_valid,
  output logic   in_ready,
  input  fbeat_t in_beat,
  input  col_t   orig_col,
  input  col_t   new_col,
  output logic   out_valid,
  input  logic   out_ready,
  output fbeat_t out_beat
);
  always_comb begin
    out_valid = in_valid;
    in_ready  = out_ready;
    out_beat  = in_beat;
    out_beat.faddr.major = in_beat.faddr.major - orig_col + new_col;
  end
endmodule
