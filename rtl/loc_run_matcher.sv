// Location run matcher, shared by the State Extraction and State Inclusion Filters.
//
// A stream of frame data is processed one byte per step; byte_bit is the bit offset of the
// current byte within the stream's frame data (bit k of the byte has offset byte_bit + k).
// State locations are a sorted list of non-overlapping runs {offset, len}; `run` is the entry
// the filter's pointer selects and run_ok says the pointer is still inside the list.
// The matcher returns which bits of the byte belong to the run (mask), whether the run ends
// within this byte (advance: step the pointer), and whether the byte must be looked at once more
// with the next run because that run may also start inside it (hold). Purely combinational.
// The run-list form of the state locations is this design's own choice.
module loc_run_matcher
  import reloc_pkg::*;
(
  input  logic [LOC_OFS_W-1:0] byte_bit,
  input  loc_t                 run,
  input  logic                 run_ok,
  input  logic                 more,    // another run follows this one
  output logic [7:0]           mask,
  output logic                 advance,
  output logic                 hold
);
  logic [LOC_OFS_W:0] run_end, byte_end;

  always_comb begin
    run_end  = {1'b0, run.offset} + (LOC_OFS_W+1)'(run.len);
    byte_end = {1'b0, byte_bit} + (LOC_OFS_W+1)'(8);
    for (int k = 0; k < 8; k++) begin
      logic [LOC_OFS_W:0] b;
      b = {1'b0, byte_bit} + (LOC_OFS_W+1)'(k);
      mask[k] = run_ok && (b >= {1'b0, run.offset}) && (b < run_end);
    end
    advance = run_ok && (run_end <= byte_end);
    hold    = advance && more && (run_end < byte_end);
  end
endmodule
