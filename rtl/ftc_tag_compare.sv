// ftc_tag_compare: hit detection of the fault tolerant cache.
//
// Compares the widened tag read from the tag array with the widened tag of
// the access (ordinary tag bits followed by the original index bits) and
// reports a hit when they are equal and the entry is valid.  Because the
// stored tag carries the original index, two memory lines whose conflict
// sets share a physical line can never be confused.  Combinational.
module ftc_tag_compare #(
  parameter int unsigned NTAG_W = ftc_pkg::NTAG_W
) (
  input  logic              stored_valid,
  input  logic [NTAG_W-1:0] stored_tag,
  input  logic [NTAG_W-1:0] access_tag,
  output logic              hit
);

  assign hit = stored_valid && (stored_tag == access_tag);

endmodule
