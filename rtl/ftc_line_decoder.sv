// ftc_line_decoder: word-line decoder of the tag and data arrays.
//
// Turns the physical line number from the placement table into a one-hot
// word-line vector.  A line marked in the fault status vector is never
// activated: its word line stays low and 'active' reports that the access
// has no usable line.  With a correctly loaded table this never happens; if
// it does, the access is served from memory and nothing is allocated (this
// guard is this design's choice).
//
// Purely combinational.
module ftc_line_decoder #(
  parameter int unsigned LINES = ftc_pkg::LINES,
  parameter int unsigned IDX_W = $clog2(LINES)
) (
  input  logic             en,
  input  logic [IDX_W-1:0] line,
  input  logic [LINES-1:0] fault,
  output logic [LINES-1:0] wl,
  output logic             active
);

  always_comb begin
    for (int k = 0; k < LINES; k++) begin
      wl[k] = en && (line == IDX_W'(k)) && !fault[k];
    end
    active = en && !fault[line];
  end

endmodule
