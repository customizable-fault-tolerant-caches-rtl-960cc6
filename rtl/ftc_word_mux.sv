// ftc_word_mux: selects the addressed word of a cache line.
//
// The word-select field of the address offset picks one WORD_W-bit word out
// of the LINE_W-bit line; word 0 is in the least significant bits.
// Combinational.
module ftc_word_mux #(
  parameter int unsigned LINE_W = ftc_pkg::LINE_W,
  parameter int unsigned WORD_W = ftc_pkg::WORD_W,
  parameter int unsigned WORDS  = LINE_W / WORD_W,
  parameter int unsigned WSEL_W = (WORDS > 1) ? $clog2(WORDS) : 1
) (
  input  logic [LINE_W-1:0] line,
  input  logic [WSEL_W-1:0] wsel,
  output logic [WORD_W-1:0] word
);

  always_comb begin
    word = '0;
    for (int w = 0; w < WORDS; w++) begin
      if (wsel == WSEL_W'(w)) word = line[w*WORD_W +: WORD_W];
    end
  end

endmodule
