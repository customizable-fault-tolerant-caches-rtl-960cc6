// ftc_data_array: data store of the fault tolerant cache, one line per row.
//
// Rows are selected by the one-hot word lines of the line decoder; a faulty
// row has its word line held low and is never read or written.  A whole line
// is written on a refill (fill_en); a single word, under byte strobes, is
// written when a store hits (word_en, word selected by wsel).
//
// Timing: synchronous read; when rd_en is high at a rising edge the selected
// line (all zeros when no row is selected) appears on rd_line and is held
// until the next read.  Writes take effect at the rising edge.  The array is
// not reset: a line is only read after the tag array marks it valid.
module ftc_data_array #(
  parameter int unsigned LINES  = ftc_pkg::LINES,
  parameter int unsigned LINE_W = ftc_pkg::LINE_W,
  parameter int unsigned WORD_W = ftc_pkg::WORD_W,
  parameter int unsigned WORDS  = LINE_W / WORD_W,
  parameter int unsigned WSEL_W = (WORDS > 1) ? $clog2(WORDS) : 1,
  parameter int unsigned STRB_W = WORD_W / 8
) (
  input  logic              clk,
  input  logic [LINES-1:0]  wl,
  input  logic              rd_en,
  input  logic              fill_en,
  input  logic [LINE_W-1:0] fill_line,
  input  logic              word_en,
  input  logic [WSEL_W-1:0] wsel,
  input  logic [STRB_W-1:0] wstrb,
  input  logic [WORD_W-1:0] wdata,
  output logic [LINE_W-1:0] rd_line
);

  logic [LINE_W-1:0] line_q [LINES];
  logic [LINE_W-1:0] sel_line;
  logic [LINE_W-1:0] word_mask;   // bits changed by a word write
  logic [LINE_W-1:0] word_bits;   // wdata placed at its word position

  always_comb begin
    sel_line = '0;
    for (int k = 0; k < LINES; k++) begin
      if (wl[k]) sel_line = sel_line | line_q[k];
    end
  end

  always_comb begin
    word_mask = '0;
    word_bits = '0;
    for (int w = 0; w < WORDS; w++) begin
      if (wsel == WSEL_W'(w)) begin
        for (int b = 0; b < STRB_W; b++) begin
          if (wstrb[b]) word_mask[w*WORD_W + b*8 +: 8] = 8'hFF;
        end
        word_bits[w*WORD_W +: WORD_W] = wdata;
      end
    end
  end

  always_ff @(posedge clk) begin
    for (int k = 0; k < LINES; k++) begin
      if (wl[k]) begin
        if (fill_en)      line_q[k] <= fill_line;
        else if (word_en) line_q[k] <= (line_q[k] & ~word_mask) | (word_bits & word_mask);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rd_en) rd_line <= sel_line;
  end

endmodule
