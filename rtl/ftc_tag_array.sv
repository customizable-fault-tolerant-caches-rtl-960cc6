// ftc_tag_array: tag store of the fault tolerant cache, one entry per line.
//
// Each entry holds a valid bit and the widened tag (ordinary tag plus the
// original index bits, t+i bits).  Rows are selected by the one-hot word
// lines of the line decoder, so a row whose word line is low is never read
// or written.
//
// Timing: synchronous read; when rd_en is high at a rising edge the selected
// row (or an all-zero, invalid entry when no row is selected) appears on
// rd_valid/rd_tag and is held until the next read.  A write with wr_en
// stores the tag and sets the valid bit of the selected row.  inv_all clears
// every valid bit at the next edge (used when software reloads the
// placement).  Valid bits reset to zero; tags are not reset.
module ftc_tag_array #(
  parameter int unsigned LINES  = ftc_pkg::LINES,
  parameter int unsigned NTAG_W = ftc_pkg::NTAG_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [LINES-1:0]  wl,
  input  logic              rd_en,
  input  logic              wr_en,
  input  logic [NTAG_W-1:0] wr_tag,
  input  logic              inv_all,
  output logic              rd_valid,
  output logic [NTAG_W-1:0] rd_tag
);

  logic [NTAG_W-1:0] tag_q [LINES];
  logic [LINES-1:0]  valid_q;
  logic [NTAG_W-1:0] sel_tag;
  logic              sel_valid;

  // One-hot row select: OR of the rows whose word line is high.
  always_comb begin
    sel_tag   = '0;
    sel_valid = 1'b0;
    for (int k = 0; k < LINES; k++) begin
      if (wl[k]) begin
        sel_tag   = sel_tag | tag_q[k];
        sel_valid = sel_valid | valid_q[k];
      end
    end
  end

  always_ff @(posedge clk) begin
    for (int k = 0; k < LINES; k++) begin
      if (wr_en && wl[k]) tag_q[k] <= wr_tag;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q <= '0;
    end else if (inv_all) begin
      valid_q <= '0;
    end else if (wr_en) begin
      valid_q <= valid_q | wl;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_valid <= 1'b0;
      rd_tag   <= '0;
    end else if (rd_en) begin
      rd_valid <= sel_valid;
      rd_tag   <= sel_tag;
    end
  end

endmodule
