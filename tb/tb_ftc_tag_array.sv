// tb_ftc_tag_array: checks the tag store.
// Writes random widened tags to random rows through one-hot word lines,
// reads every row back one cycle after rd_en and compares with a model
// (valid bit and tag), checks that a read with no word line selected returns
// an invalid entry, and that inv_all clears every valid bit.
module tb_ftc_tag_array;
  localparam int unsigned LINES  = 128;
  localparam int unsigned NTAG_W = 27;

  logic              clk = 1'b0;
  logic              rst_n = 1'b0;
  logic [LINES-1:0]  wl;
  logic              rd_en, wr_en, inv_all, rd_valid;
  logic [NTAG_W-1:0] wr_tag, rd_tag;
  logic [NTAG_W-1:0] m_tag [LINES];
  logic [LINES-1:0]  m_valid;
  int                checks = 0, failures = 0;

  ftc_tag_array #(.LINES(LINES), .NTAG_W(NTAG_W)) dut (.*);

  always #5 clk = ~clk;

  task automatic read_row(int k);
    @(negedge clk);
    wl = '0; wl[k] = 1'b1; rd_en = 1'b1; wr_en = 1'b0;
    @(negedge clk);
    rd_en = 1'b0; wl = '0;
    checks++;
    if (rd_valid !== m_valid[k] || (m_valid[k] && rd_tag !== m_tag[k])) begin
      failures++;
      $display("FAIL row %0d: valid %b tag %h, expected %b %h", k, rd_valid, rd_tag, m_valid[k], m_tag[k]);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wl = '0; rd_en = 1'b0; wr_en = 1'b0; inv_all = 1'b0; wr_tag = '0;
    m_valid = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < LINES; k += 9) read_row(k);        // all invalid after reset
    for (int n = 0; n < 300; n++) begin
      int k;
      k = $urandom_range(0, LINES - 1);
      @(negedge clk);
      wl = '0; wl[k] = 1'b1; wr_en = 1'b1; wr_tag = NTAG_W'($urandom());
      m_tag[k] = wr_tag; m_valid[k] = 1'b1;
    end
    @(negedge clk);
    wr_en = 1'b0;
    for (int k = 0; k < LINES; k++) read_row(k);
    // read with no word line: invalid
    @(negedge clk);
    wl = '0; rd_en = 1'b1;
    @(negedge clk);
    rd_en = 1'b0;
    checks++;
    if (rd_valid !== 1'b0) begin failures++; $display("FAIL unselected read valid"); end
    // flush
    @(negedge clk);
    inv_all = 1'b1;
    @(negedge clk);
    inv_all = 1'b0;
    m_valid = '0;
    for (int k = 0; k < LINES; k += 5) read_row(k);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
