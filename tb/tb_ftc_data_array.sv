// tb_ftc_data_array: checks the data store.
// Fills random rows with random lines, then applies random word writes under
// random byte strobes, keeping a model of every line; reads every written
// row back (one cycle after rd_en) and compares the whole line.
module tb_ftc_data_array;
  localparam int unsigned LINES  = 128;
  localparam int unsigned LINE_W = 256;
  localparam int unsigned WORD_W = 32;

  logic              clk = 1'b0;
  logic [LINES-1:0]  wl;
  logic              rd_en, fill_en, word_en;
  logic [LINE_W-1:0] fill_line, rd_line;
  logic [2:0]        wsel;
  logic [3:0]        wstrb;
  logic [WORD_W-1:0] wdata;
  logic [LINE_W-1:0] model [LINES];
  logic [LINES-1:0]  written;
  int                checks = 0, failures = 0;

  ftc_data_array #(.LINES(LINES), .LINE_W(LINE_W), .WORD_W(WORD_W)) dut (.*);

  always #5 clk = ~clk;

  function automatic logic [LINE_W-1:0] rand_line();
    logic [LINE_W-1:0] l;
    for (int w = 0; w < LINE_W / 32; w++) l[w*32 +: 32] = $urandom();
    return l;
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wl = '0; rd_en = 1'b0; fill_en = 1'b0; word_en = 1'b0;
    fill_line = '0; wsel = '0; wstrb = '0; wdata = '0; written = '0;
    @(posedge clk);
    for (int n = 0; n < 64; n++) begin
      int k;
      k = $urandom_range(0, LINES - 1);
      @(negedge clk);
      wl = '0; wl[k] = 1'b1; fill_en = 1'b1; fill_line = rand_line();
      model[k] = fill_line; written[k] = 1'b1;
    end
    @(negedge clk);
    fill_en = 1'b0;
    for (int n = 0; n < 200; n++) begin
      int k;
      do k = $urandom_range(0, LINES - 1); while (!written[k]);
      @(negedge clk);
      wl = '0; wl[k] = 1'b1; word_en = 1'b1;
      wsel = 3'($urandom()); wstrb = 4'($urandom()); wdata = $urandom();
      for (int b = 0; b < 4; b++)
        if (wstrb[b]) model[k][wsel*32 + b*8 +: 8] = wdata[b*8 +: 8];
    end
    @(negedge clk);
    word_en = 1'b0;
    for (int k = 0; k < LINES; k++) begin
      if (!written[k]) continue;
      @(negedge clk);
      wl = '0; wl[k] = 1'b1; rd_en = 1'b1;
      @(negedge clk);
      rd_en = 1'b0; wl = '0;
      checks++;
      if (rd_line !== model[k]) begin
        failures++;
        $display("FAIL row %0d: %h expected %h", k, rd_line, model[k]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
