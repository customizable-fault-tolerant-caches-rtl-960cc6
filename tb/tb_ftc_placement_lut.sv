// tb_ftc_placement_lut: checks the placement table.
// After reset every entry must hold its own index (identity placement).  A
// random placement is then written, and every entry is checked through both
// the lookup port and the read-back port against a model array.  A watchdog
// ends the run if it hangs.
module tb_ftc_placement_lut;
  localparam int unsigned LINES = 128;
  localparam int unsigned IDX_W = 7;

  logic             clk = 1'b0;
  logic             rst_n = 1'b0;
  logic [IDX_W-1:0] lookup_idx, lookup_line, cfg_idx, cfg_line, cfg_rd_idx, cfg_rd_line;
  logic             cfg_we;
  int               checks = 0, failures = 0;
  logic [IDX_W-1:0] model [LINES];

  ftc_placement_lut #(.LINES(LINES)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(string what, logic [IDX_W-1:0] got, logic [IDX_W-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    repeat (200) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cfg_we = 1'b0; cfg_idx = '0; cfg_line = '0; cfg_rd_idx = '0; lookup_idx = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < LINES; k++) begin
      lookup_idx = IDX_W'(k); cfg_rd_idx = IDX_W'(LINES - 1 - k);
      #1;
      check("reset lookup", lookup_line, IDX_W'(k));
      check("reset readback", cfg_rd_line, IDX_W'(LINES - 1 - k));
    end
    // load a random placement, one entry per cycle
    for (int k = 0; k < LINES; k++) begin
      model[k] = IDX_W'($urandom_range(0, LINES - 1));
      @(negedge clk);
      cfg_we = 1'b1; cfg_idx = IDX_W'(k); cfg_line = model[k];
    end
    @(negedge clk);
    cfg_we = 1'b0;
    for (int k = 0; k < LINES; k++) begin
      lookup_idx = IDX_W'(k); cfg_rd_idx = IDX_W'(k);
      #1;
      check("lookup", lookup_line, model[k]);
      check("readback", cfg_rd_line, model[k]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
