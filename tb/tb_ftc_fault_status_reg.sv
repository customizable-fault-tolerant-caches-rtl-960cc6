// tb_ftc_fault_status_reg: checks the fault status register.
// Checks that reset clears it, that a self-test result is captured only while
// bist_valid is high, and that every bit reads back through the single-bit
// read port.  A watchdog ends the run if it hangs.
module tb_ftc_fault_status_reg;
  localparam int unsigned LINES = 128;
  localparam int unsigned IDX_W = 7;

  logic             clk = 1'b0;
  logic             rst_n = 1'b0;
  logic             bist_valid;
  logic [LINES-1:0] bist_fault, fault, exp_v;
  logic [IDX_W-1:0] rd_idx;
  logic             rd_faulty;
  int               checks = 0, failures = 0;

  ftc_fault_status_reg #(.LINES(LINES)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(string what, logic [LINES-1:0] got, logic [LINES-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bist_valid = 1'b0; bist_fault = '1; rd_idx = '0;
    repeat (2) @(posedge clk);
    #1 check("reset", fault, '0);
    rst_n = 1'b1;
    @(negedge clk);
    check("no load without bist_valid", fault, '0);
    for (int t = 0; t < 8; t++) begin
      for (int w = 0; w < LINES / 32; w++) exp_v[w*32 +: 32] = $urandom();
      @(negedge clk);
      bist_fault = exp_v; bist_valid = 1'b1;
      @(negedge clk);
      bist_valid = 1'b0; bist_fault = ~exp_v;
      check("loaded", fault, exp_v);
      @(negedge clk);
      check("held", fault, exp_v);
      for (int k = 0; k < LINES; k++) begin
        rd_idx = IDX_W'(k);
        #1 check("bit read", LINES'(rd_faulty), LINES'(exp_v[k]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
