// tb_ftc_line_decoder: checks the word-line decoder.
// For every line number and several random fault vectors the word lines must
// be the one-hot code of the line unless that line is faulty (then all low),
// and 'active' must say whether a line was driven.  Combinational, so the
// watchdog counts time steps.
module tb_ftc_line_decoder;
  localparam int unsigned LINES = 128;
  localparam int unsigned IDX_W = 7;

  logic             en;
  logic [IDX_W-1:0] line;
  logic [LINES-1:0] fault, wl, exp_wl;
  logic             active;
  int               checks = 0, failures = 0;

  ftc_line_decoder #(.LINES(LINES)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 6; t++) begin
      if (t == 0) fault = '0;
      else for (int w = 0; w < LINES / 32; w++) fault[w*32 +: 32] = $urandom();
      for (int k = 0; k < LINES; k++) begin
        en = (t != 5);
        line = IDX_W'(k);
        exp_wl = '0;
        if (en && !fault[k]) exp_wl[k] = 1'b1;
        #1;
        checks++;
        if (wl !== exp_wl || active !== (en && !fault[k])) begin
          failures++;
          $display("FAIL line %0d fault %b en %b: wl %h active %b", k, fault[k], en, wl, active);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
