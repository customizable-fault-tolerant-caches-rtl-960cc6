// tb_ftc_word_mux: checks word selection from a 256-bit line.
// Random lines; every word position is selected and compared with the slice
// of the line the test computes itself.
module tb_ftc_word_mux;
  localparam int unsigned LINE_W = 256;
  localparam int unsigned WORD_W = 32;

  logic [LINE_W-1:0] line;
  logic [2:0]        wsel;
  logic [WORD_W-1:0] word;
  logic [WORD_W-1:0] words [8];
  int                checks = 0, failures = 0;

  ftc_word_mux #(.LINE_W(LINE_W), .WORD_W(WORD_W)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 50; t++) begin
      for (int w = 0; w < 8; w++) words[w] = $urandom();
      line = {words[7], words[6], words[5], words[4], words[3], words[2], words[1], words[0]};
      for (int w = 0; w < 8; w++) begin
        wsel = 3'(w);
        #1;
        checks++;
        if (word !== words[w]) begin
          failures++;
          $display("FAIL wsel %0d: got %h expected %h", w, word, words[w]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
