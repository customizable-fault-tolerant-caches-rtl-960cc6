// tb_ftc_tag_compare: checks hit detection on the widened tag.
// Random equal and unequal tag pairs, single-bit differences in every
// position (the original-index bits included) and invalid entries.
module tb_ftc_tag_compare;
  localparam int unsigned NTAG_W = 27;

  logic              stored_valid, hit;
  logic [NTAG_W-1:0] stored_tag, access_tag;
  int                checks = 0, failures = 0;

  ftc_tag_compare #(.NTAG_W(NTAG_W)) dut (.*);

  task automatic check(logic exp);
    #1;
    checks++;
    if (hit !== exp) begin
      failures++;
      $display("FAIL v=%b s=%h a=%h hit=%b exp=%b", stored_valid, stored_tag, access_tag, hit, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 200; t++) begin
      stored_tag = NTAG_W'($urandom());
      access_tag = stored_tag;
      stored_valid = 1'b1; check(1'b1);
      stored_valid = 1'b0; check(1'b0);
      stored_valid = 1'b1;
      access_tag = stored_tag ^ NTAG_W'(1 << (t % NTAG_W)); check(1'b0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
