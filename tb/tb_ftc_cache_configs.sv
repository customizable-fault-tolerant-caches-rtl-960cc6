// tb_ftc_cache_configs: runs the fault tolerant cache in its two larger
// 128-line geometries, 8 KB with 64-byte lines and 16 KB with 128-byte lines,
// side by side.  Memory latencies are set so that a read miss costs 108 and
// 124 cycles respectively.  Each geometry gets a quarter of its lines faulty,
// modulo placement and random loads and stores checked against a reference
// model (see ftc_cache_random_check).
module tb_ftc_cache_configs;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic done_a, done_b;
  int   checks_a, failures_a, checks_b, failures_b;

  always #5 clk = ~clk;

  ftc_cache_random_check #(.CACHE_BYTES(8192),  .LINE_BYTES(64),  .LATENCY(106), .N(2000))
    u_8k  (.clk, .rst_n, .done(done_a), .checks(checks_a), .failures(failures_a));
  ftc_cache_random_check #(.CACHE_BYTES(16384), .LINE_BYTES(128), .LATENCY(122), .N(2000))
    u_16k (.clk, .rst_n, .done(done_b), .checks(checks_b), .failures(failures_b));

  initial begin
    #5_000_000;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks_a + checks_b, failures_a + failures_b + 1);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (done_a && done_b);
    $display("TB_RESULT checks=%0d failures=%0d", checks_a + checks_b, failures_a + failures_b);
    $finish;
  end
endmodule
