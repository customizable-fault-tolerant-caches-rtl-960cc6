// tb_ftc_cache_4line: the fault tolerant cache shrunk to four 16-byte lines,
// with line 3 faulty and conflict sets 1 and 3 merged onto line 1 (table
// 0->0, 1->1, 2->2, 3->1).  Memory lines L1, L3, L5, L7 (addresses 0x10,
// 0x30, 0x50, 0x70) then all compete for line 1.  With only the ordinary tag
// 0x10 and 0x30 would look alike; the widened tag (0x1 and 0x3 here, i.e. the
// memory line number) keeps them apart.  The test checks hit/miss and data
// for a fixed sequence, that line 3 is never used, and the read-back of the
// table and fault register.
module tb_ftc_cache_4line;
  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        req_valid, req_ready, req_we, resp_valid, resp_hit;
  logic [3:0]  req_wstrb;
  logic [31:0] req_addr, req_wdata, resp_rdata;
  logic        mem_req_valid, mem_req_ready, mem_req_we, mem_resp_valid;
  logic [31:0] mem_req_addr, mem_req_wdata;
  logic [3:0]  mem_req_wstrb;
  logic [127:0] mem_resp_line;
  logic        cfg_lut_we, cfg_rd_faulty, cfg_flush, bist_valid;
  logic [1:0]  cfg_lut_idx, cfg_lut_line, cfg_rd_idx, cfg_rd_line;
  logic [3:0]  bist_fault, fault_status;
  int          checks = 0, failures = 0;

  ftc_cache #(.CACHE_BYTES(64), .LINE_BYTES(16)) dut (.*);

  ftc_main_memory_model #(.LINE_BYTES(16), .LATENCY(10)) u_mem (
    .clk, .rst_n, .stall(1'b0), .mem_req_valid, .mem_req_ready, .mem_req_we,
    .mem_req_addr, .mem_req_wstrb, .mem_req_wdata, .mem_resp_valid, .mem_resp_line
  );

  always #5 clk = ~clk;

  function automatic logic [31:0] mem_word(logic [31:0] addr);
    return ((addr >> 2) * 32'h9E37_79B1) ^ 32'h5A5A_1234;
  endfunction

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic load(logic [31:0] addr, logic exp_hit);
    @(negedge clk);
    req_valid = 1'b1; req_we = 1'b0; req_addr = addr;
    @(negedge clk);
    req_valid = 1'b0;
    while (!resp_valid) @(negedge clk);
    check($sformatf("hit flag of %h (got %b)", addr, resp_hit), resp_hit == exp_hit);
    check($sformatf("data of %h", addr), resp_rdata == mem_word(addr));
  endtask

  always @(negedge clk) if (rst_n && dut.wl[3]) begin
    failures++; $display("FAIL faulty line 3 activated");
  end

  initial begin
    #100_000;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    req_valid = 1'b0; req_we = 1'b0; req_wstrb = 4'hF; req_addr = '0; req_wdata = '0;
    cfg_lut_we = 1'b0; cfg_lut_idx = '0; cfg_lut_line = '0; cfg_rd_idx = '0;
    cfg_flush = 1'b0; bist_valid = 1'b0; bist_fault = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk); bist_valid = 1'b1; bist_fault = 4'b1000;
    @(negedge clk); bist_valid = 1'b0;
    cfg_lut_we = 1'b1; cfg_lut_idx = 2'd3; cfg_lut_line = 2'd1;
    @(negedge clk); cfg_lut_we = 1'b0;
    for (int k = 0; k < 4; k++) begin
      cfg_rd_idx = 2'(k);
      #1;
      check("table read-back", cfg_rd_line == ((k == 3) ? 2'd1 : 2'(k)));
      check("fault bit", cfg_rd_faulty == (k == 3));
    end
    load(32'h10, 1'b0);   // L1 -> line 1
    load(32'h14, 1'b1);
    load(32'h70, 1'b0);   // L7 (set 3) -> line 1, evicts L1
    load(32'h74, 1'b1);
    load(32'h10, 1'b0);   // L1 again: the widened tag tells it from L7
    load(32'h30, 1'b0);   // L3 (set 3) -> line 1
    load(32'h10, 1'b0);   // same ordinary tag as L3, different index: miss
    load(32'h20, 1'b0);   // L2 -> line 2, untouched by the merge
    load(32'h00, 1'b0);   // L0 -> line 0
    load(32'h24, 1'b1);
    load(32'h08, 1'b1);
    load(32'h1C, 1'b1);   // L1 still in line 1
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
