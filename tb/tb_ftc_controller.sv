// tb_ftc_controller: checks the access sequencer on its own.
// The test plays the arrays and the memory: it drives 'hit', 'line_active'
// and the memory handshake, and checks the strobes the controller raises in
// each cycle.  Covered: read hit with a one-cycle answer, back-to-back read
// hits, read miss with a refill (latency = 2 + memory wait cycles), read miss
// to an inactive line (no refill), memory back-pressure, write hit and write
// miss (write-through), and capture of the request and translated line.
module tb_ftc_controller;
  import ftc_pkg::cpu_req_t;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic       req_valid, req_ready, use_held, arr_rd_en, hit, line_active;
  logic       tag_wr_en, data_fill_en, data_word_en, resp_valid, resp_hit, resp_from_mem;
  logic       mem_req_valid, mem_req_we, mem_req_ready, mem_resp_valid;
  cpu_req_t   req, req_q;
  logic [6:0] req_line, line_q;
  int         checks = 0, failures = 0;

  ftc_controller #(.IDX_W(7)) dut (.*);

  always #5 clk = ~clk;

  // Compare a vector of named strobes against the expected values.
  task automatic expect_out(string what, logic [11:0] exp);
    logic [11:0] got;
    #1;
    got = {req_ready, use_held, arr_rd_en, tag_wr_en, data_fill_en, data_word_en,
           resp_valid, resp_hit, resp_from_mem, mem_req_valid, mem_req_we, 1'b0};
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: rdy,held,rd,tw,fill,ww,rv,rh,rm,mv,mwe = %b expected %b", what, got, exp);
    end
  endtask

  task automatic idle_inputs();
    req_valid = 1'b0; hit = 1'b0; line_active = 1'b1;
    mem_req_ready = 1'b0; mem_resp_valid = 1'b0;
  endtask

  task automatic issue(logic we, logic [31:0] addr, logic [6:0] line);
    req_valid = 1'b1;
    req = '{we: we, wstrb: 4'hF, addr: addr, wdata: ~addr};
    req_line = line;
  endtask

  //                          rdy held rd tw fill ww rv rh rm mv mwe
  localparam logic [11:0] IDLE_ACC = 12'b1_0_1_0_0_0_0_0_0_0_0_0;
  localparam logic [11:0] IDLE_NOP = 12'b1_0_0_0_0_0_0_0_0_0_0_0;
  localparam logic [11:0] HIT_ACC  = 12'b1_0_1_0_0_0_1_1_0_0_0_0;
  localparam logic [11:0] HIT_END  = 12'b1_0_0_0_0_0_1_1_0_0_0_0;
  localparam logic [11:0] WAITING  = 12'b0_1_0_0_0_0_0_0_0_0_0_0;
  localparam logic [11:0] RD_REQ   = 12'b0_1_0_0_0_0_0_0_0_1_0_0;
  localparam logic [11:0] FILL     = 12'b0_1_0_1_1_0_1_0_1_0_0_0;
  localparam logic [11:0] NOFILL   = 12'b0_1_0_0_0_0_1_0_1_0_0_0;
  localparam logic [11:0] WR_HIT   = 12'b0_1_0_0_0_1_0_0_0_0_0_0;
  localparam logic [11:0] WR_REQ   = 12'b0_1_0_0_0_0_0_0_0_1_1_0;
  localparam logic [11:0] WR_ACK_H = 12'b0_1_0_0_0_0_1_1_0_1_1_0;
  localparam logic [11:0] WR_ACK_M = 12'b0_1_0_0_0_0_1_0_0_1_1_0;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Read miss: returns the number of cycles from acceptance to the answer.
  task automatic read_miss(logic active, int mem_wait, int backpressure);
    int cyc;
    @(negedge clk); idle_inputs(); issue(1'b0, 32'h0000_1040, 7'd9);
    expect_out("miss accept", IDLE_ACC);
    cyc = 0;
    @(negedge clk); idle_inputs(); line_active = active; cyc++;
    expect_out("miss compare", WAITING);
    repeat (backpressure) begin
      @(negedge clk); cyc++; expect_out("read request held", RD_REQ);
    end
    @(negedge clk); mem_req_ready = 1'b1; cyc++; expect_out("read request", RD_REQ);
    repeat (mem_wait) begin
      @(negedge clk); mem_req_ready = 1'b0; cyc++; expect_out("read wait", WAITING);
    end
    @(negedge clk); mem_req_ready = 1'b0; mem_resp_valid = 1'b1; cyc++;
    expect_out("refill", active ? FILL : NOFILL);
    checks++;
    if (cyc != 2 + backpressure + mem_wait + 1) begin
      failures++; $display("FAIL miss latency %0d", cyc);
    end
    checks++;
    if (req_q.addr !== 32'h0000_1040 || line_q !== 7'd9) begin
      failures++; $display("FAIL held request %h line %0d", req_q.addr, line_q);
    end
  endtask

  task automatic write_access(logic is_hit);
    @(negedge clk); idle_inputs(); issue(1'b1, 32'h0000_2004, 7'd3);
    expect_out("write accept", IDLE_ACC);
    @(negedge clk); idle_inputs(); hit = is_hit;
    expect_out("write compare", is_hit ? WR_HIT : WAITING);
    @(negedge clk); idle_inputs();
    expect_out("write request", WR_REQ);
    @(negedge clk); mem_req_ready = 1'b1;
    expect_out("write accepted", is_hit ? WR_ACK_H : WR_ACK_M);
  endtask

  initial begin
    idle_inputs(); req = '0; req_line = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk); expect_out("idle", IDLE_NOP);
    // read hit, answered one cycle after acceptance
    @(negedge clk); issue(1'b0, 32'h0000_0010, 7'd1);
    expect_out("hit accept", IDLE_ACC);
    @(negedge clk); idle_inputs(); hit = 1'b1;
    expect_out("hit answer", HIT_END);
    // three back-to-back hits
    @(negedge clk); idle_inputs(); issue(1'b0, 32'h0000_0020, 7'd2);
    expect_out("b2b accept 1", IDLE_ACC);
    for (int n = 0; n < 2; n++) begin
      @(negedge clk); hit = 1'b1; issue(1'b0, 32'h0000_0040 + 32'(n), 7'd4);
      expect_out("b2b hit+accept", HIT_ACC);
    end
    @(negedge clk); idle_inputs(); hit = 1'b1;
    expect_out("b2b last", HIT_END);
    read_miss(1'b1, 5, 0);
    read_miss(1'b1, 3, 2);
    read_miss(1'b0, 4, 0);
    write_access(1'b1);
    write_access(1'b0);
    @(negedge clk); idle_inputs(); expect_out("idle end", IDLE_NOP);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
