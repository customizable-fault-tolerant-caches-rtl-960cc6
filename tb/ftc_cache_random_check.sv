// ftc_cache_random_check: testbench helper that runs one fault tolerant
// cache of a given geometry against the main memory model.
//
// After reset it reports a random fault pattern (a quarter of the lines) on
// the self-test inputs, loads modulo placement onto the good lines, and runs
// N random loads and stores over a region four times the cache size.  A
// reference model predicts the hit flag and the load data of every access;
// read misses must take 2 + LATENCY cycles.  It raises 'done' when finished
// and reports its check and failure counts.
module ftc_cache_random_check #(
  parameter int unsigned CACHE_BYTES = 8192,
  parameter int unsigned LINE_BYTES  = 64,
  parameter int unsigned LATENCY     = 106,
  parameter int unsigned N           = 2000
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int unsigned S  = CACHE_BYTES / LINE_BYTES;
  localparam int unsigned IW = $clog2(S);
  localparam int unsigned OW = $clog2(LINE_BYTES);

  logic              req_valid, req_ready, req_we, resp_valid, resp_hit;
  logic [3:0]        req_wstrb;
  logic [31:0]       req_addr, req_wdata, resp_rdata;
  logic              mem_req_valid, mem_req_ready, mem_req_we, mem_resp_valid;
  logic [31:0]       mem_req_addr, mem_req_wdata;
  logic [3:0]        mem_req_wstrb;
  logic [LINE_BYTES*8-1:0] mem_resp_line;
  logic              cfg_lut_we, cfg_rd_faulty, cfg_flush, bist_valid;
  logic [IW-1:0]     cfg_lut_idx, cfg_lut_line, cfg_rd_idx, cfg_rd_line;
  logic [S-1:0]      bist_fault, fault_status;

  ftc_cache #(.CACHE_BYTES(CACHE_BYTES), .LINE_BYTES(LINE_BYTES)) dut (.*);

  ftc_main_memory_model #(.LINE_BYTES(LINE_BYTES), .LATENCY(LATENCY)) u_mem (
    .clk, .rst_n, .stall(1'b0), .mem_req_valid, .mem_req_ready, .mem_req_we,
    .mem_req_addr, .mem_req_wstrb, .mem_req_wdata, .mem_resp_valid, .mem_resp_line
  );

  logic [31:0]   ref_mem [int unsigned];
  logic [IW-1:0] m_map [S];
  logic [S-1:0]  m_fault, m_valid;
  logic [31:0]   m_line [S];

  function automatic logic [31:0] ref_read(logic [31:0] word_addr);
    if (ref_mem.exists(word_addr)) return ref_mem[word_addr];
    return (word_addr * 32'h9E37_79B1) ^ 32'h5A5A_1234;
  endfunction

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL [%0d B / %0d B lines] %s", CACHE_BYTES, LINE_BYTES, what);
    end
  endtask

  initial begin
    int unsigned good [$];
    int          misses;
    done = 1'b0; checks = 0; failures = 0; misses = 0;
    req_valid = 1'b0; req_we = 1'b0; req_wstrb = '0; req_addr = '0; req_wdata = '0;
    cfg_lut_we = 1'b0; cfg_lut_idx = '0; cfg_lut_line = '0; cfg_rd_idx = '0;
    cfg_flush = 1'b0; bist_valid = 1'b0; bist_fault = '0;
    m_valid = '0;
    m_fault = '0;
    while ($countones(m_fault) < S / 4) m_fault[$urandom_range(0, S - 1)] = 1'b1;
    for (int k = 0; k < S; k++) if (!m_fault[k]) good.push_back(k);
    for (int k = 0; k < S; k++) m_map[k] = IW'(good[k % good.size()]);
    @(posedge rst_n);
    @(negedge clk); bist_valid = 1'b1; bist_fault = m_fault;
    @(negedge clk); bist_valid = 1'b0;
    for (int k = 0; k < S; k++) begin
      @(negedge clk); cfg_lut_we = 1'b1; cfg_lut_idx = IW'(k); cfg_lut_line = m_map[k];
    end
    @(negedge clk); cfg_lut_we = 1'b0;
    for (int n = 0; n < N; n++) begin
      logic [31:0] a, w, exp_data;
      logic        we, exp_hit;
      logic [IW-1:0] phys;
      int          lat;
      a  = 32'h0040_0000 | ((32'($urandom()) % (4 * CACHE_BYTES)) & ~32'h3);
      we = ($urandom_range(0, 3) == 0);
      @(negedge clk);
      req_valid = 1'b1; req_we = we; req_addr = a; req_wdata = $urandom();
      req_wstrb = we ? 4'($urandom_range(1, 15)) : 4'hF;
      // model
      phys    = m_map[a[OW +: IW]];
      exp_hit = !m_fault[phys] && m_valid[phys] && m_line[phys] == (a >> OW);
      exp_data = ref_read(a >> 2);
      if (we) begin
        w = exp_data;
        for (int b = 0; b < 4; b++) if (req_wstrb[b]) w[b*8 +: 8] = req_wdata[b*8 +: 8];
        ref_mem[a >> 2] = w;
      end else if (!exp_hit && !m_fault[phys]) begin
        m_valid[phys] = 1'b1;
        m_line[phys]  = a >> OW;
      end
      lat = 0;
      @(negedge clk);
      req_valid = 1'b0;
      while (!resp_valid) begin @(negedge clk); lat++; end
      lat++;
      check($sformatf("hit flag at %h", a), resp_hit == exp_hit);
      if (!we) begin
        check($sformatf("load data at %h: %h exp %h", a, resp_rdata, exp_data), resp_rdata == exp_data);
        if (!exp_hit) begin
          misses++;
          check($sformatf("miss latency %0d", lat), lat == 2 + LATENCY);
        end else begin
          check($sformatf("hit latency %0d", lat), lat == 1);
        end
      end
    end
    check("read misses seen", misses > 0);
    $display("[%0d B cache, %0d B lines] %0d accesses, %0d read misses of %0d cycles",
             CACHE_BYTES, LINE_BYTES, N, misses, 2 + LATENCY);
    done = 1'b1;
  end
endmodule
