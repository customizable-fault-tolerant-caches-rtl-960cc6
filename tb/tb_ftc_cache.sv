// tb_ftc_cache: end-to-end test of the fault tolerant cache at its default
// size (4 KB, 32-byte lines, 128 lines).  The memory model answers a line
// read 98 cycles after taking the request, so a read miss costs 100 cycles.
//
// A reference model of the cache (placement table, fault vector, widened
// tags, write-through without write allocation) predicts for every access
// whether it hits and what it returns; the test checks both, checks the
// latency of every access (hit 1 cycle, read miss 100, write 2 when memory
// is not stalling), and checks every cycle that no word line of a faulty
// line is ever raised.
//
// Sequence:
//   1. reset state: empty fault register, identity placement.
//   2. a phased synthetic workload (four program phases, each touching its
//      own quarter of the cache indices, 10 % stores) runs on the fault-free
//      cache.
//   3. for 4, 16, 64 and 102 faulty lines (3 %, 12.5 %, 50 %, 80 %): self
//      test reports a random fault pattern; the workload is rerun with
//      modulo placement, L mod (S - f) onto the good lines, and then with the
//      profile-driven placement computed from the workload's per-window
//      reference counts by greedy merging of the pair of conflict sets with
//      the least interference potential.  The profile-driven mean access
//      time must not exceed the modulo one.
//   4. one table entry is pointed at a faulty line: those accesses must be
//      served from memory without allocation.
//   5. random loads and stores with memory back-pressure.
// Each mechanism (hits, refills, write hits and misses, back-to-back hits,
// back-pressure, misses between merged conflict sets, faulty-line bypass,
// self-test load, table reload, flush, remapped accesses) is counted and must
// occur at least once.
module tb_ftc_cache;
  localparam int unsigned S       = 128;
  localparam int unsigned IW      = 7;
  localparam int unsigned LB      = 32;
  localparam int unsigned LATENCY = 98;    // a read miss then takes 100 cycles
  localparam int unsigned NWIN    = 8;     // profile windows
  localparam int unsigned WIN_REFS = 256;  // references per window
  localparam int unsigned NPHASE  = 4;
  // 3 %, 12.5 %, 50 % and 80 % of the 128 lines
  localparam int unsigned FAULT_COUNTS [4] = '{4, 16, 64, 102};

  typedef struct {
    logic        we;
    logic [3:0]  wstrb;
    logic [31:0] addr;
    logic [31:0] wdata;
  } access_t;

  logic              clk = 1'b0;
  logic              rst_n = 1'b0;
  logic              req_valid, req_ready, req_we, resp_valid, resp_hit;
  logic [3:0]        req_wstrb;
  logic [31:0]       req_addr, req_wdata, resp_rdata;
  logic              mem_req_valid, mem_req_ready, mem_req_we, mem_resp_valid;
  logic [31:0]       mem_req_addr, mem_req_wdata;
  logic [3:0]        mem_req_wstrb;
  logic [LB*8-1:0]   mem_resp_line;
  logic              cfg_lut_we, cfg_rd_faulty, cfg_flush, bist_valid, stall;
  logic [IW-1:0]     cfg_lut_idx, cfg_lut_line, cfg_rd_idx, cfg_rd_line;
  logic [S-1:0]      bist_fault, fault_status;

  ftc_cache dut (.*);

  ftc_main_memory_model #(.LINE_BYTES(LB), .LATENCY(LATENCY)) u_mem (
    .clk, .rst_n, .stall, .mem_req_valid, .mem_req_ready, .mem_req_we,
    .mem_req_addr, .mem_req_wstrb, .mem_req_wdata, .mem_resp_valid, .mem_resp_line
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // ---------------------------------------------------------------- model
  logic [31:0] ref_mem [int unsigned];
  logic [IW-1:0] m_map [S];
  logic [S-1:0]  m_fault;
  logic [S-1:0]  m_valid;
  logic [24:0]   m_tag [S];          // memory line number held by each line

  function automatic logic [31:0] ref_read(logic [31:0] word_addr);
    if (ref_mem.exists(word_addr)) return ref_mem[word_addr];
    return (word_addr * 32'h9E37_79B1) ^ 32'h5A5A_1234;
  endfunction

  // mechanism counters
  int n_rd_hit, n_rd_fill, n_wr_hit, n_wr_miss, n_b2b, n_backpressure;
  int n_merged_miss, n_bypass, n_bist, n_reload, n_flush, n_remapped;

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s (cycle %0d)", what, cycle);
    end
  endtask

  // ---------------------------------------------------------------- driver
  access_t  trace [$];
  access_t  pend;
  logic     pend_hit;
  logic [31:0] pend_data;
  longint   pend_cycle;
  bit       outstanding;
  longint   total_latency;
  int       n_access;

  // Model the accepted access: predict hit/miss and read data, update state.
  task automatic model_accept(access_t a);
    logic [24:0]   line_no;
    logic [IW-1:0] idx, phys;
    logic [31:0]   w;
    line_no = a.addr[31:5];
    idx     = a.addr[5 +: IW];
    phys    = m_map[idx];
    if (phys != idx) n_remapped++;
    pend_hit = !m_fault[phys] && m_valid[phys] && m_tag[phys] == line_no;
    if (a.we) begin
      w = ref_read(a.addr >> 2);
      for (int b = 0; b < 4; b++) if (a.wstrb[b]) w[b*8 +: 8] = a.wdata[b*8 +: 8];
      ref_mem[a.addr >> 2] = w;
      if (pend_hit) n_wr_hit++; else n_wr_miss++;
    end else begin
      pend_data = ref_read(a.addr >> 2);
      if (pend_hit) n_rd_hit++;
      else if (m_fault[phys]) n_bypass++;
      else begin
        n_rd_fill++;
        if (m_valid[phys] && m_tag[phys][IW-1:0] != idx) n_merged_miss++;
        m_valid[phys] = 1'b1;
        m_tag[phys]   = line_no;
      end
    end
  endtask

  // Runs every access of 'trace'; returns after the last response.
  task automatic run_trace(bit check_latency);
    int head;
    head = 0;
    outstanding = 1'b0;
    total_latency = 0;
    n_access = 0;
    while (head < trace.size() || outstanding) begin
      @(posedge clk);
      #1;
      if (head < trace.size()) begin
        req_valid = 1'b1;
        req_we    = trace[head].we;
        req_wstrb = trace[head].wstrb;
        req_addr  = trace[head].addr;
        req_wdata = trace[head].wdata;
      end else begin
        req_valid = 1'b0;
      end
      #1;
      if (resp_valid) begin
        longint lat;
        check("response without request", outstanding);
        lat = cycle - pend_cycle;
        check($sformatf("hit flag for %h (got %b)", pend.addr, resp_hit), resp_hit == pend_hit);
        if (!pend.we)
          check($sformatf("read data %h: %h exp %h", pend.addr, resp_rdata, pend_data),
                resp_rdata == pend_data);
        if (check_latency) begin
          if (pend.we)       check($sformatf("write latency %0d", lat), lat == 2);
          else if (pend_hit) check($sformatf("hit latency %0d", lat), lat == 1);
          else               check($sformatf("miss latency %0d", lat), lat == 2 + LATENCY);
        end
        total_latency += lat;
        n_access++;
        outstanding = 1'b0;
      end
      if (req_valid && req_ready) begin
        if (outstanding) check("accepted while busy", 1'b0);
        if (resp_valid) n_b2b++;
        pend = trace[head];
        pend_cycle = cycle;
        model_accept(pend);
        outstanding = 1'b1;
        head++;
      end
    end
    @(negedge clk);
    req_valid = 1'b0;
  endtask

  // ---------------------------------------------------------------- config
  task automatic write_lut(logic [IW-1:0] idx, logic [IW-1:0] line);
    @(negedge clk);
    cfg_lut_we = 1'b1; cfg_lut_idx = idx; cfg_lut_line = line;
    @(negedge clk);
    cfg_lut_we = 1'b0;
    m_map[idx] = line;
  endtask

  task automatic flush();
    @(negedge clk); cfg_flush = 1'b1;
    @(negedge clk); cfg_flush = 1'b0;
    m_valid = '0;
    n_flush++;
  endtask

  task automatic load_map(logic [IW-1:0] map [S]);
    for (int k = 0; k < S; k++) write_lut(IW'(k), map[k]);
    for (int k = 0; k < S; k++) begin
      cfg_rd_idx = IW'(k);
      #1 check("table read-back", cfg_rd_line == map[k]);
    end
    n_reload++;
    flush();
  endtask

  // ---------------------------------------------------------------- workload
  int unsigned group_of [S];
  int unsigned r_cnt [S][NWIN];

  task automatic make_workload();
    int unsigned perm [S];
    trace.delete();
    for (int k = 0; k < S; k++) perm[k] = k;
    for (int k = S - 1; k > 0; k--) begin
      int unsigned j, t;
      j = $urandom_range(0, k);
      t = perm[k]; perm[k] = perm[j]; perm[j] = t;
    end
    for (int k = 0; k < S; k++) group_of[perm[k]] = k / (S / NPHASE);
    for (int w = 0; w < NWIN; w++) begin
      for (int k = 0; k < S; k++) r_cnt[k][w] = 0;
      for (int n = 0; n < WIN_REFS; n++) begin
        access_t a;
        int unsigned idx;
        do idx = $urandom_range(0, S - 1); while (group_of[idx] != w % NPHASE);
        a.addr  = {19'd1, 1'b0, 7'(idx), 3'($urandom_range(0, 7)), 2'b00};
        a.we    = ($urandom_range(0, 9) == 0);
        a.wstrb = a.we ? 4'($urandom_range(1, 15)) : 4'hF;
        a.wdata = $urandom();
        trace.push_back(a);
        r_cnt[idx][w]++;
      end
    end
  endtask

  // Profile-driven placement: greedy merge of the pair of conflict sets with
  // the least interference potential, sum over windows of
  // min(refs(w,i), refs(w,j)), until f merges are done; the surviving sets
  // are then numbered onto the fault-free lines in order.
  function automatic void custom_placement(input logic [S-1:0] fault,
                                           output logic [IW-1:0] map [S]);
    int unsigned r [S][NWIN];
    longint      ip [S][S];
    bit          alive [S];
    int unsigned rep [S];
    int unsigned good [$];
    int unsigned rank [S];
    int          nf, nr;
    for (int k = 0; k < S; k++) begin
      rep[k] = k; alive[k] = 1'b1;
      for (int w = 0; w < NWIN; w++) r[k][w] = r_cnt[k][w];
      if (!fault[k]) good.push_back(k);
    end
    nf = S - good.size();
    for (int i = 0; i < S; i++)
      for (int j = 0; j < S; j++) begin
        ip[i][j] = 0;
        for (int w = 0; w < NWIN; w++) ip[i][j] += (r[i][w] < r[j][w]) ? r[i][w] : r[j][w];
      end
    for (int it = 0; it < nf; it++) begin
      longint best; int bi, bj;
      best = -1; bi = 0; bj = 0;
      for (int i = 0; i < S; i++) if (alive[i])
        for (int j = i + 1; j < S; j++) if (alive[j])
          if (best < 0 || ip[i][j] < best) begin best = ip[i][j]; bi = i; bj = j; end
      for (int k = 0; k < S; k++) if (rep[k] == bj) rep[k] = bi;
      alive[bj] = 1'b0;
      for (int w = 0; w < NWIN; w++) r[bi][w] += r[bj][w];
      for (int k = 0; k < S; k++) if (alive[k] && k != bi) begin
        ip[bi][k] = 0;
        for (int w = 0; w < NWIN; w++) ip[bi][k] += (r[bi][w] < r[k][w]) ? r[bi][w] : r[k][w];
        ip[k][bi] = ip[bi][k];
      end
    end
    nr = 0;
    for (int k = 0; k < S; k++) if (alive[k]) begin rank[k] = nr; nr++; end
    for (int k = 0; k < S; k++) map[k] = IW'(good[rank[rep[k]]]);
  endfunction

  function automatic void modulo_placement(input logic [S-1:0] fault,
                                           output logic [IW-1:0] map [S]);
    int unsigned good [$];
    for (int k = 0; k < S; k++) if (!fault[k]) good.push_back(k);
    for (int k = 0; k < S; k++) map[k] = IW'(good[k % good.size()]);
  endfunction

  // ---------------------------------------------------------------- checks
  always @(negedge clk) if (rst_n) begin
    if ((dut.wl & fault_status) != '0) begin
      failures++;
      $display("FAIL faulty line activated: %h", dut.wl & fault_status);
    end
    if (mem_req_valid && !mem_req_ready) n_backpressure++;
  end

  initial begin
    #20_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [IW-1:0] map [S];
    logic [S-1:0]  fv;
    real amat0, amat_mod, amat_cust;
    access_t a;

    req_valid = 1'b0; req_we = 1'b0; req_wstrb = '0; req_addr = '0; req_wdata = '0;
    cfg_lut_we = 1'b0; cfg_lut_idx = '0; cfg_lut_line = '0; cfg_rd_idx = '0;
    cfg_flush = 1'b0; bist_valid = 1'b0; bist_fault = '0; stall = 1'b0;
    for (int k = 0; k < S; k++) m_map[k] = IW'(k);
    m_fault = '0; m_valid = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // 1. reset state
    @(negedge clk);
    check("fault register clear after reset", fault_status == '0);
    for (int k = 0; k < S; k++) begin
      cfg_rd_idx = IW'(k);
      #1 check("identity placement after reset", cfg_rd_line == IW'(k));
    end

    // 2. fault-free cache
    make_workload();
    run_trace(1'b1);
    amat0 = real'(total_latency) / n_access;

    // 3. for each fault count: self test reports the faulty lines, the
    // workload runs with modulo placement, then with the profile-driven one
    foreach (FAULT_COUNTS[c]) begin
      fv = '0;
      while ($countones(fv) < FAULT_COUNTS[c]) fv[$urandom_range(0, S - 1)] = 1'b1;
      @(negedge clk); bist_valid = 1'b1; bist_fault = fv;
      @(negedge clk); bist_valid = 1'b0;
      m_fault = fv; n_bist++;
      check("fault register loaded", fault_status == fv);
      for (int k = 0; k < S; k++) begin
        cfg_rd_idx = IW'(k);
        #1 check("fault bit read", cfg_rd_faulty == fv[k]);
      end
      modulo_placement(fv, map);
      load_map(map);
      run_trace(1'b1);
      amat_mod = real'(total_latency) / n_access;
      custom_placement(fv, map);
      for (int k = 0; k < S; k++) check("placement avoids faulty lines", !fv[map[k]]);
      load_map(map);
      run_trace(1'b1);
      amat_cust = real'(total_latency) / n_access;
      $display("%3d of %0d lines faulty: mean access time modulo %6.2f, profile-driven %6.2f cycles (fault-free %0.2f)",
               FAULT_COUNTS[c], S, amat_mod, amat_cust, amat0);
      check("profile-driven placement no worse than modulo", amat_cust <= amat_mod);
      check("fault-free cache no slower", amat0 <= amat_cust);
    end

    // 4. a table entry pointing to a faulty line: served from memory
    begin
      int unsigned bad;
      bad = 0;
      while (!fv[bad]) bad++;
      write_lut(IW'(5), IW'(bad));
      trace.delete();
      for (int n = 0; n < 3; n++) begin
        a.we = 1'b0; a.wstrb = 4'hF; a.addr = {19'd2, 1'b0, 7'd5, 3'(n), 2'b00}; a.wdata = '0;
        trace.push_back(a);
      end
      run_trace(1'b1);
      write_lut(IW'(5), map[5]);
    end

    // 5. random loads and stores in a 16 KB region with memory back-pressure
    stall = 1'b1;
    trace.delete();
    for (int n = 0; n < 1500; n++) begin
      a.we    = ($urandom_range(0, 2) == 0);
      a.wstrb = a.we ? 4'($urandom_range(1, 15)) : 4'hF;
      a.addr  = {18'd0, 12'($urandom()), 2'b00} | 32'h0010_0000;
      a.wdata = $urandom();
      trace.push_back(a);
    end
    run_trace(1'b0);
    stall = 1'b0;

    $display("mechanisms: rd_hit=%0d rd_fill=%0d wr_hit=%0d wr_miss=%0d b2b=%0d backpressure=%0d merged_miss=%0d bypass=%0d bist=%0d reload=%0d flush=%0d remapped=%0d",
             n_rd_hit, n_rd_fill, n_wr_hit, n_wr_miss, n_b2b, n_backpressure,
             n_merged_miss, n_bypass, n_bist, n_reload, n_flush, n_remapped);
    check("read hits seen", n_rd_hit > 0);
    check("refills seen", n_rd_fill > 0);
    check("write hits seen", n_wr_hit > 0);
    check("write misses seen", n_wr_miss > 0);
    check("back-to-back hits seen", n_b2b > 0);
    check("memory back-pressure seen", n_backpressure > 0);
    check("misses between merged conflict sets seen", n_merged_miss > 0);
    check("faulty-line bypass seen", n_bypass == 3);
    check("self-test load seen", n_bist > 0);
    check("table reloads seen", n_reload > 0);
    check("flushes seen", n_flush > 0);
    check("remapped accesses seen", n_remapped > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
