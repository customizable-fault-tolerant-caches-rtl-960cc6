// ftc_main_memory_model: behavioural model of the off-chip main memory used
// by the cache testbenches (not synthesizable, not part of the design).
//
// Accepts one request at a time on a valid/ready handshake.  A line read is
// answered by a single mem_resp_valid beat carrying the whole line LATENCY
// cycles after the request was accepted.  A word write is applied under its
// byte strobes when accepted.  Words never written read as a fixed function
// of their address (init_word), so no memory image is needed.  When 'stall'
// is high the model randomly withholds mem_req_ready to exercise
// back-pressure.
module ftc_main_memory_model #(
  parameter int unsigned LINE_BYTES = 32,
  parameter int unsigned LATENCY    = 100
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    stall,
  input  logic                    mem_req_valid,
  output logic                    mem_req_ready,
  input  logic                    mem_req_we,
  input  logic [31:0]             mem_req_addr,
  input  logic [3:0]              mem_req_wstrb,
  input  logic [31:0]             mem_req_wdata,
  output logic                    mem_resp_valid,
  output logic [LINE_BYTES*8-1:0] mem_resp_line
);

  localparam int unsigned WORDS = LINE_BYTES / 4;

  logic [31:0] store [int unsigned];   // written words, by word address
  int          count;
  logic        busy, stall_now;
  logic [31:0] rd_addr;

  function automatic logic [31:0] init_word(logic [31:0] word_addr);
    return (word_addr * 32'h9E37_79B1) ^ 32'h5A5A_1234;
  endfunction

  function automatic logic [31:0] read_word(logic [31:0] word_addr);
    if (store.exists(word_addr)) return store[word_addr];
    return init_word(word_addr);
  endfunction

  assign mem_req_ready = !busy && !stall_now;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy           <= 1'b0;
      count          <= 0;
      stall_now      <= 1'b0;
      mem_resp_valid <= 1'b0;
      mem_resp_line  <= '0;
      rd_addr        <= '0;
    end else begin
      stall_now      <= stall && ($urandom_range(0, 3) == 0);
      mem_resp_valid <= 1'b0;
      if (mem_req_valid && mem_req_ready) begin
        if (mem_req_we) begin
          logic [31:0] w;
          w = read_word(mem_req_addr >> 2);
          for (int b = 0; b < 4; b++)
            if (mem_req_wstrb[b]) w[b*8 +: 8] = mem_req_wdata[b*8 +: 8];
          store[mem_req_addr >> 2] = w;
        end else begin
          busy    <= 1'b1;
          count   <= LATENCY - 1;
          rd_addr <= mem_req_addr;
        end
      end else if (busy) begin
        if (count <= 1) begin
          busy           <= 1'b0;
          mem_resp_valid <= 1'b1;
          for (int w = 0; w < WORDS; w++)
            mem_resp_line[w*32 +: 32] <= read_word((rd_addr >> 2) + 32'(w));
        end else begin
          count <= count - 1;
        end
      end
    end
  end

endmodule
