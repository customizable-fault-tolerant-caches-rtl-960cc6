// ftc_controller: access sequencer of the fault tolerant cache.
//
// Accepts one processor request at a time, holds it (with the physical line
// its index was translated to) while it is served, and drives the array,
// memory and response strobes:
//
//   IDLE     ready for a request.  On accept the placement table output is
//            captured and the tag and data arrays are read.
//   COMPARE  tag and line are out of the arrays, 'hit' is valid.
//            read hit : respond with the array word; a new request may be
//                       accepted in the same cycle (one hit per cycle).
//            read miss: go to RD_REQ.
//            write    : on a hit the word is updated in the data array;
//                       either way go to WR_REQ (write-through, no
//                       allocation on a write miss).
//   RD_REQ   line read request to memory, held until accepted.
//   RD_WAIT  on the memory response the line is written into the arrays
//            (only when the translated line is active, i.e. not faulty) and
//            the requested word is returned from the incoming line.
//   WR_REQ   word write request to memory, held until accepted; the response
//            is given when memory accepts it.
//
// Timing: a read hit answers one cycle after it is accepted; a read miss
// answers in the cycle the memory line arrives.  Memory requests follow a
// valid/ready handshake and stay stable while waiting.
//
// The cache itself only needs a direct-mapped hit path and a refill path;
// the write policy (write-through, no write-allocate), the one-line-per-beat
// memory interface and the handshakes are this design's choices.
module ftc_controller #(
  parameter int unsigned IDX_W = ftc_pkg::IDX_W
) (
  input  logic             clk,
  input  logic             rst_n,
  // processor request
  input  logic             req_valid,
  output logic             req_ready,
  input  ftc_pkg::cpu_req_t         req,
  input  logic [IDX_W-1:0] req_line,     // translated line of 'req'
  output ftc_pkg::cpu_req_t         req_q,        // request being served
  output logic [IDX_W-1:0] line_q,       // its translated line
  output logic             use_held,     // arrays addressed by req_q/line_q
  // array control
  output logic             arr_rd_en,
  input  logic             hit,
  input  logic             line_active,
  output logic             tag_wr_en,
  output logic             data_fill_en,
  output logic             data_word_en,
  // processor response
  output logic             resp_valid,
  output logic             resp_hit,
  output logic             resp_from_mem,
  // memory
  output logic             mem_req_valid,
  output logic             mem_req_we,
  input  logic             mem_req_ready,
  input  logic             mem_resp_valid
);

  ftc_pkg::ctrl_state_t state_q, state_d;
  logic        hit_q;
  logic        accept;

  always_comb begin
    state_d       = state_q;
    req_ready     = 1'b0;
    use_held      = 1'b1;
    arr_rd_en     = 1'b0;
    tag_wr_en     = 1'b0;
    data_fill_en  = 1'b0;
    data_word_en  = 1'b0;
    resp_valid    = 1'b0;
    resp_hit      = 1'b0;
    resp_from_mem = 1'b0;
    mem_req_valid = 1'b0;
    mem_req_we    = 1'b0;

    unique case (state_q)
      ftc_pkg::ST_IDLE: begin
        req_ready = 1'b1;
        use_held  = 1'b0;
        if (req_valid) begin
          arr_rd_en = 1'b1;
          state_d   = ftc_pkg::ST_COMPARE;
        end
      end
      ftc_pkg::ST_COMPARE: begin
        if (!req_q.we && hit) begin
          resp_valid = 1'b1;
          resp_hit   = 1'b1;
          req_ready  = 1'b1;
          use_held   = 1'b0;
          if (req_valid) begin
            arr_rd_en = 1'b1;
            state_d   = ftc_pkg::ST_COMPARE;
          end else begin
            state_d   = ftc_pkg::ST_IDLE;
          end
        end else if (!req_q.we) begin
          state_d = ftc_pkg::ST_RD_REQ;
        end else begin
          data_word_en = hit;
          state_d      = ftc_pkg::ST_WR_REQ;
        end
      end
      ftc_pkg::ST_RD_REQ: begin
        mem_req_valid = 1'b1;
        if (mem_req_ready) state_d = ftc_pkg::ST_RD_WAIT;
      end
      ftc_pkg::ST_RD_WAIT: begin
        if (mem_resp_valid) begin
          tag_wr_en     = line_active;
          data_fill_en  = line_active;
          resp_valid    = 1'b1;
          resp_from_mem = 1'b1;
          state_d       = ftc_pkg::ST_IDLE;
        end
      end
      ftc_pkg::ST_WR_REQ: begin
        mem_req_valid = 1'b1;
        mem_req_we    = 1'b1;
        if (mem_req_ready) begin
          resp_valid = 1'b1;
          resp_hit   = hit_q;
          state_d    = ftc_pkg::ST_IDLE;
        end
      end
      default: state_d = ftc_pkg::ST_IDLE;
    endcase
  end

  assign accept = req_valid && req_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= ftc_pkg::ST_IDLE;
      req_q   <= '0;
      line_q  <= '0;
      hit_q   <= 1'b0;
    end else begin
      state_q <= state_d;
      if (accept) begin
        req_q  <= req;
        line_q <= req_line;
      end
      if (state_q == ftc_pkg::ST_COMPARE) hit_q <= hit;
    end
  end

  // A memory request, once raised, is held until memory takes it.
  a_mem_req_held: assert property (@(posedge clk) disable iff (!rst_n)
    mem_req_valid && !mem_req_ready |=> mem_req_valid && $stable(mem_req_we));
  // A response is only given for a request that was accepted earlier.
  a_resp_after_req: assert property (@(posedge clk) disable iff (!rst_n)
    resp_valid |-> state_q != ftc_pkg::ST_IDLE);

endmodule
