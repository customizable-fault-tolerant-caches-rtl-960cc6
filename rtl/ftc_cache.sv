// ftc_cache: direct-mapped cache with programmable, fault tolerant placement.
//
// Self test marks cache lines that contain a failing cell in their data or
// tag.  Instead of indexing the arrays with the address index directly, the
// index goes through a small lookup table (placement table) whose output is
// the physical line to use.  Software loads the table so that no entry points
// to a faulty line; several original indices (conflict sets) may share one
// good line.  To keep memory lines that now share a physical line apart, the
// tag array stores the ordinary tag concatenated with the original index
// (t+i bits), and the hit comparison uses that widened tag.  Faulty lines are
// never activated by the decoder.
//
//   addr = | tag (t) | index (i) | offset |
//            index -> placement table -> line -> decoder -> tag/data arrays
//            {tag,index} == stored tag  -> hit ; offset -> word mux -> data
//
// Interfaces:
//   processor  req_valid/req_ready handshake with we, byte strobes, address
//              and write data; resp_valid with resp_hit and read data.
//   memory     mem_req_valid/mem_req_ready handshake carrying a line read
//              (line-aligned address) or a word write; a read is answered by
//              one mem_resp_valid beat carrying the whole line.
//   config     write/read-back of the placement table, read of the fault
//              status register, flush of all valid bits.
//   self test  bist_valid loads the fault vector into the status register.
//
// Timing: read hit one cycle after acceptance, back-to-back read hits one per
// cycle; read miss two cycles plus the memory latency; writes go through to
// memory (no allocation on a write miss) and are answered when memory
// accepts them.  The table lookup is in the same cycle as the array access,
// ahead of the decoder.
//
// The placement table, the widened tag, the fault status register and the
// decoder that never activates faulty lines follow the design; the 32-bit
// address and word, the write policy and the memory and configuration
// interfaces are this implementation's own.
module ftc_cache #(
  parameter int unsigned CACHE_BYTES = ftc_pkg::CACHE_BYTES,
  parameter int unsigned LINE_BYTES  = ftc_pkg::LINE_BYTES
) (
  input  logic                                      clk,
  input  logic                                      rst_n,
  // processor side
  input  logic                                      req_valid,
  output logic                                      req_ready,
  input  logic                                      req_we,
  input  logic [ftc_pkg::STRB_W-1:0]                         req_wstrb,
  input  logic [ftc_pkg::ADDR_W-1:0]                         req_addr,
  input  logic [ftc_pkg::WORD_W-1:0]                         req_wdata,
  output logic                                      resp_valid,
  output logic                                      resp_hit,
  output logic [ftc_pkg::WORD_W-1:0]                         resp_rdata,
  // memory side
  output logic                                      mem_req_valid,
  input  logic                                      mem_req_ready,
  output logic                                      mem_req_we,
  output logic [ftc_pkg::ADDR_W-1:0]                         mem_req_addr,
  output logic [ftc_pkg::STRB_W-1:0]                         mem_req_wstrb,
  output logic [ftc_pkg::WORD_W-1:0]                         mem_req_wdata,
  input  logic                                      mem_resp_valid,
  input  logic [LINE_BYTES*8-1:0]                   mem_resp_line,
  // configuration
  input  logic                                      cfg_lut_we,
  input  logic [$clog2(CACHE_BYTES/LINE_BYTES)-1:0] cfg_lut_idx,
  input  logic [$clog2(CACHE_BYTES/LINE_BYTES)-1:0] cfg_lut_line,
  input  logic [$clog2(CACHE_BYTES/LINE_BYTES)-1:0] cfg_rd_idx,
  output logic [$clog2(CACHE_BYTES/LINE_BYTES)-1:0] cfg_rd_line,
  output logic                                      cfg_rd_faulty,
  input  logic                                      cfg_flush,
  // self test result
  input  logic                                      bist_valid,
  input  logic [CACHE_BYTES/LINE_BYTES-1:0]         bist_fault,
  output logic [CACHE_BYTES/LINE_BYTES-1:0]         fault_status
);

  localparam int unsigned S      = CACHE_BYTES / LINE_BYTES;
  localparam int unsigned I_W    = $clog2(S);
  localparam int unsigned O_W    = $clog2(LINE_BYTES);
  localparam int unsigned NT_W   = ftc_pkg::ADDR_W - O_W;          // tag + index
  localparam int unsigned L_W    = LINE_BYTES * 8;
  localparam int unsigned NWORDS = L_W / ftc_pkg::WORD_W;
  localparam int unsigned WS_W   = (NWORDS > 1) ? $clog2(NWORDS) : 1;
  localparam int unsigned BO_W   = $clog2(ftc_pkg::WORD_W / 8);    // byte-in-word bits

  ftc_pkg::cpu_req_t         req, req_q, look_req;
  logic [I_W-1:0]   lut_line, line_q, dec_line;
  logic             use_held;
  logic [S-1:0]     wl;
  logic             line_active;
  logic             arr_rd_en, tag_wr_en, data_fill_en, data_word_en;
  logic             hit, resp_from_mem;
  logic             tag_valid;
  logic [NT_W-1:0]  tag_rd, tag_new;
  logic [L_W-1:0]   data_rd;
  logic [WS_W-1:0]  wsel_q;
  logic [ftc_pkg::WORD_W-1:0] arr_word, mem_word;

  assign req = '{we: req_we, wstrb: req_wstrb, addr: req_addr, wdata: req_wdata};

  // The arrays are addressed by the incoming request while a new request can
  // be accepted, otherwise by the request being served.
  assign look_req = use_held ? req_q : req;

  ftc_placement_lut #(.LINES(S)) u_lut (
    .clk         (clk),
    .rst_n       (rst_n),
    .lookup_idx  (look_req.addr[O_W +: I_W]),
    .lookup_line (lut_line),
    .cfg_we      (cfg_lut_we),
    .cfg_idx     (cfg_lut_idx),
    .cfg_line    (cfg_lut_line),
    .cfg_rd_idx  (cfg_rd_idx),
    .cfg_rd_line (cfg_rd_line)
  );

  ftc_fault_status_reg #(.LINES(S)) u_fault (
    .clk        (clk),
    .rst_n      (rst_n),
    .bist_valid (bist_valid),
    .bist_fault (bist_fault),
    .fault      (fault_status),
    .rd_idx     (cfg_rd_idx),
    .rd_faulty  (cfg_rd_faulty)
  );

  assign dec_line = use_held ? line_q : lut_line;

  ftc_line_decoder #(.LINES(S)) u_dec (
    .en     (1'b1),
    .line   (dec_line),
    .fault  (fault_status),
    .wl     (wl),
    .active (line_active)
  );

  ftc_controller #(.IDX_W(I_W)) u_ctrl (
    .clk            (clk),
    .rst_n          (rst_n),
    .req_valid      (req_valid),
    .req_ready      (req_ready),
    .req            (req),
    .req_line       (lut_line),
    .req_q          (req_q),
    .line_q         (line_q),
    .use_held       (use_held),
    .arr_rd_en      (arr_rd_en),
    .hit            (hit),
    .line_active    (line_active),
    .tag_wr_en      (tag_wr_en),
    .data_fill_en   (data_fill_en),
    .data_word_en   (data_word_en),
    .resp_valid     (resp_valid),
    .resp_hit       (resp_hit),
    .resp_from_mem  (resp_from_mem),
    .mem_req_valid  (mem_req_valid),
    .mem_req_we     (mem_req_we),
    .mem_req_ready  (mem_req_ready),
    .mem_resp_valid (mem_resp_valid)
  );

  // Widened tag of the request being served: ordinary tag followed by the
  // original index, i.e. the memory line number.
  assign tag_new = req_q.addr[ftc_pkg::ADDR_W-1:O_W];
  assign wsel_q  = WS_W'(req_q.addr[O_W-1:BO_W]);

  ftc_tag_array #(.LINES(S), .NTAG_W(NT_W)) u_tag (
    .clk      (clk),
    .rst_n    (rst_n),
    .wl       (wl),
    .rd_en    (arr_rd_en),
    .wr_en    (tag_wr_en),
    .wr_tag   (tag_new),
    .inv_all  (cfg_flush),
    .rd_valid (tag_valid),
    .rd_tag   (tag_rd)
  );

  ftc_data_array #(.LINES(S), .LINE_W(L_W), .WORD_W(ftc_pkg::WORD_W)) u_data (
    .clk       (clk),
    .wl        (wl),
    .rd_en     (arr_rd_en),
    .fill_en   (data_fill_en),
    .fill_line (mem_resp_line),
    .word_en   (data_word_en),
    .wsel      (wsel_q),
    .wstrb     (req_q.wstrb),
    .wdata     (req_q.wdata),
    .rd_line   (data_rd)
  );

  ftc_tag_compare #(.NTAG_W(NT_W)) u_cmp (
    .stored_valid (tag_valid),
    .stored_tag   (tag_rd),
    .access_tag   (tag_new),
    .hit          (hit)
  );

  ftc_word_mux #(.LINE_W(L_W), .WORD_W(ftc_pkg::WORD_W)) u_mux_arr (
    .line (data_rd),
    .wsel (wsel_q),
    .word (arr_word)
  );

  ftc_word_mux #(.LINE_W(L_W), .WORD_W(ftc_pkg::WORD_W)) u_mux_mem (
    .line (mem_resp_line),
    .wsel (wsel_q),
    .word (mem_word)
  );

  assign resp_rdata = resp_from_mem ? mem_word : arr_word;

  assign mem_req_addr  = mem_req_we ? req_q.addr
                                    : {req_q.addr[ftc_pkg::ADDR_W-1:O_W], O_W'(0)};
  assign mem_req_wstrb = req_q.wstrb;
  assign mem_req_wdata = req_q.wdata;

endmodule
