// ftc_pkg: constants and types shared by the fault tolerant cache.
//
// The default geometry is the main configuration of the design: a 4 KB
// direct-mapped cache with 32-byte lines (128 lines, 7 index bits, 5 offset
// bits) behind a 32-bit byte address.  The "new tag" kept in the tag array
// is the ordinary tag concatenated with the original index, i.e. the whole
// memory line number, so that memory lines whose conflict sets were merged
// onto one physical line stay distinguishable.  The 32-bit data word and
// 32-bit address are this design's choice; the widths derived from them
// follow the design.
package ftc_pkg;

  parameter int unsigned ADDR_W      = 32;    // byte address width (own choice)
  parameter int unsigned WORD_W      = 32;    // processor word (own choice)
  parameter int unsigned CACHE_BYTES = 4096;  // 4 KB
  parameter int unsigned LINE_BYTES  = 32;    // 32-byte lines

  parameter int unsigned LINES    = CACHE_BYTES / LINE_BYTES;     // S = 128
  parameter int unsigned IDX_W    = $clog2(LINES);                // i = 7
  parameter int unsigned OFF_W    = $clog2(LINE_BYTES);           // 5
  parameter int unsigned TAG_W    = ADDR_W - IDX_W - OFF_W;       // t = 20
  parameter int unsigned NTAG_W   = TAG_W + IDX_W;                // t+i = 27
  parameter int unsigned LINE_W   = LINE_BYTES * 8;               // 256
  parameter int unsigned STRB_W   = WORD_W / 8;                   // 4

  // Processor side request as held by the controller while it is served.
  typedef struct packed {
    logic                we;
    logic [STRB_W-1:0]   wstrb;
    logic [ADDR_W-1:0]   addr;
    logic [WORD_W-1:0]   wdata;
  } cpu_req_t;

  typedef enum logic [2:0] {
    ST_IDLE     = 3'd0,  // waiting for a request
    ST_COMPARE  = 3'd1,  // tag and data read out, hit/miss known
    ST_RD_REQ   = 3'd2,  // line read request to memory
    ST_RD_WAIT  = 3'd3,  // waiting for the line
    ST_WR_REQ   = 3'd4   // write-through of one word to memory
  } ctrl_state_t;

endpackage
