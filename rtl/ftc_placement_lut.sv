// ftc_placement_lut: the placement lookup table of the fault tolerant cache.
//
// One entry per original cache index (2^i entries of i bits).  An access
// reads the entry selected by the index field of its address and gets the
// physical cache line that the memory line is placed in.  Configuration
// software writes the entries: for the profile-driven placement it loads the
// map computed from a reference profile, for modulo placement it loads
// L mod (S - f) renumbered onto the fault-free lines.  Entries that point to
// the same line merge their conflict sets.
//
// Interface and timing: the lookup port is combinational (index in, line out
// in the same cycle) so that the lookup can sit in front of the array
// decoder.  A second combinational read port lets software read the table
// back.  Writes take effect at the next rising clock edge.  Reset loads the
// identity map map[k] = k, which is the initial placement of the placement
// algorithm and the placement of a cache with no faults; this reset value is
// this design's choice.
module ftc_placement_lut #(
  parameter int unsigned LINES = ftc_pkg::LINES,
  parameter int unsigned IDX_W = $clog2(LINES)
) (
  input  logic             clk,
  input  logic             rst_n,
  // address translation
  input  logic [IDX_W-1:0] lookup_idx,
  output logic [IDX_W-1:0] lookup_line,
  // configuration write
  input  logic             cfg_we,
  input  logic [IDX_W-1:0] cfg_idx,
  input  logic [IDX_W-1:0] cfg_line,
  // configuration read-back
  input  logic [IDX_W-1:0] cfg_rd_idx,
  output logic [IDX_W-1:0] cfg_rd_line
);

  logic [IDX_W-1:0] map_q [LINES];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < LINES; k++) map_q[k] <= IDX_W'(k);
    end else if (cfg_we) begin
      map_q[cfg_idx] <= cfg_line;
    end
  end

  assign lookup_line = map_q[lookup_idx];
  assign cfg_rd_line = map_q[cfg_rd_idx];

endmodule
