// ftc_fault_status_reg: the S-bit fault status register.
//
// Holds one bit per physical cache line, set when self test found a faulty
// cell anywhere in that line's data or tag.  The register is loaded with the
// whole result vector in the cycle that bist_valid is high, and is readable
// by configuration software both as a vector and one bit at a time.  The
// cache uses it to keep faulty lines from ever being activated.
//
// Timing: the load takes effect at the next rising clock edge; reads are
// combinational.  Reset clears the register (no line faulty) until self test
// reports, which is this design's choice.
module ftc_fault_status_reg #(
  parameter int unsigned LINES = ftc_pkg::LINES,
  parameter int unsigned IDX_W = $clog2(LINES)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             bist_valid,
  input  logic [LINES-1:0] bist_fault,
  output logic [LINES-1:0] fault,
  input  logic [IDX_W-1:0] rd_idx,
  output logic             rd_faulty
);

  logic [LINES-1:0] fault_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          fault_q <= '0;
    else if (bist_valid) fault_q <= bist_fault;
  end

  assign fault     = fault_q;
  assign rd_faulty = fault_q[rd_idx];

endmodule
