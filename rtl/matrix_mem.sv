// matrix_mem: the matrix memory of the least-squares solver.
//
// Holds ROWS rows of the augmented system [A | b]: three 16-bit signed entries
// of A and one 26-bit signed entry of b per row (15 rows for 16 anchors). The
// Givens rotations read and rewrite two rows at a time, so the memory has two
// combinational read ports (ra0/rd0, ra1/rd1) and two write ports (we0/wa0/wd0,
// we1/wa1/wd1) written on the rising clock edge; if both write ports address the
// same row, port 1 wins. Setup and back substitution share these ports through
// the solver's controller. The two-port organisation is this design's choice;
// the row and word sizes are those of the specification.
module matrix_mem
  import loc_pkg::*;
#(
  parameter int unsigned ROWS = 15
) (
  input  logic                    clk,
  input  logic [$clog2(ROWS)-1:0] ra0,
  input  logic [$clog2(ROWS)-1:0] ra1,
  output mrow_t                   rd0,
  output mrow_t                   rd1,
  input  logic                    we0,
  input  logic [$clog2(ROWS)-1:0] wa0,
  input  mrow_t                   wd0,
  input  logic                    we1,
  input  logic [$clog2(ROWS)-1:0] wa1,
  input  mrow_t                   wd1
);

  mrow_t mem [ROWS];

  always_ff @(posedge clk) begin
    if (we0) mem[wa0] <= wd0;
    if (we1) mem[wa1] <= wd1;
  end

  assign rd0 = mem[ra0];
  assign rd1 = mem[ra1];

endmodule
