// alu: 4-bit adder / comparator with the zero-flag register.
//
// sum is a + b modulo 2**W (the carry is dropped). For eq the ALU
// subtracts b from a; on a clock edge with eq_en high the zero flag zf
// is loaded with (a - b == 0), i.e. set when the operands are equal and
// cleared otherwise. zf keeps its value until the next eq. Dropping the
// carry and resetting zf to 0 (synchronous, active-low) are this design's
// choices.
module alu
  import cpu_pkg::*;
#(
  parameter int unsigned W = DATA_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         eq_en,
  output logic [W-1:0] sum,
  output logic         zf
);

  logic [W-1:0] diff;

  assign sum  = a + b;
  assign diff = a - b;

  always_ff @(posedge clk) begin
    if (!rst_n)     zf <= 1'b0;
    else if (eq_en) zf <= (diff == '0);
  end

endmodule
