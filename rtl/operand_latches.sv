// operand_latches: the two ALU operand registers.
//
// On a clock edge with set1 high, register A captures din (the register
// file output, addressed by regA); with set2 high, register B captures din
// (addressed by regB). Two separate latches follow the description of
// set1/set2; making them edge-triggered registers with a synchronous
// active-low reset to 0 is this design's choice.
module operand_latches
  import cpu_pkg::*;
#(
  parameter int unsigned W = DATA_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         set1,
  input  logic         set2,
  input  logic [W-1:0] din,
  output logic [W-1:0] a,
  output logic [W-1:0] b
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      a <= '0;
      b <= '0;
    end else begin
      if (set1) a <= din;
      if (set2) b <= din;
    end
  end

endmodule
