// write_select: register-file address and write-data selection.
//
// Coordinates the two instructions that write a register, ld and add, and
// the two operand reads, set1 and set2, over the single register-file
// port:
//   add  : write address is fixed register 00, data is the ALU sum
//   ld   : write address is regA (instruction bits 5:4), data is the
//          immediate (instruction bits 3:0, on opnd)
//   set2 : read address is regB (instruction bits 3:2, opnd[3:2])
//   else : read address is regA
// Write enable is LD or ADD. The fixed-00 destination and the ld/add data
// selector follow the original machine; folding the regB read into the
// same address selector is this design's choice.
module write_select
  import cpu_pkg::*;
(
  input  logic                ld,
  input  logic                add,
  input  logic                set2,
  input  logic [RADDR_W-1:0]  ra,
  input  logic [3:0]          opnd,
  input  logic [DATA_W-1:0]   alu_sum,
  output logic [RADDR_W-1:0]  rf_addr,
  output logic                rf_we,
  output logic [DATA_W-1:0]   rf_wdata
);

  always_comb begin
    if (add)       rf_addr = '0;
    else if (set2) rf_addr = opnd[3:2];
    else                 rf_addr = ra;
    rf_we    = ld | add;
    rf_wdata = ld ? opnd[DATA_W-1:0] : alu_sum;
  end

endmodule
