// prog_ram: instruction memory of the CPU.
//
// 2**PC_W words of 9 bits. The read port is asynchronous: the word at
// raddr appears on rdata in the same cycle, so the microcode address
// follows the program counter without a fetch cycle, as the original
// memory-device-based machine does. A synchronous write port lets a host
// load a program. After power-up the memory holds the demonstration program
// (cpu_pkg::example_program) when INIT_EXAMPLE is set, otherwise all halt
// instructions. The original machine splits each instruction over two
// 8-bit memory devices (bit 8 in one, bits 7:0 in the other); here it is a
// single 9-bit-wide array, which behaves identically.
module prog_ram
  import cpu_pkg::*;
#(
  parameter int unsigned AW           = PC_W,
  parameter bit          INIT_EXAMPLE = 1'b1
) (
  input  logic               clk,
  input  logic               we,
  input  logic [AW-1:0]      waddr,
  input  logic [INSTR_W-1:0] wdata,
  input  logic [AW-1:0]      raddr,
  output logic [INSTR_W-1:0] rdata
);

  logic [INSTR_W-1:0] mem [2**AW];

  initial begin
    for (int unsigned i = 0; i < 2**AW; i++)
      mem[i] = INIT_EXAMPLE ? example_program(i) : {OP_HALT, 6'b0};
  end

  always_ff @(posedge clk)
    if (we) mem[waddr] <= wdata;

  assign rdata = mem[raddr];

endmodule
