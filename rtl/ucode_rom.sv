// ucode_rom: the microcode memory.
//
// 256 lines of 8 control flags, addressed by {opcode, micro-step}. Each
// opcode owns 32 consecutive lines (opcode*32). The contents follow the
// published microcode (see cpu_pkg::ucode_line); lines an instruction does
// not use hold 00. Read is combinational: the flags of the current step
// are valid for the whole clock cycle and act on the next rising edge.
module ucode_rom
  import cpu_pkg::*;
(
  input  logic [UADDR_W-1:0] addr,
  output uflags_t            flags
);

  always_comb flags = uflags_t'(ucode_line(addr));

endmodule
