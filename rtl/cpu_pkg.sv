// cpu_pkg: shared types and constants of the 4-register microcoded CPU.
//
// An instruction is 9 bits wide: a 3-bit opcode in bits 8:6 and a 6-bit
// operand field. The opcode, placed above a 5-bit micro-step number, forms
// the 8-bit address of a 256-line microcode memory, so each opcode owns a
// block of 32 lines starting at opcode*32. Each microcode line is one byte
// with at most one control flag set. The opcode values, the flag encodings
// and the microcode contents follow the published instruction set; the
// 8-bit program-counter width and the content of the unused opcodes
// (110, 111: all lines 00) are choices of this design.
package cpu_pkg;

  localparam int INSTR_W = 9;   // instruction width
  localparam int DATA_W  = 4;   // register / data width
  localparam int NREGS   = 4;   // physical registers 00..11
  localparam int RADDR_W = 2;   // register address width
  localparam int USTEP_W = 5;   // micro-steps per opcode block (32 lines)
  localparam int UADDR_W = 8;   // microcode address: {opcode, step}
  localparam int PC_W    = 8;   // instruction memory address width

  typedef enum logic [2:0] {
    OP_ADD   = 3'b000,
    OP_LD    = 3'b001,
    OP_EQ    = 3'b010,
    OP_NOP   = 3'b011,
    OP_HALT  = 3'b100,
    OP_SKIPZ = 3'b101
  } opcode_e;

  // Instruction layout. For add/eq: opnd[3:2] is regB, opnd[1:0] padding.
  // For ld: opnd[3:0] is the immediate value.
  typedef struct packed {
    opcode_e            op;
    logic [RADDR_W-1:0] ra;
    logic [3:0]         opnd;
  } instr_t;

  // One microcode byte, bit 7 (NOPE, 80h) down to bit 0 (PC, 01h).
  typedef struct packed {
    logic nope;   // 80h  no-operation / halted indicator
    logic set2;   // 40h  latch register regB into operand latch B
    logic set1;   // 20h  latch register regA into operand latch A
    logic skipz;  // 10h  skip the next instruction if ZF is set
    logic ld;     // 08h  write the immediate into register regA
    logic eq;     // 04h  compare latches, update ZF
    logic add;    // 02h  write latch A + latch B into register 00
    logic pc;     // 01h  advance to the next instruction
  } uflags_t;

  localparam logic [7:0] F_PC    = 8'h01;
  localparam logic [7:0] F_ADD   = 8'h02;
  localparam logic [7:0] F_EQ    = 8'h04;
  localparam logic [7:0] F_LD    = 8'h08;
  localparam logic [7:0] F_SKIPZ = 8'h10;
  localparam logic [7:0] F_SET1  = 8'h20;
  localparam logic [7:0] F_SET2  = 8'h40;
  localparam logic [7:0] F_NOPE  = 8'h80;

  // Microcode contents, line by line.
  //   add   (lines   0..3):  SET1, SET2, ADD, PC
  //   ld    (lines  32..33): LD, PC
  //   eq    (lines  64..67): SET1, SET2, EQ, PC
  //   nop   (lines  96..97): NOPE, PC
  //   halt  (lines 128..159): NOPE on every line, never PC
  //   skipz (lines 160..161): SKIPZ, PC
  function automatic logic [7:0] ucode_line(input logic [UADDR_W-1:0] a);
    logic [2:0]         op;
    logic [USTEP_W-1:0] s;
    logic [7:0]         w;
    op = a[UADDR_W-1 -: 3];
    s  = a[USTEP_W-1:0];
    w  = 8'h00;
    unique case (op)
      3'b000: case (s) 5'd0: w = F_SET1; 5'd1: w = F_SET2; 5'd2: w = F_ADD; 5'd3: w = F_PC; default: w = 8'h00; endcase
      3'b001: case (s) 5'd0: w = F_LD;   5'd1: w = F_PC;   default: w = 8'h00; endcase
      3'b010: case (s) 5'd0: w = F_SET1; 5'd1: w = F_SET2; 5'd2: w = F_EQ;  5'd3: w = F_PC; default: w = 8'h00; endcase
      3'b011: case (s) 5'd0: w = F_NOPE; 5'd1: w = F_PC;   default: w = 8'h00; endcase
      3'b100: w = F_NOPE;
      3'b101: case (s) 5'd0: w = F_SKIPZ; 5'd1: w = F_PC;  default: w = 8'h00; endcase
      default: w = 8'h00;
    endcase
    return w;
  endfunction

  // The demonstration program held in instruction memory after power-up.
  // Address beyond the program read as halt (100 000000).
  function automatic logic [INSTR_W-1:0] example_program(input int unsigned a);
    logic [INSTR_W-1:0] i;
    case (a)
      0:  i = 9'b001_00_0101; // ld   r0, 5
      1:  i = 9'b001_01_0001; // ld   r1, 1
      2:  i = 9'b000_00_01_00; // add  r0 + r1 -> r0   (6)
      3:  i = 9'b001_10_0110; // ld   r2, 6
      4:  i = 9'b010_00_10_00; // eq   r0, r2           (ZF=1)
      5:  i = 9'b011_000000;  // nop
      6:  i = 9'b011_000000;  // nop
      7:  i = 9'b011_000000;  // nop
      8:  i = 9'b101_000000;  // skipz                  (taken)
      9:  i = 9'b000_00_01_00; // add  r0 + r1 -> r0   (skipped)
      10: i = 9'b001_01_0000; // ld   r1, 0
      11: i = 9'b010_00_01_00; // eq   r0, r1           (ZF=0)
      12: i = 9'b101_000000;  // skipz                  (not taken)
      13: i = 9'b001_00_0101; // ld   r0, 5
      default: i = 9'b100_000000; // halt
    endcase
    return i;
  endfunction

endpackage
