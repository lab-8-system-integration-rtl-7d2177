// lab8_cpu: a microcoded 4-bit CPU with four registers.
//
// Every instruction is executed as a short sequence of microcode lines.
// The program counter (pc_unit) addresses the instruction memory
// (prog_ram); the instruction's opcode together with the micro-step
// counter (ucode_counter) addresses the microcode memory (ucode_rom),
// whose one-hot flags drive the datapath for one clock each:
//   SET1/SET2 load registers regA/regB into the operand latches,
//   ADD writes latchA+latchB to register 00, EQ sets ZF if they are equal,
//   LD writes the 4-bit immediate to regA, SKIPZ skips the next
//   instruction if ZF is set, PC ends the instruction, NOPE marks nop/halt.
// Cycles per instruction: add 4, eq 4, ld 2, nop 2, skipz 2; halt never
// ends. Datapath, microcode and instruction set follow the original
// machine; clocking everything from one clock with synchronous active-low
// reset is this design's choice.
//
// Interface: prog_we/prog_addr/prog_wdata write the instruction memory
// (which powers up holding the demonstration program); the remaining
// outputs expose the internal state for observation.
module lab8_cpu
  import cpu_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               prog_we,
  input  logic [PC_W-1:0]    prog_addr,
  input  logic [INSTR_W-1:0] prog_wdata,
  output logic [PC_W-1:0]    fetch_addr,
  output logic [PC_W-1:0]    pc_count,
  output logic [PC_W-1:0]    skip_count,
  output logic               skip_pending,
  output logic [INSTR_W-1:0] instr_o,
  output logic [USTEP_W-1:0] ustep,
  output uflags_t            flags,
  output logic               zf,
  output logic [DATA_W-1:0]  regs [NREGS]
);

  instr_t              instr;
  logic [RADDR_W-1:0]  rf_addr;
  logic                rf_we;
  logic [DATA_W-1:0]   rf_wdata, rf_rdata;
  logic [DATA_W-1:0]   opa, opb, alu_sum;

  pc_unit u_pc (
    .clk, .rst_n,
    .pc_flag    (flags.pc),
    .skipz_flag (flags.skipz),
    .zf,
    .fetch_addr,
    .pc_count,
    .skip_count,
    .skip_pending
  );

  prog_ram u_ram (
    .clk,
    .we    (prog_we),
    .waddr (prog_addr),
    .wdata (prog_wdata),
    .raddr (fetch_addr),
    .rdata (instr)
  );

  ucode_counter u_ucnt (
    .clk, .rst_n,
    .pc_flag (flags.pc),
    .step    (ustep)
  );

  ucode_rom u_urom (
    .addr  ({instr.op, ustep}),
    .flags (flags)
  );

  write_select u_sel (
    .ld   (flags.ld),
    .add  (flags.add),
    .set2 (flags.set2),
    .ra   (instr.ra),
    .opnd (instr.opnd),
    .alu_sum,
    .rf_addr,
    .rf_we,
    .rf_wdata
  );

  regfile u_rf (
    .clk, .rst_n,
    .addr  (rf_addr),
    .we    (rf_we),
    .wdata (rf_wdata),
    .rdata (rf_rdata),
    .regs
  );

  operand_latches u_lat (
    .clk, .rst_n,
    .set1 (flags.set1),
    .set2 (flags.set2),
    .din  (rf_rdata),
    .a    (opa),
    .b    (opb)
  );

  alu u_alu (
    .clk, .rst_n,
    .a     (opa),
    .b     (opb),
    .eq_en (flags.eq),
    .sum   (alu_sum),
    .zf
  );

  assign instr_o = instr;

  // The microcode sets at most one flag per line.
  a_onehot_flags: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(flags))
    else $error("more than one microcode flag set: %b", flags);

endmodule
