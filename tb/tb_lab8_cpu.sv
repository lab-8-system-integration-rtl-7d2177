// tb_lab8_cpu: end-to-end test of the CPU at its default sizes.
//
// An instruction-level reference model runs alongside the CPU. Every time
// the CPU ends an instruction (PC flag at a clock edge) the model executes
// the instruction at its own program counter, and the testbench compares:
// the fetch address before the edge, the number of clocks the instruction
// took (add/eq 4, ld/nop/skipz 2), and all four registers and ZF after
// it. When the model reaches halt, the CPU must keep NOPE high, never
// raise PC again and keep its fetch address.
//
// Part 1 runs the demonstration program held in memory after power-up
// (final state r0=5 r1=0 r2=6 r3=0, ZF=0, halt reached 32 clocks after
// reset, the add at word 9 skipped). Part 2 loads random programs through
// the program-write port and runs each to its halt. Every mechanism (ld,
// add, eq true and false, nop, skipz taken and not taken, halt, program
// load) is counted and must occur at least once.
module tb_lab8_cpu;
  import cpu_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  logic               rst_n, prog_we;
  logic [PC_W-1:0]    prog_addr;
  logic [INSTR_W-1:0] prog_wdata;
  logic [PC_W-1:0]    fetch_addr, pc_count, skip_count;
  logic               skip_pending;
  logic [INSTR_W-1:0] instr_o;
  logic [USTEP_W-1:0] ustep;
  uflags_t            flags;
  logic               zf;
  logic [DATA_W-1:0]  regs [NREGS];

  lab8_cpu dut (.*);

  int checks = 0, failures = 0;
  int n_ld = 0, n_add = 0, n_eq_t = 0, n_eq_f = 0, n_nop = 0;
  int n_skip_t = 0, n_skip_n = 0, n_halt = 0, n_load = 0;

  // demonstration program, hex words of its listing
  localparam logic [8:0] DEMO [15] = '{9'h045, 9'h051, 9'h004, 9'h066, 9'h088, 9'h0c0, 9'h0c0,
                                       9'h0c0, 9'h140, 9'h004, 9'h050, 9'h084, 9'h140, 9'h045, 9'h100};

  // reference model state
  logic [8:0] m_mem [256];
  logic [3:0] m_r [4];
  logic       m_zf;
  int         m_pc;

  task automatic chk(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d (t=%0t)", what, got, exp, $time);
    end
  endtask

  function automatic int op_cycles(input logic [2:0] op);
    return (op == OP_ADD || op == OP_EQ) ? 4 : 2;
  endfunction

  // Run the CPU from reset until the model reaches halt; returns clocks.
  task automatic run_program(output int total_cycles);
    int cyc, since, guard;
    logic [8:0] iw;
    logic [2:0] op;
    logic [1:0] ra, rb;
    for (int i = 0; i < 4; i++) m_r[i] = 0;
    m_zf = 0; m_pc = 0;
    rst_n = 0;
    @(posedge clk); @(negedge clk);
    rst_n = 1;
    cyc = 0; since = 0; guard = 0;
    forever begin
      iw = m_mem[m_pc];
      op = iw[8:6]; ra = iw[5:4]; rb = iw[3:2];
      if (op == OP_HALT) break;
      // wait for the PC flag of this instruction
      // the first clock of the instruction is already under way
      since = 1;
      while (!flags.pc && guard < 10000) begin
        @(negedge clk);
        since++;
        guard++;
      end
      chk(fetch_addr, m_pc, "fetch address");
      chk(instr_o, iw, "instruction word");
      chk(since, op_cycles(op), $sformatf("cycles of opcode %0d", op));
      cyc += since;
      // model executes
      case (op)
        OP_ADD:   begin m_r[0] = m_r[ra] + m_r[rb]; n_add++; m_pc++; end
        OP_LD:    begin m_r[ra] = iw[3:0]; n_ld++; m_pc++; end
        OP_EQ:    begin m_zf = (m_r[ra] == m_r[rb]); if (m_zf) n_eq_t++; else n_eq_f++; m_pc++; end
        OP_NOP:   begin n_nop++; m_pc++; end
        OP_SKIPZ: begin if (m_zf) begin n_skip_t++; m_pc += 2; end else begin n_skip_n++; m_pc++; end end
        default:  begin m_pc++; end
      endcase
      m_pc = m_pc % 256;
      @(posedge clk); #1;
      for (int i = 0; i < 4; i++) chk(regs[i], m_r[i], $sformatf("r%0d", i));
      chk(zf, m_zf, "zf");
      chk(fetch_addr, m_pc, "next fetch address");
      @(negedge clk);
    end
    // halted: NOPE must stay high, PC must not move
    n_halt++;
    for (int k = 0; k < 40; k++) begin
      @(negedge clk);
      chk(flags.nope, 1, "nope while halted");
      chk(flags.pc, 0, "no pc while halted");
      chk(fetch_addr, m_pc, "address while halted");
    end
    for (int i = 0; i < 4; i++) chk(regs[i], m_r[i], $sformatf("r%0d at halt", i));
    total_cycles = cyc;
  endtask

  function automatic logic [8:0] random_instr();
    logic [2:0] op;
    case ($urandom_range(0, 9))
      0, 1, 2: op = OP_LD;
      3, 4:    op = OP_ADD;
      5, 6:    op = OP_EQ;
      7:       op = OP_NOP;
      default: op = OP_SKIPZ;
    endcase
    // eq compares small values so that both outcomes are frequent
    if (op == OP_LD) return {op, 2'($urandom), 2'b00, 2'($urandom)};
    return {op, 6'($urandom)};
  endfunction

  initial begin
    int cycles;
    rst_n = 0; prog_we = 0; prog_addr = 0; prog_wdata = 0;
    // Part 1: demonstration program (power-up memory contents)
    for (int i = 0; i < 256; i++) m_mem[i] = 9'h100;
    for (int i = 0; i < 15; i++) m_mem[i] = DEMO[i];
    run_program(cycles);
    chk(cycles, 32, "demo program clocks to halt");
    chk(fetch_addr, 14, "demo halt address");
    chk(skip_count, 1, "demo skips taken");
    chk(regs[0], 5, "demo r0"); chk(regs[1], 0, "demo r1");
    chk(regs[2], 6, "demo r2"); chk(regs[3], 0, "demo r3");
    chk(zf, 0, "demo zf");

    // Part 2: random programs loaded through the write port
    for (int p = 0; p < 30; p++) begin
      int len;
      len = $urandom_range(10, 80);
      rst_n = 0;
      for (int a = 0; a < len + 2; a++) begin
        @(negedge clk);
        prog_we = 1; prog_addr = PC_W'(a);
        prog_wdata = (a < len) ? random_instr() : 9'h100;
        m_mem[a] = prog_wdata;
      end
      @(negedge clk);
      prog_we = 0;
      n_load++;
      run_program(cycles);
    end

    chk(int'(n_ld > 0), 1, "ld executed");
    chk(int'(n_add > 0), 1, "add executed");
    chk(int'(n_eq_t > 0), 1, "eq equal executed");
    chk(int'(n_eq_f > 0), 1, "eq not-equal executed");
    chk(int'(n_nop > 0), 1, "nop executed");
    chk(int'(n_skip_t > 0), 1, "skipz taken");
    chk(int'(n_skip_n > 0), 1, "skipz not taken");
    chk(int'(n_halt > 0), 1, "halt reached");
    chk(int'(n_load > 0), 1, "program loaded");
    $display("mechanisms: ld=%0d add=%0d eq_true=%0d eq_false=%0d nop=%0d skip_taken=%0d skip_not=%0d halt=%0d load=%0d",
             n_ld, n_add, n_eq_t, n_eq_f, n_nop, n_skip_t, n_skip_n, n_halt, n_load);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
