// tb_demo_program: clock-by-clock check of the demonstration program.
//
// After reset the CPU runs the program held in instruction memory at
// power-up. The microcode flags of every clock are compared with the
// expected sequence, worked out by hand from the per-instruction microcode
// (ld 08 01, add 20 40 02 01, eq 20 40 04 01, nop 80 01, skipz 10 01,
// halt 80 ...). The skipped add at word 9 must not appear, the second
// skipz must fall through to the ld at word 13, and the register contents
// are checked at the points the program comments name.
module tb_demo_program;
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

  localparam int NCYC = 40;
  // expected flags per clock; halt (80) from clock 32 on
  localparam logic [7:0] EXP [NCYC] = '{
    8'h08, 8'h01,                // 0  ld r0,5
    8'h08, 8'h01,                // 1  ld r1,1
    8'h20, 8'h40, 8'h02, 8'h01,  // 2  add
    8'h08, 8'h01,                // 3  ld r2,6
    8'h20, 8'h40, 8'h04, 8'h01,  // 4  eq r0,r2
    8'h80, 8'h01, 8'h80, 8'h01, 8'h80, 8'h01,  // 5-7 nop
    8'h10, 8'h01,                // 8  skipz (taken)
    8'h08, 8'h01,                // 10 ld r1,0
    8'h20, 8'h40, 8'h04, 8'h01,  // 11 eq r0,r1
    8'h10, 8'h01,                // 12 skipz (not taken)
    8'h08, 8'h01,                // 13 ld r0,5
    8'h80, 8'h80, 8'h80, 8'h80, 8'h80, 8'h80, 8'h80, 8'h80};  // 14 halt
  // expected fetch address per clock
  localparam int ADDR [NCYC] = '{0,0, 1,1, 2,2,2,2, 3,3, 4,4,4,4, 5,5,6,6,7,7, 8,8,
                                 10,10, 11,11,11,11, 12,12, 13,13, 14,14,14,14,14,14,14,14};

  task automatic chk(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  initial begin
    rst_n = 0; prog_we = 0; prog_addr = 0; prog_wdata = 0;
    @(posedge clk); @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < NCYC; c++) begin
      chk(flags, EXP[c], $sformatf("flags at clock %0d", c));
      chk(fetch_addr, ADDR[c], $sformatf("fetch address at clock %0d", c));
      // state visible at the start of selected clocks
      case (c)
        4:  begin chk(regs[0], 5, "r0 before add"); chk(regs[1], 1, "r1 before add"); end
        8:  chk(regs[0], 6, "r0 after add (0101+0001)");
        14: chk(zf, 1, "zf after eq r0,r2");
        24: chk(regs[1], 0, "r1 after ld 0");
        28: chk(zf, 0, "zf after eq r0,r1");
        32: begin chk(regs[0], 5, "r0 final"); chk(regs[2], 6, "r2 final"); end
        default: ;
      endcase
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
