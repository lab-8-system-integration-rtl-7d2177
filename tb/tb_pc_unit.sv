// tb_pc_unit: drives instruction-like flag sequences (a SKIPZ cycle, then
// a PC cycle; or a lone PC cycle) with a random zero flag and checks the
// fetch address against a model: +1 per PC flag, +2 when the instruction
// was a skipz executed with ZF set. The fetch address must not move
// between the SKIPZ and PC cycles of one instruction.
module tb_pc_unit;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, pc_flag, skipz_flag, zf;
  logic [7:0] fetch_addr, pc_count, skip_count;
  logic skip_pending;
  int checks = 0, failures = 0;
  int exp_addr, exp_pc, exp_skip, taken = 0;

  pc_unit dut (.clk, .rst_n, .pc_flag, .skipz_flag, .zf, .fetch_addr,
               .pc_count, .skip_count, .skip_pending);

  task automatic chk(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic cyc(input logic p, input logic s, input logic z);
    @(negedge clk);
    pc_flag = p; skipz_flag = s; zf = z;
    @(posedge clk); #1;
  endtask

  initial begin
    rst_n = 0; pc_flag = 0; skipz_flag = 0; zf = 0;
    @(posedge clk); @(negedge clk); rst_n = 1;
    exp_addr = 0; exp_pc = 0; exp_skip = 0;
    chk(fetch_addr, 0, "after reset");
    for (int n = 0; n < 400; n++) begin
      logic z, is_skip, tk;
      z = 1'($urandom);
      is_skip = ($urandom_range(0, 2) == 0);
      tk = is_skip & z;
      if (is_skip) begin
        cyc(0, 1, z);
        chk(fetch_addr, exp_addr, "address held during skipz");
        chk(skip_pending, tk, "skip pending");
      end else begin
        cyc(0, 0, z);   // e.g. a SET1 step
        chk(fetch_addr, exp_addr, "address held mid-instruction");
      end
      cyc(1, 0, 1'($urandom));
      exp_pc   = (exp_pc + 1) % 256;
      exp_skip = (exp_skip + tk) % 256;
      exp_addr = (exp_pc + exp_skip) % 256;
      if (tk) taken++;
      chk(fetch_addr, exp_addr, "address after pc");
      chk(pc_count, exp_pc, "pc count");
      chk(skip_count, exp_skip, "skip count");
    end
    chk(int'(taken > 10), 1, "skips taken");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
