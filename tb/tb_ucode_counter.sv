// tb_ucode_counter: drives the PC flag at random and compares the
// micro-step with a model (clear on PC, else +1 with 5-bit wrap), and
// checks that without PC the counter wraps from 31 to 0.
module tb_ucode_counter;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, pc_flag;
  logic [4:0] step;
  int checks = 0, failures = 0;
  int exp_step;

  ucode_counter dut (.clk, .rst_n, .pc_flag, .step);

  initial begin
    rst_n = 0; pc_flag = 0;
    @(posedge clk); @(negedge clk);
    rst_n = 1;
    exp_step = 0;
    checks++; if (step !== 0) begin failures++; $display("FAIL reset"); end
    for (int n = 0; n < 300; n++) begin
      pc_flag = (n < 100) ? 1'b0 : ($urandom_range(0, 3) == 0);
      @(posedge clk); #1;
      exp_step = pc_flag ? 0 : (exp_step + 1) % 32;
      checks++;
      if (step !== 5'(exp_step)) begin
        failures++;
        $display("FAIL cycle %0d: step %0d expected %0d", n, step, exp_step);
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
