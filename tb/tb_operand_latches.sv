// tb_operand_latches: random set1/set2 strobes and data; latch A must take
// din only on set1, latch B only on set2, and both hold otherwise.
module tb_operand_latches;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, set1, set2;
  logic [3:0] din, a, b, ea, eb;
  int checks = 0, failures = 0;

  operand_latches dut (.clk, .rst_n, .set1, .set2, .din, .a, .b);

  initial begin
    rst_n = 0; set1 = 0; set2 = 0; din = 0;
    @(posedge clk); @(negedge clk); rst_n = 1;
    ea = 0; eb = 0;
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      set1 = ($urandom_range(0, 2) == 0); set2 = ($urandom_range(0, 2) == 0);
      din = 4'($urandom);
      @(posedge clk); #1;
      if (set1) ea = din;
      if (set2) eb = din;
      checks++;
      if (a !== ea || b !== eb) begin
        failures++; $display("FAIL a=%h b=%h expected %h %h", a, b, ea, eb);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
