// tb_alu: exhaustive over both 4-bit operands: sum must be (a+b) mod 16;
// an eq strobe must set zf exactly when a == b, and zf must hold its value
// while eq is low.
module tb_alu;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, eq_en, zf, ezf;
  logic [3:0] a, b, sum;
  int checks = 0, failures = 0;

  alu dut (.clk, .rst_n, .a, .b, .eq_en, .sum, .zf);

  initial begin
    rst_n = 0; eq_en = 0; a = 0; b = 0;
    @(posedge clk); @(negedge clk); rst_n = 1;
    ezf = 0;
    checks++; if (zf !== 0) begin failures++; $display("FAIL reset zf"); end
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++) begin
        @(negedge clk);
        a = 4'(i); b = 4'(j); eq_en = 1'($urandom) | (i == j);
        #1;
        checks++;
        if (sum !== 4'(i + j)) begin failures++; $display("FAIL %0d+%0d=%0d", i, j, sum); end
        @(posedge clk); #1;
        if (eq_en) ezf = (i == j);
        checks++;
        if (zf !== ezf) begin failures++; $display("FAIL zf for %0d,%0d eq=%0d: %0d", i, j, eq_en, zf); end
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
