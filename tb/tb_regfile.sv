// tb_regfile: random reads and writes compared with a model of four 4-bit
// registers; checks reset to 0, write at the clock edge and the
// asynchronous read of the addressed register.
module tb_regfile;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, we;
  logic [1:0] addr;
  logic [3:0] wdata, rdata;
  logic [3:0] regs [4];
  logic [3:0] model [4];
  int checks = 0, failures = 0;

  regfile dut (.clk, .rst_n, .addr, .we, .wdata, .rdata, .regs);

  initial begin
    rst_n = 0; we = 0; addr = 0; wdata = 0;
    @(posedge clk); @(negedge clk); rst_n = 1;
    for (int i = 0; i < 4; i++) begin
      model[i] = 0;
      checks++; if (regs[i] !== 0) begin failures++; $display("FAIL reset r%0d", i); end
    end
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      we = 1'($urandom); addr = 2'($urandom); wdata = 4'($urandom);
      #1;
      checks++;
      if (rdata !== model[addr]) begin
        failures++; $display("FAIL read r%0d: %h expected %h", addr, rdata, model[addr]);
      end
      @(posedge clk); #1;
      if (we) model[addr] = wdata;
      for (int i = 0; i < 4; i++) begin
        checks++;
        if (regs[i] !== model[i]) begin
          failures++; $display("FAIL r%0d: %h expected %h", i, regs[i], model[i]);
        end
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
