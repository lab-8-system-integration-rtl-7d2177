// tb_prog_ram: checks the instruction memory.
// 1) After power-up it must hold the demonstration program, compared with
//    the hex words of the program listing (045, 051, 004, ...), and read
//    as halt (100h) beyond it. 2) Random writes must read back, with the
//    asynchronous read showing the new word right after the write edge,
//    and an untouched word must keep its value.
module tb_prog_ram;
  import cpu_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  logic               we;
  logic [PC_W-1:0]    waddr, raddr;
  logic [INSTR_W-1:0] wdata, rdata;
  int checks = 0, failures = 0;

  prog_ram dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  localparam logic [8:0] PROG [15] = '{9'h045, 9'h051, 9'h004, 9'h066, 9'h088,
                                       9'h0c0, 9'h0c0, 9'h0c0, 9'h140, 9'h004,
                                       9'h050, 9'h084, 9'h140, 9'h045, 9'h100};

  task automatic check(input logic [8:0] got, input logic [8:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  logic [8:0] model [256];

  initial begin
    we = 0; waddr = 0; wdata = 0; raddr = 0;
    #1;
    for (int i = 0; i < 256; i++) begin
      raddr = PC_W'(i); #1;
      check(rdata, (i < 15) ? PROG[i] : 9'h100, $sformatf("init word %0d", i));
      model[i] = rdata;
    end
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      we = ($urandom_range(0, 1) == 1);
      waddr = PC_W'($urandom);
      wdata = INSTR_W'($urandom);
      raddr = waddr;
      @(posedge clk); #1;
      if (we) begin
        model[waddr] = wdata;
        check(rdata, wdata, "read after write");
      end
      raddr = PC_W'($urandom); #1;
      check(rdata, model[raddr], "random read");
    end
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
