// tb_ucode_rom: checks all 256 microcode lines against the published
// microcode: add 20 40 02 01 at line 0, ld 08 01 at 32, eq 20 40 04 01 at
// 64, nop 80 01 at 96, halt 80 on every line of 128..159, skipz 10 01 at
// 160; every other line 00. Also checks that no line sets two flags.
module tb_ucode_rom;
  import cpu_pkg::*;

  logic [7:0] addr;
  uflags_t    flags;
  int checks = 0, failures = 0;

  ucode_rom dut (.addr, .flags);

  function automatic logic [7:0] expected(input int a);
    logic [7:0] e;
    e = 8'h00;
    case (a)
      0: e = 8'h20;   1: e = 8'h40;   2: e = 8'h02;   3: e = 8'h01;
      32: e = 8'h08;  33: e = 8'h01;
      64: e = 8'h20;  65: e = 8'h40;  66: e = 8'h04;  67: e = 8'h01;
      96: e = 8'h80;  97: e = 8'h01;
      160: e = 8'h10; 161: e = 8'h01;
      default: if (a >= 128 && a < 160) e = 8'h80;
    endcase
    return e;
  endfunction

  initial begin
    for (int a = 0; a < 256; a++) begin
      addr = 8'(a); #1;
      checks++;
      if (flags !== expected(a)) begin
        failures++;
        $display("FAIL line %0d: got %h expected %h", a, flags, expected(a));
      end
      checks++;
      if (!$onehot0(flags)) begin
        failures++;
        $display("FAIL line %0d sets several flags", a);
      end
    end
    // named-field view of one line
    addr = 8'd2; #1;
    checks++;
    if (!(flags.add && !flags.pc && !flags.set1)) begin
      failures++;
      $display("FAIL field mapping of ADD line");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
