// tb_write_select: exhaustive check of the register-file port selection
// for every flag combination the microcode produces (none, LD, ADD, SET1,
// SET2) and every operand field and ALU sum.
module tb_write_select;
  logic ld, add, set2;
  logic [1:0] ra, rf_addr;
  logic [3:0] opnd, alu_sum, rf_wdata;
  logic rf_we;
  int checks = 0, failures = 0;

  write_select dut (.ld, .add, .set2, .ra, .opnd, .alu_sum, .rf_addr, .rf_we, .rf_wdata);

  initial begin
    for (int f = 0; f < 4; f++)
      for (int r = 0; r < 4; r++)
        for (int o = 0; o < 16; o++)
          for (int s = 0; s < 16; s++) begin
            logic [1:0] ea; logic ew; logic [3:0] ed;
            ld = (f == 1); add = (f == 2); set2 = (f == 3);
            ra = 2'(r); opnd = 4'(o); alu_sum = 4'(s);
            #1;
            case (f)
              1: begin ea = 2'(r);     ew = 1; ed = 4'(o); end   // ld
              2: begin ea = 2'b00;     ew = 1; ed = 4'(s); end   // add -> r00
              3: begin ea = 2'(o >> 2); ew = 0; ed = 'x;    end   // set2 reads regB
              default: begin ea = 2'(r); ew = 0; ed = 'x; end   // set1/idle read regA
            endcase
            checks++;
            if (rf_addr !== ea || rf_we !== ew || (ew && rf_wdata !== ed)) begin
              failures++;
              $display("FAIL f=%0d ra=%0d opnd=%h sum=%h: addr %0d we %0d data %h", f, r, o, s,
                       rf_addr, rf_we, rf_wdata);
            end
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
