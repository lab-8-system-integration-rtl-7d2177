// ucode_counter: micro-step sequencer.
//
// A USTEP_W-bit counter that supplies the low address bits of the
// microcode memory. It advances by one every clock and returns to step 0
// on the clock edge that ends a cycle with the PC flag set, so the next
// instruction starts at the first line of its microcode block. An
// instruction that never raises PC (halt) wraps around inside its own
// 32-line block. Reset (active-low, synchronous) clears it.
module ucode_counter
  import cpu_pkg::*;
#(
  parameter int unsigned W = USTEP_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         pc_flag,
  output logic [W-1:0] step
);

  always_ff @(posedge clk) begin
    if (!rst_n)       step <= '0;
    else if (pc_flag) step <= '0;
    else              step <= step + 1'b1;
  end

endmodule
