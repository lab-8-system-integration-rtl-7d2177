// pc_unit: program counter with skip support.
//
// The fetch address is the sum of two counters: pc_count, which counts
// executed PC flags, and skip_count, which counts taken skipz instructions.
// A skipz is taken when its SKIPZ flag is set while the zero flag is set;
// the add of the two counts then lands one word further on, skipping the
// next instruction. This "counter plus skip counter" arrangement follows
// the original machine. This design's own choice: a taken skipz is first
// recorded in a pending bit and counted on the PC flag that ends the
// skipz, so the fetch address never changes in the middle of an
// instruction. All registers reset synchronously (active-low) to 0.
module pc_unit
  import cpu_pkg::*;
#(
  parameter int unsigned AW = PC_W
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          pc_flag,
  input  logic          skipz_flag,
  input  logic          zf,
  output logic [AW-1:0] fetch_addr,
  output logic [AW-1:0] pc_count,
  output logic [AW-1:0] skip_count,
  output logic          skip_pending
);

  logic take_skip;
  assign take_skip = skipz_flag & zf;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pc_count     <= '0;
      skip_count   <= '0;
      skip_pending <= 1'b0;
    end else begin
      if (pc_flag) begin
        pc_count     <= pc_count + 1'b1;
        skip_count   <= skip_count + AW'(skip_pending | take_skip);
        skip_pending <= 1'b0;
      end else if (take_skip) begin
        skip_pending <= 1'b1;
      end
    end
  end

  assign fetch_addr = pc_count + skip_count;

endmodule
