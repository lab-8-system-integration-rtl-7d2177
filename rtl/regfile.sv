// regfile: four 4-bit general registers, 00..11.
//
// One shared address selects both the asynchronous read port and the
// synchronous write port, as in the original single-port register device.
// A write with we=1 takes effect at the rising clock edge. The registers
// reset synchronously (active-low) to 0; the reset value is this design's
// choice. All register contents are brought out on regs for observation.
module regfile
  import cpu_pkg::*;
#(
  parameter int unsigned N = NREGS,
  parameter int unsigned W = DATA_W
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [$clog2(N)-1:0] addr,
  input  logic                 we,
  input  logic [W-1:0]         wdata,
  output logic [W-1:0]         rdata,
  output logic [W-1:0]         regs [N]
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) regs[i] <= '0;
    end else if (we) begin
      regs[addr] <= wdata;
    end
  end

  assign rdata = regs[addr];

endmodule
