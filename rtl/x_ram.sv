// x_ram: data memory, used as a circular buffer of the last N input samples.
//
// One synchronous write port and one asynchronous read port. A new sample is
// written over the oldest one at the slot named by the write pointer, so no
// data ever moves between words (the reason the published core uses a
// circular buffer rather than a shift register: fewer switching nodes).
// The read port is combinational; its output is captured by x_reg.
//
// Timing: mem[waddr] takes wdata at the rising edge where we is high. The
// memory has no reset; the controller clears it after reset by writing zeros.
module x_ram #(
  parameter int N  = 80,
  parameter int W  = 16,
  parameter int AW = (N > 1) ? $clog2(N) : 1
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  input  logic [AW-1:0] raddr,
  output logic [W-1:0]  rdata
);

  logic [W-1:0] mem [N];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata = (int'(raddr) < N) ? mem[raddr] : '0;

endmodule
