// data_reg: W-bit register with load enable and asynchronous active-low reset.
//
// The core uses three of these: h_reg and x_reg hold the coefficient and the
// data sample that feed the multiplier, so the memories' read paths and the
// multiplier sit in separate clock cycles; out_reg holds the finished filter
// output y between output updates. q takes d at the rising clock edge when
// en is high, and keeps its value otherwise. Reset clears q to zero (the
// reset value is this design's choice).
module data_reg #(
  parameter int W = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  q <= '0;
    else if (en) q <= d;
  end

endmodule
