// write_pointer: position of the newest data sample in the circular data memory.
//
// The data memory is a circular buffer of N words. The pointer always marks
// the slot holding the most recent sample x(0); sample x(k) then sits k slots
// further on, at (wp + k) mod N. After every filter output the pointer steps
// back by one (modulo N), onto the slot of the oldest sample, which is where
// the next input sample is written. Stepping back is the published scheme;
// the reset value 0 is this design's choice.
//
// Timing: wp changes at the rising edge where dec is high.
module write_pointer #(
  parameter int N  = 80,
  parameter int AW = (N > 1) ? $clog2(N) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          dec,
  output logic [AW-1:0] wp
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)             wp <= '0;
    else if (dec) begin
      if (wp == '0)         wp <= AW'(N - 1);
      else                  wp <= wp - 1'b1;
    end
  end

endmodule
