// mac: multiply-accumulate unit of the FIR core.
//
// Multiplies the registered coefficient (from h_reg) by the registered data
// sample (from x_reg) and adds the product to an accumulator. The multiplier
// is either the carry-save array type or the Wallace-tree Booth type, chosen
// by MULT; both were evaluated for the core. At the first product of every
// output the accumulator is cleared, which is done here by adding the product
// to zero instead of to the old sum, so no separate clear cycle is needed.
//
// Widths: W-bit signed operands, 2W-bit exact product, and an ACC_W-bit
// accumulator; with ACC_W = 2W + ceil(log2(taps)) no sum of taps products can
// overflow. The guard bits and the clear-by-load are this design's choices.
//
// Timing: the multiplier is combinational; acc updates at the rising edge
// where en is high (acc <= (clr ? 0 : acc) + a*b).
module mac
  import fir_pkg::*;
#(
  parameter int    W     = 16,
  parameter int    ACC_W = 39,
  parameter mult_e MULT  = MULT_CSA
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    en,
  input  logic                    clr,
  input  logic signed [W-1:0]     a,
  input  logic signed [W-1:0]     b,
  output logic signed [ACC_W-1:0] acc
);

  logic signed [2*W-1:0]   prod;
  logic signed [ACC_W-1:0] prod_ext;

  if (MULT == MULT_CSA) begin : g_csa
    mult_csa #(.W(W)) u_mult (.a(a), .b(b), .p(prod));
  end else begin : g_wall
    mult_booth_wallace #(.W(W)) u_mult (.a(a), .b(b), .p(prod));
  end

  assign prod_ext = {{(ACC_W - 2*W){prod[2*W-1]}}, prod};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   acc <= '0;
    else if (en)  acc <= (clr ? '0 : acc) + prod_ext;
  end

endmodule
