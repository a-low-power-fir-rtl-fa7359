// mult_csa: signed W x W carry-save array multiplier, combinational.
//
// One of the two multiplier types the core is built with. Each bit b[i] of
// the multiplier selects a partial product a << i (sign-extended to 2W bits).
// The row of the sign bit b[W-1] has negative weight in two's complement, so
// it is entered inverted and its +1 is fed in as the carry of the first stage.
// The rows are added one after the other by a linear array of carry-save
// (3:2) adder rows: each stage takes the running sum and carry vectors and one
// new partial product and produces a new sum and carry, with no carry
// propagation inside the array. A single carry-propagate adder at the bottom
// merges the final sum and carry vectors. The internal structure is this
// design's choice; the core only specifies "carry-save array multiplier".
//
// Interface: p = a * b, all signed, exact (2W bits); no clock.
module mult_csa #(
  parameter int W = 16
) (
  input  logic signed [W-1:0]   a,
  input  logic signed [W-1:0]   b,
  output logic signed [2*W-1:0] p
);

  localparam int PW = 2 * W;

  logic [PW-1:0] a_ext;
  logic [PW-1:0] pp  [W];   // partial products
  logic [PW-1:0] s   [W];   // sum vector after stage i
  logic [PW-1:0] c   [W];   // carry vector after stage i

  assign a_ext = {{W{a[W-1]}}, a};

  // Partial products: rows 0..W-2 positive, row W-1 (sign bit) inverted.
  always_comb begin
    for (int i = 0; i < W - 1; i++)
      pp[i] = b[i] ? (a_ext << i) : '0;
    pp[W-1] = b[W-1] ? ~(a_ext << (W - 1)) : '0;
  end

  // Stage 0 holds the first row; the +1 completing the negated row enters
  // as the initial carry vector.
  assign s[0] = pp[0];
  assign c[0] = PW'(b[W-1]);

  // Carry-save adder rows.
  for (genvar i = 1; i < W; i++) begin : g_row
    assign s[i] = s[i-1] ^ c[i-1] ^ pp[i];
    assign c[i] = ((s[i-1] & c[i-1]) | (s[i-1] & pp[i]) | (c[i-1] & pp[i])) << 1;
  end

  // Final carry-propagate adder.
  assign p = s[W-1] + c[W-1];

endmodule
