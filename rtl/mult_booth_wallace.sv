// mult_booth_wallace: signed W x W Wallace-tree Booth multiplier, combinational.
//
// The second multiplier type the core is built with. Radix-4 (modified)
// Booth recoding looks at overlapping bit triples b[2j+1], b[2j], b[2j-1]
// (b[-1] = 0) and turns the multiplier into W/2 digits in {-2,-1,0,1,2}, so
// there are only W/2 partial products, each 0, +-a or +-2a shifted by 2j.
// A negative partial product is entered as the bit-inverse of the positive
// one; the missing +1 of each is collected in one extra correction row (bit
// 2j set for a negative digit j). All rows are 2W bits, sign-extended.
// A Wallace tree then reduces the rows level by level: every group of three
// rows passes through a row of full adders (3:2 compressors) giving a sum row
// and a carry row; left-over rows pass to the next level unchanged. When two
// rows remain, a carry-propagate adder forms the product. The internal
// structure is this design's choice; the core only specifies "Wallace-tree
// Booth multiplier". W must be even.
//
// Interface: p = a * b, all signed, exact (2W bits); no clock.
module mult_booth_wallace #(
  parameter int W = 16
) (
  input  logic signed [W-1:0]   a,
  input  logic signed [W-1:0]   b,
  output logic signed [2*W-1:0] p
);

  localparam int PW  = 2 * W;
  localparam int NPP = W / 2;       // Booth partial products
  localparam int R0  = NPP + 1;     // rows entering the tree

  // Rows left after l levels of 3:2 reduction.
  function automatic int nrows(int l);
    int n;
    n = R0;
    for (int i = 0; i < l; i++) n = (n / 3) * 2 + n % 3;
    return n;
  endfunction

  // Levels needed to reach two rows.
  function automatic int nlevels();
    int n, l;
    n = R0;
    l = 0;
    while (n > 2) begin
      n = (n / 3) * 2 + n % 3;
      l++;
    end
    return l;
  endfunction

  localparam int L = nlevels();

  logic [PW-1:0] a_ext;
  logic [W:0]    b_ext;             // {b, 0}: b_ext[i+1] = b[i]
  logic [PW-1:0] pp  [R0];

  assign a_ext = {{W{a[W-1]}}, a};
  assign b_ext = {b, 1'b0};

  // Booth recoding and partial-product selection.
  always_comb begin
    logic [2:0]    trip;
    logic [PW-1:0] m;
    logic          neg;
    pp[NPP] = '0;
    for (int j = 0; j < NPP; j++) begin
      trip = b_ext[2*j +: 3];
      unique case (trip)
        3'b001, 3'b010: begin m = a_ext;      neg = 1'b0; end
        3'b011:         begin m = a_ext << 1; neg = 1'b0; end
        3'b100:         begin m = a_ext << 1; neg = 1'b1; end
        3'b101, 3'b110: begin m = a_ext;      neg = 1'b1; end
        default:        begin m = '0;         neg = 1'b0; end
      endcase
      pp[j] = neg ? (~m << (2 * j)) : (m << (2 * j));
      pp[NPP][2*j] = neg;
    end
  end

  // Wallace tree of 3:2 compressor rows; each level has its own row array.
  for (genvar l = 0; l < L; l++) begin : g_lvl
    localparam int NI = nrows(l);
    localparam int NG = NI / 3;
    localparam int NO = nrows(l + 1);
    logic [PW-1:0] rin  [NI];
    logic [PW-1:0] rout [NO];
    for (genvar r = 0; r < NI; r++) begin : g_in
      if (l == 0) begin : g_first
        assign rin[r] = pp[r];
      end else begin : g_next
        assign rin[r] = g_lvl[l-1].rout[r];
      end
    end
    for (genvar g = 0; g < NG; g++) begin : g_csa
      assign rout[2*g]   = rin[3*g] ^ rin[3*g+1] ^ rin[3*g+2];
      assign rout[2*g+1] = ((rin[3*g]   & rin[3*g+1]) |
                            (rin[3*g]   & rin[3*g+2]) |
                            (rin[3*g+1] & rin[3*g+2])) << 1;
    end
    for (genvar r = 3 * NG; r < NI; r++) begin : g_pass
      assign rout[2*NG + r - 3*NG] = rin[r];
    end
  end

  // Final carry-propagate adder.
  assign p = g_lvl[L-1].rout[0] + g_lvl[L-1].rout[1];

endmodule
