// xram_addr_gen: data-memory read address for the tap being processed.
//
// The coefficient ROM holds the taps in an arbitrary (Hamming-ordered)
// sequence, so the data sample that pairs with ROM word i is not simply the
// i-th newest one. A look-up table, addressed by the same counter as the
// ROM, stores for each step i the tap index k of the coefficient in ROM
// word i; that is the distance of the matching sample x(k) from the newest
// sample x(0). An adder adds it to the write pointer. Because the buffer is
// N words long and N need not be a power of two, the sum is brought back
// into 0..N-1 by one conditional subtraction of N (the wrap-around is this
// design's way of realising the circular buffer).
//
// Interface: cnt is the step counter, wp the write pointer; addr is
// combinational, valid in the same cycle. The table is a parameter: word i
// is LUT[i*AW +: AW]; steps at or beyond N read offset 0. The default table
// is the ordered BPF2 schedule.
module xram_addr_gen #(
  parameter int                N   = 80,
  parameter int                AW  = (N > 1) ? $clog2(N) : 1,
  parameter logic [N*AW-1:0]   LUT = (N*AW)'(fir_pkg::lut_image(fir_pkg::BPF2_HAM_ORDER, N, AW))
) (
  input  logic [AW-1:0] cnt,
  input  logic [AW-1:0] wp,
  output logic [AW-1:0] addr
);

  logic [AW-1:0] offset;
  logic [AW:0]   sum;

  // LUT: offset of the data sample used in step cnt.
  always_comb begin
    offset = '0;
    for (int i = 0; i < N; i++)
      if (cnt == AW'(i)) offset = LUT[i*AW +: AW];
  end

  // Adder with modulo-N wrap.
  always_comb begin
    sum = {1'b0, wp} + {1'b0, offset};
    if (sum >= (AW+1)'(N)) addr = AW'(sum - (AW+1)'(N));
    else                   addr = sum[AW-1:0];
  end

endmodule
