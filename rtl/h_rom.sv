// h_rom: coefficient memory.
//
// Read-only table of N signed coefficients, stored in the order in which the
// core processes them (Hamming-ordered in the low-power configuration,
// natural order h(0)..h(N-1) in the conventional one). Word i is
// CONTENTS[i*W +: W]; the ordering itself is computed before filtering, at
// elaboration, by fir_pkg. The read is combinational: q follows addr in the
// same cycle and is captured by h_reg at the next clock edge. Addresses at or
// beyond N read zero. The default contents are the ordered BPF2 table.
module h_rom #(
  parameter int              N        = 80,
  parameter int              W        = 16,
  parameter int              AW       = (N > 1) ? $clog2(N) : 1,
  parameter logic [N*W-1:0]  CONTENTS = (N*W)'(fir_pkg::BPF2_HAM_ROM)
) (
  input  logic [AW-1:0] addr,
  output logic [W-1:0]  q
);

  always_comb begin
    q = '0;
    for (int i = 0; i < N; i++)
      if (addr == AW'(i)) q = CONTENTS[i*W +: W];
  end

endmodule
