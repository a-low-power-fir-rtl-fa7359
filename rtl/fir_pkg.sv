// fir_pkg: types, sizes and coefficient sets shared by the FIR core.
//
// The core computes y(n) = sum_k h(k) * x(n-k) with one multiplier, one
// coefficient per clock, but visits the taps in an order chosen to minimise
// the Hamming distance between coefficients used in successive cycles. This
// package holds everything fixed at design time:
//   * the data and coefficient word length (16 bits, as in the evaluated cores),
//   * the two example bandpass filters, BPF1 (73 taps) and BPF2 (80 taps),
//     as signed Q15 integers in natural tap order h(0)..h(N-1),
//   * ham_order(), which builds the processing order of the taps, and from it
//     the contents of the coefficient ROM and of the offset look-up table.
//
// Coefficient sets (the filter specifications are the published ones; the
// integer values are this design's own, since only the specifications exist):
//   BPF1: fs = 1 kHz, stopbands 0-0.1 and 0.3-0.5 kHz, passband 0.15-0.25 kHz,
//         60 dB attenuation, 73 taps, Kaiser-window design (beta from the
//         60 dB attenuation, cut-offs at the middle of each transition band).
//   BPF2: fs = 10 kHz, stopbands 0-1 and 4-5 kHz, passband 1.375-3.625 kHz,
//         0.1 dB ripple, 68.4 dB attenuation, 80 taps, Parks-McClellan
//         equiripple design with band weights set by the two ripple limits.
//   Both are rounded to Q15: h_int = round(h * 32768).
//
// Ordering: the order is found once, before filtering starts. ham_order()
// is a greedy nearest-neighbour walk: it starts at h(0) and repeatedly
// moves to the not yet used coefficient whose 16-bit pattern differs from
// the current one in the fewest bit positions (ties go to the lowest tap
// index). The choice of a greedy walk starting from h(0) is this design's.
package fir_pkg;

  localparam int DW       = 16;   // data sample word length
  localparam int CW       = 16;   // coefficient word length
  localparam int MAX_TAPS = 80;   // longest filter held in this package
  localparam int IDX_W    = 8;    // width of one tap index in ham_order()

  typedef enum logic {BPF1 = 1'b0, BPF2 = 1'b1} filter_e;
  typedef enum logic {MULT_CSA = 1'b0, MULT_WALLACE = 1'b1} mult_e;

  // Natural-order Q15 coefficients.
  localparam int BPF1_LEN = 73;
  localparam logic signed [15:0] BPF1_H [73] = '{-3, -13, -2, -4, -22, 17, 77, 26, -56, -18, -16, -144, -71, 226, 216, -54, 0, 72, -384, -536, 225, 618, 95, 144, 617, -409, -1705, -542, 1090, 342, 309, 2805, 1484, -5455, -6769, 2919, 9824, 2919, -6769, -5455, 1484, 2805, 309, 342, 1090, -542, -1705, -409, 617, 144, 95, 618, 225, -536, -384, 72, 0, -54, 216, 226, -71, -144, -16, -18, -56, 26, 77, 17, -22, -4, -2, -13, -3};
  localparam int BPF2_LEN = 80;
  localparam logic signed [15:0] BPF2_H [80] = '{-37, 46, 86, -58, -18, -41, -104, 89, 20, 73, 170, -142, -26, -127, -267, 215, 24, 214, 405, -309, -6, -353, -602, 431, -44, 580, 898, -599, 157, -977, -1397, 868, -417, 1830, 2521, -1509, 1290, -5251, -9209, 11585, 11585, -9209, -5251, 1290, -1509, 2521, 1830, -417, 868, -1397, -977, 157, -599, 898, 580, -44, 431, -602, -353, -6, -309, 405, 214, 24, 215, -267, -127, -26, -142, 170, 73, 20, 89, -104, -41, -18, -58, 86, 46, -37};

  // Number of taps of a filter.
  function automatic int taps(filter_e f);
    return (f == BPF1) ? BPF1_LEN : BPF2_LEN;
  endfunction

  // Natural-order coefficient h(k) of a filter; 0 outside the filter.
  function automatic logic signed [CW-1:0] coeff(filter_e f, int k);
    if (k < 0 || k >= taps(f)) return '0;
    return (f == BPF1) ? BPF1_H[k] : BPF2_H[k];
  endfunction

  // Processing order of the taps, packed: bits [i*IDX_W +: IDX_W] hold the
  // tap index k processed in step i. With ordered = 0 this is the
  // conventional order 0, 1, ..., N-1.
  function automatic logic [MAX_TAPS*IDX_W-1:0] ham_order(filter_e f, bit ordered);
    logic [MAX_TAPS*IDX_W-1:0] ord;
    logic [MAX_TAPS-1:0]       used;
    int n, cur, best, best_d, d;
    n    = taps(f);
    ord  = '0;
    used = '0;
    cur  = 0;
    used[0] = 1'b1;
    for (int i = 1; i < MAX_TAPS; i++) begin
      if (i < n) begin
        if (!ordered) begin
          cur = i;
        end else begin
          best   = 0;
          best_d = CW + 1;
          for (int k = 0; k < MAX_TAPS; k++) begin
            if (k < n && !used[k]) begin
              d = $countones(coeff(f, cur) ^ coeff(f, k));
              if (d < best_d) begin
                best_d = d;
                best   = k;
              end
            end
          end
          cur = best;
        end
        used[cur] = 1'b1;
        ord[i*IDX_W +: IDX_W] = IDX_W'(cur);
      end
    end
    return ord;
  endfunction

  // Tap processed in step i of the given order.
  function automatic int order_at(filter_e f, bit ordered, int i);
    logic [MAX_TAPS*IDX_W-1:0] ord;
    ord = ham_order(f, ordered);
    return int'(ord[i*IDX_W +: IDX_W]);
  endfunction

  // Coefficient ROM image: word i (bits [i*CW +: CW]) is h(k) of the tap
  // processed in step i. Words beyond the filter length are zero.
  function automatic logic [MAX_TAPS*CW-1:0] rom_image(filter_e f, bit ordered);
    logic [MAX_TAPS*IDX_W-1:0] ord;
    logic [MAX_TAPS*CW-1:0]    img;
    ord = ham_order(f, ordered);
    img = '0;
    for (int i = 0; i < MAX_TAPS; i++)
      if (i < taps(f)) img[i*CW +: CW] = coeff(f, int'(ord[i*IDX_W +: IDX_W]));
    return img;
  endfunction

  // Default tables of the core's main configuration (BPF2, ordered), used as
  // the parameter defaults of h_rom and xram_addr_gen.
  localparam logic [MAX_TAPS*IDX_W-1:0] BPF2_HAM_ORDER = ham_order(BPF2, 1'b1);
  localparam logic [MAX_TAPS*CW-1:0]    BPF2_HAM_ROM   = rom_image(BPF2, 1'b1);

  // Order table repacked to AW-bit entries, n entries.
  function automatic logic [MAX_TAPS*IDX_W-1:0] lut_image(logic [MAX_TAPS*IDX_W-1:0] ord,
                                                          int n, int aw);
    logic [MAX_TAPS*IDX_W-1:0] t;
    t = '0;
    for (int i = 0; i < MAX_TAPS; i++)
      if (i < n)
        for (int b = 0; b < IDX_W; b++)
          if (b < aw) t[i*aw + b] = ord[i*IDX_W + b];
    return t;
  endfunction

endpackage
