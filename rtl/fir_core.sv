// fir_core: low-power direct-form FIR filtering core (top level).
//
// A sequential FIR filter, y(n) = sum_{k=0}^{N-1} h(k) x(n-k), computed with
// one multiplier and one accumulator, one tap per clock. The low-power idea is
// the order of the taps: instead of h(0), h(1), ..., the coefficients are
// visited in an order that makes successive coefficients differ in as few
// bits as possible (minimum Hamming distance), so the multiplier's coefficient
// input, the coefficient bus and the coefficient ROM switch far less. The
// order is fixed once, before filtering (here at elaboration, fir_pkg), and
// costs no cycles.
//
// Structure (all names are the published block names):
//   counter (fir_ctrl)  steps 0..N-1 and sequences the core,
//   h_rom               coefficients stored in processing order,
//   xram_addr_gen       LUT of tap indices + adder: read address
//                       = write_pointer + k (mod N) for the tap k in ROM step i,
//   write_pointer       slot of the newest sample x(0), stepped back by one
//                       after each output,
//   x_ram               circular buffer of the last N samples,
//   h_reg, x_reg        multiplier input registers,
//   mac                 multiplier (carry-save array or Wallace-tree Booth)
//                       plus accumulator,
//   out_reg             holds y.
//
// Parameters: FILTER selects one of the two example bandpass filters (BPF1, 73
// taps; BPF2, 80 taps), ORDERED = 1 gives the Hamming-ordered core and 0 the
// conventional tap order, MULT the multiplier type. Words are 16-bit signed
// (Q15 coefficients); y is the full-precision accumulator, 2*16 +
// ceil(log2(N)) bits, never overflowing. Output scaling, the handshake and
// reset behaviour are this design's choices.
//
// Interface and timing: after reset the core spends N cycles clearing x_ram.
// It then raises in_ready; a sample x_in is taken in a cycle where in_valid
// and in_ready are both high. y_valid pulses high N + 3 cycles later, with
// y = sum_k h(k) x(n-k) over the last N accepted samples (earlier samples
// counted as zero); in_ready returns in that same cycle. Throughput is one
// output per N + 3 cycles.
module fir_core
  import fir_pkg::*;
#(
  parameter filter_e FILTER  = BPF2,
  parameter bit      ORDERED = 1'b1,
  parameter mult_e   MULT    = MULT_CSA
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic signed [DW-1:0]    x_in,
  input  logic                    in_valid,
  output logic                    in_ready,
  output logic signed [2*DW+$clog2(taps(FILTER))-1:0] y,
  output logic                    y_valid
);

  localparam int N     = taps(FILTER);
  localparam int AW    = $clog2(N);
  localparam int ACC_W = 2 * DW + $clog2(N);

  // Processing order, ROM image and offset table, fixed at elaboration.
  localparam logic [MAX_TAPS*IDX_W-1:0] ORDER = ham_order(FILTER, ORDERED);
  localparam logic [MAX_TAPS*CW-1:0]    IMAGE = rom_image(FILTER, ORDERED);

  localparam logic [N*AW-1:0] LUT = (N*AW)'(lut_image(ORDER, N, AW));
  localparam logic [N*CW-1:0] ROM = IMAGE[N*CW-1:0];

  // Control.
  logic          x_we, x_zero, wp_dec, fetch_en, mac_en, mac_clr, out_load;
  logic [AW-1:0] cnt;

  fir_ctrl #(.N(N), .AW(AW)) u_counter (
    .clk, .rst_n, .in_valid, .in_ready,
    .x_we, .x_zero, .wp_dec, .cnt, .fetch_en,
    .mac_en, .mac_clr, .out_load, .y_valid
  );

  // Coefficient path.
  logic [CW-1:0] h_rom_q, h_reg_q;

  h_rom #(.N(N), .W(CW), .AW(AW), .CONTENTS(ROM)) u_h_rom (
    .addr(cnt), .q(h_rom_q)
  );

  data_reg #(.W(CW)) u_h_reg (
    .clk, .rst_n, .en(fetch_en), .d(h_rom_q), .q(h_reg_q)
  );

  // Data path.
  logic [AW-1:0] wp, x_raddr;
  logic [DW-1:0] x_ram_q, x_reg_q;

  write_pointer #(.N(N), .AW(AW)) u_write_pointer (
    .clk, .rst_n, .dec(wp_dec), .wp
  );

  xram_addr_gen #(.N(N), .AW(AW), .LUT(LUT)) u_xram_addr_gen (
    .cnt, .wp, .addr(x_raddr)
  );

  x_ram #(.N(N), .W(DW), .AW(AW)) u_x_ram (
    .clk, .we(x_we), .waddr(wp), .wdata(x_zero ? '0 : x_in),
    .raddr(x_raddr), .rdata(x_ram_q)
  );

  data_reg #(.W(DW)) u_x_reg (
    .clk, .rst_n, .en(fetch_en), .d(x_ram_q), .q(x_reg_q)
  );

  // Multiply-accumulate and output register.
  logic signed [ACC_W-1:0] acc;

  mac #(.W(DW), .ACC_W(ACC_W), .MULT(MULT)) u_mac (
    .clk, .rst_n, .en(mac_en), .clr(mac_clr),
    .a(h_reg_q), .b(x_reg_q), .acc
  );

  data_reg #(.W(ACC_W)) u_out_reg (
    .clk, .rst_n, .en(out_load), .d(acc), .q(y)
  );

endmodule
