// tb_xram_addr_gen: self-checking test of the data-memory address generator.
// Uses the Hamming-ordered tap sequence of BPF2 (80 taps) as the look-up
// table, as the core does, and checks every combination of step counter
// and write pointer: the address must be (wp + k) mod N, k being the tap
// processed in that step.
module tb_xram_addr_gen;
  import fir_pkg::*;

  localparam filter_e F  = BPF2;
  localparam int      N  = taps(F);
  localparam int      AW = $clog2(N);

  localparam logic [MAX_TAPS*IDX_W-1:0] ORD = ham_order(F, 1'b1);

  function automatic logic [N*AW-1:0] make_lut();
    logic [N*AW-1:0] t;
    for (int i = 0; i < N; i++) t[i*AW +: AW] = AW'(ORD[i*IDX_W +: IDX_W]);
    return t;
  endfunction

  localparam logic [N*AW-1:0] LUT = make_lut();

  logic [AW-1:0] cnt, wp, addr;
  int checks = 0, failures = 0, wraps = 0;
  int k_of [N];

  xram_addr_gen #(.N(N), .AW(AW), .LUT(LUT)) dut (.cnt, .wp, .addr);

  initial begin
    for (int i = 0; i < N; i++) k_of[i] = order_at(F, 1'b1, i);
    for (int c = 0; c < N; c++) begin
      for (int w = 0; w < N; w++) begin
        cnt = AW'(c);
        wp  = AW'(w);
        #1;
        checks++;
        if (w + k_of[c] >= N) wraps++;
        if (int'(addr) != (w + k_of[c]) % N) begin
          failures++;
          $display("FAIL: cnt=%0d wp=%0d addr=%0d expected %0d", c, w, addr, (w + k_of[c]) % N);
        end
      end
    end
    checks++;
    if (wraps == 0) begin failures++; $display("FAIL: no wrap-around exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
