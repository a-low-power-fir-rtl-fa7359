// tb_h_rom: self-checking test of the coefficient ROM loaded with the
// Hamming-ordered BPF2 image. Checks that the processing order is a
// permutation of the 80 taps, that every ROM word holds the natural-order
// coefficient of the tap scheduled for that step, and that addresses past
// the end read zero.
module tb_h_rom;
  import fir_pkg::*;

  localparam filter_e F  = BPF2;
  localparam int      N  = taps(F);
  localparam int      AW = $clog2(N);
  localparam logic [MAX_TAPS*CW-1:0] IMG = rom_image(F, 1'b1);

  logic [AW-1:0] addr;
  logic [CW-1:0] q;
  int checks = 0, failures = 0;
  bit seen [N];

  h_rom #(.N(N), .W(CW), .AW(AW), .CONTENTS(IMG[N*CW-1:0])) dut (.addr, .q);

  initial begin
    int k;
    for (int i = 0; i < N; i++) begin
      k = order_at(F, 1'b1, i);
      checks++;
      if (k < 0 || k >= N || seen[k]) begin
        failures++;
        $display("FAIL: step %0d schedules tap %0d twice or out of range", i, k);
      end else seen[k] = 1'b1;
      addr = AW'(i);
      #1;
      checks++;
      if (q !== coeff(F, k)) begin
        failures++;
        $display("FAIL: addr %0d q=%0d expected h(%0d)=%0d", i, $signed(q), k, coeff(F, k));
      end
    end
    for (int a = N; a < (1 << AW); a++) begin
      addr = AW'(a);
      #1;
      checks++;
      if (q !== '0) begin failures++; $display("FAIL: addr %0d not zero", a); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
