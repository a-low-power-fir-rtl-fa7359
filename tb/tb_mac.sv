// tb_mac: self-checking test of the multiply-accumulate unit with each of the
// two multiplier types. Both instances get the same 5000 cycles of random
// operands (extreme values included), enables and clears; the accumulator is
// compared after every edge with a 64-bit model, acc = (clr ? 0 : acc) + a*b.
module tb_mac;
  import fir_pkg::*;

  localparam int W     = 16;
  localparam int ACC_W = 39;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic                    rst_n, en, clr;
  logic signed [W-1:0]     a, b;
  logic signed [ACC_W-1:0] acc_csa, acc_wall;
  longint                  model;
  int checks = 0, failures = 0;

  mac #(.W(W), .ACC_W(ACC_W), .MULT(MULT_CSA)) dut_csa (
    .clk, .rst_n, .en, .clr, .a, .b, .acc(acc_csa)
  );
  mac #(.W(W), .ACC_W(ACC_W), .MULT(MULT_WALLACE)) dut_wall (
    .clk, .rst_n, .en, .clr, .a, .b, .acc(acc_wall)
  );

  function automatic logic signed [W-1:0] pick();
    case ($urandom_range(7))
      0:       return -(2 ** (W - 1));
      1:       return 2 ** (W - 1) - 1;
      2:       return '0;
      3:       return -1;
      default: return W'($urandom);
    endcase
  endfunction

  initial begin
    rst_n = 1'b0; en = 1'b0; clr = 1'b0; a = '0; b = '0;
    #12;
    checks++;
    if (acc_csa !== '0 || acc_wall !== '0) begin failures++; $display("FAIL: reset"); end
    rst_n = 1'b1;
    model = 0;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      en  = ($urandom_range(7) != 0);
      clr = ($urandom_range(15) == 0);
      a   = pick();
      b   = pick();
      @(posedge clk);
      if (en) model = (clr ? 0 : model) + longint'(a) * longint'(b);
      #1;
      checks += 2;
      if (longint'(acc_csa) != model) begin
        failures++;
        $display("FAIL csa: cycle %0d acc=%0d expected %0d", i, longint'(acc_csa), model);
      end
      if (longint'(acc_wall) != model) begin
        failures++;
        $display("FAIL wall: cycle %0d acc=%0d expected %0d", i, longint'(acc_wall), model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
