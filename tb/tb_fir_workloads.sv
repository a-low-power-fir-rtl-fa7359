// tb_fir_workloads: the evaluated filters on every core variant.
//
// Eight cores run side by side: filter BPF1 (73 taps) or BPF2 (80 taps),
// carry-save array or Wallace-tree Booth multiplier, Hamming-ordered or
// natural coefficient order. Each gets 1000 zero-mean uniformly distributed
// random 16-bit samples from its own fir_env, which checks every output value
// and its latency against a direct-form reference.
// For every core the bench counts bit toggles on the multiplier's two input
// buses (h_reg: coefficient bus, x_reg: data bus) while the MAC is active
// and prints, per filter and multiplier, the change the ordering makes. It
// fails if ordering does not reduce coefficient-bus switching. Switching
// counts are a proxy for the dynamic power of those nets only; gate-level
// power of the whole core is not modelled.
module tb_fir_workloads;
  import fir_pkg::*;

  localparam int NCFG = 8;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int     env_checks [NCFG];
  int     env_fail   [NCFG];
  longint h_tog      [NCFG];
  longint x_tog      [NCFG];
  logic   done       [NCFG];

  for (genvar c = 0; c < NCFG; c++) begin : g_cfg
    localparam filter_e F   = filter_e'(c[2]);
    localparam mult_e   M   = mult_e'(c[1]);
    localparam bit      ORD = c[0];
    localparam int      N   = taps(F);

    logic                 rst_n, in_valid, in_ready, y_valid;
    logic signed [DW-1:0] x_in;
    logic signed [2*DW+$clog2(N)-1:0] y;
    int                   stalls;
    logic [CW-1:0]        h_prev;
    logic [DW-1:0]        x_prev;

    fir_core #(.FILTER(F), .ORDERED(ORD), .MULT(M)) dut (
      .clk, .rst_n, .x_in, .in_valid, .in_ready, .y, .y_valid
    );

    fir_env #(.FILTER(F), .NSAMP(1000), .GAPS(1'b0), .SEED(11 + c)) env (
      .clk, .rst_n, .x_in, .in_valid, .in_ready, .y, .y_valid,
      .done(done[c]), .checks(env_checks[c]), .failures(env_fail[c]), .stalls
    );

    initial begin
      h_tog[c] = 0; x_tog[c] = 0; h_prev = '0; x_prev = '0;
    end

    always @(posedge clk) begin
      if (dut.mac_en) begin
        h_tog[c] += $countones(dut.h_reg_q ^ h_prev);
        x_tog[c] += $countones(dut.x_reg_q ^ x_prev);
        h_prev = dut.h_reg_q;
        x_prev = dut.x_reg_q;
      end
    end
  end

  int checks, failures;

  function automatic real pct(longint norm, longint ham);
    return 100.0 * real'(norm - ham) / real'(norm);
  endfunction

  initial begin
    bit all_done;
    checks = 0; failures = 0;
    do begin
      @(posedge clk);
      all_done = 1'b1;
      for (int c = 0; c < NCFG; c++) if (done[c] !== 1'b1) all_done = 1'b0;
    end while (!all_done);
    for (int c = 0; c < NCFG; c++) begin
      checks   += env_checks[c];
      failures += env_fail[c];
    end
    $display("filter mult  coef-bus toggles (norm -> ham, saving)   data-bus toggles (norm -> ham, saving)");
    for (int c = 0; c < NCFG; c += 2) begin
      $display("%s  %s  %0d -> %0d (%.1f%%)   %0d -> %0d (%.1f%%)",
               (c & 4) ? "BPF2" : "BPF1", (c & 2) ? "wall" : "csa ",
               h_tog[c], h_tog[c+1], pct(h_tog[c], h_tog[c+1]),
               x_tog[c], x_tog[c+1], pct(x_tog[c], x_tog[c+1]));
      checks++;
      if (h_tog[c+1] >= h_tog[c]) begin
        failures++;
        $display("FAIL: ordering does not reduce coefficient-bus switching");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
