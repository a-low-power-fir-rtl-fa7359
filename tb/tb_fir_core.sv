// tb_fir_core: end-to-end test of the FIR core at its default configuration
// (BPF2, 80 taps, Hamming-ordered coefficients, carry-save array multiplier).
//
// fir_env feeds 1000 zero-mean uniformly distributed random samples through
// the handshake and checks every output value and its latency against an
// independent direct-form reference. Besides, this bench watches the core's
// internal mechanisms and fails if one of them never happened:
//   memory clearing after reset, sample writes into the circular buffer,
//   write-pointer wrap-around (0 -> N-1), read-address wrap-around in the
//   adder (wp + offset >= N), accumulator clearing at the first product,
//   out_reg updates, back-pressure (sample offered while busy) and the core
//   waiting for a sample.
// It also counts bit toggles on the coefficient bus (h_reg) and checks that
// the ordered core switches it less than the natural tap order would, which
// is the purpose of the ordering.
module tb_fir_core;
  import fir_pkg::*;

  localparam filter_e F = BPF2;
  localparam int      N = taps(F);

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic                 rst_n, in_valid, in_ready, y_valid, done;
  logic signed [DW-1:0] x_in;
  logic signed [2*DW+$clog2(N)-1:0] y;
  int env_checks, env_failures, stalls;
  int checks, failures;

  fir_core dut (
    .clk, .rst_n, .x_in, .in_valid, .in_ready, .y, .y_valid
  );

  fir_env #(.FILTER(F), .NSAMP(1000), .GAPS(1'b1), .SEED(7)) env (
    .clk, .rst_n, .x_in, .in_valid, .in_ready, .y, .y_valid,
    .done, .checks(env_checks), .failures(env_failures), .stalls
  );

  // Mechanism counters.
  int n_clear, n_write, n_wp_wrap, n_addr_wrap, n_acc_clr, n_out, n_wait;
  longint h_toggles;
  logic [CW-1:0] h_prev;

  always @(posedge clk) begin
    if (rst_n) begin
      if (dut.x_we && dut.x_zero) n_clear++;
      if (dut.x_we && !dut.x_zero) n_write++;
      if (dut.wp_dec && dut.wp == '0) n_wp_wrap++;
      if (dut.fetch_en && (int'(dut.x_raddr) < int'(dut.wp))) n_addr_wrap++;
      if (dut.mac_en && dut.mac_clr) n_acc_clr++;
      if (dut.out_load) n_out++;
      if (in_ready && !in_valid) n_wait++;
      if (dut.mac_en) begin
        h_toggles += $countones(dut.h_reg_q ^ h_prev);
        h_prev = dut.h_reg_q;
      end
    end
  end

  // Toggles per output of the coefficient sequence in a given order,
  // counted round the loop (last coefficient back to the first).
  function automatic int order_toggles(bit ordered);
    int t;
    t = 0;
    for (int i = 0; i < N; i++)
      t += $countones(coeff(F, order_at(F, ordered, i)) ^
                      coeff(F, order_at(F, ordered, (i + 1) % N)));
    return t;
  endfunction

  task automatic expect_seen(string what, int count);
    checks++;
    if (count == 0) begin
      failures++;
      $display("FAIL: mechanism never happened: %s", what);
    end else $display("  %-28s %0d", what, count);
  endtask

  initial begin
    int t_ham, t_norm;
    checks = 0; failures = 0; h_toggles = 0; h_prev = '0;
    n_clear = 0; n_write = 0; n_wp_wrap = 0; n_addr_wrap = 0;
    n_acc_clr = 0; n_out = 0; n_wait = 0;
    repeat (2) @(posedge clk);
    wait (done === 1'b1);
    $display("mechanisms:");
    expect_seen("memory clearing writes", n_clear);
    expect_seen("sample writes", n_write);
    expect_seen("write-pointer wrap", n_wp_wrap);
    expect_seen("read-address wrap", n_addr_wrap);
    expect_seen("accumulator clears", n_acc_clr);
    expect_seen("out_reg updates", n_out);
    expect_seen("back-pressure cycles", stalls);
    expect_seen("waiting-for-sample cycles", n_wait);
    checks++;
    if (n_clear != N) begin
      failures++;
      $display("FAIL: %0d clearing writes, expected %0d", n_clear, N);
    end
    t_ham  = order_toggles(1'b1);
    t_norm = order_toggles(1'b0);
    $display("coefficient-bus toggles per output: ordered %0d, natural %0d", t_ham, t_norm);
    $display("coefficient-bus toggles measured over the run: %0d", h_toggles);
    checks++;
    if (t_ham >= t_norm) begin
      failures++;
      $display("FAIL: ordering does not reduce coefficient switching");
    end
    checks += env_checks;
    failures += env_failures;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Watchdog.
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks + env_checks, failures + env_failures);
    $finish;
  end

endmodule
