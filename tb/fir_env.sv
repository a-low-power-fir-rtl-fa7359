// fir_env: stimulus and checker for one fir_core instance.
//
// Drives NSAMP zero-mean, uniformly distributed random 16-bit samples into
// the core through the in_valid/in_ready handshake and checks every output
// against a reference model computed here from the natural-order
// coefficients h(0)..h(N-1) and the sample history (samples before the first
// count as zero): y(n) = sum_k h(k) x(n-k), exact.
// It also checks the timing: y_valid must come exactly N + 3 cycles after the
// cycle that accepted the sample, in_ready must stay low in between, and the
// first in_ready must come N cycles after reset (memory clearing).
// With GAPS = 1 the source sometimes has no sample ready (the core waits) and
// usually offers the next sample while the core is still busy (back-pressure).
// Results are returned through the ports: done, checks, failures and the
// number of back-pressure cycles seen.
module fir_env
  import fir_pkg::*;
#(
  parameter filter_e FILTER = BPF2,
  parameter int      NSAMP  = 1000,
  parameter bit      GAPS   = 1'b1,
  parameter int      SEED   = 1
) (
  input  logic                    clk,
  output logic                    rst_n,
  output logic signed [DW-1:0]    x_in,
  output logic                    in_valid,
  input  logic                    in_ready,
  input  logic signed [2*DW+$clog2(taps(FILTER))-1:0] y,
  input  logic                    y_valid,
  output logic                    done,
  output int                      checks,
  output int                      failures,
  output int                      stalls
);

  localparam int N = taps(FILTER);

  logic signed [DW-1:0] hist [$];
  longint               cycle, acc_cycle, first_ready;
  int                   n_out;

  function automatic longint ref_y();
    longint s;
    s = 0;
    for (int k = 0; k < N; k++)
      if (k < hist.size())
        s += longint'(coeff(FILTER, k)) * longint'(hist[hist.size() - 1 - k]);
    return s;
  endfunction

  always @(posedge clk) cycle <= cycle + 1;

  int  sent;
  bit  took;     // a sample was accepted at the last clock edge

  // Stimulus: valid/ready handshake; once raised, in_valid and x_in are held
  // until the sample is taken. With GAPS, in_valid is dropped at random for
  // a cycle, so the core sometimes waits for data, and a new sample is
  // usually offered while the core is still busy (back-pressure).
  initial begin
    void'($urandom(SEED));
    checks = 0; failures = 0; stalls = 0; done = 1'b0;
    cycle = 0; first_ready = -1; acc_cycle = -1; n_out = 0; sent = 0; took = 0;
    rst_n = 1'b0; in_valid = 1'b0; x_in = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    while (sent < NSAMP) begin
      if (!in_valid || took) begin
        if (GAPS && ($urandom_range(3) == 0)) begin
          in_valid = 1'b0;
        end else begin
          in_valid = 1'b1;
          x_in     = DW'($urandom);
        end
      end
      @(posedge clk);
      #1;
    end
    in_valid = 1'b0;
    while (n_out < NSAMP) @(posedge clk);
    repeat (2) @(posedge clk);
    done = 1'b1;
  end

  // Monitor and checker.
  always @(posedge clk) begin
    took = 1'b0;
    if (rst_n) begin
      if (in_ready && first_ready < 0) first_ready = cycle;
      if (in_valid && !in_ready) stalls++;
      if (in_ready && n_out < hist.size() && !y_valid) begin
        failures++;
        $display("FAIL %m: in_ready high before the pending output (cycle %0d)", cycle);
      end
      if (y_valid) begin
        n_out++;
        checks++;
        if (longint'(y) != ref_y()) begin
          failures++;
          $display("FAIL %m: output %0d y=%0d expected %0d", n_out, longint'(y), ref_y());
        end
        checks++;
        if (cycle - acc_cycle != longint'(N) + 3) begin
          failures++;
          $display("FAIL %m: latency %0d expected %0d", cycle - acc_cycle, N + 3);
        end
      end
      if (in_valid && in_ready) begin
        hist.push_back(x_in);
        acc_cycle = cycle;
        sent++;
        took = 1'b1;
        if (sent == 1) begin
          // Reset is released just after edge 3; in_ready is due N cycles on.
          checks++;
          if (first_ready != longint'(N) + 3) begin
            failures++;
            $display("FAIL %m: first in_ready at cycle %0d, expected %0d", first_ready, N + 3);
          end
        end
      end
    end
  end

endmodule
