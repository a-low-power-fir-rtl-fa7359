// tb_fir_ctrl: self-checking, cycle-exact test of the counter and sequencer
// with a short filter (N = 8). After reset it checks the N memory-clearing
// cycles, then runs 40 operations with random gaps in in_valid and compares
// every control output in every cycle with a schedule model: relative to the
// cycle r = 0 that accepts a sample, fetch_en and cnt = r-1 in r = 1..N,
// mac_en in r = 2..N+1, mac_clr in r = 2, out_load and wp_dec in r = N+2,
// then y_valid and in_ready together in r = N+3.
module tb_fir_ctrl;

  localparam int N  = 8;
  localparam int AW = $clog2(N);

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic          rst_n, in_valid, in_ready, x_we, x_zero, wp_dec;
  logic          fetch_en, mac_en, mac_clr, out_load, y_valid;
  logic [AW-1:0] cnt;
  int checks = 0, failures = 0, ops = 0;

  fir_ctrl #(.N(N)) dut (
    .clk, .rst_n, .in_valid, .in_ready, .x_we, .x_zero, .wp_dec, .cnt,
    .fetch_en, .mac_en, .mac_clr, .out_load, .y_valid
  );

  task automatic check(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %0t: %s = %b, expected %b", $time, what, got, exp);
    end
  endtask

  initial begin
    int  r;
    bit  yv;
    rst_n = 1'b0; in_valid = 1'b0;
    #12 rst_n = 1'b1;
    // Memory clearing: N cycles.
    for (int i = 0; i < N; i++) begin
      check("x_we (clear)", x_we, 1'b1);
      check("x_zero", x_zero, 1'b1);
      check("wp_dec (clear)", wp_dec, 1'b1);
      check("in_ready (clear)", in_ready, 1'b0);
      check("cnt (clear)", cnt == AW'(i), 1'b1);
      @(posedge clk); #1;
    end
    r = 0; yv = 0;
    while (ops < 40) begin
      in_valid = (r == 0) && ($urandom_range(2) != 0);
      #1;
      check("in_ready", in_ready, r == 0);
      check("x_we", x_we, (r == 0) && in_valid);
      check("x_zero", x_zero, 1'b0);
      check("fetch_en", fetch_en, r >= 1 && r <= N);
      if (r >= 1 && r <= N) check("cnt", cnt == AW'(r - 1), 1'b1);
      check("mac_en", mac_en, r >= 2 && r <= N + 1);
      check("mac_clr", mac_clr, r == 2);
      check("out_load", out_load, r == N + 2);
      check("wp_dec", wp_dec, r == N + 2);
      check("y_valid", y_valid, yv);
      @(posedge clk);
      yv = 0;
      if (r == 0) begin
        if (in_valid) r = 1;
      end else if (r == N + 2) begin
        r = 0; yv = 1; ops++;
      end else r++;
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
