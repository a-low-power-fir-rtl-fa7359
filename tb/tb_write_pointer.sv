// tb_write_pointer: self-checking test of the circular-buffer write pointer
// at the default buffer length (80). Checks the reset value, that the
// pointer steps back by one on dec, wraps from 0 to N-1, and holds otherwise,
// over 1000 random cycles (several full turns of the buffer).
module tb_write_pointer;

  localparam int N  = 80;
  localparam int AW = $clog2(N);

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic          rst_n, dec;
  logic [AW-1:0] wp;
  int model, wraps;
  int checks = 0, failures = 0;

  write_pointer dut (.clk, .rst_n, .dec, .wp);

  initial begin
    rst_n = 1'b0; dec = 1'b0; wraps = 0;
    #12;
    checks++;
    if (wp !== '0) begin failures++; $display("FAIL: reset value %0d", wp); end
    rst_n = 1'b1;
    model = 0;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      dec = ($urandom_range(3) != 0);
      @(posedge clk);
      if (dec) begin
        if (model == 0) wraps++;
        model = (model + N - 1) % N;
      end
      #1;
      checks++;
      if (int'(wp) != model) begin
        failures++;
        $display("FAIL: cycle %0d wp=%0d expected %0d", i, wp, model);
      end
    end
    checks++;
    if (wraps == 0) begin failures++; $display("FAIL: no wrap-around exercised"); end
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
