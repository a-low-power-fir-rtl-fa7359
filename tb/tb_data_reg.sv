// tb_data_reg: self-checking test of the load-enable register used for
// h_reg, x_reg and out_reg. Drives random data and enables for 2000 cycles
// and checks q against a model register after every edge; also checks that
// reset clears q and that q holds while en is low.
module tb_data_reg;

  localparam int W = 39;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic         rst_n, en;
  logic [W-1:0] d, q, model;
  int checks = 0, failures = 0;

  data_reg #(.W(W)) dut (.clk, .rst_n, .en, .d, .q);

  initial begin
    rst_n = 1'b0; en = 1'b1; d = '1;
    #12;
    checks++;
    if (q !== '0) begin failures++; $display("FAIL: reset did not clear q"); end
    rst_n = 1'b1;
    model = '0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      en = ($urandom_range(2) != 0);
      d  = {$urandom, $urandom};
      @(posedge clk);
      if (en) model = d;
      #1;
      checks++;
      if (q !== model) begin
        failures++;
        $display("FAIL: cycle %0d q=%h expected %h (en=%b)", i, q, model, en);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
