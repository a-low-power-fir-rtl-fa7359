// tb_x_ram: self-checking test of the data memory at its default size
// (80 x 16). Fills it, then runs 3000 cycles of random writes and reads,
// comparing the combinational read port with a model array; a read of the
// address being written must still return the old word in that cycle.
module tb_x_ram;

  localparam int N  = 80;
  localparam int W  = 16;
  localparam int AW = $clog2(N);

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic          we;
  logic [AW-1:0] waddr, raddr;
  logic [W-1:0]  wdata, rdata;
  logic [W-1:0]  model [N];
  int checks = 0, failures = 0;

  x_ram dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  initial begin
    we = 1'b0; waddr = '0; raddr = '0; wdata = '0;
    for (int i = 0; i < N; i++) begin
      @(negedge clk);
      we = 1'b1; waddr = AW'(i); wdata = W'($urandom);
      model[i] = wdata;
    end
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      we    = ($urandom_range(1) == 1);
      waddr = AW'($urandom_range(N - 1));
      wdata = W'($urandom);
      raddr = ($urandom_range(3) == 0) ? waddr : AW'($urandom_range(N - 1));
      #1;
      checks++;
      if (rdata !== model[raddr]) begin
        failures++;
        $display("FAIL: read %0d got %h expected %h", raddr, rdata, model[raddr]);
      end
      @(posedge clk);
      if (we) model[waddr] = wdata;
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
