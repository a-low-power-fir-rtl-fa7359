// tb_mult_csa: self-checking test of the carry-save array multiplier. A 16-bit instance is
// checked on all pairs of corner values and on 50000 random pairs; an 8-bit
// instance is checked exhaustively (all 65536 pairs). The reference is the
// simulator's own signed multiplication.
module tb_mult_csa;

  logic signed [15:0] a16, b16;
  logic signed [31:0] p16;
  logic signed [7:0]  a8, b8;
  logic signed [15:0] p8;
  int checks = 0, failures = 0;

  mult_csa #(.W(16)) dut16 (.a(a16), .b(b16), .p(p16));
  mult_csa #(.W(8))  dut8  (.a(a8),  .b(b8),  .p(p8));

  localparam logic signed [15:0] CORNER [8] =
    '{16'sh8000, 16'sh7fff, 16'sh0000, 16'shffff, 16'sh0001, 16'sh8001, 16'sh5555, 16'shaaaa};

  task automatic check16();
    #1;
    checks++;
    if (p16 !== 32'(longint'(a16) * longint'(b16))) begin
      failures++;
      $display("FAIL: %0d * %0d = %0d", a16, b16, p16);
    end
  endtask

  initial begin
    a8 = '0; b8 = '0;
    foreach (CORNER[i]) foreach (CORNER[j]) begin
      a16 = CORNER[i]; b16 = CORNER[j];
      check16();
    end
    for (int i = 0; i < 50000; i++) begin
      a16 = 16'($urandom); b16 = 16'($urandom);
      check16();
    end
    for (int i = -128; i < 128; i++) begin
      for (int j = -128; j < 128; j++) begin
        a8 = 8'(i); b8 = 8'(j);
        #1;
        checks++;
        if (int'(p8) != i * j) begin
          failures++;
          if (failures < 10) $display("FAIL: %0d * %0d = %0d (8-bit)", i, j, p8);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
