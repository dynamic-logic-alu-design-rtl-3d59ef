// tb_wallace_mult: exhaustive self-checking test of the 8x8 multiplier
// against the integer product, plus a 4x4 instance (exhaustive) to check
// that the array generalises with WIDTH.
module tb_wallace_mult;
  logic [7:0]  a, b;
  logic [15:0] p;
  logic [3:0]  a4, b4;
  logic [7:0]  p4;
  int checks = 0, failures = 0;
  logic clk = 1'b0;

  wallace_mult #(.WIDTH(8)) dut   (.a(a),  .b(b),  .p(p));
  wallace_mult #(.WIDTH(4)) dut4  (.a(a4), .b(b4), .p(p4));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++) begin
        a = 8'(i); b = 8'(j);
        #1;
        checks++;
        if (p !== 16'(i * j)) begin
          failures++;
          if (failures < 10) $display("FAIL %0d * %0d = %0d", i, j, p);
        end
      end
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++) begin
        a4 = 4'(i); b4 = 4'(j);
        #1;
        checks++;
        if (p4 !== 8'(i * j)) begin
          failures++;
          if (failures < 10) $display("FAIL4 %0d * %0d = %0d", i, j, p4);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
