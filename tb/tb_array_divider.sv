// tb_array_divider: exhaustive self-checking test of the 8-bit divider.
// Quotient and remainder are compared with integer division; a zero
// divisor must give quotient 8'hFF and remainder equal to the dividend.
module tb_array_divider;
  logic [7:0] n, d, q, r;
  int checks = 0, failures = 0;
  logic clk = 1'b0;

  array_divider #(.WIDTH(8)) dut (.dividend(n), .divisor(d), .quotient(q), .remainder(r));

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
        logic [7:0] q_exp, r_exp;
        n = 8'(i); d = 8'(j);
        #1;
        if (j == 0) begin
          q_exp = 8'hFF; r_exp = 8'(i);
        end else begin
          q_exp = 8'(i / j); r_exp = 8'(i % j);
        end
        checks++;
        if (q !== q_exp || r !== r_exp) begin
          failures++;
          if (failures < 10) $display("FAIL %0d / %0d : q=%0d r=%0d", i, j, q, r);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
