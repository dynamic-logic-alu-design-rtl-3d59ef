// tb_add_sub: exhaustive self-checking test of the 8-bit adder-subtractor.
// Every (x, y) pair is applied in both modes; sum, carry-out (UO) and
// signed overflow (SO) are compared with integer arithmetic. Includes the
// example operands 8'b1011_1010 + 8'b1100_1001 = 1_1000_0011.
module tb_add_sub;
  localparam int W = 8;

  logic [W-1:0] x, y, s;
  logic m, uo, so;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  int cycles = 0;

  add_sub #(.WIDTH(W)) dut (.x, .y, .m, .s, .uo, .so);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [W-1:0] xi, input logic [W-1:0] yi, input logic mi);
    int unsigned xs, ys, full;
    int sx, sy, sr;
    logic [W-1:0] s_exp;
    logic uo_exp, so_exp;
    x = xi; y = yi; m = mi;
    #1;
    xs = int'(xi); ys = int'(yi);
    sx = int'($signed(xi)); sy = int'($signed(yi));
    if (!mi) begin
      full   = xs + ys;
      uo_exp = full > 255;
      sr     = sx + sy;
    end else begin
      full   = (xs - ys) & 32'hFF;
      uo_exp = xs >= ys;
      sr     = sx - sy;
    end
    s_exp  = full[W-1:0];
    so_exp = (sr > 127) || (sr < -128);
    checks++;
    if (s !== s_exp || uo !== uo_exp || so !== so_exp) begin
      failures++;
      if (failures < 10)
        $display("FAIL m=%0b x=%0d y=%0d : s=%0d uo=%0b so=%0b exp s=%0d uo=%0b so=%0b",
                 mi, xi, yi, s, uo, so, s_exp, uo_exp, so_exp);
    end
  endtask

  initial begin
    // worked example: 186 + 201 = 387 = 9'b1_1000_0011
    check(8'b1011_1010, 8'b1100_1001, 1'b0);
    checks++;
    if ({uo, s} !== 9'b1_1000_0011) failures++;
    for (int mm = 0; mm < 2; mm++)
      for (int i = 0; i < 256; i++)
        for (int j = 0; j < 256; j++)
          check(W'(i), W'(j), mm[0]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
