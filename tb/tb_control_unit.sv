// tb_control_unit: self-checking test of the ALU sequencer.
// For each operation it checks the order and the cycle of every control
// strobe: ir_load with start in idle, reg_load one cycle later, exec and
// acc_load the cycle after, done the cycle after that (four cycles from
// the sampled start to done), busy throughout, and that start is ignored
// while busy. Idle gaps between operations are random.
module tb_control_unit;
  logic clk = 1'b0, rst_n, start;
  logic ir_load, reg_load, exec, acc_load, busy, done;
  int checks = 0, failures = 0;

  control_unit dut (.clk, .rst_n, .start, .ir_load, .reg_load, .exec, .acc_load, .busy, .done);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_ctl(input logic [5:0] exp, input string what);
    checks++;
    if ({ir_load, reg_load, exec, acc_load, busy, done} !== exp) begin
      failures++;
      if (failures < 10)
        $display("FAIL %s: got %b expected %b", what,
                 {ir_load, reg_load, exec, acc_load, busy, done}, exp);
    end
  endtask

  initial begin
    rst_n = 1'b0; start = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    expect_ctl(6'b000000, "idle after reset");
    for (int n = 0; n < 1000; n++) begin
      repeat ($urandom_range(0, 3)) begin
        @(posedge clk); #1;
        expect_ctl(6'b000000, "idle");
      end
      start = 1'b1; #1;
      expect_ctl(6'b100000, "start in idle");
      @(posedge clk); #1;
      start = 1'($urandom);            // must be ignored while busy
      expect_ctl(6'b010010, "select");
      @(posedge clk); #1;
      start = 1'($urandom);
      expect_ctl(6'b001110, "execute");
      @(posedge clk); #1;
      start = 1'b0;
      expect_ctl(6'b000011, "done");
      @(posedge clk); #1;
      expect_ctl(6'b000000, "back to idle");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
