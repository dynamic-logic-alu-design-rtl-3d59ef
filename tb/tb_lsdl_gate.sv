// tb_lsdl_gate: self-checking test of the LSDL gate model.
//
// Four gates are tested: a 2-input series PDN (NAND), a 2-input parallel
// PDN (NOR), a single-input PDN (inverter) and an AO22 PDN (XOR with
// complemented inputs). Per clock cycle the inputs change during
// precharge (clk = 0) and the test checks that
//   - after evaluate, out is the complement of the PDN function;
//   - out does not move during precharge, even when the inputs change;
//   - an input that turns the PDN off in the middle of evaluate cannot
//     restore a discharged dynamic node (one evaluation per cycle);
//   - with the inputs held, out never toggles across many cycles, while
//     the dynamic node o1 is discharged and precharged every cycle.
module tb_lsdl_gate;
  import alu_pkg::*;

  logic clk = 1'b0;
  logic [1:0] in2s, in2p;
  logic       in1;
  logic [3:0] in4;
  logic out_nand, out_nor, out_not, out_xor;
  int checks = 0, failures = 0;

  lsdl_gate #(.N(2), .PDN(PDN_SERIES))   u_nand (.clk, .in(in2s), .out(out_nand));
  lsdl_gate #(.N(2), .PDN(PDN_PARALLEL)) u_nor  (.clk, .in(in2p), .out(out_nor));
  lsdl_gate #(.N(1), .PDN(PDN_SERIES))   u_not  (.clk, .in(in1),  .out(out_not));
  lsdl_gate #(.N(4), .PDN(PDN_AO22))     u_xor  (.clk, .in(in4),  .out(out_xor));

  initial begin : watchdog
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0b expected %0b at %0t", what, got, exp, $time);
    end
  endtask

  // one precharge (5) + evaluate (5) cycle
  task automatic cycle();
    clk = 1'b0; #5;
    clk = 1'b1; #5;
  endtask

  logic [1:0] a;
  logic [1:0] b;
  logic       prev_nand, prev_nor, prev_not, prev_xor;
  int toggles_out, toggles_o1;

  initial begin
    in2s = '0; in2p = '0; in1 = 1'b0; in4 = '0;
    cycle();
    // random sweep: inputs applied in precharge, checked after evaluate
    for (int n = 0; n < 500; n++) begin
      a = 2'($urandom);
      b = 2'($urandom);
      // values at the end of the previous evaluate phase
      prev_nand = out_nand; prev_nor = out_nor; prev_not = out_not; prev_xor = out_xor;
      clk = 1'b0; #1;
      in2s = a; in2p = a; in1 = a[0];
      in4  = {~b[1], ~b[0], b[1], b[0]};   // PDN = b1&b0 | ~b1&~b0 -> out = b1 ^ b0
      #3;
      // precharge: outputs hold the previous evaluation
      expect_eq(out_nand, prev_nand, "nand hold");
      expect_eq(out_nor,  prev_nor,  "nor hold");
      expect_eq(out_not,  prev_not,  "not hold");
      expect_eq(out_xor,  prev_xor,  "xor hold");
      expect_eq(u_nand.o1, 1'b1, "o1 precharged");
      #1; clk = 1'b1; #4;
      expect_eq(out_nand, ~(a[1] & a[0]), "nand eval");
      expect_eq(out_nor,  ~(a[1] | a[0]), "nor eval");
      expect_eq(out_not,  ~a[0],          "not eval");
      expect_eq(out_xor,  b[1] ^ b[0],    "xor eval");
      #1;
    end

    // one evaluation per cycle: PDN conducts early, then turns off
    clk = 1'b0; in2s = 2'b11; #5;
    clk = 1'b1; #2;
    expect_eq(u_nand.o1, 1'b0, "o1 discharged");
    in2s = 2'b01; #2;
    expect_eq(u_nand.o1, 1'b0, "o1 stays discharged");
    expect_eq(out_nand, 1'b0, "out keeps evaluated value");
    #1;

    // held inputs: count transitions of out and of the dynamic node
    toggles_out = 0; toggles_o1 = 0;
    clk = 1'b0; in2s = 2'b11; #5;
    clk = 1'b1; #5;
    fork
      begin
        logic last_out, last_o1;
        last_out = out_nand; last_o1 = u_nand.o1;
        repeat (200) begin
          #1;
          if (out_nand != last_out) toggles_out++;
          if (u_nand.o1 != last_o1) toggles_o1++;
          last_out = out_nand; last_o1 = u_nand.o1;
        end
      end
      repeat (20) cycle();
    join
    checks++;
    if (toggles_out != 0) begin failures++; $display("FAIL out toggled %0d times", toggles_out); end
    checks++;
    if (toggles_o1 < 20) begin failures++; $display("FAIL o1 toggled only %0d times", toggles_o1); end
    $display("held inputs: out toggles %0d, dynamic node toggles %0d", toggles_out, toggles_o1);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
