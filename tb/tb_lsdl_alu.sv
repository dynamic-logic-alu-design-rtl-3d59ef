// tb_lsdl_alu: end-to-end self-checking test of the LSDL ALU at its
// default size (8-bit operands, 4-bit op-code, 16 register pairs).
//
// It first runs the worked example: instruction 8'b0001_0000 (add, pair
// 0) with A = 8'b1011_1010 and B = 8'b1100_1001 gives 9'b1_1000_0011.
// Then it issues random instructions covering every op-code (including
// the unused ones) and every register pair, with random operands and
// edge-case operands, and compares acc, carry and overflow with an
// independent integer model. For every operation it checks the latency
// (done rises with the second rising edge after the one that samples
// start)
// and that start pulses while busy are ignored. It counts how often each
// mechanism occurred: every operation, every register pair, carry out,
// signed overflow, division by zero, an unused op-code and an ignored
// start; any that never occurs counts as a failure.
module tb_lsdl_alu;
  import alu_pkg::*;

  logic        clk = 1'b0, rst_n, start;
  logic [7:0]  instr, din_a, din_b;
  logic        busy, done, carry, overflow;
  logic [15:0] acc;
  int checks = 0, failures = 0;

  lsdl_alu dut (.clk, .rst_n, .start, .instr, .din_a, .din_b,
                .busy, .done, .acc, .carry, .overflow);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int op_count  [16];
  int pair_count[16];
  int n_carry = 0, n_ovf = 0, n_div0 = 0, n_ignored = 0;

  // Independent reference: {acc, carry, overflow}
  function automatic logic [17:0] model(logic [3:0] op, logic [7:0] a, logic [7:0] b);
    int ia, ib, sa, sb, r;
    logic [15:0] res;
    logic c, v;
    ia = int'(a); ib = int'(b);
    sa = int'($signed(a)); sb = int'($signed(b));
    res = '0; c = 1'b0; v = 1'b0;
    case (op)
      4'h0: res = 16'(ia * ib);
      4'h1: begin r = ia + ib; res = 16'(r); c = r > 255; v = (sa + sb > 127) || (sa + sb < -128); end
      4'hA: begin res = {7'd0, ia >= ib, 8'(ia - ib)}; c = ia >= ib;
                  v = (sa - sb > 127) || (sa - sb < -128); end
      4'h2: res = (ib == 0) ? {a, 8'hFF} : {8'(ia % ib), 8'(ia / ib)};
      4'h3: res = {8'd0, a & b};
      4'h4: res = {8'd0, a | b};
      4'h5: res = {8'd0, ~a};
      4'h6: res = {8'd0, ~(a & b)};
      4'h7: res = {8'd0, ~(a | b)};
      4'h8: res = {8'd0, a ^ b};
      4'h9: res = {8'd0, ~(a ^ b)};
      default: res = '0;
    endcase
    return {res, c, v};
  endfunction

  task automatic do_op(input logic [7:0] ins, input logic [7:0] a, input logic [7:0] b);
    logic [17:0] exp;
    int edges;
    // present the instruction while idle
    @(negedge clk);
    checks++;
    if (busy) begin failures++; $display("FAIL busy before start"); end
    instr = ins; din_a = a; din_b = b; start = 1'b1;
    @(posedge clk);              // edge that samples start
    #1 start = 1'b0;
    edges = 0;
    while (!done) begin
      @(negedge clk);
      // pulse start while busy: must be ignored
      if (!done && $urandom_range(0, 1) == 1) begin
        start = 1'b1; instr = 8'($urandom);
        n_ignored++;
      end
      @(posedge clk);
      edges++;
      #1 start = 1'b0;
      if (edges > 10) break;
    end
    checks++;
    if (edges != 2) begin failures++; $display("FAIL latency %0d edges", edges); end
    exp = model(ins[7:4], a, b);
    checks++;
    if ({acc, carry, overflow} !== exp) begin
      failures++;
      if (failures < 20)
        $display("FAIL instr=%b a=%h b=%h : acc=%h c=%b v=%b expected acc=%h c=%b v=%b",
                 ins, a, b, acc, carry, overflow, exp[17:2], exp[1], exp[0]);
    end
    op_count[ins[7:4]]++;
    pair_count[ins[3:0]]++;
    if (exp[1] && (ins[7:4] == 4'h1 || ins[7:4] == 4'hA)) n_carry++;
    if (exp[0]) n_ovf++;
    if (ins[7:4] == 4'h2 && b == 8'd0) n_div0++;
    // after done the accumulator must hold its value
    @(posedge clk); #1;
    checks++;
    if ({acc, carry, overflow} !== exp) begin failures++; $display("FAIL acc not held"); end
  endtask

  function automatic logic [7:0] pick();
    case ($urandom_range(0, 7))
      0: return 8'h00;
      1: return 8'hFF;
      2: return 8'h80;
      3: return 8'h7F;
      default: return 8'($urandom);
    endcase
  endfunction

  initial begin
    foreach (op_count[i]) begin op_count[i] = 0; pair_count[i] = 0; end
    rst_n = 1'b0; start = 1'b0; instr = '0; din_a = '0; din_b = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    // worked example
    do_op(8'b0001_0000, 8'b1011_1010, 8'b1100_1001);
    checks++;
    if ({carry, acc[7:0]} !== 9'b1_1000_0011) begin failures++; $display("FAIL worked example"); end

    // every op-code on every pair, then random traffic
    for (int op = 0; op < 16; op++)
      for (int p = 0; p < 16; p++)
        do_op({4'(op), 4'(p)}, pick(), pick());
    for (int n = 0; n < 3000; n++)
      do_op(8'($urandom), pick(), pick());

    for (int op = 0; op < 16; op++) begin
      checks++;
      if (op_count[op] == 0) begin failures++; $display("FAIL op-code %0d never ran", op); end
      checks++;
      if (pair_count[op] == 0) begin failures++; $display("FAIL pair %0d never used", op); end
    end
    $display("mechanisms: mul %0d add %0d sub %0d div %0d and %0d or %0d not %0d nand %0d nor %0d xor %0d xnor %0d unused-op %0d",
             op_count[0], op_count[1], op_count[10], op_count[2], op_count[3], op_count[4],
             op_count[5], op_count[6], op_count[7], op_count[8], op_count[9],
             op_count[11] + op_count[12] + op_count[13] + op_count[14] + op_count[15]);
    $display("mechanisms: carry %0d overflow %0d div-by-zero %0d ignored-start %0d",
             n_carry, n_ovf, n_div0, n_ignored);
    checks++; if (n_carry   == 0) begin failures++; $display("FAIL no carry"); end
    checks++; if (n_ovf     == 0) begin failures++; $display("FAIL no overflow"); end
    checks++; if (n_div0    == 0) begin failures++; $display("FAIL no division by zero"); end
    checks++; if (n_ignored == 0) begin failures++; $display("FAIL no ignored start"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
