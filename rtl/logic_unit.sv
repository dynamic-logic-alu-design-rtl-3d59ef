// logic_unit: bitwise logic operations of the ALU, every result bit one
// LSDL gate (lsdl_gate).
//
// Seven operations, indexed like their enable bits:
//   0 AND, 1 OR, 2 NOT (of a), 3 NAND, 4 NOR, 5 XOR, 6 XNOR.
// An LSDL gate outputs the complement of its pull-down function, so each
// operation uses the PDN of its complement:
//   NAND : a, b in series          NOR  : a, b in parallel
//   AND  : ~a, ~b in parallel      OR   : ~a, ~b in series
//   NOT  : a alone
//   XOR  : (a & b) | (~a & ~b)     XNOR : (a & ~b) | (~a & b)
// AND, OR, NOT, NAND, NOR and XOR are the paper's list; XNOR is added
// because the integration figure numbers an "Ex-nor" unit as well.
//
// en is one-hot (or zero). The operands of a disabled operation are held
// at zero, so its gates keep evaluating the same value and, being LSDL,
// their outputs do not toggle. y is the enabled operation's result, zero
// when none is enabled.
//
// Timing: the gates evaluate while clk = 1 and hold while clk = 0; a, b
// and en must be stable during evaluate. y is valid at the end of the
// evaluate phase and stays valid through the following precharge phase.
module logic_unit
  import alu_pkg::*;
#(
  parameter int unsigned WIDTH = 8
) (
  input  logic             clk,   // LSDL clock: 0 precharge, 1 evaluate
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic [6:0]       en,    // one-hot operation enable
  output logic [WIDTH-1:0] y
);

  localparam int unsigned NOPS = 7;

  logic [WIDTH-1:0] ga   [NOPS];  // isolated operands per operation
  logic [WIDTH-1:0] gb   [NOPS];
  logic [WIDTH-1:0] res  [NOPS];  // gate outputs per operation

  for (genvar k = 0; k < NOPS; k++) begin : g_iso
    assign ga[k] = a & {WIDTH{en[k]}};
    assign gb[k] = b & {WIDTH{en[k]}};
  end

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    lsdl_gate #(.N(2), .PDN(PDN_PARALLEL)) u_and (
      .clk(clk), .in({~gb[0][i], ~ga[0][i]}), .out(res[0][i]));
    lsdl_gate #(.N(2), .PDN(PDN_SERIES)) u_or (
      .clk(clk), .in({~gb[1][i], ~ga[1][i]}), .out(res[1][i]));
    lsdl_gate #(.N(1), .PDN(PDN_SERIES)) u_not (
      .clk(clk), .in(ga[2][i]), .out(res[2][i]));
    lsdl_gate #(.N(2), .PDN(PDN_SERIES)) u_nand (
      .clk(clk), .in({gb[3][i], ga[3][i]}), .out(res[3][i]));
    lsdl_gate #(.N(2), .PDN(PDN_PARALLEL)) u_nor (
      .clk(clk), .in({gb[4][i], ga[4][i]}), .out(res[4][i]));
    lsdl_gate #(.N(4), .PDN(PDN_AO22)) u_xor (
      .clk(clk), .in({~gb[5][i], ~ga[5][i], gb[5][i], ga[5][i]}), .out(res[5][i]));
    lsdl_gate #(.N(4), .PDN(PDN_AO22)) u_xnor (
      .clk(clk), .in({gb[6][i], ~ga[6][i], ~gb[6][i], ga[6][i]}), .out(res[6][i]));
  end

  // Static output selection (AND-OR multiplexer on the one-hot enable).
  always_comb begin
    y = '0;
    for (int k = 0; k < NOPS; k++)
      y |= res[k] & {WIDTH{en[k]}};
  end

  // At the start of every evaluate phase at most one operation is enabled.
  a_en_onehot: assert property (@(posedge clk) $onehot0(en))
    else $error("logic_unit: en not one-hot");

endmodule
