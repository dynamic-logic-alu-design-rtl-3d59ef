// lsdl_gate: logic-level model of one limited switch dynamic logic (LSDL)
// gate: a footed dynamic stage followed by a clocked static latch and an
// output inverter.
//
// Nodes, as named in the paper's LSDL schematic:
//   o1  - dynamic node. While clk = 0 (precharge) P1 pulls it high. While
//         clk = 1 (evaluate) the footer N1 is on and o1 is discharged when
//         the pull-down network (PDN) conducts. A discharged o1 stays low
//         until the next precharge: one evaluation per clock cycle.
//   o2  - latch node. While clk = 1, M1 pulls it high when o1 is low, and
//         M2 with the clocked footer M3 pull it low when o1 is high, so
//         o2 = ~o1. While clk = 0, M3 is off and the feedback pair M4/M5,
//         driven by out, keeps o2 at its last value.
//   out - o2 through the M6/M7 inverter, so out = NOT(PDN function).
//
// The point of the style is that out changes only when the evaluated value
// changes: precharge never disturbs it. The outputs are therefore valid
// and stable from the end of one evaluate phase to the end of the next;
// inputs must be stable during evaluate (change them while clk = 0).
//
// The PDN topology is a parameter (alu_pkg::pdn_e): all N inputs in series,
// all in parallel, or two series pairs in parallel (N = 4). Complemented
// inputs, where a function needs them, are supplied by the caller. The
// paper draws the PDN as a generic box; the three topologies are this
// design's choice, enough for the ALU's logic operations.
//
// Both nodes are level-sensitive storage, so synthesis infers two latches
// per gate. They stand on purpose: they are the dynamic node and the
// static latch of the circuit being modelled.
module lsdl_gate
  import alu_pkg::*;
#(
  parameter int unsigned N   = 2,
  parameter pdn_e        PDN = PDN_SERIES
) (
  input  logic         clk,   // 0: precharge, 1: evaluate
  input  logic [N-1:0] in,    // PDN transistor gates
  output logic         out
);

  logic pdn_on;   // the pull-down network conducts
  logic o1;       // dynamic node
  logic o2;       // latch node

  if (PDN == PDN_SERIES) begin : g_series
    assign pdn_on = &in;
  end else if (PDN == PDN_PARALLEL) begin : g_parallel
    assign pdn_on = |in;
  end else begin : g_ao22
    assign pdn_on = (in[0] & in[1]) | (in[2] & in[3]);
  end

  // Dynamic node: precharge, then monotonic discharge during evaluate.
  always_latch begin
    if (!clk)
      o1 = 1'b1;
    else if (pdn_on)
      o1 = 1'b0;
  end

  // Static latch: follows ~o1 while evaluating, holds during precharge.
  always_latch begin
    if (clk)
      o2 = ~o1;
  end

  assign out = ~o2;

  if (PDN == PDN_AO22) begin : g_chk
    initial assert (N == 4) else $error("lsdl_gate: PDN_AO22 needs N = 4");
  end

endmodule
