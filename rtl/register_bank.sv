// register_bank: operand register pairs (register A / register B) of the
// ALU, one pair per output line of decoder b.
//
// Pair k loads din_a into its A register and din_b into its B register on
// a rising clk edge when its strobe ENB = sel[k] & load is high. The pair
// whose select line is high drives qa and qb, the operands of the
// functional units (zero when no line is high). The paper draws only
// the pair on decoder b's first line and says the number of registers
// follows from the decoder bits; this design gives every one of the 2**4
// lines a pair. Active-low synchronous reset clears all registers.
module register_bank #(
  parameter int unsigned WIDTH  = 8,
  parameter int unsigned NPAIRS = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [NPAIRS-1:0] sel,    // one-hot pair select (decoder b)
  input  logic              load,   // strobe the selected pair
  input  logic [WIDTH-1:0]  din_a,
  input  logic [WIDTH-1:0]  din_b,
  output logic [WIDTH-1:0]  qa,
  output logic [WIDTH-1:0]  qb
);

  logic [WIDTH-1:0] reg_a [NPAIRS];
  logic [WIDTH-1:0] reg_b [NPAIRS];

  for (genvar k = 0; k < NPAIRS; k++) begin : g_pair
    always_ff @(posedge clk) begin
      if (!rst_n) begin
        reg_a[k] <= '0;
        reg_b[k] <= '0;
      end else if (sel[k] && load) begin   // ENB of pair k
        reg_a[k] <= din_a;
        reg_b[k] <= din_b;
      end
    end
  end

  always_comb begin
    qa = '0;
    qb = '0;
    for (int k = 0; k < NPAIRS; k++) begin
      qa |= reg_a[k] & {WIDTH{sel[k]}};
      qb |= reg_b[k] & {WIDTH{sel[k]}};
    end
  end

  a_sel_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(sel))
    else $error("register_bank: sel not one-hot");

endmodule
