// add_sub: ripple-carry adder-subtractor controlled by a mode bit.
//
// With m = 0 it forms s = x + y; with m = 1 it forms s = x - y as
// x + ~y + 1: every y bit passes through an XOR with m, and m itself is the
// carry into the least significant full adder. This is the structure of the
// paper's adder-subtractor figure, widened from its four-bit drawing to
// the ALU's eight bits.
//
// Status outputs, as drawn in that figure:
//   uo - the carry out of the top full adder (unsigned carry; for a
//        subtraction it is 1 when no borrow occurred)
//   so - carry into the top stage XOR carry out of it (two's-complement
//        overflow)
// Purely combinational; no clock.
module add_sub #(
  parameter int unsigned WIDTH = 8
) (
  input  logic [WIDTH-1:0] x,
  input  logic [WIDTH-1:0] y,
  input  logic             m,    // 0: add, 1: subtract
  output logic [WIDTH-1:0] s,
  output logic             uo,   // carry out
  output logic             so    // signed overflow
);

  logic [WIDTH:0]   c;      // c[0] is C0, c[WIDTH] is Cout
  logic [WIDTH-1:0] y_m;    // y after the mode XOR gates

  assign c[0] = m;

  for (genvar i = 0; i < WIDTH; i++) begin : g_stage
    assign y_m[i] = y[i] ^ m;
    full_adder u_fa (
      .a   (x[i]),
      .b   (y_m[i]),
      .cin (c[i]),
      .sum (s[i]),
      .cout(c[i+1])
    );
  end

  assign uo = c[WIDTH];
  assign so = c[WIDTH] ^ c[WIDTH-1];

endmodule
