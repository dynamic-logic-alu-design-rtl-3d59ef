// array_divider: unsigned WIDTH-bit restoring array divider.
//
// The ALU's integration figure lists a division unit, but its insides are
// not described; this is the plainest combinational divider. It has WIDTH
// rows. Row i shifts the next dividend bit (most significant first) into
// the partial remainder, tries to subtract the divisor with a (WIDTH+1)-bit
// subtractor, and keeps the difference when no borrow occurs (quotient bit
// 1) or restores the partial remainder (quotient bit 0).
//
// Division by zero is not trapped: every trial subtraction succeeds, so
// the quotient is all ones and the remainder equals the dividend.
// Purely combinational; no clock.
module array_divider #(
  parameter int unsigned WIDTH = 8
) (
  input  logic [WIDTH-1:0] dividend,
  input  logic [WIDTH-1:0] divisor,
  output logic [WIDTH-1:0] quotient,
  output logic [WIDTH-1:0] remainder
);

  // rem[i] is the partial remainder entering row i (row 0 first).
  logic [WIDTH-1:0] rem [WIDTH+1];
  assign rem[0] = '0;

  for (genvar i = 0; i < WIDTH; i++) begin : g_row
    logic [WIDTH:0] shifted;  // partial remainder with next dividend bit
    logic [WIDTH:0] diff;     // trial difference, diff[WIDTH] is the borrow
    assign shifted = {rem[i], dividend[WIDTH-1-i]};
    assign diff    = shifted - {1'b0, divisor};
    assign quotient[WIDTH-1-i] = ~diff[WIDTH];
    assign rem[i+1] = diff[WIDTH] ? shifted[WIDTH-1:0] : diff[WIDTH-1:0];
  end

  assign remainder = rem[WIDTH];

endmodule
