// decoder: M-input, 2**M-output one-hot decoder with an enable.
//
// Output line k (counting from 0) is high when the input code equals k and
// en is high; all other lines are low. The ALU uses two of them on the two
// halves of the instruction: decoder a turns the op-code into a unit
// enable, decoder b turns the register field into a register-pair strobe.
// With the paper's example, code 0001 raises line 1 (its "second
// line") and code 0000 line 0 (its "first line").
// Purely combinational.
module decoder #(
  parameter int unsigned M = 4
) (
  input  logic [M-1:0]      code,
  input  logic              en,
  output logic [2**M-1:0]   line
);
  always_comb begin
    line = '0;
    line[code] = en;
  end
endmodule
