// instruction_unit: the ALU's instruction register (IU).
//
// On a rising clk edge with load high it captures the 8-bit instruction
// from the instruction inputs (M1..M8) and then drives it on N1..N8 to the
// decoders: the upper nibble is the op-code (to decoder a), the lower
// nibble the register-pair select (to decoder b). Bit numbering follows
// the instruction format figure: its fields 8..5 are instr[7:4] and 4..1
// are instr[3:0]. An active-low synchronous reset clears it, which decodes
// as a multiply on register pair 0 but enables nothing until the control
// unit executes.
module instruction_unit
  import alu_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                load,
  input  logic [INSTR_W-1:0]  instr,
  output logic [OPCODE_W-1:0] opcode,
  output logic [REGSEL_W-1:0] regsel
);
  instr_t ir;

  always_ff @(posedge clk) begin
    if (!rst_n)
      ir <= '0;
    else if (load)
      ir <= instr_t'(instr);
  end

  assign opcode = ir.opcode;
  assign regsel = ir.regsel;
endmodule
