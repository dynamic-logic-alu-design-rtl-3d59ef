// alu_pkg: types and constants shared by the LSDL ALU.
//
// The 8-bit instruction is split into a 4-bit op-code (upper half) and a
// 4-bit register-pair select (lower half). Op-code values follow the order
// in which the functional units are numbered on decoder a's output lines:
// line 1 (op-code 0) multiplier, line 2 adder, line 3 divider, then AND, OR,
// NOT, NAND, NOR, XOR and XNOR. Subtraction has no line of its own in that
// numbering; this design gives it the first free line (op-code 4'hA) and
// drives the adder-subtractor's mode input from it.
package alu_pkg;

  localparam int unsigned DATA_W   = 8;  // operand width
  localparam int unsigned OPCODE_W = 4;  // upper instruction nibble
  localparam int unsigned REGSEL_W = 4;  // lower instruction nibble
  localparam int unsigned INSTR_W  = OPCODE_W + REGSEL_W;

  typedef enum logic [OPCODE_W-1:0] {
    OP_MUL  = 4'h0,
    OP_ADD  = 4'h1,
    OP_DIV  = 4'h2,
    OP_AND  = 4'h3,
    OP_OR   = 4'h4,
    OP_NOT  = 4'h5,
    OP_NAND = 4'h6,
    OP_NOR  = 4'h7,
    OP_XOR  = 4'h8,
    OP_XNOR = 4'h9,
    OP_SUB  = 4'hA
  } opcode_e;

  // Pull-down network topologies offered by lsdl_gate.
  //   PDN_SERIES   : all inputs in series    (conducts when all are 1)
  //   PDN_PARALLEL : all inputs in parallel  (conducts when any is 1)
  //   PDN_AO22     : two series pairs in parallel, in[1:0] and in[3:2]
  typedef enum logic [1:0] {
    PDN_SERIES   = 2'd0,
    PDN_PARALLEL = 2'd1,
    PDN_AO22     = 2'd2
  } pdn_e;

  // Control unit states.
  typedef enum logic [1:0] {
    S_IDLE    = 2'd0,  // wait for start; instruction unit captures instr
    S_SELECT  = 2'd1,  // decoder b strobes the selected register pair
    S_EXECUTE = 2'd2,  // decoder a enables one unit; accumulator loads
    S_DONE    = 2'd3   // result valid, done pulse
  } state_e;

  typedef struct packed {
    logic [OPCODE_W-1:0] opcode;
    logic [REGSEL_W-1:0] regsel;
  } instr_t;

endpackage
