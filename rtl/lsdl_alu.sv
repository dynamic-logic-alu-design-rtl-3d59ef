// lsdl_alu: 8-bit arithmetic and logic unit whose logic operations are
// built from limited switch dynamic logic (LSDL) gates.
//
// Data flow (one operation):
//   1. start with an 8-bit instruction: the instruction unit captures it.
//      Upper nibble = op-code, lower nibble = register-pair select.
//   2. Decoder b turns the register field into one of 16 select lines;
//      the control unit strobes that line's register pair, which loads the
//      operands from din_a (register A) and din_b (register B).
//   3. Decoder a turns the op-code into one of 16 unit-enable lines
//      (alu_pkg::opcode_e). Only the enabled unit receives the operands;
//      the others see zeros and do not switch. The result is stored in the
//      accumulator at the end of the cycle.
//   4. done is high for one cycle; acc, carry and overflow hold the result
//      until the next operation completes.
//
// Accumulator layout:
//   MUL      acc = a * b (16 bits)
//   ADD/SUB  acc = {7'b0, carry, a +/- b}; carry and overflow flags are the
//            adder-subtractor's UO and SO outputs
//   DIV      acc = {a % b, a / b}; division by zero gives quotient 8'hFF
//            and remainder a
//   logic    acc = {8'h00, result}; NOT acts on register A
// Op-codes with no unit (4'hB..4'hF) store zero. Flags are cleared by any
// operation other than ADD and SUB.
//
// Timing: single clock, rising-edge registers, active-low synchronous
// reset. The LSDL gates are clocked by the inverted clock, so they
// precharge in the first (high) half of the cycle, while the registers
// feeding them change, and evaluate in the second (low) half with their
// inputs settled; their outputs are held when the accumulator samples them
// at the next rising edge. done rises with the second rising edge after
// the one that samples start; back-to-back operations take four cycles
// each (idle, select, execute, done). start is ignored while busy.
// din_a and din_b are sampled one cycle after start and need only be
// valid then (the testbench holds them until done).
//
// The op-code order, the subtract op-code, the register-pair count, the
// control sequence and the accumulator layout are this design's choices
// where the paper leaves them open; the units, the two decoders on the
// two instruction nibbles, the register pairs with an enable from decoder
// b, and the use of LSDL are the paper's.
module lsdl_alu
  import alu_pkg::*;
#(
  parameter int unsigned WIDTH = DATA_W   // operand width
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic [INSTR_W-1:0]   instr,
  input  logic [WIDTH-1:0]     din_a,
  input  logic [WIDTH-1:0]     din_b,
  output logic                 busy,
  output logic                 done,
  output logic [2*WIDTH-1:0]   acc,
  output logic                 carry,
  output logic                 overflow
);

  localparam int unsigned NLINES = 2**OPCODE_W;
  localparam int unsigned NPAIRS = 2**REGSEL_W;

  // ---------------------------------------------------------------- control
  logic ir_load, reg_load, exec, acc_load;

  control_unit u_cu (
    .clk, .rst_n, .start,
    .ir_load, .reg_load, .exec, .acc_load, .busy, .done
  );

  logic [OPCODE_W-1:0] opcode;
  logic [REGSEL_W-1:0] regsel;

  instruction_unit u_iu (
    .clk, .rst_n, .load(ir_load), .instr, .opcode, .regsel
  );

  logic [NLINES-1:0] op_line;    // decoder a
  logic [NPAIRS-1:0] reg_line;   // decoder b

  decoder #(.M(OPCODE_W)) u_dec_a (.code(opcode), .en(1'b1), .line(op_line));
  decoder #(.M(REGSEL_W)) u_dec_b (.code(regsel), .en(1'b1), .line(reg_line));

  // ---------------------------------------------------------------- operands
  logic [WIDTH-1:0] qa, qb;

  register_bank #(.WIDTH(WIDTH), .NPAIRS(NPAIRS)) u_regs (
    .clk, .rst_n, .sel(reg_line), .load(reg_load),
    .din_a, .din_b, .qa, .qb
  );

  // Unit enables: decoder a's lines, live only while executing.
  logic [NLINES-1:0] unit_en;
  assign unit_en = op_line & {NLINES{exec}};

  logic en_mul, en_addsub, en_sub, en_div;
  assign en_mul    = unit_en[OP_MUL];
  assign en_sub    = unit_en[OP_SUB];
  assign en_addsub = unit_en[OP_ADD] | en_sub;
  assign en_div    = unit_en[OP_DIV];

  // ------------------------------------------------------------- arithmetic
  logic [WIDTH-1:0]   as_s;
  logic               as_uo, as_so;
  logic [2*WIDTH-1:0] mul_p;
  logic [WIDTH-1:0]   div_q, div_r;

  add_sub #(.WIDTH(WIDTH)) u_addsub (
    .x (qa & {WIDTH{en_addsub}}),
    .y (qb & {WIDTH{en_addsub}}),
    .m (en_sub),
    .s (as_s), .uo(as_uo), .so(as_so)
  );

  wallace_mult #(.WIDTH(WIDTH)) u_mul (
    .a (qa & {WIDTH{en_mul}}),
    .b (qb & {WIDTH{en_mul}}),
    .p (mul_p)
  );

  array_divider #(.WIDTH(WIDTH)) u_div (
    .dividend (qa & {WIDTH{en_div}}),
    .divisor  (qb & {WIDTH{en_div}}),
    .quotient (div_q),
    .remainder(div_r)
  );

  // ------------------------------------------------------------------ logic
  logic             lsdl_clk;   // 0: precharge, 1: evaluate
  logic [WIDTH-1:0] lu_y;

  assign lsdl_clk = ~clk;

  logic_unit #(.WIDTH(WIDTH)) u_logic (
    .clk(lsdl_clk), .a(qa), .b(qb),
    .en (unit_en[OP_XNOR:OP_AND]),
    .y  (lu_y)
  );

  // ------------------------------------------------------------ accumulator
  logic [2*WIDTH-1:0] result;

  always_comb begin
    result = '0;
    if (en_mul)    result |= mul_p;
    if (en_addsub) result |= {{(WIDTH-1){1'b0}}, as_uo, as_s};
    if (en_div)    result |= {div_r, div_q};
    result |= {{WIDTH{1'b0}}, lu_y};   // zero unless a logic op is enabled
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      acc      <= '0;
      carry    <= 1'b0;
      overflow <= 1'b0;
    end else if (acc_load) begin
      acc      <= result;
      carry    <= en_addsub & as_uo;
      overflow <= en_addsub & as_so;
    end
  end

endmodule
