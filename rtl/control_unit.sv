// control_unit: sequences one ALU operation through four states
// (alu_pkg::state_e):
//
//   S_IDLE    ready for work. When start is high, ir_load captures the
//             instruction in the instruction unit.
//   S_SELECT  reg_load strobes the register pair chosen by decoder b, which
//             takes the operands from the data inputs.
//   S_EXECUTE exec enables the unit chosen by decoder a; its operands are
//             released to it, the logic unit's LSDL gates evaluate in the
//             second half of the cycle, and acc_load stores the result in
//             the accumulator at the end of the cycle.
//   S_DONE    done is high for one cycle; the accumulator holds the result.
//
// done rises with the second rising edge after the edge that samples
// start, and the next start can be sampled one cycle later, so
// back-to-back operations take four cycles each (idle, select, execute,
// done). start is ignored while busy. The paper
// says only that the control unit sequences the data flow and controls
// the instruction unit, the units and the registers; the states and their
// timing are this design's. Active-low synchronous reset to S_IDLE.
module control_unit
  import alu_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  output logic ir_load,
  output logic reg_load,
  output logic exec,
  output logic acc_load,
  output logic busy,
  output logic done
);

  state_e state, state_nx;

  always_ff @(posedge clk) begin
    if (!rst_n) state <= S_IDLE;
    else        state <= state_nx;
  end

  always_comb begin
    state_nx = state;
    unique case (state)
      S_IDLE:    if (start) state_nx = S_SELECT;
      S_SELECT:  state_nx = S_EXECUTE;
      S_EXECUTE: state_nx = S_DONE;
      S_DONE:    state_nx = S_IDLE;
      default:   state_nx = S_IDLE;
    endcase
  end

  assign ir_load  = (state == S_IDLE) && start;
  assign reg_load = (state == S_SELECT);
  assign exec     = (state == S_EXECUTE);
  assign acc_load = (state == S_EXECUTE);
  assign busy     = (state != S_IDLE);
  assign done     = (state == S_DONE);

endmodule
