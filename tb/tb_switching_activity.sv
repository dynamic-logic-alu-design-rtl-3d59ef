// tb_switching_activity: output switching of the LSDL logic unit on the
// six 8-bit logic operations and on XNOR, against what a conventional
// footed dynamic gate would do on the same input stream.
//
// For each operation a stream of 2000 operand pairs is applied, one per
// LSDL clock cycle; with probability 1/2 an operand pair repeats the
// previous one, as in a datapath where a register is read several times.
// The testbench counts transitions of every result bit at the unit's
// output. Expected values, computed from the operand stream alone:
//   LSDL          - a result bit toggles only when its evaluated value
//                   differs from the previous cycle's (static-like).
//   conventional  - the output node is precharged high every cycle and
//                   discharged in every cycle in which its pull-down
//                   network conducts, i.e. in which the result bit is 0:
//                   two transitions per such cycle.
// It checks the LSDL count exactly and that it is below the conventional
// count, and prints both with their ratio.
module tb_switching_activity;
  localparam int W = 8, NCYC = 2000;

  logic clk = 1'b0;
  logic [W-1:0] a, b, y;
  logic [6:0] en;
  int checks = 0, failures = 0;

  logic_unit #(.WIDTH(W)) dut (.clk, .a, .b, .en, .y);

  initial begin : watchdog
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W-1:0] ref_op(int op, logic [W-1:0] x, logic [W-1:0] z);
    case (op)
      0: return x & z;
      1: return x | z;
      2: return ~x;
      3: return ~(x & z);
      4: return ~(x | z);
      5: return x ^ z;
      default: return ~(x ^ z);
    endcase
  endfunction

  string names[7] = '{"AND", "OR", "NOT", "NAND", "NOR", "XOR", "XNOR"};

  initial begin
    a = '0; b = '0; en = '0;
    for (int op = 0; op < 7; op++) begin
      int lsdl_seen, lsdl_exp, dyn_exp;
      logic [W-1:0] prev_y, prev_ref, r;
      // first evaluation establishes the starting value
      clk = 1'b0; en = 7'(1 << op); a = W'($urandom); b = W'($urandom); #5;
      clk = 1'b1; #5;
      prev_y = y; prev_ref = ref_op(op, a, b);
      lsdl_seen = 0; lsdl_exp = 0; dyn_exp = 0;
      for (int n = 0; n < NCYC; n++) begin
        clk = 1'b0;
        if ($urandom_range(0, 1) == 1) begin a = W'($urandom); b = W'($urandom); end
        #5;
        clk = 1'b1;
        #5;
        r = ref_op(op, a, b);
        lsdl_seen += $countones(y ^ prev_y);
        lsdl_exp  += $countones(r ^ prev_ref);
        dyn_exp   += 2 * $countones(~r);
        prev_y = y; prev_ref = r;
      end
      checks++;
      if (lsdl_seen != lsdl_exp) begin
        failures++;
        $display("FAIL %s: LSDL transitions %0d, expected %0d", names[op], lsdl_seen, lsdl_exp);
      end
      checks++;
      if (lsdl_seen >= dyn_exp) begin
        failures++;
        $display("FAIL %s: no reduction (%0d vs %0d)", names[op], lsdl_seen, dyn_exp);
      end
      $display("%-5s output transitions over %0d cycles: LSDL %0d, conventional dynamic %0d (%0d%%)",
               names[op], NCYC, lsdl_seen, dyn_exp, (100 * lsdl_seen) / dyn_exp);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
