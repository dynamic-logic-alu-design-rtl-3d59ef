// tb_logic_unit: self-checking test of the LSDL logic unit.
//
// The LSDL clock runs with 5-unit phases. Operands and the one-hot enable
// change at the start of precharge; the result is checked at the end of
// the following evaluate phase and again in the middle of the next
// precharge, after the operands have moved on, where it must still hold.
// All seven operations are checked exhaustively over 8-bit operands, and
// with no operation enabled the output must be zero.
module tb_logic_unit;
  localparam int W = 8;

  logic clk = 1'b0;
  logic [W-1:0] a, b, y;
  logic [6:0] en;
  int checks = 0, failures = 0;

  logic_unit #(.WIDTH(W)) dut (.clk, .a, .b, .en, .y);

  initial begin : watchdog
    #20000000;
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
      6: return ~(x ^ z);
      default: return '0;
    endcase
  endfunction

  logic [W-1:0] held;

  // apply in precharge, check after evaluate and in the next precharge
  task automatic run(input int op, input logic [W-1:0] x, input logic [W-1:0] z);
    logic [W-1:0] exp;
    exp = (op < 7) ? ref_op(op, x, z) : '0;
    clk = 1'b0;
    a = x; b = z; en = (op < 7) ? 7'(1 << op) : 7'd0;
    #5;
    clk = 1'b1;
    #5;
    checks++;
    if (y !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL op=%0d a=%h b=%h y=%h exp=%h", op, x, z, y, exp);
    end
    held = y;
    // next precharge with different operands: result must hold
    clk = 1'b0;
    a = ~x; b = z + 8'd1;
    #3;
    checks++;
    if (y !== held) begin
      failures++;
      if (failures < 20) $display("FAIL hold op=%0d y=%h held=%h", op, y, held);
    end
    #2;
    clk = 1'b1;  // evaluate the disturbed operands; next run re-precharges
    #5;
  endtask

  initial begin
    a = '0; b = '0; en = '0;
    for (int op = 0; op < 7; op++)
      for (int i = 0; i < 256; i++)
        for (int j = 0; j < 256; j += 1)
          run(op, W'(i), W'(j));
    for (int i = 0; i < 64; i++) run(7, W'($urandom), W'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
