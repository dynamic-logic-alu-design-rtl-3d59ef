// tb_decoder: self-checking test of the one-hot decoder at M = 4 (the
// ALU's decoders a and b) and M = 3. Every code is applied with the
// enable high and low; exactly line[code] must be high, or no line when
// disabled. Also checks the worked examples: 0001 raises line 1 (the
// second line) and 0000 raises line 0 (the first line).
module tb_decoder;
  logic [3:0]  code4;
  logic [15:0] line4;
  logic [2:0]  code3;
  logic [7:0]  line3;
  logic        en;
  int checks = 0, failures = 0;

  decoder #(.M(4)) u4 (.code(code4), .en(en), .line(line4));
  decoder #(.M(3)) u3 (.code(code3), .en(en), .line(line3));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = 0; e < 2; e++) begin
      en = e[0];
      for (int c = 0; c < 16; c++) begin
        code4 = 4'(c); code3 = 3'(c);
        #1;
        checks++;
        if (line4 !== (e ? 16'(1 << c) : 16'd0)) begin
          failures++; $display("FAIL M=4 en=%0d code=%0d line=%b", e, c, line4);
        end
        checks++;
        if (line3 !== (e ? 8'(1 << (c % 8)) : 8'd0)) begin
          failures++; $display("FAIL M=3 en=%0d code=%0d line=%b", e, c, line3);
        end
      end
    end
    en = 1'b1; code4 = 4'b0001; #1;
    checks++; if (line4 !== 16'b10) failures++;
    code4 = 4'b0000; #1;
    checks++; if (line4 !== 16'b1) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
