// tb_instruction_unit: self-checking test of the instruction register.
// Checks reset to zero, capture on load, hold without load, and the split
// of the 8-bit instruction into op-code (upper nibble) and register select
// (lower nibble), e.g. 8'b0001_0000 gives op-code 1 and register select 0.
module tb_instruction_unit;
  logic clk = 1'b0, rst_n, load;
  logic [7:0] instr;
  logic [3:0] opcode, regsel;
  int checks = 0, failures = 0;
  logic [7:0] model;

  instruction_unit dut (.clk, .rst_n, .load, .instr, .opcode, .regsel);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; load = 1'b0; instr = 8'hFF;
    repeat (2) @(posedge clk);
    #1;
    checks++; if ({opcode, regsel} !== 8'h00) begin failures++; $display("FAIL reset"); end
    rst_n = 1'b1;
    model = 8'h00;
    instr = 8'b0001_0000; load = 1'b1;
    @(posedge clk); #1;
    model = 8'b0001_0000;
    checks++; if (opcode !== 4'b0001 || regsel !== 4'b0000) begin failures++; $display("FAIL example"); end
    for (int n = 0; n < 2000; n++) begin
      instr = 8'($urandom);
      load  = 1'($urandom);
      @(posedge clk);
      if (load) model = instr;
      #1;
      checks++;
      if ({opcode, regsel} !== model) begin
        failures++;
        if (failures < 10) $display("FAIL got %h expected %h", {opcode, regsel}, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
