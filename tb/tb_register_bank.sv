// tb_register_bank: self-checking test of the operand register pairs.
// Random loads through the one-hot select and load strobe are mirrored in
// a model; the selected pair's outputs are compared with it every cycle.
// A select line without load must not change the pair, and no select line
// must give zero outputs.
module tb_register_bank;
  localparam int W = 8, NP = 16;
  logic clk = 1'b0, rst_n, load;
  logic [NP-1:0] sel;
  logic [W-1:0] din_a, din_b, qa, qb;
  logic [W-1:0] ma [NP];
  logic [W-1:0] mb [NP];
  int checks = 0, failures = 0;
  int loads = 0;

  register_bank #(.WIDTH(W), .NPAIRS(NP)) dut (.clk, .rst_n, .sel, .load, .din_a, .din_b, .qa, .qb);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; load = 1'b0; sel = '0; din_a = '0; din_b = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < NP; k++) begin ma[k] = '0; mb[k] = '0; end
    for (int n = 0; n < 4000; n++) begin
      int k;
      k = int'($urandom_range(0, NP));       // NP means no line
      sel   = (k < NP) ? NP'(1) << k : '0;
      load  = 1'($urandom);
      din_a = W'($urandom);
      din_b = W'($urandom);
      @(posedge clk);
      if (load && k < NP) begin ma[k] = din_a; mb[k] = din_b; loads++; end
      #1;
      checks++;
      if (k < NP) begin
        if (qa !== ma[k] || qb !== mb[k]) begin
          failures++;
          if (failures < 10) $display("FAIL pair %0d qa=%h qb=%h exp %h %h", k, qa, qb, ma[k], mb[k]);
        end
      end else if (qa !== '0 || qb !== '0) begin
        failures++;
        $display("FAIL no select but qa=%h qb=%h", qa, qb);
      end
    end
    checks++;
    if (loads < 100) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
