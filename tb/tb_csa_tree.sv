// tb_csa_tree: checks the carry-save tree for 3 operands (the default
// partition), 8 operands (one per modulus) and 5 operands (padded tree) on
// random words: sum_out + carry_out must equal the plain sum of the operands
// modulo 2^W.
module tb_csa_tree;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic [2:0][24:0] ops3;
  logic [7:0][26:0] ops8;
  logic [4:0][15:0] ops5;
  logic [24:0] s3, c3;
  logic [26:0] s8, c8;
  logic [15:0] s5, c5;
  int checks = 0, failures = 0;

  csa_tree #(.N(3), .W(25)) dut3 (.ops(ops3), .sum_out(s3), .carry_out(c3));
  csa_tree #(.N(8), .W(27)) dut8 (.ops(ops8), .sum_out(s8), .carry_out(c8));
  csa_tree #(.N(5), .W(16)) dut5 (.ops(ops5), .sum_out(s5), .carry_out(c5));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 3000; n++) begin
      logic [24:0] e3;
      logic [26:0] e8;
      logic [15:0] e5;
      e3 = '0; e8 = '0; e5 = '0;
      for (int j = 0; j < 3; j++) begin
        ops3[j] = (n == 0) ? '1 : 25'($urandom);
        e3 += ops3[j];
      end
      for (int j = 0; j < 8; j++) begin
        ops8[j] = (n == 0) ? '1 : 27'($urandom);
        e8 += ops8[j];
      end
      for (int j = 0; j < 5; j++) begin
        ops5[j] = (n == 0) ? '1 : 16'($urandom);
        e5 += ops5[j];
      end
      #1;
      checks += 3;
      if (25'(s3 + c3) != e3) begin failures++; $display("FAIL N=3"); end
      if (27'(s8 + c8) != e8) begin failures++; $display("FAIL N=8"); end
      if (16'(s5 + c5) != e5) begin failures++; $display("FAIL N=5"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
