// tb_mod_adder_table: exhaustive check of the tabular modulo-m adder for
// two moduli (19, the largest default modulus, and 2, the smallest). Every
// pair a, b in [0..m-1] is applied and the output compared with (a+b) % m.
module tb_mod_adder_table;
  logic [4:0] a19, b19, s19;
  logic [4:0] a2, b2, s2;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  mod_adder_table #(.MOD(19), .RES_W(5)) dut19 (.a(a19), .b(b19), .sum(s19));
  mod_adder_table #(.MOD(2),  .RES_W(5)) dut2  (.a(a2),  .b(b2),  .sum(s2));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a2 = '0; b2 = '0;
    for (int i = 0; i < 19; i++)
      for (int j = 0; j < 19; j++) begin
        a19 = 5'(i); b19 = 5'(j);
        #1;
        checks++;
        if (int'(s19) != (i + j) % 19) begin
          failures++;
          $display("FAIL m=19 %0d+%0d -> %0d", i, j, s19);
        end
      end
    for (int i = 0; i < 2; i++)
      for (int j = 0; j < 2; j++) begin
        a2 = 5'(i); b2 = 5'(j);
        #1;
        checks++;
        if (int'(s2) != (i + j) % 2) begin
          failures++;
          $display("FAIL m=2 %0d+%0d -> %0d", i, j, s2);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
