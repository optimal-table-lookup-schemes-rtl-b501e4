// tb_b2r_rom: exhaustive check of the digit-weight tables. One instance is a
// position-specific table (position 5, modulus 17, as in the tree
// converter); the other is a general (digit, position) table for 8 positions
// and modulus 13, as in the serial converter. Expected values are
// (d * 16^i) mod m computed here with 64-bit arithmetic.
module tb_b2r_rom;
  logic [3:0] d_a, d_b;
  logic [2:0] p_b;
  logic [4:0] v_a, v_b;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  b2r_rom #(.MOD(17), .DIGIT_W(4), .NUM_POS(1), .POS_BASE(5), .RES_W(5))
    dut_a (.digit(d_a), .pos(1'b0), .value(v_a));
  b2r_rom #(.MOD(13), .DIGIT_W(4), .NUM_POS(8), .POS_BASE(0), .RES_W(5))
    dut_b (.digit(d_b), .pos(p_b), .value(v_b));

  function automatic longint unsigned ref_val(int d, int i, int m);
    longint unsigned w = 1;
    for (int k = 0; k < i; k++) w = w * 16;   // 16^7 fits in 64 bits
    return (longint'(d) * w) % m;
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d_b = '0; p_b = '0;
    for (int d = 0; d < 16; d++) begin
      d_a = 4'(d);
      #1;
      checks++;
      if (longint'(v_a) != ref_val(d, 5, 17)) begin
        failures++;
        $display("FAIL pos5 m17 d=%0d got %0d", d, v_a);
      end
    end
    for (int p = 0; p < 8; p++)
      for (int d = 0; d < 16; d++) begin
        d_b = 4'(d); p_b = 3'(p);
        #1;
        checks++;
        if (longint'(v_b) != ref_val(d, p, 13)) begin
          failures++;
          $display("FAIL m13 pos=%0d d=%0d got %0d", p, d, v_b);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
