// tb_b2r_serial_channel: drives one serial channel (modulus 17, 8 radix-16
// digits) by hand, one digit per clock from u_0 to u_7 with 'first' on the
// first digit, and checks the accumulator after the last digit against
// u % 17. Conversions run back to back, so 'first' must discard the previous
// result. Idle clocks with step low are inserted to check the accumulator
// holds.
module tb_b2r_serial_channel;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic       step, first;
  logic [3:0] digit;
  logic [2:0] pos;
  logic [4:0] acc;
  int checks = 0, failures = 0;

  b2r_serial_channel #(.MOD(17), .NUM_DIGITS(8), .DIGIT_W(4), .RES_W(5))
    dut (.clk(clk), .rst_n(rst_n), .step(step), .first(first),
         .digit(digit), .pos(pos), .acc(acc));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    step = 1'b0; first = 1'b0; digit = '0; pos = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 1000; n++) begin
      logic [31:0] v;
      v = (n == 0) ? 32'hFFFF_FFFF : (n == 1) ? 32'd0 : $urandom;
      for (int i = 0; i < 8; i++) begin
        @(negedge clk);
        step  = 1'b1;
        first = (i == 0);
        digit = v[4*i +: 4];
        pos   = 3'(i);
      end
      @(negedge clk);
      step = 1'b0;
      checks++;
      if (32'(acc) != v % 17) begin
        failures++;
        $display("FAIL u=%h got %0d exp %0d", v, acc, v % 17);
      end
      if (n % 7 == 0) begin
        digit = 4'hF;
        repeat (2) @(negedge clk);
        checks++;
        if (32'(acc) != v % 17) begin
          failures++;
          $display("FAIL hold u=%h got %0d", v, acc);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
