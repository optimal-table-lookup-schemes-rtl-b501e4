// tb_b2r_tree_channel: streams random 32-bit numbers (plus corner values)
// into one tree channel for modulus 19, one per clock, and checks that the
// residue u % 19 appears exactly 4 clocks later. A second instance with
// 5 digits (a non-power-of-two tree with padded leaves, latency 4) and
// modulus 7 is checked on the same stream truncated to 20 bits.
module tb_b2r_tree_channel;
  localparam int LAT = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic [7:0][3:0] digits;
  logic [4:0][3:0] digits5;
  logic [4:0] res, res5;
  int checks = 0, failures = 0;
  logic [31:0] hist [0:LAT];

  b2r_tree_channel #(.MOD(19), .NUM_DIGITS(8), .DIGIT_W(4), .RES_W(5))
    dut (.clk(clk), .rst_n(rst_n), .digits(digits), .residue(res));
  b2r_tree_channel #(.MOD(7), .NUM_DIGITS(5), .DIGIT_W(4), .RES_W(5))
    dut5 (.clk(clk), .rst_n(rst_n), .digits(digits5), .residue(res5));

  assign digits5 = digits[4:0];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    digits = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 2000 + LAT; n++) begin
      logic [31:0] v;
      if (n == 0)      v = 32'hFFFF_FFFF;
      else if (n == 1) v = 32'd0;
      else if (n == 2) v = 32'd19;
      else             v = $urandom;
      @(negedge clk);
      digits = v;
      for (int k = LAT; k > 0; k--) hist[k] = hist[k-1];
      hist[0] = v;
      @(posedge clk);
      #1;
      if (n >= LAT - 1) begin
        checks += 2;
        if (32'(res) != hist[LAT-1] % 19) begin
          failures++;
          $display("FAIL u=%h got %0d exp %0d", hist[LAT-1], res, hist[LAT-1] % 19);
        end
        if (32'(res5) != (hist[LAT-1] & 32'hFFFFF) % 7) begin
          failures++;
          $display("FAIL5 u=%h got %0d", hist[LAT-1] & 32'hFFFFF, res5);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
