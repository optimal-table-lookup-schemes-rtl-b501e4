// tb_b2r_serial_converter: runs conversions through the serial
// binary-to-residue converter at its default size (8 moduli, 8 radix-16
// digits). For each number it checks every residue against u % m_k, that
// done comes exactly NUM_DIGITS + 1 = 9 clocks after the start clock, that
// busy is high in between, that done is a single-clock pulse and that a start
// pulse given while busy is ignored.
module tb_b2r_serial_converter;
  import rns_pkg::*;
  localparam int LAT = NUM_DIGITS + 1;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic        start, busy, done;
  logic [31:0] u;
  rns_word_t   res;
  int checks = 0, failures = 0;
  int ignored_starts = 0;

  b2r_serial_converter dut (
    .clk(clk), .rst_n(rst_n), .start(start), .u(u),
    .busy(busy), .done(done), .residues(res)
  );

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start = 1'b0; u = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 1000; n++) begin
      logic [31:0] v;
      int wait_cyc;
      v = (n == 0) ? 32'hFFFF_FFFF : (n == 1) ? 32'd0 : $urandom;
      @(negedge clk);
      checks++;
      if (busy) begin
        failures++;
        $display("FAIL busy before start");
      end
      start = 1'b1; u = v;
      @(negedge clk);
      start = 1'b0; u = $urandom;
      wait_cyc = 1;
      while (!done && wait_cyc < 50) begin
        checks++;
        if (!busy) begin
          failures++;
          $display("FAIL busy low during conversion");
        end
        // A second start while busy, with a different number, must be ignored.
        if (wait_cyc == 3 && n % 5 == 0) begin
          start = 1'b1;
          ignored_starts++;
        end else begin
          start = 1'b0;
        end
        @(negedge clk);
        wait_cyc++;
      end
      start = 1'b0;
      checks++;
      if (wait_cyc != LAT) begin
        failures++;
        $display("FAIL latency %0d expected %0d", wait_cyc, LAT);
      end
      for (int k = 0; k < NUM_MODULI; k++) begin
        checks++;
        if (32'(res[k]) != v % MODULI[k]) begin
          failures++;
          $display("FAIL u=%h m=%0d got %0d", v, MODULI[k], res[k]);
        end
      end
      @(negedge clk);
      checks++;
      if (done) begin
        failures++;
        $display("FAIL done longer than one clock");
      end
      for (int k = 0; k < NUM_MODULI; k++) begin
        checks++;
        if (32'(res[k]) != v % MODULI[k]) begin
          failures++;
          $display("FAIL result not held");
        end
      end
    end
    checks++;
    if (ignored_starts == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
