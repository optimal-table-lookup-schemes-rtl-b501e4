// tb_b2r_tree_converter: streams numbers through the pipelined tree
// binary-to-residue converter at its default size (8 moduli, 8 radix-16
// digits), with gaps in in_valid, and checks every output against u % m_k.
// It also checks the latency (out_valid exactly 4 clocks after in_valid),
// the throughput (one result per clock during back-to-back input) and that
// no result appears without an input. A second instance with moduli
// {15,16,29,31} and 6 digits (24-bit input, a padded adder tree, same
// latency) is checked on the low 24 bits of the same numbers.
module tb_b2r_tree_converter;
  import rns_pkg::*;
  localparam int LAT = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic        in_valid, out_valid;
  logic [31:0] u;
  rns_word_t   res;
  int checks = 0, failures = 0;
  int cycle = 0;
  logic [31:0] q_val [$];
  int          q_cyc [$];
  int unsigned n_out = 0, n_in = 0;
  localparam int unsigned ALT_MOD [4] = '{15, 16, 29, 31};
  logic            ov_alt;
  logic [3:0][4:0] res_alt;

  b2r_tree_converter dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .u(u),
    .out_valid(out_valid), .residues(res)
  );

  b2r_tree_converter #(.NUM_MOD(4), .MODULI(ALT_MOD), .NUM_DIGITS(6), .DIGIT_W(4),
                       .RES_W(5)) dut_alt (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .u(u[23:0]),
    .out_valid(ov_alt), .residues(res_alt)
  );

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) cycle <= cycle + 1;

  // Scoreboard: compare every output with the oldest outstanding input.
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      logic [31:0] v;
      int c;
      n_out++;
      if (q_val.size() == 0) begin
        failures++;
        $display("FAIL: output without input");
      end else begin
        v = q_val.pop_front();
        c = q_cyc.pop_front();
        checks++;
        if (cycle - c != LAT) begin
          failures++;
          $display("FAIL latency %0d", cycle - c);
        end
        checks++;
        if (!ov_alt) begin
          failures++;
          $display("FAIL alternate valid");
        end
        for (int k = 0; k < 4; k++) begin
          checks++;
          if (32'(res_alt[k]) != (v & 32'hFF_FFFF) % ALT_MOD[k]) begin
            failures++;
            $display("FAIL alt u=%h m=%0d got %0d", v & 32'hFF_FFFF, ALT_MOD[k], res_alt[k]);
          end
        end
        for (int k = 0; k < NUM_MODULI; k++) begin
          checks++;
          if (32'(res[k]) != v % MODULI[k]) begin
            failures++;
            $display("FAIL u=%h m=%0d got %0d", v, MODULI[k], res[k]);
          end
        end
      end
    end
  end

  initial begin
    in_valid = 1'b0; u = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      in_valid = (n < 1000) ? 1'b1 : ($urandom_range(0, 2) != 0);
      u = (n == 0) ? 32'hFFFF_FFFF : (n == 1) ? 32'd9699690 : $urandom;
      if (in_valid) begin
        q_val.push_back(u);
        q_cyc.push_back(cycle);
        n_in++;
      end
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (LAT + 2) @(posedge clk);
    checks++;
    if (n_out != n_in || q_val.size() != 0) begin
      failures++;
      $display("FAIL: %0d inputs, %0d outputs", n_in, n_out);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
