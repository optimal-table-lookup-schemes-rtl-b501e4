// tb_r2b_group_rom: checks the three default group tables ({2,3,5,7},
// {11,19}, {13,17}). For random numbers u < M the residues u % m_k are
// applied and each table's output is compared with
// (sum over the group of w_k * (u % m_k)) mod M, where the CRT weights w_k
// are found here by direct search (w_k is the multiple of M/m_k that is
// 1 mod m_k). The sum of the three outputs mod M must also give u back.
module tb_r2b_group_rom;
  import rns_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  rns_word_t res;
  logic [2:0][M_W-1:0] part;
  int checks = 0, failures = 0;
  longint unsigned w [NUM_MODULI];

  for (genvar g = 0; g < 3; g++) begin : g_dut
    r2b_group_rom #(.GROUP(g)) dut (.residues(res), .partial(part[g]));
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    res = '0;
    for (int k = 0; k < NUM_MODULI; k++) begin
      longint unsigned b;
      b = RANGE_M / MODULI[k];
      w[k] = 0;
      for (longint unsigned t = 1; t < MODULI[k]; t++)
        if ((b * t) % MODULI[k] == 1) w[k] = b * t;
    end
    for (int n = 0; n < 3000; n++) begin
      longint unsigned v, e[3], tot;
      v = (n == 0) ? RANGE_M - 1 : (n == 1) ? 0 : longint'($urandom) % RANGE_M;
      for (int k = 0; k < NUM_MODULI; k++) res[k] = RES_W'(v % MODULI[k]);
      e = '{0, 0, 0};
      for (int k = 0; k < NUM_MODULI; k++)
        e[GROUP_OF[k]] = (e[GROUP_OF[k]] + w[k] * (v % MODULI[k])) % RANGE_M;
      #1;
      tot = 0;
      for (int g = 0; g < 3; g++) begin
        checks++;
        tot += part[g];
        if (longint'(part[g]) != e[g]) begin
          failures++;
          $display("FAIL u=%0d group %0d got %0d exp %0d", v, g, part[g], e[g]);
        end
      end
      checks++;
      if (tot % RANGE_M != v) begin
        failures++;
        $display("FAIL u=%0d sum mod M = %0d", v, tot % RANGE_M);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
