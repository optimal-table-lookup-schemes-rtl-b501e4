// tb_rns_converter_top: end-to-end test of the conversion unit at its
// default size (moduli {2,3,5,7,11,13,17,19}, 32-bit binary side).
//
// Random numbers u < M go into the pipelined tree converter; its residues
// are fed straight back into the residue-to-binary converter, and the value
// that comes out must be u again (round trip). The same numbers, and also
// numbers of the full 32-bit range, go through the serial converter, whose
// residues must equal u % m_k. The testbench counts each mechanism of the
// design and fails if one never happened:
//   tree_back_to_back  results of the tree converter on consecutive clocks
//   r2b_back_to_back   results of the residue-to-binary converter likewise
//   corr_sub           final reduction needed its corrective subtraction
//   no_corr_sub        final reduction was done by the table lookup alone
//   serial_done        serial conversions finished
//   serial_ignored     start pulses ignored because the serial unit was busy
module tb_rns_converter_top;
  import rns_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        tree_in_valid, tree_out_valid;
  bin_word_t   tree_u;
  rns_word_t   tree_residues;
  logic        serial_start, serial_busy, serial_done;
  bin_word_t   serial_u;
  rns_word_t   serial_residues;
  logic        r2b_out_valid;
  bin_mrange_t r2b_u;

  int checks = 0, failures = 0;
  int tree_b2b = 0, r2b_b2b = 0, corr_sub = 0, no_corr_sub = 0;
  int serial_cnt = 0, serial_ignored = 0;
  logic tree_ov_d = 1'b0, r2b_ov_d = 1'b0;
  bin_word_t tree_q [$];
  bin_word_t r2b_q [$];
  bin_word_t serial_cur;
  logic      serial_feed_done = 1'b0, tree_feed_done = 1'b0;

  rns_converter_top dut (
    .clk(clk), .rst_n(rst_n),
    .tree_in_valid(tree_in_valid), .tree_u(tree_u),
    .tree_out_valid(tree_out_valid), .tree_residues(tree_residues),
    .serial_start(serial_start), .serial_u(serial_u),
    .serial_busy(serial_busy), .serial_done(serial_done),
    .serial_residues(serial_residues),
    // round trip: tree converter output drives the residue-to-binary input
    .r2b_in_valid(tree_out_valid), .r2b_residues(tree_residues),
    .r2b_out_valid(r2b_out_valid), .r2b_u(r2b_u)
  );

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- scoreboards ----
  always @(posedge clk) begin
    if (rst_n) begin
      tree_ov_d <= tree_out_valid;
      r2b_ov_d  <= r2b_out_valid;
      if (tree_out_valid && tree_ov_d) tree_b2b++;
      if (r2b_out_valid && r2b_ov_d)   r2b_b2b++;
      if (dut.u_r2b.u_reduce.mid_valid_q) begin
        if (64'(dut.u_r2b.u_reduce.mid_q) >= RANGE_M) corr_sub++;
        else                                          no_corr_sub++;
      end
      if (tree_out_valid) begin
        bin_word_t v;
        v = tree_q.pop_front();
        r2b_q.push_back(v);
        for (int k = 0; k < NUM_MODULI; k++) begin
          checks++;
          if (32'(tree_residues[k]) != v % MODULI[k]) begin
            failures++;
            $display("FAIL tree u=%0d m=%0d got %0d", v, MODULI[k], tree_residues[k]);
          end
        end
      end
      if (r2b_out_valid) begin
        bin_word_t v;
        v = r2b_q.pop_front();
        checks++;
        if (32'(r2b_u) != v) begin
          failures++;
          $display("FAIL round trip u=%0d got %0d", v, r2b_u);
        end
      end
      if (serial_done) begin
        serial_cnt++;
        for (int k = 0; k < NUM_MODULI; k++) begin
          checks++;
          if (32'(serial_residues[k]) != serial_cur % MODULI[k]) begin
            failures++;
            $display("FAIL serial u=%0d m=%0d got %0d", serial_cur, MODULI[k],
                     serial_residues[k]);
          end
        end
      end
    end
  end

  // ---- tree / round-trip stimulus ----
  initial begin
    tree_in_valid = 1'b0; tree_u = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      tree_in_valid = (n < 500) ? 1'b1 : ($urandom_range(0, 3) != 0);
      case (n)
        0: tree_u = 0;
        1: tree_u = 32'(RANGE_M - 1);
        default: tree_u = 32'(longint'($urandom) % RANGE_M);
      endcase
      if (tree_in_valid) tree_q.push_back(tree_u);
    end
    @(negedge clk);
    tree_in_valid = 1'b0;
    repeat (12) @(posedge clk);
    tree_feed_done = 1'b1;
  end

  // ---- serial stimulus ----
  initial begin
    serial_start = 1'b0; serial_u = '0;
    @(posedge rst_n);
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      while (serial_busy) @(negedge clk);
      serial_cur   = (n % 2 == 0) ? 32'(longint'($urandom) % RANGE_M) : $urandom;
      serial_u     = serial_cur;
      serial_start = 1'b1;
      @(negedge clk);
      serial_u     = $urandom;
      serial_start = 1'b0;
      if (n % 4 == 0) begin
        @(negedge clk);
        checks++;
        if (!serial_busy) begin
          failures++;
          $display("FAIL serial not busy");
        end
        serial_start = 1'b1;            // must be ignored
        serial_ignored++;
        @(negedge clk);
        serial_start = 1'b0;
      end
      while (!serial_done) @(negedge clk);
    end
    @(negedge clk);
    serial_feed_done = 1'b1;
  end

  initial begin
    wait (tree_feed_done && serial_feed_done);
    @(posedge clk);
    checks++;
    if (tree_q.size() != 0 || r2b_q.size() != 0) begin
      failures++;
      $display("FAIL results missing: %0d tree, %0d r2b", tree_q.size(), r2b_q.size());
    end
    checks++;
    if (serial_cnt != 300) begin
      failures++;
      $display("FAIL serial conversions %0d of 300", serial_cnt);
    end
    $display("mechanisms: tree_back_to_back=%0d r2b_back_to_back=%0d corr_sub=%0d no_corr_sub=%0d serial_done=%0d serial_ignored=%0d",
             tree_b2b, r2b_b2b, corr_sub, no_corr_sub, serial_cnt, serial_ignored);
    checks += 6;
    if (tree_b2b == 0)       failures++;
    if (r2b_b2b == 0)        failures++;
    if (corr_sub == 0)       failures++;
    if (no_corr_sub == 0)    failures++;
    if (serial_cnt == 0)     failures++;
    if (serial_ignored == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
