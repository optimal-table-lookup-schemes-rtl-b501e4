// tb_r2b_converter: streams random numbers u < M, as their residues, through
// two residue-to-binary converters and checks that u comes back, with the
// output valid exactly 4 clocks after the input and one result per clock
// during back-to-back input.
//  * dut_hr  : default high-radix configuration, groups {2,3,5,7}, {11,19},
//              {13,17} (three tables, three summands);
//  * dut_one : the basic scheme with one table per modulus (eight summands).
//  * dut_alt : a different set, moduli {7,11,13,15,16} (M = 240,240) in the
//              groups {7,16}, {11,13}, {15}, fed with v mod 240,240.
// Corner values 0, 1, M-1 and the weights themselves are included.
module tb_r2b_converter;
  import rns_pkg::*;
  localparam int LAT = 4;
  localparam int unsigned ONE_EACH [NUM_MODULI] = '{0, 1, 2, 3, 4, 5, 6, 7};
  localparam int unsigned ALT_MOD [5] = '{7, 11, 13, 15, 16};
  localparam int unsigned ALT_GRP [5] = '{0, 1, 1, 2, 0};
  localparam longint unsigned ALT_M = 240240;
  logic [4:0][4:0] res_alt;
  logic [17:0]     u_alt;
  logic            ov_alt;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic           in_valid, ov_hr, ov_one;
  rns_word_t      res;
  logic [M_W-1:0] u_hr, u_one;
  int checks = 0, failures = 0;
  int cycle = 0;
  longint unsigned q_val [$];
  int              q_cyc [$];
  int n_in = 0, n_out = 0;

  r2b_converter dut_hr (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .residues(res),
    .out_valid(ov_hr), .u(u_hr));

  r2b_converter #(.NUM_GROUPS(NUM_MODULI), .GROUP_OF(ONE_EACH)) dut_one (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .residues(res),
    .out_valid(ov_one), .u(u_one));

  r2b_converter #(.NUM_MOD(5), .MODULI(ALT_MOD), .NUM_GROUPS(3), .GROUP_OF(ALT_GRP),
                  .RES_W(5), .RANGE_M(ALT_M), .M_W(18)) dut_alt (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .residues(res_alt),
    .out_valid(ov_alt), .u(u_alt));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) cycle <= cycle + 1;

  always @(posedge clk) begin
    if (rst_n) begin
      if (ov_hr != ov_one || ov_hr != ov_alt) begin
        failures++;
        $display("FAIL valid mismatch");
      end
      if (ov_hr) begin
        longint unsigned v;
        int c;
        n_out++;
        if (q_val.size() == 0) begin
          failures++;
          $display("FAIL output without input");
        end else begin
          v = q_val.pop_front();
          c = q_cyc.pop_front();
          checks += 4;
          if (longint'(u_alt) != v % ALT_M) begin
            failures++;
            $display("FAIL alternate set u=%0d got %0d", v % ALT_M, u_alt);
          end
          if (cycle - c != LAT) begin
            failures++;
            $display("FAIL latency %0d", cycle - c);
          end
          if (longint'(u_hr) != v) begin
            failures++;
            $display("FAIL high-radix u=%0d got %0d", v, u_hr);
          end
          if (longint'(u_one) != v) begin
            failures++;
            $display("FAIL one-per-modulus u=%0d got %0d", v, u_one);
          end
        end
      end
    end
  end

  initial begin
    in_valid = 1'b0; res = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 4000; n++) begin
      longint unsigned v;
      @(negedge clk);
      in_valid = (n < 1000) ? 1'b1 : ($urandom_range(0, 2) != 0);
      case (n)
        0: v = 0;
        1: v = 1;
        2: v = RANGE_M - 1;
        3: v = RANGE_M / 2;                // weight of modulus 2
        default: v = longint'($urandom) % RANGE_M;
      endcase
      for (int k = 0; k < NUM_MODULI; k++) res[k] = RES_W'(v % MODULI[k]);
      for (int k = 0; k < 5; k++) res_alt[k] = 5'((v % ALT_M) % ALT_MOD[k]);
      if (in_valid) begin
        q_val.push_back(v);
        q_cyc.push_back(cycle);
        n_in++;
      end
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (LAT + 2) @(posedge clk);
    checks++;
    if (n_in != n_out || q_val.size() != 0) begin
      failures++;
      $display("FAIL %0d in, %0d out", n_in, n_out);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
