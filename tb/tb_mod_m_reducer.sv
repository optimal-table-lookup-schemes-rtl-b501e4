// tb_mod_m_reducer: streams values through the modulo-M reducer, one per
// clock, and checks y = x mod M two clocks later. Instance A uses the
// default M = 9,699,690 with a 25-bit input (three partial results, input up
// to 3(M-1)); instance B uses the same M with a 29-bit input (sixteen
// partial results, input up to 16(M-1)), the case whose index is five bits
// wide. Inputs are random over the whole reachable range, plus the values
// right at multiples of M and the maximum.
module tb_mod_m_reducer;
  import rns_pkg::*;
  localparam int LAT = 2;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic            vin, vout_a, vout_b;
  logic [24:0]     xa;
  logic [28:0]     xb;
  logic [M_W-1:0]  ya, yb;
  int checks = 0, failures = 0;
  longint unsigned ha [0:LAT], hb [0:LAT];
  logic            hv [0:LAT];

  mod_m_reducer #(.M(RANGE_M), .IN_W(25), .OUT_W(M_W)) dut_a (
    .clk(clk), .rst_n(rst_n), .in_valid(vin), .x(xa), .out_valid(vout_a), .y(ya));
  mod_m_reducer #(.M(RANGE_M), .IN_W(29), .OUT_W(M_W)) dut_b (
    .clk(clk), .rst_n(rst_n), .in_valid(vin), .x(xb), .out_valid(vout_b), .y(yb));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint unsigned pick(int n, longint unsigned l);
    longint unsigned top = l * (RANGE_M - 1);
    longint unsigned r = {$urandom, $urandom};
    case (n % 8)
      0: return (r % l) * RANGE_M;                 // exact multiple
      1: return ((r % l) + 1) * RANGE_M - 1;       // just below a multiple
      2: return top;
      default: return r % (top + 1);
    endcase
  endfunction

  initial begin
    vin = 1'b0; xa = '0; xb = '0;
    for (int k = 0; k <= LAT; k++) hv[k] = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      vin = ($urandom_range(0, 3) != 0);
      xa  = 25'(pick(n, 3));
      xb  = 29'(pick(n + 3, 16));
      for (int k = LAT; k > 0; k--) begin
        ha[k] = ha[k-1]; hb[k] = hb[k-1]; hv[k] = hv[k-1];
      end
      ha[0] = xa; hb[0] = xb; hv[0] = vin;
      @(posedge clk);
      #1;
      checks++;
      if (vout_a != hv[LAT-1] || vout_b != hv[LAT-1]) begin
        failures++;
        $display("FAIL valid timing");
      end
      if (n >= LAT - 1 && hv[LAT-1]) begin
        checks += 2;
        if (longint'(ya) != ha[LAT-1] % RANGE_M) begin
          failures++;
          $display("FAIL A x=%0d got %0d", ha[LAT-1], ya);
        end
        if (longint'(yb) != hb[LAT-1] % RANGE_M) begin
          failures++;
          $display("FAIL B x=%0d got %0d", hb[LAT-1], yb);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
