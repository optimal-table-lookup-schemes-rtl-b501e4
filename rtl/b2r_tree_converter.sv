// b2r_tree_converter: pipelined binary-to-residue converter with adder trees.
//
// A binary number u, taken as NUM_DIGITS digits of radix 2^DIGIT_W, is
// converted to its residues with respect to NUM_MOD moduli at once. There is
// one row per modulus: NUM_DIGITS position-specific lookup tables
// (r * n tables in all) and a pipelined binary tree of n-1 tabular modulo-m
// adders (b2r_tree_channel). A valid bit travels alongside the data.
//
// Interface: in_valid/u in, out_valid/residues out (residue k at [k], for
// modulus MODULI[k]). No back-pressure: one number may enter every clock.
// Timing: LATENCY = 1 + ceil(log2 NUM_DIGITS) clocks (4 at the defaults).
// The row structure follows the converter array with adder trees; the valid
// bit and the synchronous active-low reset are this design's additions.
module b2r_tree_converter #(
  parameter int unsigned NUM_MOD    = rns_pkg::NUM_MODULI,
  parameter int unsigned MODULI [NUM_MOD] = rns_pkg::MODULI,
  parameter int unsigned NUM_DIGITS = rns_pkg::NUM_DIGITS,
  parameter int unsigned DIGIT_W    = rns_pkg::DIGIT_W,
  parameter int unsigned RES_W      = rns_pkg::RES_W,
  localparam int unsigned LATENCY   = 1 + ((NUM_DIGITS > 1) ? $clog2(NUM_DIGITS) : 0)
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic                              in_valid,
  input  logic [NUM_DIGITS*DIGIT_W-1:0]     u,
  output logic                              out_valid,
  output logic [NUM_MOD-1:0][RES_W-1:0]     residues
);

  logic [NUM_DIGITS-1:0][DIGIT_W-1:0] digits;
  assign digits = u;

  for (genvar k = 0; k < NUM_MOD; k++) begin : g_mod
    b2r_tree_channel #(
      .MOD(MODULI[k]), .NUM_DIGITS(NUM_DIGITS), .DIGIT_W(DIGIT_W), .RES_W(RES_W)
    ) u_chan (
      .clk     (clk),
      .rst_n   (rst_n),
      .digits  (digits),
      .residue (residues[k])
    );
  end

  logic [LATENCY-1:0] valid_q;

  always_ff @(posedge clk) begin
    if (!rst_n) valid_q <= '0;
    else        valid_q <= LATENCY'({valid_q, in_valid});
  end

  assign out_valid = valid_q[LATENCY-1];

endmodule
