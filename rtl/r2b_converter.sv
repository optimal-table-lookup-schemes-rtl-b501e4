// r2b_converter: high-radix residue-to-binary converter.
//
// Converts the NUM_MOD residues of u back to its binary value
// u in [0 .. M-1], M = product of the moduli, in three steps:
//  1. Table lookup. The moduli are partitioned into NUM_GROUPS groups
//     (GROUP_OF gives the group of each modulus). One table per group takes
//     all of that group's residues at once and returns the partial result
//     u_p = |sum w_k |u|_mk|_M over the group (r2b_group_rom). With one
//     modulus per group this is the basic one-table-per-residue scheme;
//     grouping balances the table sizes and cuts the number of summands from
//     r to l.
//  2. Summation. A tree of l-1 carry-save adders (csa_tree) and one
//     carry-propagate adder form u_s = sum u_p, u_s in [0 .. l(M-1)].
//  3. Reduction. u = u_s mod M with one table lookup of a multiple of M
//     indexed by the top bits of u_s, one subtraction and at most one
//     corrective subtraction (mod_m_reducer).
//
// Interface: in_valid, residues (residue k, for MODULI[k], at [k]) in;
// out_valid, u (M_W bits) out. Residues must be in range.
// Timing: fully pipelined, one conversion per clock, latency 4: table output
// register, summation register, then the reducer's two stages. The register
// placement, the valid bit and the synchronous active-low reset are this
// design's choices. RANGE_M and M_W must match MODULI; a mismatch stops
// elaboration.
module r2b_converter #(
  parameter int unsigned     NUM_MOD    = rns_pkg::NUM_MODULI,
  parameter int unsigned     MODULI   [NUM_MOD] = rns_pkg::MODULI,
  parameter int unsigned     NUM_GROUPS = rns_pkg::NUM_GROUPS,
  parameter int unsigned     GROUP_OF [NUM_MOD] = rns_pkg::GROUP_OF,
  parameter int unsigned     RES_W      = rns_pkg::RES_W,
  parameter longint unsigned RANGE_M    = rns_pkg::RANGE_M,
  parameter int unsigned     M_W        = rns_pkg::M_W,
  localparam int unsigned    LATENCY    = 4
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          in_valid,
  input  logic [NUM_MOD-1:0][RES_W-1:0] residues,
  output logic                          out_valid,
  output logic [M_W-1:0]                u
);

  // Width of u_s, which can reach NUM_GROUPS * (M - 1).
  localparam int unsigned S_W = rns_pkg::bits_for(NUM_GROUPS * (RANGE_M - 1));

  // ---- step 1: one table per group ----
  logic [NUM_GROUPS-1:0][M_W-1:0] partial;
  logic [NUM_GROUPS-1:0][S_W-1:0] partial_q;
  logic                           valid1_q;

  for (genvar g = 0; g < NUM_GROUPS; g++) begin : g_group
    r2b_group_rom #(
      .NUM_MOD(NUM_MOD), .MODULI(MODULI), .GROUP_OF(GROUP_OF), .GROUP(g),
      .RES_W(RES_W), .RANGE_M(RANGE_M), .M_W(M_W)
    ) u_rom (
      .residues (residues),
      .partial  (partial[g])
    );
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      partial_q <= '0;
      valid1_q  <= 1'b0;
    end else begin
      for (int g = 0; g < NUM_GROUPS; g++) partial_q[g] <= S_W'(partial[g]);
      valid1_q <= in_valid;
    end
  end

  // ---- step 2: carry-save tree and final carry-propagate addition ----
  logic [S_W-1:0] cs_sum, cs_carry;
  logic [S_W-1:0] us_q;
  logic           valid2_q;

  csa_tree #(.N(NUM_GROUPS), .W(S_W)) u_tree (
    .ops       (partial_q),
    .sum_out   (cs_sum),
    .carry_out (cs_carry)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      us_q     <= '0;
      valid2_q <= 1'b0;
    end else begin
      us_q     <= cs_sum + cs_carry;
      valid2_q <= valid1_q;
    end
  end

  // ---- step 3: modulo-M reduction ----
  mod_m_reducer #(.M(RANGE_M), .IN_W(S_W), .OUT_W(M_W)) u_reduce (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (valid2_q),
    .x         (us_q),
    .out_valid (out_valid),
    .y         (u)
  );

endmodule
