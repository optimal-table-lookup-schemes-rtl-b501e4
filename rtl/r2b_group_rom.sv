// r2b_group_rom: high-radix lookup table of the residue-to-binary converter.
//
// By the Chinese remainder theorem u = |sum_k w_k |u|_mk|_M, where the weight
// w_k is the number whose residues are 1 for m_k and 0 for every other
// modulus, and M is the product of all moduli. The moduli are partitioned into
// groups; this table serves one group s_p and looks up all of its residues at
// once, returning the partial result u_p = |sum_{m_k in s_p} w_k |u|_mk|_M.
//
// The group's residues are packed into one table index in mixed radix,
// index = x_a + m_a*(x_b + m_b*(x_c + ...)) over the group's members in
// ascending modulus index, so the table needs only prod(m_k in s_p) entries
// and is addressed as a ROM of 2^ceil(log2 prod) words: the default groups
// {2,3,5,7}, {11,19}, {13,17} use 210, 209 and 221 words of three uniform
// 256-word ROMs. The mixed-radix packing is this design's choice of index;
// the table contents follow the formula above and are computed at
// elaboration.
//
// Interface: residues (all NUM_MOD residues; only the group's are used),
// partial (M_W bits, < M). Residues must be in range (x_k < m_k).
// Timing: combinational; the converter registers its output.
module r2b_group_rom #(
  parameter int unsigned     NUM_MOD = rns_pkg::NUM_MODULI,
  parameter int unsigned     MODULI   [NUM_MOD] = rns_pkg::MODULI,
  parameter int unsigned     GROUP_OF [NUM_MOD] = rns_pkg::GROUP_OF,
  parameter int unsigned     GROUP   = 0,
  parameter int unsigned     RES_W   = rns_pkg::RES_W,
  parameter longint unsigned RANGE_M = rns_pkg::RANGE_M,
  parameter int unsigned     M_W     = rns_pkg::M_W
) (
  input  logic [NUM_MOD-1:0][RES_W-1:0] residues,
  output logic [M_W-1:0]                partial
);

  function automatic longint unsigned group_product();
    longint unsigned p = 1;
    for (int k = 0; k < NUM_MOD; k++)
      if (GROUP_OF[k] == GROUP) p = p * MODULI[k];
    return p;
  endfunction

  function automatic longint unsigned full_product();
    longint unsigned p = 1;
    for (int k = 0; k < NUM_MOD; k++) p = p * MODULI[k];
    return p;
  endfunction

  localparam longint unsigned GPROD = group_product();
  localparam int unsigned     IDX_W = rns_pkg::bits_for(GPROD - 1);
  localparam int unsigned     DEPTH = 1 << IDX_W;

  typedef logic [NUM_MOD-1:0][IDX_W-1:0] coef_t;
  typedef logic [DEPTH-1:0][M_W-1:0]     table_t;

  // Mixed-radix place value of each member's residue (0 for non-members).
  function automatic coef_t build_coef();
    coef_t c;
    longint unsigned place = 1;
    for (int k = 0; k < NUM_MOD; k++) begin
      if (GROUP_OF[k] == GROUP) begin
        c[k]  = IDX_W'(place);
        place = place * MODULI[k];
      end else begin
        c[k] = '0;
      end
    end
    return c;
  endfunction

  function automatic table_t build_table();
    table_t t;
    for (longint unsigned idx = 0; idx < 64'(DEPTH); idx++) begin
      longint unsigned rest = idx;
      longint unsigned acc  = 0;
      for (int k = 0; k < NUM_MOD; k++) begin
        if (GROUP_OF[k] == GROUP) begin
          longint unsigned mk = 64'(MODULI[k]);
          longint unsigned x  = rest % mk;
          longint unsigned bk = RANGE_M / mk;
          longint unsigned wk = (bk * rns_pkg::inv_mod(bk % mk, mk)) % RANGE_M;
          rest = rest / mk;
          acc  = (acc + wk * x) % RANGE_M;
        end
      end
      t[idx] = (idx < GPROD) ? M_W'(acc) : '0;
    end
    return t;
  endfunction

  localparam coef_t  COEF = build_coef();
  localparam table_t ROM  = build_table();

  if (full_product() != RANGE_M) begin : g_bad_range
    $error("r2b_group_rom: RANGE_M must equal the product of MODULI");
  end

  logic [IDX_W-1:0] index;

  always_comb begin
    index = '0;
    for (int k = 0; k < NUM_MOD; k++)
      index = index + IDX_W'(COEF[k] * IDX_W'(residues[k]));
    partial = ROM[index];
  end

endmodule
