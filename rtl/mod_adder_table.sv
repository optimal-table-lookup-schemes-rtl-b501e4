// mod_adder_table: tabular modulo-m adder.
//
// Adds two residues a, b in [0..m-1] with a plain binary adder and then maps
// the raw sum, which lies in [0..2m-2], back into [0..m-1] through a small
// lookup table of 2m-1 entries (entry s holds s mod m). Using a table for the
// modulo step after a normal addition is the scheme described for the modular
// adders of the converters; the table contents are computed at elaboration,
// so any modulus can be chosen with the MOD parameter.
//
// Interface: a, b (RES_W bits each, must be < MOD), sum (RES_W bits).
// Timing: purely combinational; the callers register its output.
module mod_adder_table #(
  parameter int unsigned MOD   = 19,
  parameter int unsigned RES_W = 5
) (
  input  logic [RES_W-1:0] a,
  input  logic [RES_W-1:0] b,
  output logic [RES_W-1:0] sum
);

  localparam int unsigned DEPTH = 2 * MOD - 1;   // raw sums 0 .. 2m-2
  localparam int unsigned RAW_W = RES_W + 1;

  typedef logic [DEPTH-1:0][RES_W-1:0] table_t;

  function automatic table_t build_table();
    table_t t;
    for (int unsigned s = 0; s < DEPTH; s++) t[s] = RES_W'(s % MOD);
    return t;
  endfunction

  localparam table_t MOD_TABLE = build_table();

  logic [RAW_W-1:0] raw;

  always_comb begin
    raw = RAW_W'(a) + RAW_W'(b);
    sum = '0;
    if (32'(raw) < DEPTH) sum = MOD_TABLE[raw];
  end

endmodule
