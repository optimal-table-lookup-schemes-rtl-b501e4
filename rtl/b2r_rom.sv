// b2r_rom: digit-weight lookup table of the binary-to-residue converters.
//
// Indexed by the pair (u_i, i) of a radix-2^DIGIT_W digit and its position,
// it returns (u_i * R^i) mod MOD with R = 2^DIGIT_W. Summing these values
// modulo MOD over all digits gives the residue of the whole number.
//
// Two uses:
//  * pipelined tree converter: one table per digit position, NUM_POS = 1 and
//    POS_BASE = i, so the digit is the only index (the position input is
//    ignored);
//  * serial converter: one general table for all positions, NUM_POS = n,
//    POS_BASE = 0, indexed by {pos, digit}, NUM_POS * 2^DIGIT_W entries.
// The contents are computed at elaboration.
//
// Interface: digit (DIGIT_W bits), pos (POS_W bits), value (RES_W bits).
// Timing: combinational (an asynchronous-read ROM); callers register it.
module b2r_rom #(
  parameter int unsigned MOD      = 19,
  parameter int unsigned DIGIT_W  = 4,
  parameter int unsigned NUM_POS  = 1,
  parameter int unsigned POS_BASE = 0,
  parameter int unsigned RES_W    = 5,
  localparam int unsigned POS_W   = (NUM_POS > 1) ? $clog2(NUM_POS) : 1
) (
  input  logic [DIGIT_W-1:0] digit,
  input  logic [POS_W-1:0]   pos,
  output logic [RES_W-1:0]   value
);

  localparam int unsigned RADIX = 1 << DIGIT_W;
  localparam int unsigned DEPTH = NUM_POS * RADIX;

  typedef logic [DEPTH-1:0][RES_W-1:0] table_t;

  function automatic table_t build_table();
    table_t t;
    for (int unsigned p = 0; p < NUM_POS; p++) begin
      longint unsigned w = rns_pkg::pow_mod(64'(RADIX), POS_BASE + p, 64'(MOD));
      for (int unsigned d = 0; d < RADIX; d++)
        t[p * RADIX + d] = RES_W'((longint'(d) * w) % MOD);
    end
    return t;
  endfunction

  localparam table_t ROM = build_table();

  logic [POS_W+DIGIT_W-1:0] index;

  always_comb begin
    if (NUM_POS > 1) index = {pos, digit};
    else             index = (POS_W + DIGIT_W)'(digit);
    value = '0;
    if (32'(index) < DEPTH) value = ROM[index];
  end

endmodule
