// rns_pkg: shared constants, types and elaboration-time arithmetic for the
// binary <-> residue number system (RNS) converters.
//
// The default moduli set {2,3,5,7,11,13,17,19} and its partition into the
// groups {2,3,5,7}, {11,19}, {13,17} are the worked example of the high-radix
// residue-to-binary scheme. Their product M = 9,699,690 needs 24 bits. The
// binary side uses radix 16 (4-bit digits) and 8 digits (32-bit input); the
// 8 digits follow the figures of the converter arrays, the radix is this
// design's choice, the largest radix at which the table-size/adder-count
// trade-off is still shown to improve.
//
// The functions below only run during elaboration, to fill lookup tables.
package rns_pkg;

  // ---- moduli set (index k holds modulus m_(k+1)) ----
  localparam int unsigned NUM_MODULI = 8;
  localparam int unsigned MODULI [NUM_MODULI] = '{2, 3, 5, 7, 11, 13, 17, 19};

  // Partition used by the residue-to-binary converter: group number of each
  // modulus. {2,3,5,7} -> 0, {11,19} -> 1, {13,17} -> 2.
  localparam int unsigned NUM_GROUPS = 3;
  localparam int unsigned GROUP_OF [NUM_MODULI] = '{0, 0, 0, 0, 1, 2, 2, 1};

  // ---- positional side ----
  localparam int unsigned DIGIT_W    = 4;   // radix R' = 2^4 = 16
  localparam int unsigned NUM_DIGITS = 8;   // u_7 .. u_0
  localparam int unsigned BIN_W      = DIGIT_W * NUM_DIGITS;

  // Width of one residue field; wide enough for the largest default modulus.
  localparam int unsigned RES_W = 5;

  // Dynamic range M of the default moduli set and its width.
  localparam longint unsigned RANGE_M = 64'd9699690;
  localparam int unsigned     M_W     = 24;

  typedef logic [RES_W-1:0]       residue_t;
  typedef residue_t [NUM_MODULI-1:0] rns_word_t;
  typedef logic [BIN_W-1:0]       bin_word_t;
  typedef logic [M_W-1:0]         bin_mrange_t;

  // (base ** exp) mod m, by repeated multiplication.
  function automatic longint unsigned pow_mod(longint unsigned base,
                                              int unsigned exp,
                                              longint unsigned m);
    longint unsigned r = 64'd1 % m;
    for (int unsigned i = 0; i < exp; i++) r = (r * (base % m)) % m;
    return r;
  endfunction

  // Multiplicative inverse of a mod m (m small), by search; 0 if none.
  function automatic longint unsigned inv_mod(longint unsigned a,
                                              longint unsigned m);
    for (longint unsigned x = 0; x < m; x++)
      if (((a % m) * x) % m == 64'd1 % m) return x;
    return 0;
  endfunction

  // Number of bits needed to hold values 0 .. v.
  function automatic int unsigned bits_for(longint unsigned v);
    int unsigned b = 1;
    while (b < 63 && (v >> b) != 0) b++;
    return b;
  endfunction

endpackage
