// rns_converter_top: binary <-> residue number system conversion unit.
//
// Brings together, for one moduli set (default {2,3,5,7,11,13,17,19},
// M = 9,699,690), the three converters of the scheme, each with its own
// ports and sharing only clock and reset:
//  * tree_*   : pipelined binary-to-residue converter with adder trees
//               (b2r_tree_converter), one 32-bit number per clock,
//               latency 4;
//  * serial_* : lower-complexity binary-to-residue converter
//               (b2r_serial_converter), one digit per clock, done 9 clocks
//               after start;
//  * r2b_*    : high-radix residue-to-binary converter (r2b_converter),
//               groups {2,3,5,7}, {11,19}, {13,17}, one conversion per clock,
//               latency 4.
// The RNS arithmetic that would sit between the converters is outside this
// design, so the converters are not chained inside it; a user feeds the
// residues produced by either binary-to-residue converter (for u < M) into
// the residue-to-binary converter to get u back.
//
// Reset: rst_n, synchronous, active low.
module rns_converter_top
  import rns_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // pipelined tree binary-to-residue converter
  input  logic        tree_in_valid,
  input  bin_word_t   tree_u,
  output logic        tree_out_valid,
  output rns_word_t   tree_residues,
  // serial binary-to-residue converter
  input  logic        serial_start,
  input  bin_word_t   serial_u,
  output logic        serial_busy,
  output logic        serial_done,
  output rns_word_t   serial_residues,
  // residue-to-binary converter
  input  logic        r2b_in_valid,
  input  rns_word_t   r2b_residues,
  output logic        r2b_out_valid,
  output bin_mrange_t r2b_u
);

  b2r_tree_converter u_tree (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (tree_in_valid),
    .u         (tree_u),
    .out_valid (tree_out_valid),
    .residues  (tree_residues)
  );

  b2r_serial_converter u_serial (
    .clk      (clk),
    .rst_n    (rst_n),
    .start    (serial_start),
    .u        (serial_u),
    .busy     (serial_busy),
    .done     (serial_done),
    .residues (serial_residues)
  );

  r2b_converter u_r2b (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (r2b_in_valid),
    .residues  (r2b_residues),
    .out_valid (r2b_out_valid),
    .u         (r2b_u)
  );

endmodule
