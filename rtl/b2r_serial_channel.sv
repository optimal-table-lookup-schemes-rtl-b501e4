// b2r_serial_channel: one modulus of the lower-complexity (serial)
// binary-to-residue converter.
//
// Instead of one table per digit position, a single general table indexed by
// (u_i, i) returns |u_i R^i|_m for every position, and one tabular modulo-m
// adder sums the looked-up values into an accumulator whose output is fed back
// to the adder. After the n digits of a number have been presented one per
// clock, the accumulator holds |u|_m. Table size: n * 2^DIGIT_W entries.
//
// Interface: step (a digit is presented this clock), first (it is the first
// digit of a new number: the accumulator restarts from zero instead of adding
// to its old value), digit, pos (digit position i), acc (running residue).
// Timing: acc is updated on the clock edge that ends a step cycle; one digit
// per clock. The step/first controls are this design's own.
module b2r_serial_channel #(
  parameter int unsigned MOD        = 19,
  parameter int unsigned NUM_DIGITS = 8,
  parameter int unsigned DIGIT_W    = 4,
  parameter int unsigned RES_W      = 5,
  localparam int unsigned POS_W     = (NUM_DIGITS > 1) ? $clog2(NUM_DIGITS) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               step,
  input  logic               first,
  input  logic [DIGIT_W-1:0] digit,
  input  logic [POS_W-1:0]   pos,
  output logic [RES_W-1:0]   acc
);

  logic [RES_W-1:0] term;
  logic [RES_W-1:0] addend;
  logic [RES_W-1:0] sum;

  b2r_rom #(
    .MOD(MOD), .DIGIT_W(DIGIT_W), .NUM_POS(NUM_DIGITS), .POS_BASE(0), .RES_W(RES_W)
  ) u_rom (
    .digit (digit),
    .pos   (pos),
    .value (term)
  );

  assign addend = first ? '0 : acc;

  mod_adder_table #(.MOD(MOD), .RES_W(RES_W)) u_add (
    .a   (addend),
    .b   (term),
    .sum (sum)
  );

  always_ff @(posedge clk) begin
    if (!rst_n)    acc <= '0;
    else if (step) acc <= sum;
  end

endmodule
