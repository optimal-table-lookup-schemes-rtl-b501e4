// b2r_tree_channel: one modulus of the pipelined tree binary-to-residue
// converter.
//
// u = sum_i u_i R^i, so |u|_m = |sum_i |u_i R^i|_m|_m. Each of the
// NUM_DIGITS digits addresses its own table, specialised to its position i,
// that returns |u_i R^i|_m. The table outputs are then summed in a balanced
// binary tree of tabular modulo-m adders, ceil(log2 n) levels deep, instead of
// a linear chain, so the result needs log2(n) adder delays. A register stage
// follows the tables and every adder level, so a new number can enter each
// clock. When NUM_DIGITS is not a power of two, the missing leaves are held at
// zero, the neutral element of modular addition.
//
// Interface: digits (packed, digit i at [i]), residue (RES_W bits).
// Timing: residue belongs to the digits applied LATENCY = 1 + ceil(log2 n)
// clocks earlier (4 for 8 digits); throughput one number per clock.
// Registers are cleared by the active-low synchronous reset (this design's
// choice; none is specified).
module b2r_tree_channel #(
  parameter int unsigned MOD        = 19,
  parameter int unsigned NUM_DIGITS = 8,
  parameter int unsigned DIGIT_W    = 4,
  parameter int unsigned RES_W      = 5,
  localparam int unsigned LEVELS    = (NUM_DIGITS > 1) ? $clog2(NUM_DIGITS) : 0,
  localparam int unsigned LATENCY   = 1 + LEVELS
) (
  input  logic                                clk,
  input  logic                                rst_n,
  input  logic [NUM_DIGITS-1:0][DIGIT_W-1:0]  digits,
  output logic [RES_W-1:0]                    residue
);

  localparam int unsigned LEAVES = 1 << LEVELS;

  // Heap-ordered tree: node 1 is the root, node k has children 2k and 2k+1,
  // leaves are LEAVES .. 2*LEAVES-1. Every node is a register.
  logic [RES_W-1:0] node_q [1:2*LEAVES-1];
  logic [RES_W-1:0] node_d [1:2*LEAVES-1];

  for (genvar j = 0; j < LEAVES; j++) begin : g_leaf
    if (j < NUM_DIGITS) begin : g_rom
      b2r_rom #(
        .MOD(MOD), .DIGIT_W(DIGIT_W), .NUM_POS(1), .POS_BASE(j), .RES_W(RES_W)
      ) u_rom (
        .digit (digits[j]),
        .pos   (1'b0),
        .value (node_d[LEAVES + j])
      );
    end else begin : g_pad
      assign node_d[LEAVES + j] = '0;
    end
  end

  for (genvar k = 1; k < LEAVES; k++) begin : g_node
    mod_adder_table #(.MOD(MOD), .RES_W(RES_W)) u_add (
      .a   (node_q[2*k]),
      .b   (node_q[2*k+1]),
      .sum (node_d[k])
    );
  end

  always_ff @(posedge clk) begin
    for (int k = 1; k < 2 * LEAVES; k++) begin
      if (!rst_n) node_q[k] <= '0;
      else        node_q[k] <= node_d[k];
    end
  end

  assign residue = node_q[1];

endmodule
