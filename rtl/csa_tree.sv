// csa_tree: carry-save adder tree for the residue-to-binary summation.
//
// Sums N operands of W bits as a balanced binary tree of N-1 carry-save
// adders in ceil(log2 N) levels. Every tree node adds two carry-save numbers
// (sum word + carry word each) with two cascaded 3:2 counter rows, so no
// carry propagates inside the tree; a leaf is an operand with a zero carry
// word. Missing leaves, when N is not a power of two, are zero. The result
// is left in carry-save form: sum_out + carry_out equals the sum of the
// operands modulo 2^W, so W must be wide enough for the true total. Bit 0 of
// carry_out is always 0, since every carry word is shifted left by one.
//
// Interface: ops (packed, operand j at [j]); sum_out, carry_out (W bits).
// Timing: combinational.
module csa_tree #(
  parameter int unsigned N = 3,
  parameter int unsigned W = 25
) (
  input  logic [N-1:0][W-1:0] ops,
  output logic [W-1:0]        sum_out,
  output logic [W-1:0]        carry_out
);

  localparam int unsigned LEVELS = (N > 1) ? $clog2(N) : 0;
  localparam int unsigned LEAVES = 1 << LEVELS;

  // Heap-ordered nodes: node 1 is the root, children of k are 2k and 2k+1.
  logic [W-1:0] s_n [1:2*LEAVES-1];
  logic [W-1:0] c_n [1:2*LEAVES-1];

  for (genvar j = 0; j < LEAVES; j++) begin : g_leaf
    if (j < N) begin : g_op
      assign s_n[LEAVES + j] = ops[j];
    end else begin : g_pad
      assign s_n[LEAVES + j] = '0;
    end
    assign c_n[LEAVES + j] = '0;
  end

  for (genvar k = 1; k < LEAVES; k++) begin : g_node
    logic [W-1:0] s1, c1;
    // First 3:2 row: left sum, left carry, right sum.
    assign s1 = s_n[2*k] ^ c_n[2*k] ^ s_n[2*k+1];
    assign c1 = ((s_n[2*k] & c_n[2*k]) | (s_n[2*k] & s_n[2*k+1]) |
                 (c_n[2*k] & s_n[2*k+1])) << 1;
    // Second 3:2 row: add the right carry word.
    assign s_n[k] = s1 ^ c1 ^ c_n[2*k+1];
    assign c_n[k] = ((s1 & c1) | (s1 & c_n[2*k+1]) | (c1 & c_n[2*k+1])) << 1;
  end

  assign sum_out   = s_n[1];
  assign carry_out = c_n[1];

endmodule
