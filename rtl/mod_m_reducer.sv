// mod_m_reducer: final modulo-M step of the residue-to-binary converter.
//
// The sum of the l partial results lies in [0 .. l(M-1)]; it is reduced
// modulo M without iterative trial subtraction. Let F = floor(log2 M). The
// input bits from position F-1 upward, ceil(log2(l(M-1))) - F + 1 bits (about
// log2(l) + 1), address a small table. Entry h holds the largest multiple qM
// that does not exceed h * 2^(F-1). Because the granule 2^(F-1) is at most
// M/2, subtracting that multiple leaves a value below 2M, so one conditional
// subtraction of M finishes the job. Table contents are computed at
// elaboration.
//
// Interface: in_valid, x (IN_W bits) in; out_valid, y (OUT_W bits, y = x mod M).
// Timing: two register stages: table lookup and subtraction, then the
// corrective subtraction; latency 2, one value per clock. The split into two
// stages is this design's choice.
module mod_m_reducer #(
  parameter longint unsigned M     = rns_pkg::RANGE_M,
  parameter int unsigned     IN_W  = 25,
  parameter int unsigned     OUT_W = rns_pkg::M_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [IN_W-1:0]  x,
  output logic             out_valid,
  output logic [OUT_W-1:0] y
);

  localparam int unsigned F     = rns_pkg::bits_for(M) - 1;   // floor(log2 M)
  localparam int unsigned LO    = (F > 0) ? F - 1 : 0;
  localparam int unsigned IDX_W = (IN_W > LO) ? IN_W - LO : 1;
  localparam int unsigned DEPTH = 1 << IDX_W;
  localparam int unsigned MID_W = OUT_W + 1;                  // holds < 2M

  typedef logic [DEPTH-1:0][IN_W-1:0] table_t;

  function automatic table_t build_table();
    table_t t;
    for (longint unsigned h = 0; h < 64'(DEPTH); h++)
      t[h] = IN_W'(((h << LO) / M) * M);
    return t;
  endfunction

  localparam table_t MULT_TABLE = build_table();

  logic [IDX_W-1:0] index;
  logic [IN_W-1:0]  diff;
  logic [MID_W-1:0] mid_q;
  logic             mid_valid_q;

  always_comb begin
    if (IN_W > LO) index = IDX_W'(x >> LO);
    else           index = '0;
    diff = x - MULT_TABLE[index];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      mid_q       <= '0;
      mid_valid_q <= 1'b0;
      y           <= '0;
      out_valid   <= 1'b0;
    end else begin
      mid_q       <= MID_W'(diff);
      mid_valid_q <= in_valid;
      y           <= (64'(mid_q) >= M) ? OUT_W'(64'(mid_q) - M) : OUT_W'(mid_q);
      out_valid   <= mid_valid_q;
    end
  end

endmodule
