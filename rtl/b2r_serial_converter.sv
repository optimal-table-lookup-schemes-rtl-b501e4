// b2r_serial_converter: lower-complexity binary-to-residue converter.
//
// Trades speed for area: instead of r*n position-specific tables and r(n-1)
// adders it uses r general (u_i, i) tables and r tabular modulo-m adders, one
// per modulus (b2r_serial_channel). The number is loaded into a shift
// register that moves one digit to the right per clock, so the digit in the
// least significant slot, u_i at step i, is looked up by every modulus row at
// once and added into that row's accumulator.
//
// Control (this design's own): a two-state machine. In IDLE a start pulse
// loads u and moves to RUN; RUN lasts NUM_DIGITS clocks, one per digit, then
// 'done' pulses for one clock and the residues stay on the outputs until the
// next conversion completes. start is ignored while busy.
//
// Interface: start, u in; busy, done, residues out (residue k for MODULI[k]).
// Timing: done rises NUM_DIGITS + 1 clocks after the clock that sampled
// start (9 at the defaults). busy is high during the NUM_DIGITS RUN clocks;
// a new start is accepted whenever busy is low, so back-to-back conversions
// take NUM_DIGITS + 1 clocks each.
module b2r_serial_converter #(
  parameter int unsigned NUM_MOD    = rns_pkg::NUM_MODULI,
  parameter int unsigned MODULI [NUM_MOD] = rns_pkg::MODULI,
  parameter int unsigned NUM_DIGITS = rns_pkg::NUM_DIGITS,
  parameter int unsigned DIGIT_W    = rns_pkg::DIGIT_W,
  parameter int unsigned RES_W      = rns_pkg::RES_W,
  localparam int unsigned POS_W     = (NUM_DIGITS > 1) ? $clog2(NUM_DIGITS) : 1
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic                           start,
  input  logic [NUM_DIGITS*DIGIT_W-1:0]  u,
  output logic                           busy,
  output logic                           done,
  output logic [NUM_MOD-1:0][RES_W-1:0]  residues
);

  typedef enum logic {IDLE, RUN} state_t;

  state_t                        state;
  logic [NUM_DIGITS*DIGIT_W-1:0] shift_q;
  logic [POS_W-1:0]              pos_q;
  logic                          step;
  logic                          last;

  assign step = (state == RUN);
  assign last = (pos_q == POS_W'(NUM_DIGITS - 1));
  assign busy = (state == RUN);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state   <= IDLE;
      shift_q <= '0;
      pos_q   <= '0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      case (state)
        IDLE: if (start) begin
          shift_q <= u;
          pos_q   <= '0;
          state   <= RUN;
        end
        RUN: begin
          shift_q <= shift_q >> DIGIT_W;
          pos_q   <= pos_q + 1'b1;
          if (last) begin
            state <= IDLE;
            done  <= 1'b1;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

  for (genvar k = 0; k < NUM_MOD; k++) begin : g_mod
    b2r_serial_channel #(
      .MOD(MODULI[k]), .NUM_DIGITS(NUM_DIGITS), .DIGIT_W(DIGIT_W), .RES_W(RES_W)
    ) u_chan (
      .clk   (clk),
      .rst_n (rst_n),
      .step  (step),
      .first (pos_q == '0),
      .digit (shift_q[DIGIT_W-1:0]),
      .pos   (pos_q),
      .acc   (residues[k])
    );
  end

endmodule
