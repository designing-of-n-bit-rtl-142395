// lfsr: N-bit linear feedback shift register producing a pseudo-noise (PN)
// sequence, one new state per enabled clock.
//
// How it works: the N stages form a shift register. On each enabled clock
// every stage passes its bit to the next one (state bit i moves to bit i+1)
// and stage 1 (bit 0) takes the feedback bit, the XNOR (or XOR) of the
// stages named by the generator polynomial. Drawn with stage 1 on the left
// this is a right shift with feedback into the leftmost stage; read as a
// binary number the state shifts towards its MSB. With XNOR feedback and a
// maximal-length polynomial the register walks through 2^N - 1 states from
// zero: for N = 4 the run is 0, 1, 3, 7, 14, 13, 11, 6, 12, 9, 2, 5, 10,
// 4, 8 and back to 0. The all-ones state is excluded: an XNOR register that
// holds it stays there (with XOR feedback the stuck state is all zeros).
//
// Interface:
//   clk        clock; all state changes on its rising edge
//   rst        synchronous, active high; clears the register to all zeros
//              (XNOR) or to 1 (XOR), the first legal state in either case
//   enable     when low the register holds its state
//   seed_dv    when high (with enable) seed_data is loaded instead of the
//              next state
//   seed_data  seed value, also the value `done` compares against
//   lfsr_data  the register state, all N stages in parallel
//   pn_out     the serial PN chip, the last stage (bit N-1)
//   done       high while lfsr_data equals seed_data: one full period has
//              passed since the seed was loaded (or since reset, with a
//              zero seed)
// Timing: one new state per enabled clock; lfsr_data, pn_out and done come
// straight from the register (done through an N-bit comparator), so there
// is no added latency.
//
// Follows the document: XNOR feedback, the tap table, the zero start state
// and the printed sequences, the seed multiplexer and the done comparator,
// and the clock/enable/seed/done port set (its I/O counts are 3N+4 pins
// without a reset). Own choices: the reset input (a RESET pin appears only
// in the 4-bit block diagram), the XOR option, the pn_out tap and the
// explicit TAPS override for widths the table does not cover.
module lfsr
  import lfsr_pkg::*;
#(
  parameter int unsigned         NUM_BITS = 32,
  parameter logic [NUM_BITS-1:0] TAPS     = NUM_BITS'(tap_mask(NUM_BITS)),
  parameter feedback_e           FEEDBACK = FB_XNOR
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                enable,
  input  logic                seed_dv,
  input  logic [NUM_BITS-1:0] seed_data,
  output logic [NUM_BITS-1:0] lfsr_data,
  output logic                pn_out,
  output logic                done
);

  // State the register is cleared to, and the state it cannot leave.
  localparam logic [NUM_BITS-1:0] START  = (FEEDBACK == FB_XNOR) ? '0 : NUM_BITS'(1);
  localparam logic [NUM_BITS-1:0] LOCKUP = (FEEDBACK == FB_XNOR) ? '1 : '0;

  if (NUM_BITS < 2) begin : g_bad_width
    $error("lfsr: NUM_BITS must be at least 2");
  end
  if (TAPS == '0) begin : g_no_taps
    $error("lfsr: no tabulated polynomial for this NUM_BITS; set TAPS");
  end
  if (!TAPS[NUM_BITS-1]) begin : g_no_top_tap
    $error("lfsr: TAPS must include the last stage x^NUM_BITS");
  end

  logic [NUM_BITS-1:0] state_q;
  logic                feedback;

  // Parity of the tapped stages; XNOR feedback is its complement.
  always_comb begin
    feedback = ^(state_q & TAPS);
    if (FEEDBACK == FB_XNOR) feedback = ~feedback;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state_q <= START;
    end else if (enable) begin
      if (seed_dv) state_q <= seed_data;
      else         state_q <= {state_q[NUM_BITS-2:0], feedback};
    end
  end

  assign lfsr_data = state_q;
  assign pn_out    = state_q[NUM_BITS-1];
  assign done      = (state_q == seed_data);

  // Shifting never enters the lock-up state: it can only be loaded.
  a_no_lockup_entry: assert property (
    @(posedge clk) disable iff (rst)
      (enable && !seed_dv && state_q != LOCKUP) |=> (state_q != LOCKUP)
  ) else $error("lfsr: shifted into the lock-up state");

endmodule
