// lfsr_pkg: constants and types shared by the LFSR modules.
//
// The feedback polynomials are the maximal-length ones tabulated for the
// 4, 8, 16, 32 and 64 bit generators:
//    4 bit: x^4  + x^3  + 1
//    8 bit: x^8  + x^6  + x^5  + x^4  + 1
//   16 bit: x^16 + x^15 + x^13 + x^4  + 1
//   32 bit: x^32 + x^22 + x^2  + x^1  + 1
//   64 bit: x^64 + x^63 + x^61 + x^60 + 1
// A term x^k names stage k of the register, counted from 1 at the stage that
// receives the feedback, which is bit k-1 of the state vector. tap_mask()
// turns a polynomial into a bit mask over the state: bit k-1 is set for
// every term x^k. With XNOR feedback every polynomial above gives a sequence
// of 2^N - 1 states; the all-ones state is the one left out (a lock-up
// state), where with XOR feedback it is the all-zeros state.
// Widths outside the table return an all-zero mask; the LFSR module then
// requires the caller to give its TAPS parameter explicitly.
package lfsr_pkg;

  // Largest register width with a tabulated polynomial.
  localparam int unsigned MAX_TABLE_BITS = 64;

  // Gate that closes the feedback loop. XNOR is the default: it makes the
  // all-zeros state legal, so a register cleared to zero starts running.
  typedef enum logic {
    FB_XNOR = 1'b0,
    FB_XOR  = 1'b1
  } feedback_e;

  // Tap mask for a register of `width` stages (bit k-1 set for term x^k).
  function automatic logic [MAX_TABLE_BITS-1:0] tap_mask(int unsigned width);
    logic [MAX_TABLE_BITS-1:0] m;
    m = '0;
    case (width)
      4:  begin m[3]  = 1'b1; m[2]  = 1'b1; end
      8:  begin m[7]  = 1'b1; m[5]  = 1'b1; m[4]  = 1'b1; m[3]  = 1'b1; end
      16: begin m[15] = 1'b1; m[14] = 1'b1; m[12] = 1'b1; m[3]  = 1'b1; end
      32: begin m[31] = 1'b1; m[21] = 1'b1; m[1]  = 1'b1; m[0]  = 1'b1; end
      64: begin m[63] = 1'b1; m[62] = 1'b1; m[60] = 1'b1; m[59] = 1'b1; end
      default: m = '0;
    endcase
    return m;
  endfunction

endpackage
