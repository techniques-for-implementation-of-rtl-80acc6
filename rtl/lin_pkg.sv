// lin_pkg: types, constants and elaboration-time coefficient arithmetic shared
// by the at-speed testable linear filter.
//
// A second-order recursive section  w[n] = u[n] + a1*w[n-1] + a2*w[n-2],
// y[n] = b0*w[n] + b1*w[n-1]  is rewritten in state form (S1 = newest w,
// S2 = the one before) and unfolded twice, so that one iteration consumes the
// input pair (u0,u1) and produces the output pair (y0,y1) and the next state:
//
//   y0  = b0*u0 + 0*u1  + (b0*a1+b1)*S1              + b0*a2*S2
//   y1  = (b0*a1+b1)*u0 + b0*u1 + (b0*(a1^2+a2)+b1*a1)*S1 + (b0*a1+b1)*a2*S2
//   S1' = w1 = a1*u0 + u1 + (a1^2+a2)*S1 + a1*a2*S2
//   S2' = w0 = u0 + 0*u1 + a1*S1 + a2*S2
//
// Every row is a sum of exactly four constant products of (u0, u1, S1, S2),
// which the datapath evaluates as a balanced tree whose first addition joins
// the two input products only. unfold2() computes each of the 16 constants from the
// four section coefficients. All coefficients are signed fixed point with
// F fractional bits; each derived constant is computed exactly and rounded
// once (round half up) back to F fractional bits.
package lin_pkg;

  // Unfolding level of the section: two input samples per iteration.
  localparam int UNFOLD = 2;
  // Rows of the unfolded matrix (adder trees) and terms per row.
  localparam int NTREE  = 4;
  localparam int NTERM  = 4;

  // Row order: the two outputs, then the two next-state values.
  localparam int ROW_Y0 = 0;
  localparam int ROW_Y1 = 1;
  localparam int ROW_S1 = 2;
  localparam int ROW_S2 = 3;
  // Term order: the input pair first (neighbours in the tree), then the state.
  localparam int TERM_U0 = 0;
  localparam int TERM_U1 = 1;
  localparam int TERM_S1 = 2;
  localparam int TERM_S2 = 3;

  // The two control steps of one iteration of the shared datapath.
  //   ST_OUT   : shared adders add the input-only products of the previous
  //              iteration (outputs); register files load state partial sums.
  //   ST_STATE : shared adders add the state partial sums (next state);
  //              register files load the input-only products.
  typedef enum logic {
    ST_OUT   = 1'b0,
    ST_STATE = 1'b1
  } cstep_t;

  // Round half up and drop sh fractional bits.
  function automatic longint rnd_shift(longint v, int sh);
    if (sh <= 0) return v;
    return (v + (longint'(1) <<< (sh - 1))) >>> sh;
  endfunction

  // One entry of the unfolded (k = 2) coefficient matrix of a second-order
  // section: row r (ROW_*), term t (TERM_*), f fractional bits.
  function automatic int unfold2(int b0, int a1, int b1, int a2, int f, int r, int t);
    longint one, lb0, la1, lb1, la2, n1;
    one = longint'(1) <<< f;
    lb0 = longint'(b0);
    la1 = longint'(a1);
    lb1 = longint'(b1);
    la2 = longint'(a2);
    n1  = lb0 * la1 + lb1 * one;                 // b0*a1 + b1, 2f fraction bits
    case (r * NTERM + t)
      // y0
      ROW_Y0 * NTERM + TERM_U0: return b0;
      ROW_Y0 * NTERM + TERM_U1: return 0;
      ROW_Y0 * NTERM + TERM_S1: return int'(rnd_shift(n1, f));
      ROW_Y0 * NTERM + TERM_S2: return int'(rnd_shift(lb0 * la2, f));
      // y1
      ROW_Y1 * NTERM + TERM_U0: return int'(rnd_shift(n1, f));
      ROW_Y1 * NTERM + TERM_U1: return b0;
      ROW_Y1 * NTERM + TERM_S1:
        return int'(rnd_shift(lb0 * (la1 * la1 + la2 * one) + lb1 * la1 * one, 2 * f));
      ROW_Y1 * NTERM + TERM_S2: return int'(rnd_shift(n1 * la2, 2 * f));
      // S1' = w1
      ROW_S1 * NTERM + TERM_U0: return a1;
      ROW_S1 * NTERM + TERM_U1: return int'(one);
      ROW_S1 * NTERM + TERM_S1: return int'(rnd_shift(la1 * la1 + la2 * one, f));
      ROW_S1 * NTERM + TERM_S2: return int'(rnd_shift(la1 * la2, f));
      // S2' = w0
      ROW_S2 * NTERM + TERM_U0: return int'(one);
      ROW_S2 * NTERM + TERM_U1: return 0;
      ROW_S2 * NTERM + TERM_S1: return a1;
      default:                  return a2;
    endcase
  endfunction

  // True when v fits a signed w-bit field.
  function automatic bit fits_signed(int v, int w);
    longint lim;
    lim = longint'(1) <<< (w - 1);
    return (longint'(v) < lim) && (longint'(v) >= -lim);
  endfunction

endpackage
