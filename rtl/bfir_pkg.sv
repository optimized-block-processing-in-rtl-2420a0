// bfir_pkg: constants and helper functions shared by the block transpose-form
// FIR filters.
//
// The coefficient ROM of the reconfigurable filter and the constants of the
// fixed-coefficient filter are both filled from rom_coef(), a fixed arithmetic
// formula of (filter index, tap index); no coefficient values are given for
// this design, so the formula is this design's own choice and is meant to be
// replaced by real filter taps. With WH = 8 it gives integers in -125..125:
//     h_f(i) = ((7919 f + 104729 i + 31 (f+1)(i+3)) mod (2^WH - 5)) - (2^(WH-1) - 3)
// csd_digits() recodes a constant into canonical signed digits and
// mcm_terms() groups those digits into terms of x, 3x and 5x for the
// shift-and-add MCM unit; both run at elaboration only.
package bfir_pkg;

  // Coefficient h_f(i) of filter f, tap i, as a WH-bit signed integer.
  function automatic int rom_coef(input int f, input int i, input int wh);
    longint a;
    longint m;
    longint lf;
    longint li;
    lf = longint'(f);
    li = longint'(i);
    a = lf * 7919 + li * 104729 + (lf + 1) * (li + 3) * 31;
    m = (longint'(1) <<< wh) - 5;
    return int'((a % m) - ((longint'(1) <<< (wh - 1)) - 3));
  endfunction

  // Canonical signed digit recoding of c: bit b of the result is set where
  // digit b is -1 (want_neg) or +1 (otherwise); c = sum of digits * 2^b.
  function automatic longint unsigned csd_digits(input int c, input bit want_neg);
    longint v;
    longint unsigned pos;
    longint unsigned neg;
    int b;
    v = longint'(c);
    pos = 0;
    neg = 0;
    b = 0;
    while (v != 0 && b < 63) begin
      if ((v & 1) != 0) begin
        if ((v & 3) == 1) begin
          pos[b] = 1'b1;
          v = v - 1;
        end else begin
          neg[b] = 1'b1;
          v = v + 1;
        end
      end
      v = v >>> 1;
      b++;
    end
    return want_neg ? neg : pos;
  endfunction

  // Shared-term recoding for the MCM unit. The CSD digits of c are scanned
  // from the least significant end; two nonzero digits two places apart are
  // replaced by one shifted copy of a shared subexpression:
  //   (+1, +1) -> +5x,  (-1, +1) -> +3x,  (+1, -1) -> -3x,  (-1, -1) -> -5x
  // (first digit at position b, second at b+2, term placed at b). Remaining
  // digits stay single +/-x terms. The result is a bit mask of the positions
  // holding a term of the given kind:
  //   0: +x   1: -x   2: +3x   3: -3x   4: +5x   5: -5x
  function automatic longint unsigned mcm_terms(input int c, input int kind);
    longint unsigned pos;
    longint unsigned neg;
    longint unsigned res;
    longint unsigned one;
    int b;
    int k;
    pos = csd_digits(c, 1'b0);
    neg = csd_digits(c, 1'b1);
    res = 0;
    b = 0;
    while (b < 64) begin
      one = longint'(1) << b;
      if (((pos | neg) & one) != 0) begin
        if (b + 2 < 64 && ((pos | neg) & (one << 2)) != 0) begin
          if ((pos & one) != 0 && (pos & (one << 2)) != 0)      k = 4;
          else if ((neg & one) != 0 && (pos & (one << 2)) != 0) k = 2;
          else if ((pos & one) != 0)                            k = 3;
          else                                                  k = 5;
          b += 3;
        end else begin
          k = ((pos & one) != 0) ? 0 : 1;
          b += 1;
        end
        if (k == kind) res = res | one;
      end else begin
        b += 1;
      end
    end
    return res;
  endfunction

endpackage
