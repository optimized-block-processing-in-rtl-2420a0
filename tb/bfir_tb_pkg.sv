// bfir_tb_pkg: reference arithmetic for the block FIR testbenches.
//
// ref_coef() restates the coefficient formula of the filters' ROMs,
//     h_f(i) = ((7919 f + 104729 i + 31 (f+1)(i+3)) mod (2^WH - 5)) - (2^(WH-1) - 3),
// so the testbenches can compute expected outputs by direct convolution,
// y(n) = sum_i h(i) x(n-i), without using any part of the design.
package bfir_tb_pkg;

  function automatic longint ref_coef(input int f, input int i, input int wh);
    longint a;
    longint lf;
    longint li;
    lf = longint'(f);
    li = longint'(i);
    a  = lf * 7919 + li * 104729 + (lf + 1) * (li + 3) * 31;
    return (a % ((longint'(1) <<< wh) - 5)) - ((longint'(1) <<< (wh - 1)) - 3);
  endfunction

  // Random signed value of w bits.
  function automatic longint rand_signed(input int w);
    longint v;
    v = longint'({$urandom, $urandom});
    v = v & ((longint'(1) <<< w) - 1);
    if (v >= (longint'(1) <<< (w - 1))) v = v - (longint'(1) <<< w);
    return v;
  endfunction

endpackage
