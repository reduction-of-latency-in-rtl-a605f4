// zs_pkg: shared constants and weight functions of the zero-sum code.
//
// A zero-sum code word is a systematic word {data, check}. Every data bit has
// an index weight taken from the positive integers that are not powers of two,
// in increasing order (3, 5, 6, 7, 9, 10, ...): data bit 0 weighs 3, data bit 1
// weighs 5, and so on. Check bit k weighs 2**k. The check field holds, in plain
// binary, the sum of the weights of the data bits that are 0. For the default
// 4-bit data word the data weights are 3, 5, 6, 7 and the check field has five
// bits (weights 1, 2, 4, 8, 16), which holds the largest sum 21.
//
// The weight rule and the 4-bit example follow the zero-sum code as published;
// the number of check bits is the width of the largest sum, $clog2(sum + 1).
// All functions are constant functions, usable in parameter expressions.
package zs_pkg;

  // Default number of data bits (the 4-bit code of the worked examples).
  parameter int unsigned DATA_W_DEFAULT = 4;

  // True when v is a power of two (v > 0).
  function automatic bit is_pow2(input int unsigned v);
    return (v != 0) && ((v & (v - 1)) == 0);
  endfunction

  // Index weight of data bit idx: the (idx+1)-th integer >= 3 that is not a
  // power of two.
  function automatic int unsigned data_weight(input int unsigned idx);
    int unsigned w;
    int unsigned n;
    w = 3;
    n = 0;
    while (n < idx || is_pow2(w)) begin
      if (!is_pow2(w)) n++;
      w++;
    end
    return w;
  endfunction

  // Sum of the weights of an n-bit data word: the check value of the all-zero word.
  function automatic int unsigned weight_sum(input int unsigned n);
    int unsigned s;
    s = 0;
    for (int unsigned i = 0; i < n; i++) s += data_weight(i);
    return s;
  endfunction

  // Number of check bits for an n-bit data word.
  function automatic int unsigned check_width(input int unsigned n);
    return $clog2(weight_sum(n) + 1);
  endfunction

endpackage
