// posit_pkg: widths shared by the posit multiplier modules.
//
// A posit of N bits with ES exponent bits holds a sign bit, a regime of at
// least two bits, up to ES exponent bits and a fraction. The helpers below
// derive the internal field widths from (N, ES) so that every module of the
// multiplier agrees on them:
//   rs_bits   - RS = log2(N), width of the absolute regime run length; the
//               signed regime value takes RS+1 bits.
//   mant_bits - N-ES-2, the widest significand including its hidden 1
//               (N-1 bits after the sign, minus a 2-bit regime, minus ES).
//   scale_bits- ES+RS+2, width of the summed product scale (regime and
//               exponent of both operands plus the mantissa overflow bit).
package posit_pkg;

  function automatic int rs_bits(input int n);
    return $clog2(n);
  endfunction

  function automatic int mant_bits(input int n, input int es);
    return n - es - 2;
  endfunction

  function automatic int scale_bits(input int n, input int es);
    return es + $clog2(n) + 2;
  endfunction

endpackage
