// posit_ref_pkg: bit-serial reference model of posit decoding, encoding and
// multiplication, used by the testbenches to compute expected values
// independently of the RTL.
//
// decode walks the bit pattern one bit at a time (sign, regime run,
// terminator, exponent, fraction). encode writes the exact, unbounded bit
// string of a value (regime, exponent, every fraction bit) into an array,
// keeps the first N-1 bits and rounds to nearest even on the rest, after
// clamping values outside [minpos, maxpos]. mul multiplies two posits
// exactly with integer significands and encodes the product. Widths up to
// N = 32 are supported.
package posit_ref_pkg;

  typedef struct {
    bit          is_zero;
    bit          is_nar;
    bit          sgn;
    int          k;         // signed regime
    int          e;         // exponent field value
    int          scale;     // k*2^ES + e
    longint      sig;       // significand with hidden 1
    int          fb;        // number of fraction bits in sig
  } dec_t;

  typedef struct {
    longint      bits;      // encoded posit
    bit          rnd;       // an ULP was added
    bit          sat;       // clamped to maxpos / minpos
    bit          ovf;       // significand product was >= 2
  } enc_t;

  function automatic bit bit_of(longint v, int i);
    return bit'((v >> i) & 1);
  endfunction

  function automatic dec_t decode(longint p, int n, int es);
    dec_t d;
    longint mask = (longint'(1) << n) - 1;
    int i, run;
    bit first;
    d = '{default: 0};
    p = p & mask;
    if (p == 0) begin d.is_zero = 1; return d; end
    if (p == (longint'(1) << (n - 1))) begin d.is_nar = 1; return d; end
    d.sgn = bit_of(p, n - 1);
    if (d.sgn) p = (-p) & mask;
    i = n - 2;
    first = bit_of(p, i);
    run = 0;
    while (i >= 0 && bit_of(p, i) == first) begin run++; i--; end
    if (i >= 0) i--;                       // terminating bit
    d.k = first ? run - 1 : -run;
    d.e = 0;
    for (int j = 0; j < es; j++) begin
      d.e = d.e * 2;
      if (i >= 0) begin d.e += int'(bit_of(p, i)); i--; end
    end
    d.fb = i + 1;
    d.sig = (longint'(1) << d.fb) | (p & ((longint'(1) << d.fb) - 1));
    d.scale = d.k * (1 << es) + d.e;
    return d;
  endfunction

  // Value = (-1)^sgn * sig/2^fb * 2^scale, with 2^fb <= sig < 2^(fb+1).
  // sat is set when the value is at least maxpos or below minpos.
  function automatic enc_t encode(bit sgn, int scale, longint sig, int fb,
                                  int n, int es);
    enc_t r;
    bit   str[256];
    int   len, k, e;
    int   maxsc = (n - 2) * (1 << es);
    longint mask = (longint'(1) << n) - 1;
    longint v;
    bit   g, st;
    r = '{default: 0};
    if (scale >= maxsc) begin
      v = (longint'(1) << (n - 1)) - 1; r.sat = 1;
    end else if (scale < -maxsc) begin
      v = 1; r.sat = 1;
    end else begin
      k = (scale >= 0) ? scale / (1 << es) : -((-scale + (1 << es) - 1) / (1 << es));
      e = scale - k * (1 << es);
      len = 0;
      if (k >= 0) begin
        for (int j = 0; j <= k; j++) str[len++] = 1;
        str[len++] = 0;
      end else begin
        for (int j = 0; j < -k; j++) str[len++] = 0;
        str[len++] = 1;
      end
      for (int j = es - 1; j >= 0; j--) str[len++] = bit'((e >> j) & 1);
      for (int j = fb - 1; j >= 0; j--) str[len++] = bit_of(sig, j);
      v = 0;
      for (int j = 0; j < n - 1; j++) v = (v << 1) | longint'((j < len) ? str[j] : 1'b0);
      g  = (n - 1 < len) ? str[n - 1] : 1'b0;
      st = 0;
      for (int j = n; j < len; j++) st |= str[j];
      if (g && (st || v[0])) begin v = v + 1; r.rnd = 1; end
    end
    r.bits = sgn ? ((-v) & mask) : v;
    return r;
  endfunction

  function automatic enc_t mul(longint a, longint b, int n, int es);
    dec_t da, db;
    enc_t r;
    longint sig;
    int fb, scale;
    da = decode(a, n, es);
    db = decode(b, n, es);
    r = '{default: 0};
    if (da.is_nar || db.is_nar) begin r.bits = longint'(1) << (n - 1); return r; end
    if (da.is_zero || db.is_zero) begin r.bits = 0; return r; end
    sig   = da.sig * db.sig;
    fb    = da.fb + db.fb;
    scale = da.scale + db.scale;
    if (sig >= (longint'(1) << (fb + 1))) begin
      r.ovf = 1;
      scale = scale + 1;
      fb = fb + 1;
    end
    begin
      enc_t t = encode(da.sgn ^ db.sgn, scale, sig, fb, n, es);
      r.bits = t.bits; r.rnd = t.rnd; r.sat = t.sat;
    end
    return r;
  endfunction

endpackage
