// tb_ref_pkg: reference model of the VHBCSE multiplier for the testbenches.
//
// ref_mult recomputes the multiplier's result with plain integer arithmetic,
// group by group, without any of the RTL's modules: sign conversion, the 2-bit
// group partial products, the nibble and byte sums with reuse of equal
// nibbles/bytes, the final shift and 1's complement. Flags report
// which reuse paths and corner cases a vector exercised, so testbenches can
// count that each mechanism happened. exact_prod gives the ideal x*h/2^16.
package tb_ref_pkg;

  typedef struct {
    bit reuse [1:7];   // C1..C7 reuse path taken
    bit neg_coef;      // sign conversion active
    bit pat11;         // at least one '11' group (A0 used)
  } ref_flags_t;

  function automatic longint asr(longint v, int s);
    return v >>> s;
  endfunction

  function automatic int ref_mult(int h, int x, output ref_flags_t fl);
    // h: 17-bit two's complement value, x: 16-bit two's complement value
    int hm, s, nib[4], pp[8], gs[4], as_[4], t1, t2, as6, p, b, cand;
    s  = (h < 0);
    hm = s ? (-h - 1) : h;
    fl = '{default: 0};
    fl.neg_coef = s;
    for (int k = 0; k < 8; k++) begin
      b = (hm >> (14 - 2 * k)) & 3;
      case (b)
        0: cand = 0;
        1: cand = int'(asr(x, 1));
        2: cand = x;
        default: begin cand = x + int'(asr(x, 1)); fl.pat11 = 1; end
      endcase
      pp[k] = int'(asr(cand, 2 * k));
    end
    for (int j = 0; j < 4; j++) begin
      gs[j]  = pp[2*j] + pp[2*j+1];
      nib[j] = (hm >> (12 - 4 * j)) & 15;
    end
    fl.reuse[1] = nib[0] == nib[1];
    fl.reuse[2] = nib[0] == nib[2];
    fl.reuse[3] = nib[1] == nib[2];
    fl.reuse[4] = nib[0] == nib[3];
    fl.reuse[5] = nib[1] == nib[3];
    fl.reuse[6] = nib[2] == nib[3];
    fl.reuse[7] = ((hm >> 8) & 255) == (hm & 255);
    as_[0] = gs[0];
    as_[1] = fl.reuse[1] ? int'(asr(gs[0], 4)) : gs[1];
    if (fl.reuse[2])      as_[2] = int'(asr(gs[0], 8));
    else if (fl.reuse[3]) as_[2] = int'(asr(gs[1], 4));
    else                  as_[2] = gs[2];
    if (fl.reuse[4])      as_[3] = int'(asr(gs[0], 12));
    else if (fl.reuse[5]) as_[3] = int'(asr(gs[1], 8));
    else if (fl.reuse[6]) as_[3] = int'(asr(gs[2], 4));
    else                  as_[3] = gs[3];
    t1  = as_[0] + as_[1];
    t2  = as_[2] + as_[3];
    as6 = fl.reuse[7] ? int'(asr(t1, 8)) : t2;
    p   = int'(asr(t1 + as6, 1));
    return s ? (-p - 1) : p;
  endfunction

  function automatic real exact_prod(int h, int x);
    return real'(h) * real'(x) / 65536.0;
  endfunction

endpackage
