// fp_ref_pkg: reference model of the custom floating-point format for the
// testbenches, written independently of the RTL. Values are held as `real`
// (binary64); to_fmt rounds a real to (w, t) with round-to-nearest-even at
// unbounded exponent, then flushes results below the normal range to zero
// and sends results above it to infinity, which is the range rule of the
// RTL units. Because binary64 has more than 2t+2 significand bits for every
// t <= 23, one real sum or product of two format values followed by to_fmt
// gives the correctly rounded result.
package fp_ref_pkg;

  function automatic real from_fmt(logic [63:0] v, int w, int t);
    logic        s;
    int          e;
    logic [63:0] f;
    s = v[w+t];
    e = int'((v >> t) & ((64'd1 << w) - 1));
    f = v & ((64'd1 << t) - 1);
    if (e == 0) return $bitstoreal({s, 63'd0});   // signed zero
    return $bitstoreal({s, 11'(e - ((1 << (w-1)) - 1) + 1023), 52'(f << (52 - t))});
  endfunction

  function automatic logic [63:0] to_fmt(real r, int w, int t);
    logic [63:0] b, sig, keep, rem, half;
    logic        s;
    int          e, drop, bias;
    b    = $realtobits(r);
    s    = b[63];
    bias = (1 << (w-1)) - 1;
    if (b[62:0] == 0) return 64'(s) << (w + t);
    e    = int'(b[62:52]) - 1023;
    sig  = {11'd1, b[51:0]};
    drop = 52 - t;
    keep = sig >> drop;
    rem  = sig & ((64'd1 << drop) - 1);
    half = 64'd1 << (drop - 1);
    if (rem > half || (rem == half && keep[0])) keep = keep + 1;
    if (keep == (64'd1 << (t + 1))) begin
      keep = keep >> 1;
      e    = e + 1;
    end
    e = e + bias;
    if (e <= 0) return 64'(s) << (w + t);
    if (e >= (1 << w) - 1) return (64'(s) << (w + t)) | (((64'd1 << w) - 1) << t);
    return (64'(s) << (w + t)) | (64'(e) << t) | (keep & ((64'd1 << t) - 1));
  endfunction

  function automatic logic [63:0] ref_mul(logic [63:0] a, logic [63:0] b, int w, int t);
    return to_fmt(from_fmt(a, w, t) * from_fmt(b, w, t), w, t);
  endfunction

  function automatic logic [63:0] ref_add(logic [63:0] a, logic [63:0] b, int w, int t);
    return to_fmt(from_fmt(a, w, t) + from_fmt(b, w, t), w, t);
  endfunction

  function automatic logic [63:0] ref_sub(logic [63:0] a, logic [63:0] b, int w, int t);
    return to_fmt(from_fmt(a, w, t) - from_fmt(b, w, t), w, t);
  endfunction

  // random normal value, magnitude in [2^lo, 2^hi), random sign
  function automatic logic [63:0] rnd_val(int lo, int hi, int w, int t);
    real m;
    int  e;
    m = 1.0 + real'($urandom % 1000000) / 1000000.0;
    e = lo + int'($urandom % 32'(hi - lo));
    m = m * (2.0 ** e);
    if ($urandom % 2 == 1) m = -m;
    return to_fmt(m, w, t);
  endfunction

  // random raw bit pattern with a normal exponent kept within +-span of bias
  function automatic logic [63:0] rnd_bits(int span, int w, int t);
    int          bias, e;
    logic [63:0] f;
    bias = (1 << (w-1)) - 1;
    e    = bias - span + int'($urandom % 32'(2 * span + 1));
    f    = {$urandom, $urandom} & ((64'd1 << t) - 1);
    return (64'($urandom % 2) << (w + t)) | (64'(e) << t) | f;
  endfunction

endpackage
