// fp_ref_pkg: reference floating point model for the testbenches.
//
// Works through the simulator's double-precision 'real' type, independently of
// the RTL: operands are decoded into reals, the operation is done in double
// precision (exact for every half-precision add/multiply and for single
// precision multiply; correctly rounded to 53 bits otherwise, which leaves
// single-precision rounding of divide, square root and small-exponent-gap adds
// unaffected), and ref_round rounds the value to the target format in the
// requested mode. Conventions matched: subnormal inputs read as zero, results
// below the smallest normal number flush to signed zero with underflow and
// inexact. Flags are returned as {invalid, divzero, overflow, underflow, inexact}.
package fp_ref_pkg;

  function automatic real pow2(int e);
    real r = 1.0;
    if (e >= 0) for (int i = 0; i < e; i++) r = r * 2.0;
    else        for (int i = 0; i < -e; i++) r = r / 2.0;
    return r;
  endfunction

  function automatic real fabs(real x);
    return (x < 0.0) ? -x : x;
  endfunction

  // decode a normal or zero number (subnormals read as zero)
  function automatic real to_real(logic [31:0] x, int ew, int fw);
    int  bias = (1 << (ew - 1)) - 1;
    int  e    = int'((x >> fw) & ((1 << ew) - 1));
    int  f    = int'(x & ((1 << fw) - 1));
    logic s   = x[ew + fw];
    real m;
    if (e == 0) return s ? -0.0 : 0.0;
    m = (1.0 + real'(f) / pow2(fw)) * pow2(e - bias);
    return s ? -m : m;
  endfunction

  // round a non-zero finite real to the format; rm: 0 RNE, 1 RTZ, 2 RDN, 3 RUP
  function automatic logic [31:0] ref_round(real v, int ew, int fw, int rm,
                                            output logic [4:0] fl);
    int    bias = (1 << (ew - 1)) - 1;
    logic  s = (v < 0.0);
    real   m = s ? -v : v;
    int    e = 0;
    real   scaled, fr;
    longint ip;
    logic  inc;
    fl = '0;
    while (m >= pow2(e + 1)) e++;
    while (m < pow2(e)) e--;
    if (e < 1 - bias) begin
      fl = 5'b00011;
      return 32'(s) << (ew + fw);
    end
    scaled = m * pow2(fw - e);
    ip     = longint'($floor(scaled));
    fr     = scaled - real'(ip);
    case (rm)
      0: inc = (fr > 0.5) || (fr == 0.5 && ip[0]);
      1: inc = 1'b0;
      2: inc = s && (fr > 0.0);
      default: inc = !s && (fr > 0.0);
    endcase
    ip = ip + longint'(inc);
    if (ip == (longint'(1) << (fw + 1))) begin
      ip = ip >> 1;
      e++;
    end
    if (e + bias >= (1 << ew) - 1) begin
      logic to_inf = (rm == 0) || (rm == 3 && !s) || (rm == 2 && s);
      fl = 5'b00101;
      if (to_inf) return (32'(s) << (ew + fw)) | (32'((1 << ew) - 1) << fw);
      return (32'(s) << (ew + fw)) | (32'((1 << ew) - 2) << fw) | 32'((1 << fw) - 1);
    end
    fl[0] = (fr > 0.0);
    return (32'(s) << (ew + fw)) | (32'(e + bias) << fw) | (32'(ip) & 32'((1 << fw) - 1));
  endfunction

  // exact-zero result of an add/sub of two finite operands
  function automatic logic [31:0] signed_zero(logic s, int ew, int fw);
    return 32'(s) << (ew + fw);
  endfunction

  // reference add/sub of two normal operands
  function automatic logic [31:0] ref_add(logic [31:0] a, logic [31:0] b, logic sub,
                                          int ew, int fw, int rm, output logic [4:0] fl);
    real ra = to_real(a, ew, fw);
    real rb = to_real(b, ew, fw);
    real rc = sub ? -rb : rb;
    real r  = ra + rc;
    real hi_op = (fabs(ra) >= fabs(rc)) ? ra : rc;
    real lo_op = (fabs(ra) >= fabs(rc)) ? rc : ra;
    logic [31:0] y;
    fl = '0;
    if (r == 0.0) return signed_zero(rm == 2, ew, fw);
    y = ref_round(r, ew, fw, rm, fl);
    // a double sum that is itself inexact (very different exponents) is inexact
    if ((r - hi_op) != lo_op && !fl[1]) fl[0] = 1'b1;
    return y;
  endfunction

  function automatic logic [31:0] ref_mul(logic [31:0] a, logic [31:0] b,
                                          int ew, int fw, int rm, output logic [4:0] fl);
    return ref_round(to_real(a, ew, fw) * to_real(b, ew, fw), ew, fw, rm, fl);
  endfunction

  function automatic logic [31:0] ref_div(logic [31:0] a, logic [31:0] b,
                                          int ew, int fw, int rm, output logic [4:0] fl);
    return ref_round(to_real(a, ew, fw) / to_real(b, ew, fw), ew, fw, rm, fl);
  endfunction

  function automatic logic [31:0] ref_sqrt(logic [31:0] a, int ew, int fw, int rm,
                                           output logic [4:0] fl);
    return ref_round($sqrt(to_real(a, ew, fw)), ew, fw, rm, fl);
  endfunction

  // random normal number; exponent drawn from [elo, ehi] (biased)
  function automatic logic [31:0] rand_fp(int ew, int fw, int elo, int ehi);
    logic [31:0] s = 32'($urandom_range(1));
    logic [31:0] e = 32'($urandom_range(ehi, elo));
    logic [31:0] f = $urandom & 32'((1 << fw) - 1);
    return (s << (ew + fw)) | (e << fw) | f;
  endfunction

endpackage
