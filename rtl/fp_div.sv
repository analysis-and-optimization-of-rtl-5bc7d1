// fp_div: IEEE 754 floating point divider (single precision by default).
//
// The significand quotient is formed by radix-2 restoring division, one
// quotient bit per step, unrolled into combinational logic: the dividend
// significand is first doubled if it is smaller than the divisor's, so the
// quotient's leading one is always at the top and no post-shift is needed.
// FRAC_W+3 quotient bits are produced (significand, guard and one more); the
// last bit and a non-zero remainder form the sticky bit. The exponent is
// ea - eb + bias. fp_round rounds and packs the result.
// Subnormal inputs are read as zero. Flags: invalid (signalling NaN, 0/0,
// inf/inf), divide-by-zero (finite / 0), overflow, underflow, inexact.
// Purely combinational (a long path; the processor gives it one full cycle).
// Division is specified only by function; the restoring algorithm is this
// design's choice.
module fp_div
  import cfp_pkg::*;
#(
  parameter int unsigned EXP_W  = 8,
  parameter int unsigned FRAC_W = 23
) (
  input  logic [EXP_W+FRAC_W:0] a,
  input  logic [EXP_W+FRAC_W:0] b,
  input  rmode_t                rm,
  output logic [EXP_W+FRAC_W:0] y,
  output fp_flags_t             flags
);
  localparam int N    = EXP_W + FRAC_W + 1;
  localparam int QW   = FRAC_W + 3;
  localparam int BIAS = (1 << (EXP_W - 1)) - 1;
  localparam logic [N-1:0] QNAN = {1'b0, {EXP_W{1'b1}}, 1'b1, {(FRAC_W-1){1'b0}}};

  logic              sa, sb, sy;
  logic [EXP_W-1:0]  ea, eb;
  logic [FRAC_W-1:0] fa, fb;
  logic a_zero, b_zero, a_inf, b_inf, a_nan, b_nan, a_snan, b_snan;
  logic              pre_shift;
  logic [FRAC_W+2:0] rem, dvs;
  logic [QW-1:0]     q;
  logic signed [EXP_W+2:0] er;
  logic [FRAC_W:0]   r_sig;
  logic              r_guard, r_sticky;
  logic [N-1:0]      r_y;
  fp_flags_t         r_flags;

  fp_round #(.EXP_W(EXP_W), .FRAC_W(FRAC_W)) u_round (
    .sign(sy), .exp(er), .sig(r_sig), .guard(r_guard), .sticky(r_sticky),
    .rm(rm), .y(r_y), .flags(r_flags)
  );

  always_comb begin
    {sa, ea, fa} = a;
    {sb, eb, fb} = b;
    sy     = sa ^ sb;
    a_zero = (ea == '0);
    b_zero = (eb == '0);
    a_inf  = (ea == '1) && (fa == '0);
    b_inf  = (eb == '1) && (fb == '0);
    a_nan  = (ea == '1) && (fa != '0);
    b_nan  = (eb == '1) && (fb != '0);
    a_snan = a_nan && !fa[FRAC_W-1];
    b_snan = b_nan && !fb[FRAC_W-1];

    // restoring division of the significands
    pre_shift = (fa < fb);
    dvs = {3'b001, fb};
    rem = pre_shift ? {2'b01, fa, 1'b0} : {3'b001, fa};
    for (int i = QW - 1; i >= 0; i--) begin
      if (rem >= dvs) begin
        q[i] = 1'b1;
        rem  = rem - dvs;
      end else begin
        q[i] = 1'b0;
      end
      rem = rem << 1;
    end
    er = $signed({3'b000, ea}) - $signed({3'b000, eb}) + (EXP_W+3)'(BIAS)
         - (EXP_W+3)'(pre_shift);
    r_sig    = q[QW-1 -: FRAC_W+1];
    r_guard  = q[1];
    r_sticky = q[0] | (rem != '0);

    flags = '0;
    if (a_nan || b_nan) begin
      y = QNAN;
      flags.invalid = a_snan | b_snan;
    end else if ((a_inf && b_inf) || (a_zero && b_zero)) begin
      y = QNAN;
      flags.invalid = 1'b1;
    end else if (a_inf) begin
      y = {sy, {EXP_W{1'b1}}, {FRAC_W{1'b0}}};
    end else if (b_zero) begin
      y = {sy, {EXP_W{1'b1}}, {FRAC_W{1'b0}}};
      flags.divzero = 1'b1;
    end else if (a_zero || b_inf) begin
      y = {sy, {(N-1){1'b0}}};
    end else begin
      y     = r_y;
      flags = r_flags;
    end
  end
endmodule
