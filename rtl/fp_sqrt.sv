// fp_sqrt: IEEE 754 floating point square root (single precision by default).
//
// The exponent is halved (the significand is doubled first when the unbiased
// exponent is odd), and the significand root is found by the digit-by-digit
// (non-restoring shift/subtract) integer square root, one result bit per step,
// unrolled into combinational logic. FRAC_W+2 root bits are produced
// (significand and guard); a non-zero final remainder is the sticky bit.
// fp_round rounds and packs; a square root can neither overflow nor underflow.
// sqrt(+-0) = +-0, sqrt(+inf) = +inf, a negative operand gives the quiet NaN
// and invalid. Subnormal inputs are read as zero. Purely combinational.
// Square root is specified only by function; the digit-by-digit algorithm is
// this design's choice.
module fp_sqrt
  import cfp_pkg::*;
#(
  parameter int unsigned EXP_W  = 8,
  parameter int unsigned FRAC_W = 23
) (
  input  logic [EXP_W+FRAC_W:0] a,
  input  rmode_t                rm,
  output logic [EXP_W+FRAC_W:0] y,
  output fp_flags_t             flags
);
  localparam int N    = EXP_W + FRAC_W + 1;
  localparam int RW   = FRAC_W + 2;        // root bits
  localparam int XW   = 2 * RW;            // radicand bits
  localparam int BIAS = (1 << (EXP_W - 1)) - 1;
  localparam logic [N-1:0] QNAN = {1'b0, {EXP_W{1'b1}}, 1'b1, {(FRAC_W-1){1'b0}}};

  logic              sa;
  logic [EXP_W-1:0]  ea;
  logic [FRAC_W-1:0] fa;
  logic a_zero, a_inf, a_nan, a_snan;
  logic signed [EXP_W+2:0] eu, er;
  logic [XW-1:0]     x;
  logic [RW-1:0]     root;
  logic [RW+2:0]     rem, trial;
  logic [FRAC_W:0]   r_sig;
  logic              r_guard, r_sticky;
  logic [N-1:0]      r_y;
  fp_flags_t         r_flags;

  fp_round #(.EXP_W(EXP_W), .FRAC_W(FRAC_W)) u_round (
    .sign(1'b0), .exp(er), .sig(r_sig), .guard(r_guard), .sticky(r_sticky),
    .rm(rm), .y(r_y), .flags(r_flags)
  );

  always_comb begin
    {sa, ea, fa} = a;
    a_zero = (ea == '0);
    a_inf  = (ea == '1) && (fa == '0);
    a_nan  = (ea == '1) && (fa != '0);
    a_snan = a_nan && !fa[FRAC_W-1];

    eu = $signed({3'b000, ea}) - (EXP_W+3)'(BIAS);
    er = (eu >>> 1) + (EXP_W+3)'(BIAS);
    // radicand = significand (doubled for an odd exponent) * 2^(FRAC_W+2)
    x  = eu[0] ? {{(RW-FRAC_W-2){1'b0}}, 1'b1, fa, 1'b0, {(FRAC_W+2){1'b0}}}
               : {{(RW-FRAC_W-1){1'b0}}, 1'b1, fa, {(FRAC_W+2){1'b0}}};
    root = '0;
    rem  = '0;
    for (int i = RW - 1; i >= 0; i--) begin
      rem   = {rem[RW:0], x[2*i+1], x[2*i]};
      trial = {1'b0, root, 2'b01};
      if (rem >= trial) begin
        rem  = rem - trial;
        root = {root[RW-2:0], 1'b1};
      end else begin
        root = {root[RW-2:0], 1'b0};
      end
    end
    r_sig    = root[RW-1:1];
    r_guard  = root[0];
    r_sticky = (rem != '0);

    flags = '0;
    if (a_nan) begin
      y = QNAN;
      flags.invalid = a_snan;
    end else if (a_zero) begin
      y = {sa, {(N-1){1'b0}}};
    end else if (sa) begin
      y = QNAN;
      flags.invalid = 1'b1;
    end else if (a_inf) begin
      y = a;
    end else begin
      y     = r_y;
      flags = r_flags;
    end
  end
endmodule
