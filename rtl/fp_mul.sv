// fp_mul: IEEE 754 floating point multiplier, width-parameterised.
//
// Pre-normalisation checks the operands for NaN, infinity and zero and adds the
// exponents (removing one bias); the significands, hidden one included, are
// multiplied exactly (2*(FRAC_W+1) bits, 22 bits for the 16-bit format);
// post-normalisation shifts the product by at most one place, and fp_round
// rounds it in the selected mode and packs sign, exponent and fraction.
// Subnormal inputs are read as zero. Flags: invalid (signalling NaN, 0 * inf),
// overflow, underflow, inexact. Purely combinational.
// The pre-normalise / multiply / post-normalise structure is as specified;
// the no-subnormal convention and the rounding modes are this design's choices.
module fp_mul
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
  localparam int PW   = 2 * (FRAC_W + 1);
  localparam int BIAS = (1 << (EXP_W - 1)) - 1;
  localparam logic [N-1:0] QNAN = {1'b0, {EXP_W{1'b1}}, 1'b1, {(FRAC_W-1){1'b0}}};

  logic              sa, sb, sy;
  logic [EXP_W-1:0]  ea, eb;
  logic [FRAC_W-1:0] fa, fb;
  logic a_zero, b_zero, a_inf, b_inf, a_nan, b_nan, a_snan, b_snan;
  logic [PW-1:0]     prod, norm;
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

    prod = {{(FRAC_W+1){1'b0}}, 1'b1, fa} * {{(FRAC_W+1){1'b0}}, 1'b1, fb};
    norm = prod[PW-1] ? prod : (prod << 1);
    er   = $signed({3'b000, ea}) + $signed({3'b000, eb}) - (EXP_W+3)'(BIAS)
           + (EXP_W+3)'(prod[PW-1]);
    r_sig    = norm[PW-1 -: FRAC_W+1];
    r_guard  = norm[FRAC_W];
    r_sticky = |norm[FRAC_W-1:0];

    flags = '0;
    if (a_nan || b_nan) begin
      y = QNAN;
      flags.invalid = a_snan | b_snan;
    end else if ((a_inf && b_zero) || (b_inf && a_zero)) begin
      y = QNAN;
      flags.invalid = 1'b1;
    end else if (a_inf || b_inf) begin
      y = {sy, {EXP_W{1'b1}}, {FRAC_W{1'b0}}};
    end else if (a_zero || b_zero) begin
      y = {sy, {(N-1){1'b0}}};
    end else begin
      y     = r_y;
      flags = r_flags;
    end
  end
endmodule
