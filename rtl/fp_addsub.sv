// fp_addsub: IEEE 754 floating point adder/subtractor, width-parameterised.
//
// Three steps, as in the classic adder architecture:
//   pre-normalisation - unpack both operands, detect NaN, infinity and zero,
//     order them by magnitude and shift the smaller significand right by the
//     exponent difference, keeping guard, round and sticky bits;
//   add/subtract     - add or subtract the aligned significands according to the
//     operand signs and the requested operation;
//   post-normalisation - find the leading one, shift it into place, adjust the
//     exponent, then round and pack through fp_round.
// Used at 32 bits (EXP_W=8, FRAC_W=23) in the single-precision unit and at 16
// bits (EXP_W=5, FRAC_W=10) in the complex unit. Subnormal inputs are read as
// zero. NaN results are the quiet NaN with only the top fraction bit set.
// Flags: invalid (signalling NaN input, inf - inf), overflow, underflow, inexact.
// Purely combinational.
// The three-step structure is as specified; the no-subnormal convention and
// the four rounding modes are this design's choices.
module fp_addsub
  import cfp_pkg::*;
#(
  parameter int unsigned EXP_W  = 8,
  parameter int unsigned FRAC_W = 23
) (
  input  logic [EXP_W+FRAC_W:0] a,
  input  logic [EXP_W+FRAC_W:0] b,
  input  logic                  sub,   // 1: a - b
  input  rmode_t                rm,
  output logic [EXP_W+FRAC_W:0] y,
  output fp_flags_t             flags
);
  localparam int N  = EXP_W + FRAC_W + 1;
  localparam int W  = FRAC_W + 4;          // hidden one + fraction + guard, round, sticky
  localparam logic [N-1:0] QNAN = {1'b0, {EXP_W{1'b1}}, 1'b1, {(FRAC_W-1){1'b0}}};

  logic              sa, sb;
  logic [EXP_W-1:0]  ea, eb;
  logic [FRAC_W-1:0] fa, fb;
  logic a_zero, b_zero, a_inf, b_inf, a_nan, b_nan, a_snan, b_snan;

  // aligned datapath
  logic              swap, sx, sy, eff_sub;
  logic [EXP_W-1:0]  ex, ey;
  logic [FRAC_W-1:0] fx, fy;
  logic [EXP_W-1:0]  d;
  logic [W-1:0]      mx, my, my_al, lost_mask;
  logic [W:0]        sum, norm;
  int                lead;
  logic signed [EXP_W+2:0] er;

  // rounding stage
  logic                  r_sign, r_guard, r_sticky;
  logic [FRAC_W:0]       r_sig;
  logic [N-1:0]          r_y;
  fp_flags_t             r_flags;

  fp_round #(.EXP_W(EXP_W), .FRAC_W(FRAC_W)) u_round (
    .sign(r_sign), .exp(er), .sig(r_sig), .guard(r_guard), .sticky(r_sticky),
    .rm(rm), .y(r_y), .flags(r_flags)
  );

  always_comb begin
    // ---- pre-normalisation: unpack and classify
    {sa, ea, fa} = a;
    {sb, eb, fb} = b;
    sb     = sb ^ sub;
    a_zero = (ea == '0);
    b_zero = (eb == '0);
    a_inf  = (ea == '1) && (fa == '0);
    b_inf  = (eb == '1) && (fb == '0);
    a_nan  = (ea == '1) && (fa != '0);
    b_nan  = (eb == '1) && (fb != '0);
    a_snan = a_nan && !fa[FRAC_W-1];
    b_snan = b_nan && !fb[FRAC_W-1];

    // order by magnitude, align the smaller operand
    swap = {eb, fb} > {ea, fa};
    sx = swap ? sb : sa;  ex = swap ? eb : ea;  fx = swap ? fb : fa;
    sy = swap ? sa : sb;  ey = swap ? ea : eb;  fy = swap ? fa : fb;
    d  = ex - ey;
    eff_sub = sx ^ sy;
    mx = {1'b1, fx, 3'b000};
    my = {1'b1, fy, 3'b000};
    lost_mask = ~({W{1'b1}} << d);
    if (d >= EXP_W'(W)) begin
      my_al = {{(W-1){1'b0}}, 1'b1};               // everything shifted into sticky
    end else begin
      my_al    = my >> d;
      my_al[0] = my_al[0] | (|(my & lost_mask));
    end

    // ---- add / subtract
    sum = eff_sub ? ({1'b0, mx} - {1'b0, my_al}) : ({1'b0, mx} + {1'b0, my_al});

    // ---- post-normalisation
    lead = 0;
    for (int i = 0; i <= W; i++) if (sum[i]) lead = i;
    norm = sum << (W - lead);
    er   = $signed({3'b000, ex}) + (EXP_W+3)'(lead - (W - 1));
    r_sign   = sx;
    r_sig    = norm[W -: FRAC_W+1];
    r_guard  = norm[W-FRAC_W-1];
    r_sticky = |norm[W-FRAC_W-2:0];

    // ---- result selection
    flags = '0;
    if (a_nan || b_nan) begin
      y = QNAN;
      flags.invalid = a_snan | b_snan;
    end else if (a_inf && b_inf && (sa != sb)) begin
      y = QNAN;
      flags.invalid = 1'b1;
    end else if (a_inf) begin
      y = {sa, {EXP_W{1'b1}}, {FRAC_W{1'b0}}};
    end else if (b_inf) begin
      y = {sb, {EXP_W{1'b1}}, {FRAC_W{1'b0}}};
    end else if (a_zero && b_zero) begin
      y = {(sa == sb) ? sa : (rm == RM_RDN), {(N-1){1'b0}}};
    end else if (a_zero) begin
      y = {sb, eb, fb};
    end else if (b_zero) begin
      y = {sa, ea, fa};
    end else if (sum == '0) begin
      y = {rm == RM_RDN, {(N-1){1'b0}}};           // exact cancellation
    end else begin
      y     = r_y;
      flags = r_flags;
    end
  end
endmodule
