// fp_round: post-normalisation rounding and packing stage shared by the floating
// point operators.
//
// Takes a normalised result (sign, biased exponent that may lie outside the
// format's range, significand with its leading one at the top, one guard bit and
// a sticky bit) and produces the packed IEEE 754 word of width 1+EXP_W+FRAC_W,
// rounded in the selected mode, with the overflow, underflow and inexact flags.
// The rounding increment is added to the concatenated {exponent, fraction}, so a
// carry out of the fraction moves into the exponent by itself. Results below the
// smallest normal number are flushed to a signed zero (this design keeps no
// subnormals); an exponent that reaches the all-ones code overflows to infinity
// or to the largest finite number as the rounding mode requires.
// The leading one sig[FRAC_W] is implied by normalisation and is not stored,
// so linting reports that bit as unused; that is expected.
// Purely combinational.
// Rounding by a selectable mode is specified; the four IEEE modes and the
// flush-to-zero convention are this design's choices.
module fp_round
  import cfp_pkg::*;
#(
  parameter int unsigned EXP_W  = 8,
  parameter int unsigned FRAC_W = 23
) (
  input  logic                      sign,
  input  logic signed [EXP_W+2:0]   exp,     // biased exponent of sig (leading one = 2^(exp-bias))
  input  logic [FRAC_W:0]           sig,     // normalised significand, sig[FRAC_W] = 1
  input  logic                      guard,   // first bit below the significand
  input  logic                      sticky,  // OR of all further bits
  input  rmode_t                    rm,
  output logic [EXP_W+FRAC_W:0]     y,
  output fp_flags_t                 flags
);
  localparam int EMAX = (1 << EXP_W) - 1;   // all-ones exponent code
  localparam logic signed [EXP_W+2:0] EMAX_S = (EXP_W+3)'(EMAX);

  logic                    inc;
  logic [EXP_W+FRAC_W-1:0] mag;             // {exponent, fraction} after rounding
  logic                    to_inf;

  always_comb begin
    unique case (rm)
      RM_RNE:  inc = guard & (sticky | sig[0]);
      RM_RTZ:  inc = 1'b0;
      RM_RDN:  inc = sign & (guard | sticky);
      RM_RUP:  inc = ~sign & (guard | sticky);
      default: inc = 1'b0;
    endcase
    to_inf = (rm == RM_RNE) || (rm == RM_RUP && !sign) || (rm == RM_RDN && sign);
    mag    = {exp[EXP_W-1:0], sig[FRAC_W-1:0]} + {{(EXP_W+FRAC_W-1){1'b0}}, inc};
    flags  = '0;
    if (exp <= 0) begin
      // tiny before rounding: flush to zero
      y               = {sign, {(EXP_W+FRAC_W){1'b0}}};
      flags.underflow = 1'b1;
      flags.inexact   = 1'b1;
    end else if (exp >= EMAX_S || (exp == EMAX_S - 1 && mag[EXP_W+FRAC_W-1 -: EXP_W] == EMAX[EXP_W-1:0])) begin
      flags.overflow = 1'b1;
      flags.inexact  = 1'b1;
      y = to_inf ? {sign, {EXP_W{1'b1}}, {FRAC_W{1'b0}}}
                 : {sign, {(EXP_W-1){1'b1}}, 1'b0, {FRAC_W{1'b1}}};
    end else begin
      y             = {sign, mag};
      flags.inexact = guard | sticky;
    end
  end
endmodule
