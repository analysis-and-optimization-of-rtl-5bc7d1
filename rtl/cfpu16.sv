// cfpu16: complex floating point arithmetic unit.
//
// A complex operand is one 32-bit word holding two 16-bit IEEE 754 numbers
// (1 sign, 5 exponent, 10 fraction bits): the real part in [31:16] and the
// imaginary part in [15:0]. The operation code goes through the 3-to-8
// operation decoder; its one-hot lines select
//   code 0  add       (a.re + b.re) + j(a.im + b.im)
//   code 1  subtract  (a.re - b.re) + j(a.im - b.im)
//   code 2  multiply  (a.re*b.re - a.im*b.im) + j(a.re*b.im + a.im*b.re)
// Addition and subtraction use two half-precision adders, one per part.
// Multiplication uses four half-precision multipliers in parallel and the same
// two adders to combine the products; every product and sum is rounded in the
// selected mode, as separate IEEE operations would be. Codes 3..7 select
// nothing: the result is 0 and 'illegal' is raised. 'flags' is the OR of the
// exception flags of every operator that took part. Purely combinational.
// The 16-bit part format, the three operations and the decoder are specified;
// the word layout and the parallel multiplier structure are this design's own.
module cfpu16
  import cfp_pkg::*;
(
  input  logic [2:0]  op,
  input  rmode_t      rm,
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] y,
  output fp_flags_t   flags,
  output logic        illegal
);
  logic [7:0]  sel;
  logic        do_add, do_sub, do_mul;
  logic [15:0] ar, ai, br, bi;
  logic [15:0] p_rr, p_ii, p_ri, p_ir;       // a.re*b.re, a.im*b.im, a.re*b.im, a.im*b.re
  fp_flags_t   f_rr, f_ii, f_ri, f_ir;
  logic [15:0] add_re_a, add_re_b, add_im_a, add_im_b;
  logic        sub_re, sub_im;
  logic [15:0] y_re, y_im;
  fp_flags_t   f_re, f_im;

  op_decoder3to8 u_dec (.din(op), .en(1'b1), .dout(sel));

  assign do_add = sel[CPX_ADD];
  assign do_sub = sel[CPX_SUB];
  assign do_mul = sel[CPX_MUL];
  assign {ar, ai} = a;
  assign {br, bi} = b;

  fp_mul #(.EXP_W(5), .FRAC_W(10)) u_mul_rr (.a(ar), .b(br), .rm(rm), .y(p_rr), .flags(f_rr));
  fp_mul #(.EXP_W(5), .FRAC_W(10)) u_mul_ii (.a(ai), .b(bi), .rm(rm), .y(p_ii), .flags(f_ii));
  fp_mul #(.EXP_W(5), .FRAC_W(10)) u_mul_ri (.a(ar), .b(bi), .rm(rm), .y(p_ri), .flags(f_ri));
  fp_mul #(.EXP_W(5), .FRAC_W(10)) u_mul_ir (.a(ai), .b(br), .rm(rm), .y(p_ir), .flags(f_ir));

  // adder inputs: the operands themselves, or the partial products
  always_comb begin
    if (do_mul) begin
      add_re_a = p_rr;  add_re_b = p_ii;  sub_re = 1'b1;
      add_im_a = p_ri;  add_im_b = p_ir;  sub_im = 1'b0;
    end else begin
      add_re_a = ar;    add_re_b = br;    sub_re = do_sub;
      add_im_a = ai;    add_im_b = bi;    sub_im = do_sub;
    end
  end

  fp_addsub #(.EXP_W(5), .FRAC_W(10)) u_add_re (
    .a(add_re_a), .b(add_re_b), .sub(sub_re), .rm(rm), .y(y_re), .flags(f_re));
  fp_addsub #(.EXP_W(5), .FRAC_W(10)) u_add_im (
    .a(add_im_a), .b(add_im_b), .sub(sub_im), .rm(rm), .y(y_im), .flags(f_im));

  always_comb begin
    illegal = ~(do_add | do_sub | do_mul);
    if (illegal) begin
      y     = '0;
      flags = '0;
    end else begin
      y     = {y_re, y_im};
      flags = f_re | f_im;
      if (do_mul) flags = flags | f_rr | f_ii | f_ri | f_ir;
    end
  end
endmodule
