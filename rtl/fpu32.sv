// fpu32: single-precision floating point arithmetic unit.
//
// Performs add, subtract, multiply, divide and square root on 32-bit IEEE 754
// operands, chosen by the operation code the instruction decoder supplies,
// and returns the result in single format with the five IEEE exception flags.
// Each operation has its own operator (fp_addsub, fp_mul, fp_div, fp_sqrt, all
// with EXP_W=8, FRAC_W=23); an output multiplexer picks the requested one.
// Square root uses operand a only. Codes 5..7 return +0 with no flags.
// Purely combinational: the processor issues one operation per cycle and
// writes the result at the end of that cycle.
// The five operations on 32-bit operands are specified; single-cycle
// combinational operators are this design's choice.
module fpu32
  import cfp_pkg::*;
(
  input  fpu_op_t     op,
  input  rmode_t      rm,
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] y,
  output fp_flags_t   flags
);
  logic [31:0] y_add, y_mul, y_div, y_sqrt;
  fp_flags_t   f_add, f_mul, f_div, f_sqrt;

  fp_addsub #(.EXP_W(8), .FRAC_W(23)) u_add (
    .a(a), .b(b), .sub(op == FPU_SUB), .rm(rm), .y(y_add), .flags(f_add));
  fp_mul #(.EXP_W(8), .FRAC_W(23)) u_mul (
    .a(a), .b(b), .rm(rm), .y(y_mul), .flags(f_mul));
  fp_div #(.EXP_W(8), .FRAC_W(23)) u_div (
    .a(a), .b(b), .rm(rm), .y(y_div), .flags(f_div));
  fp_sqrt #(.EXP_W(8), .FRAC_W(23)) u_sqrt (
    .a(a), .rm(rm), .y(y_sqrt), .flags(f_sqrt));

  always_comb begin
    unique case (op)
      FPU_ADD, FPU_SUB: begin y = y_add;  flags = f_add;  end
      FPU_MUL:          begin y = y_mul;  flags = f_mul;  end
      FPU_DIV:          begin y = y_div;  flags = f_div;  end
      FPU_SQRT:         begin y = y_sqrt; flags = f_sqrt; end
      default:          begin y = '0;     flags = '0;     end
    endcase
  end
endmodule
