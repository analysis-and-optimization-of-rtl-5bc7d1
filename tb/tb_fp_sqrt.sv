// tb_fp_sqrt: self-checking testbench of the single-precision square root.
//
// Random positive normal operands over the whole exponent range, odd and even
// exponents, in all four rounding modes, compared with the double-precision
// square root rounded by fp_ref_pkg. Directed cases: perfect squares (exact,
// no inexact flag), sqrt(2), +-0, +inf, negative operands and NaN (invalid).
// Combinational DUT: checked 1 ns after each vector.
module tb_fp_sqrt;
  import cfp_pkg::*;
  import fp_ref_pkg::*;

  int checks = 0, failures = 0;
  logic [31:0] a, y;
  rmode_t      rm;
  fp_flags_t   f;

  fp_sqrt #(.EXP_W(8), .FRAC_W(23)) dut (.a(a), .rm(rm), .y(y), .flags(f));

  task automatic chk(logic [31:0] exp_y, logic [4:0] exp_f, string what);
    checks++;
    if (y !== exp_y || f !== exp_f) begin
      failures++;
      if (failures < 20) $display("FAIL %s a=%h rm=%0d got %h/%b want %h/%b",
                                  what, a, rm, y, f, exp_y, exp_f);
    end
  endtask

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] r;
    logic [4:0]  fl;
    for (int i = 0; i < 8000; i++) begin
      a = rand_fp(8, 23, 1, 254);
      a[31] = 1'b0;
      rm = rmode_t'($urandom_range(3));
      #1 r = ref_sqrt(a, 8, 23, int'(rm), fl); chk(r, fl, "rnd");
    end
    rm = RM_RNE;
    a = 32'h41800000; #1 chk(32'h40800000, 5'b00000, "sqrt16");
    a = 32'h41100000; #1 chk(32'h40400000, 5'b00000, "sqrt9");
    a = 32'h40000000; #1 chk(32'h3fb504f3, 5'b00001, "sqrt2");
    rm = RM_RUP; #1 chk(32'h3fb504f4, 5'b00001, "sqrt2 up");
    rm = RM_RNE;
    a = 32'h00000000; #1 chk(32'h00000000, 5'b00000, "+0");
    a = 32'h80000000; #1 chk(32'h80000000, 5'b00000, "-0");
    a = 32'h7f800000; #1 chk(32'h7f800000, 5'b00000, "inf");
    a = 32'hc0800000; #1 chk(32'h7fc00000, 5'b10000, "neg");
    a = 32'h7f800001; #1 chk(32'h7fc00000, 5'b10000, "snan");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
