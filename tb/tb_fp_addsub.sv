// tb_fp_addsub: self-checking testbench of the floating point adder/subtractor.
//
// Instantiates the adder twice, in single (8/23) and half (5/10) precision.
// Random normal operands over the whole exponent range are checked in
// round-to-nearest-even; operands with nearby exponents are checked in all four
// rounding modes. Result bits and all five flags are compared with the real-
// arithmetic model of fp_ref_pkg. Directed cases cover NaN, infinities,
// inf - inf, signed zeros, exact cancellation, overflow and flush to zero.
// The adder is combinational: each vector is applied, then checked 1 ns later.
module tb_fp_addsub;
  import cfp_pkg::*;
  import fp_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [31:0] a32, b32, y32;
  logic [15:0] a16, b16, y16;
  logic        sub;
  rmode_t      rm;
  fp_flags_t   f32, f16;

  fp_addsub #(.EXP_W(8), .FRAC_W(23)) dut32 (.a(a32), .b(b32), .sub(sub), .rm(rm), .y(y32), .flags(f32));
  fp_addsub #(.EXP_W(5), .FRAC_W(10)) dut16 (.a(a16), .b(b16), .sub(sub), .rm(rm), .y(y16), .flags(f16));

  task automatic chk32(logic [31:0] exp_y, logic [4:0] exp_f, string what);
    checks++;
    if (y32 !== exp_y || f32 !== exp_f) begin
      failures++;
      if (failures < 20)
        $display("FAIL32 %s a=%h b=%h sub=%0d rm=%0d got %h/%b want %h/%b",
                 what, a32, b32, sub, rm, y32, f32, exp_y, exp_f);
    end
  endtask

  task automatic chk16(logic [15:0] exp_y, logic [4:0] exp_f, string what);
    checks++;
    if (y16 !== exp_y || f16 !== exp_f) begin
      failures++;
      if (failures < 20)
        $display("FAIL16 %s a=%h b=%h sub=%0d rm=%0d got %h/%b want %h/%b",
                 what, a16, b16, sub, rm, y16, f16, exp_y, exp_f);
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
    int          ea;
    // random, whole exponent range, nearest-even
    for (int i = 0; i < 3000; i++) begin
      a32 = rand_fp(8, 23, 1, 254);  b32 = rand_fp(8, 23, 1, 254);
      sub = 1'($urandom_range(1));   rm = RM_RNE;
      #1 r = ref_add(a32, b32, sub, 8, 23, 0, fl); chk32(r, fl, "rnd32");
    end
    // nearby exponents, every rounding mode (exact reference sum)
    for (int i = 0; i < 4000; i++) begin
      ea  = $urandom_range(200, 30);
      a32 = rand_fp(8, 23, ea, ea);
      b32 = rand_fp(8, 23, ea - $urandom_range(20), ea - $urandom_range(20) + 1);
      if (i % 3 == 0) b32 = {~a32[31], a32[30:4], 4'($urandom)};   // heavy cancellation
      sub = 1'($urandom_range(1));   rm = rmode_t'($urandom_range(3));
      #1 r = ref_add(a32, b32, sub, 8, 23, int'(rm), fl); chk32(r, fl, "modes32");
    end
    // half precision: reference is exact for all exponents
    for (int i = 0; i < 6000; i++) begin
      a16 = 16'(rand_fp(5, 10, 1, 30));  b16 = 16'(rand_fp(5, 10, 1, 30));
      if (i % 4 == 0) b16 = {a16[15:4], 4'($urandom)};
      sub = 1'($urandom_range(1));   rm = rmode_t'($urandom_range(3));
      #1 r = ref_add(32'(a16), 32'(b16), sub, 5, 10, int'(rm), fl); chk16(16'(r), fl, "rnd16");
    end
    // directed special cases (single precision)
    rm = RM_RNE; sub = 0;
    a32 = 32'h7fc00000; b32 = 32'h3f800000; #1 chk32(32'h7fc00000, 5'b00000, "qnan");
    a32 = 32'h7f800001; b32 = 32'h3f800000; #1 chk32(32'h7fc00000, 5'b10000, "snan");
    a32 = 32'h7f800000; b32 = 32'hff800000; #1 chk32(32'h7fc00000, 5'b10000, "inf-inf");
    a32 = 32'h7f800000; b32 = 32'hbf800000; #1 chk32(32'h7f800000, 5'b00000, "inf+x");
    a32 = 32'h3f800000; b32 = 32'hff800000; #1 chk32(32'hff800000, 5'b00000, "x+-inf");
    a32 = 32'h80000000; b32 = 32'h80000000; #1 chk32(32'h80000000, 5'b00000, "-0+-0");
    a32 = 32'h80000000; b32 = 32'h00000000; #1 chk32(32'h00000000, 5'b00000, "-0++0");
    rm = RM_RDN; #1 chk32(32'h80000000, 5'b00000, "-0++0 rdn");
    a32 = 32'h00000000; b32 = 32'hc0400000; #1 chk32(32'hc0400000, 5'b00000, "0+x");
    rm = RM_RNE; sub = 1;
    a32 = 32'h40490fdb; b32 = 32'h40490fdb; #1 chk32(32'h00000000, 5'b00000, "x-x");
    rm = RM_RDN; #1 chk32(32'h80000000, 5'b00000, "x-x rdn");
    rm = RM_RNE; sub = 0;
    a32 = 32'h7f7fffff; b32 = 32'h7f7fffff; #1 chk32(32'h7f800000, 5'b00101, "overflow");
    rm = RM_RTZ; #1 chk32(32'h7f7fffff, 5'b00101, "overflow rtz");
    rm = RM_RNE; sub = 1;
    a32 = 32'h00c00000; b32 = 32'h00800000; #1 chk32(32'h00000000, 5'b00011, "flush");
    sub = 0;
    a32 = 32'h3f800000; b32 = 32'h00000001; #1 chk32(32'h3f800000, 5'b00000, "denormal in");
    a16 = 16'h3c00; b16 = 16'h4000; #1 chk16(16'h4200, 5'b00000, "1+2");
    a16 = 16'h7bff; b16 = 16'h7bff; #1 chk16(16'h7c00, 5'b00101, "overflow16");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
