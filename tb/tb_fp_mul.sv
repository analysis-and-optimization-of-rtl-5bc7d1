// tb_fp_mul: self-checking testbench of the floating point multiplier.
//
// Single (8/23) and half (5/10) precision instances. Random normal operands
// over the whole exponent range (so products overflow and flush to zero too)
// in all four rounding modes; the double-precision product is exact, so the
// model in fp_ref_pkg gives the correctly rounded result and flags. Directed
// cases: NaNs, 0 * inf, inf * x, signed zeros. Combinational DUT: each vector
// is checked 1 ns after it is applied.
module tb_fp_mul;
  import cfp_pkg::*;
  import fp_ref_pkg::*;

  int checks = 0, failures = 0;
  logic [31:0] a32, b32, y32;
  logic [15:0] a16, b16, y16;
  rmode_t      rm;
  fp_flags_t   f32, f16;

  fp_mul #(.EXP_W(8), .FRAC_W(23)) dut32 (.a(a32), .b(b32), .rm(rm), .y(y32), .flags(f32));
  fp_mul #(.EXP_W(5), .FRAC_W(10)) dut16 (.a(a16), .b(b16), .rm(rm), .y(y16), .flags(f16));

  task automatic chk32(logic [31:0] exp_y, logic [4:0] exp_f, string what);
    checks++;
    if (y32 !== exp_y || f32 !== exp_f) begin
      failures++;
      if (failures < 20) $display("FAIL32 %s a=%h b=%h rm=%0d got %h/%b want %h/%b",
                                  what, a32, b32, rm, y32, f32, exp_y, exp_f);
    end
  endtask

  task automatic chk16(logic [15:0] exp_y, logic [4:0] exp_f, string what);
    checks++;
    if (y16 !== exp_y || f16 !== exp_f) begin
      failures++;
      if (failures < 20) $display("FAIL16 %s a=%h b=%h rm=%0d got %h/%b want %h/%b",
                                  what, a16, b16, rm, y16, f16, exp_y, exp_f);
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
    for (int i = 0; i < 6000; i++) begin
      a32 = rand_fp(8, 23, 1, 254);  b32 = rand_fp(8, 23, 1, 254);
      if (i % 2 == 0) begin a32 = rand_fp(8, 23, 90, 165); b32 = rand_fp(8, 23, 90, 165); end
      rm  = rmode_t'($urandom_range(3));
      #1 r = ref_mul(a32, b32, 8, 23, int'(rm), fl); chk32(r, fl, "rnd32");
    end
    for (int i = 0; i < 6000; i++) begin
      a16 = 16'(rand_fp(5, 10, 1, 30));  b16 = 16'(rand_fp(5, 10, 1, 30));
      rm  = rmode_t'($urandom_range(3));
      #1 r = ref_mul(32'(a16), 32'(b16), 5, 10, int'(rm), fl); chk16(16'(r), fl, "rnd16");
    end
    rm = RM_RNE;
    a32 = 32'h7fc00000; b32 = 32'h40000000; #1 chk32(32'h7fc00000, 5'b00000, "qnan");
    a32 = 32'h40000000; b32 = 32'hff800001; #1 chk32(32'h7fc00000, 5'b10000, "snan");
    a32 = 32'h00000000; b32 = 32'hff800000; #1 chk32(32'h7fc00000, 5'b10000, "0*inf");
    a32 = 32'hc0000000; b32 = 32'h7f800000; #1 chk32(32'hff800000, 5'b00000, "x*inf");
    a32 = 32'h80000000; b32 = 32'h40400000; #1 chk32(32'h80000000, 5'b00000, "-0*x");
    a32 = 32'h40400000; b32 = 32'h40400000; #1 chk32(32'h41100000, 5'b00000, "3*3");
    a16 = 16'h4200; b16 = 16'hc000; #1 chk16(16'hc600, 5'b00000, "3*-2");
    a16 = 16'h7bff; b16 = 16'h4000; #1 chk16(16'h7c00, 5'b00101, "ovf16");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
