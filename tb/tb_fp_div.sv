// tb_fp_div: self-checking testbench of the single-precision divider.
//
// Random normal operands over the whole exponent range (overflow and flush to
// zero occur) and over a middle range, in all four rounding modes, compared with
// the double-precision quotient rounded by fp_ref_pkg (a double quotient of two
// 24-bit significands never lands on a single-precision rounding boundary
// unless it is exact, so the reference is correctly rounded). Directed cases:
// x / 0 (divide-by-zero), 0 / 0 and inf / inf (invalid), NaN, x / inf, exact
// quotients. Combinational DUT: checked 1 ns after each vector.
module tb_fp_div;
  import cfp_pkg::*;
  import fp_ref_pkg::*;

  int checks = 0, failures = 0;
  logic [31:0] a, b, y;
  rmode_t      rm;
  fp_flags_t   f;

  fp_div #(.EXP_W(8), .FRAC_W(23)) dut (.a(a), .b(b), .rm(rm), .y(y), .flags(f));

  task automatic chk(logic [31:0] exp_y, logic [4:0] exp_f, string what);
    checks++;
    if (y !== exp_y || f !== exp_f) begin
      failures++;
      if (failures < 20) $display("FAIL %s a=%h b=%h rm=%0d got %h/%b want %h/%b",
                                  what, a, b, rm, y, f, exp_y, exp_f);
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
      a = rand_fp(8, 23, 1, 254);  b = rand_fp(8, 23, 1, 254);
      if (i % 2 == 0) begin a = rand_fp(8, 23, 100, 150); b = rand_fp(8, 23, 100, 150); end
      if (i % 7 == 0) b = {b[31:23], a[22:0]};            // equal significands
      rm = rmode_t'($urandom_range(3));
      #1 r = ref_div(a, b, 8, 23, int'(rm), fl); chk(r, fl, "rnd");
    end
    rm = RM_RNE;
    a = 32'h40400000; b = 32'h00000000; #1 chk(32'h7f800000, 5'b01000, "x/0");
    a = 32'hc0400000; b = 32'h00000000; #1 chk(32'hff800000, 5'b01000, "-x/0");
    a = 32'h00000000; b = 32'h00000000; #1 chk(32'h7fc00000, 5'b10000, "0/0");
    a = 32'h7f800000; b = 32'hff800000; #1 chk(32'h7fc00000, 5'b10000, "inf/inf");
    a = 32'h7fc00000; b = 32'h3f800000; #1 chk(32'h7fc00000, 5'b00000, "nan");
    a = 32'h40400000; b = 32'hff800000; #1 chk(32'h80000000, 5'b00000, "x/inf");
    a = 32'h7f800000; b = 32'h40000000; #1 chk(32'h7f800000, 5'b00000, "inf/x");
    a = 32'h41100000; b = 32'h40400000; #1 chk(32'h40400000, 5'b00000, "9/3");
    a = 32'h3f800000; b = 32'h40400000; #1 chk(32'h3eaaaaab, 5'b00001, "1/3");
    rm = RM_RTZ; #1 chk(32'h3eaaaaaa, 5'b00001, "1/3 rtz");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
