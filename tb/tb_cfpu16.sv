// tb_cfpu16: self-checking testbench of the complex floating point unit.
//
// Random complex operands (16-bit real and imaginary parts, exponents kept in a
// range where no partial product overflows or flushes) with codes add,
// subtract and multiply, in all rounding modes. The expected value is built
// from fp_ref_pkg: add/sub part by part; multiply as the rounded products
// combined by rounded adds, the order in which the unit evaluates them. Flags
// are the OR of every step's flags. Directed: (1+2j)(3+4j) = -5+10j,
// (1+2j)+(3+4j) = 4+6j, unassigned codes 3..7 give 0 and 'illegal'.
module tb_cfpu16;
  import cfp_pkg::*;
  import fp_ref_pkg::*;

  int checks = 0, failures = 0;
  logic [31:0] a, b, y;
  logic [2:0]  op;
  rmode_t      rm;
  fp_flags_t   f;
  logic        illegal;

  cfpu16 dut (.op(op), .rm(rm), .a(a), .b(b), .y(y), .flags(f), .illegal(illegal));

  task automatic chk(logic [31:0] exp_y, logic [4:0] exp_f, logic exp_ill);
    checks++;
    if (y !== exp_y || f !== exp_f || illegal !== exp_ill) begin
      failures++;
      if (failures < 20) $display("FAIL op=%0d a=%h b=%h rm=%0d got %h/%b/%b want %h/%b/%b",
                                  op, a, b, rm, y, f, illegal, exp_y, exp_f, exp_ill);
    end
  endtask

  function automatic logic [15:0] h(logic [31:0] v); return v[15:0]; endfunction

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] rr, ri, prr, pii, pri, pir;
    logic [4:0]  f1, f2, f3, f4, f5, f6;
    for (int i = 0; i < 6000; i++) begin
      a  = {16'(rand_fp(5, 10, 9, 21)), 16'(rand_fp(5, 10, 9, 21))};
      b  = {16'(rand_fp(5, 10, 9, 21)), 16'(rand_fp(5, 10, 9, 21))};
      op = 3'($urandom_range(2));
      rm = rmode_t'($urandom_range(3));
      #1;
      if (op == CPX_MUL) begin
        prr = ref_mul({16'd0, a[31:16]}, {16'd0, b[31:16]}, 5, 10, int'(rm), f1);
        pii = ref_mul({16'd0, a[15:0]},  {16'd0, b[15:0]},  5, 10, int'(rm), f2);
        pri = ref_mul({16'd0, a[31:16]}, {16'd0, b[15:0]},  5, 10, int'(rm), f3);
        pir = ref_mul({16'd0, a[15:0]},  {16'd0, b[31:16]}, 5, 10, int'(rm), f4);
        rr  = ref_add(prr, pii, 1'b1, 5, 10, int'(rm), f5);
        ri  = ref_add(pri, pir, 1'b0, 5, 10, int'(rm), f6);
        chk({h(rr), h(ri)}, f1 | f2 | f3 | f4 | f5 | f6, 1'b0);
      end else begin
        rr = ref_add({16'd0, a[31:16]}, {16'd0, b[31:16]}, op[0], 5, 10, int'(rm), f1);
        ri = ref_add({16'd0, a[15:0]},  {16'd0, b[15:0]},  op[0], 5, 10, int'(rm), f2);
        chk({h(rr), h(ri)}, f1 | f2, 1'b0);
      end
    end
    rm = RM_RNE;
    a = {16'h3c00, 16'h4000}; b = {16'h4200, 16'h4400};          // 1+2j, 3+4j
    op = CPX_MUL; #1 chk({16'hc500, 16'h4900}, 5'b0, 1'b0);       // -5+10j
    op = CPX_ADD; #1 chk({16'h4400, 16'h4600}, 5'b0, 1'b0);       // 4+6j
    op = CPX_SUB; #1 chk({16'hc000, 16'hc000}, 5'b0, 1'b0);       // -2-2j
    for (int c = 3; c < 8; c++) begin
      op = 3'(c); #1 chk(32'h0, 5'b0, 1'b1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
