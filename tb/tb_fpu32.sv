// tb_fpu32: self-checking testbench of the single-precision arithmetic unit.
//
// Drives random normal operands with each of the five operation codes and a
// random rounding mode, and compares the selected result and flags with the
// real-arithmetic model of fp_ref_pkg; unused codes must return +0, no flags.
// Operands are kept in a middle exponent range with nearby exponents so that
// the double-precision reference sum is exact in every mode.
module tb_fpu32;
  import cfp_pkg::*;
  import fp_ref_pkg::*;

  int checks = 0, failures = 0;
  int per_op [5];
  logic [31:0] a, b, y;
  fpu_op_t     op;
  rmode_t      rm;
  fp_flags_t   f;

  fpu32 dut (.op(op), .rm(rm), .a(a), .b(b), .y(y), .flags(f));

  task automatic chk(logic [31:0] exp_y, logic [4:0] exp_f);
    checks++;
    if (y !== exp_y || f !== exp_f) begin
      failures++;
      if (failures < 20) $display("FAIL op=%0d a=%h b=%h rm=%0d got %h/%b want %h/%b",
                                  op, a, b, rm, y, f, exp_y, exp_f);
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
    for (int i = 0; i < 5000; i++) begin
      ea = $urandom_range(160, 90);
      a  = rand_fp(8, 23, ea, ea);
      b  = rand_fp(8, 23, ea - 12, ea + 12);
      op = fpu_op_t'($urandom_range(4));
      rm = rmode_t'($urandom_range(3));
      if (op == FPU_SQRT) a[31] = 1'b0;
      #1;
      unique case (op)
        FPU_ADD:  r = ref_add(a, b, 1'b0, 8, 23, int'(rm), fl);
        FPU_SUB:  r = ref_add(a, b, 1'b1, 8, 23, int'(rm), fl);
        FPU_MUL:  r = ref_mul(a, b, 8, 23, int'(rm), fl);
        FPU_DIV:  r = ref_div(a, b, 8, 23, int'(rm), fl);
        default:  r = ref_sqrt(a, 8, 23, int'(rm), fl);
      endcase
      chk(r, fl);
      per_op[int'(op)]++;
    end
    for (int c = 5; c < 8; c++) begin
      op = fpu_op_t'(c); a = 32'h3f800000; b = 32'h3f800000; #1 chk(32'h0, 5'b0);
    end
    for (int k = 0; k < 5; k++) if (per_op[k] == 0) begin
      failures++;
      $display("FAIL operation %0d never exercised", k);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
