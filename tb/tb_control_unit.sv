// tb_control_unit: self-checking testbench of the instruction decoder.
//
// Encodes each instruction type with random register fields and immediates
// and checks the decoded bundle field by field against what each instruction
// must do: register indexes, immediate extension, unit operation and rounding
// mode, write-back source, and the memory, branch, flag and halt controls.
module tb_control_unit;
  import cfp_pkg::*;
  int checks = 0, failures = 0;
  logic [31:0] instr;
  ctrl_t       c;

  control_unit dut (.instr(instr), .ctrl(c));

  task automatic chk(logic [63:0] got, logic [63:0] want, string what);
    checks++;
    if (got !== want) begin
      failures++;
      if (failures < 30) $display("FAIL %s instr=%h got %h want %h", what, instr, got, want);
    end
  endtask

  initial begin
    #100_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 300; i++) begin
      logic [4:0] rd = 5'($urandom), rs = 5'($urandom), rt = 5'($urandom);
      logic [15:0] imm = 16'($urandom);
      logic [3:0] fn = 4'($urandom_range(11));
      logic [1:0] m = 2'($urandom);
      // integer R-type
      instr = enc_r(OP_ALU, rd, rs, rt, {7'd0, fn}); #1;
      chk(c.rd, rd, "alu rd"); chk(c.rs, rs, "alu rs"); chk(c.rt, rt, "alu rt");
      chk(c.alu_op, fn, "alu op"); chk(c.reg_we, 1, "alu we"); chk(c.wb_sel, WB_ALU, "alu wb");
      chk(c.b_is_rd, 0, "alu port b"); chk(c.alu_src, SRC_REG, "alu src");
      // floating point
      instr = enc_r(OP_FPU, rd, rs, rt, {4'd0, m, 2'd0, 3'(i % 5)}); #1;
      chk(c.fpu_op, i % 5, "fpu op"); chk(c.rm, m, "fpu rm"); chk(c.wb_sel, WB_FPU, "fpu wb");
      chk(c.fp_en, 1, "fpu flags"); chk(c.reg_we, 1, "fpu we");
      // complex
      instr = enc_r(OP_CPX, rd, rs, rt, {4'd0, m, 2'd0, 3'(i % 3)}); #1;
      chk(c.cpx_op, i % 3, "cpx op"); chk(c.rm, m, "cpx rm"); chk(c.wb_sel, WB_CPX, "cpx wb");
      chk(c.cpx_en, 1, "cpx flags"); chk(c.fp_en, 0, "cpx not fpu");
      // immediates
      instr = enc_i(OP_ADDI, rd, rs, imm); #1;
      chk(c.imm, {{16{imm[15]}}, imm}, "addi imm"); chk(c.alu_src, SRC_IMM, "addi src");
      chk(c.alu_op, ALU_ADD, "addi op");
      instr = enc_i(OP_ORI, rd, rs, imm); #1;
      chk(c.imm, {16'd0, imm}, "ori imm"); chk(c.alu_op, ALU_OR, "ori op");
      instr = enc_i(OP_LUI, rd, rs, imm); #1;
      chk(c.imm, {imm, 16'd0}, "lui imm"); chk(c.wb_sel, WB_IMM, "lui wb");
      // memory
      instr = enc_i(OP_LW, rd, rs, imm); #1;
      chk(c.mem_re, 1, "lw re"); chk(c.wb_sel, WB_MEM, "lw wb"); chk(c.reg_we, 1, "lw we");
      chk(c.mem_we, 0, "lw we mem");
      instr = enc_i(OP_SW, rd, rs, imm); #1;
      chk(c.mem_we, 1, "sw we"); chk(c.reg_we, 0, "sw no reg"); chk(c.b_is_rd, 1, "sw port b");
      // branches
      instr = enc_i(OP_BEQ, rd, rs, imm); #1;
      chk(c.branch, 1, "beq"); chk(c.br_ne, 0, "beq ne"); chk(c.reg_we, 0, "beq no reg");
      instr = enc_i(OP_BNE, rd, rs, imm); #1;
      chk(c.branch, 1, "bne"); chk(c.br_ne, 1, "bne ne");
      // flags, halt, no-op
      instr = enc_i(OP_RDFL, rd, rs, imm); #1;
      chk(c.flags_clr, 1, "rdfl clr"); chk(c.wb_sel, WB_FLAGS, "rdfl wb");
      instr = enc_i(OP_HALT, rd, rs, imm); #1;
      chk(c.halt, 1, "halt"); chk(c.reg_we, 0, "halt no reg");
      instr = enc_i(OP_NOP, rd, rs, imm); #1;
      chk({c.reg_we, c.mem_we, c.mem_re, c.branch, c.halt}, 0, "nop");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
