// control_unit: instruction decoder of the processor's control path.
//
// Splits a 32-bit instruction word into its fields and produces the control
// bundle (ctrl_t) that steers the datapath for the execute stage: register
// indexes for the two read ports and the write port, the extended immediate,
// the operation for the integer, single-precision and complex units, the
// rounding mode, the write-back source, and the memory, branch, flag and halt
// controls. Layout (this design's own):
//   [31:26] opcode  [25:21] rd  [20:16] rs  [15:11] rt  [15:0] imm16
//   OP_ALU: [3:0] alu_op_t   OP_FPU: [2:0] fpu_op_t, [6:5] rounding mode
//   OP_CPX: [2:0] complex operation code, [6:5] rounding mode
// Stores and branches read rd on port B. Unknown opcodes decode as no-ops.
// Purely combinational.
module control_unit
  import cfp_pkg::*;
(
  input  logic [31:0] instr,
  output ctrl_t       ctrl
);
  opcode_t     op;
  logic [15:0] imm16;

  always_comb begin
    op    = opcode_t'(instr[31:26]);
    imm16 = instr[15:0];

    ctrl           = '0;
    ctrl.rd        = instr[25:21];
    ctrl.rs        = instr[20:16];
    ctrl.rt        = instr[15:11];
    ctrl.imm       = {{16{imm16[15]}}, imm16};
    ctrl.alu_op    = ALU_ADD;
    ctrl.alu_src   = SRC_REG;
    ctrl.fpu_op    = fpu_op_t'(instr[2:0]);
    ctrl.cpx_op    = instr[2:0];
    ctrl.rm        = rmode_t'(instr[6:5]);
    ctrl.wb_sel    = WB_ALU;

    unique case (op)
      OP_ALU: begin
        ctrl.alu_op = alu_op_t'(instr[3:0]);
        ctrl.reg_we = 1'b1;
      end
      OP_FPU: begin
        ctrl.wb_sel = WB_FPU;
        ctrl.reg_we = 1'b1;
        ctrl.fp_en  = 1'b1;
      end
      OP_CPX: begin
        ctrl.wb_sel = WB_CPX;
        ctrl.reg_we = 1'b1;
        ctrl.cpx_en = 1'b1;
      end
      OP_ADDI: begin
        ctrl.alu_src = SRC_IMM;
        ctrl.reg_we  = 1'b1;
      end
      OP_ORI: begin
        ctrl.imm     = {16'd0, imm16};
        ctrl.alu_op  = ALU_OR;
        ctrl.alu_src = SRC_IMM;
        ctrl.reg_we  = 1'b1;
      end
      OP_LUI: begin
        ctrl.imm    = {imm16, 16'd0};
        ctrl.wb_sel = WB_IMM;
        ctrl.reg_we = 1'b1;
      end
      OP_LW: begin
        ctrl.alu_src = SRC_IMM;
        ctrl.wb_sel  = WB_MEM;
        ctrl.reg_we  = 1'b1;
        ctrl.mem_re  = 1'b1;
      end
      OP_SW: begin
        ctrl.alu_src = SRC_IMM;
        ctrl.mem_we  = 1'b1;
        ctrl.b_is_rd = 1'b1;
      end
      OP_BEQ, OP_BNE: begin
        ctrl.branch  = 1'b1;
        ctrl.br_ne   = (op == OP_BNE);
        ctrl.b_is_rd = 1'b1;
      end
      OP_RDFL: begin
        ctrl.wb_sel    = WB_FLAGS;
        ctrl.reg_we    = 1'b1;
        ctrl.flags_clr = 1'b1;
      end
      OP_HALT: ctrl.halt = 1'b1;
      default: ;
    endcase
  end
endmodule
