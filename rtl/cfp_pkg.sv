// cfp_pkg: types and constants shared by the complex/floating point processor.
//
// Holds the IEEE 754 exception flag bundle, the rounding-mode encoding, the
// operation codes of the integer, single-precision and complex units, the
// instruction opcodes and the decoded control bundle. The processor executes
// 32-bit instruction words; the field layout below is this design's own choice:
//   [31:26] opcode  [25:21] rd  [20:16] rs  [15:11] rt  [15:0] imm16
//   R-type units take their operation from the low bits of the word:
//   [2:0] or [3:0] operation, [6:5] rounding mode for the floating point units.
package cfp_pkg;

  // IEEE 754 exception flags, in the order of the standard's list.
  typedef struct packed {
    logic invalid;
    logic divzero;
    logic overflow;
    logic underflow;
    logic inexact;
  } fp_flags_t;

  // Rounding modes (same numbering as the RISC-V frm field for the first four).
  typedef enum logic [1:0] {
    RM_RNE = 2'd0,   // to nearest, ties to even
    RM_RTZ = 2'd1,   // toward zero
    RM_RDN = 2'd2,   // toward minus infinity
    RM_RUP = 2'd3    // toward plus infinity
  } rmode_t;

  typedef enum logic [3:0] {
    ALU_ADD = 4'd0, ALU_SUB = 4'd1, ALU_MUL = 4'd2, ALU_AND = 4'd3,
    ALU_OR  = 4'd4, ALU_XOR = 4'd5, ALU_SLL = 4'd6, ALU_SRL = 4'd7,
    ALU_SRA = 4'd8, ALU_SLT = 4'd9, ALU_SLTU = 4'd10, ALU_NOR = 4'd11
  } alu_op_t;

  typedef enum logic [2:0] {
    FPU_ADD = 3'd0, FPU_SUB = 3'd1, FPU_MUL = 3'd2, FPU_DIV = 3'd3, FPU_SQRT = 3'd4
  } fpu_op_t;

  // Complex unit operation codes; they feed the 3-to-8 operation decoder.
  localparam logic [2:0] CPX_ADD = 3'd0;
  localparam logic [2:0] CPX_SUB = 3'd1;
  localparam logic [2:0] CPX_MUL = 3'd2;

  typedef enum logic [5:0] {
    OP_NOP  = 6'h00,
    OP_ALU  = 6'h01,   // rd = rs (alu op) rt
    OP_FPU  = 6'h02,   // rd = rs (fpu op) rt, single precision
    OP_CPX  = 6'h03,   // rd = rs (complex op) rt, two half-precision parts
    OP_ADDI = 6'h04,   // rd = rs + sext(imm16)
    OP_ORI  = 6'h05,   // rd = rs | zext(imm16)
    OP_LUI  = 6'h06,   // rd = imm16 << 16
    OP_LW   = 6'h08,   // rd = mem[rs + sext(imm16)]
    OP_SW   = 6'h09,   // mem[rs + sext(imm16)] = rd
    OP_BEQ  = 6'h0A,   // if (rd == rs) pc = pc + 1 + sext(imm16)
    OP_BNE  = 6'h0B,   // if (rd != rs) pc = pc + 1 + sext(imm16)
    OP_RDFL = 6'h0C,   // rd = sticky exception flags; clears them
    OP_HALT = 6'h3F
  } opcode_t;

  // Write-back bus sources.
  typedef enum logic [2:0] {
    WB_ALU = 3'd0, WB_FPU = 3'd1, WB_CPX = 3'd2, WB_MEM = 3'd3, WB_IMM = 3'd4, WB_FLAGS = 3'd5
  } wb_sel_t;

  // Second ALU operand source.
  typedef enum logic { SRC_REG = 1'b0, SRC_IMM = 1'b1 } src_t;

  typedef struct packed {
    logic [4:0]  rd;        // destination (or store data / branch operand) register
    logic [4:0]  rs;        // first source register (read port A)
    logic [4:0]  rt;        // second source register (read port B)
    logic        b_is_rd;   // read port B addresses rd instead of rt (stores, branches)
    logic [31:0] imm;       // extended immediate
    alu_op_t     alu_op;
    src_t        alu_src;
    fpu_op_t     fpu_op;
    logic [2:0]  cpx_op;
    rmode_t      rm;
    wb_sel_t     wb_sel;
    logic        reg_we;    // write the write-back bus into rd
    logic        mem_re;    // load
    logic        mem_we;    // store
    logic        branch;    // conditional branch
    logic        br_ne;     // branch on not-equal
    logic        fp_en;     // instruction updates the sticky flags from the FPU
    logic        cpx_en;    // instruction updates the sticky flags from the complex unit
    logic        flags_clr; // RDFL: clear the sticky flags
    logic        halt;
  } ctrl_t;

  // Build an instruction word (used by testbenches and by anyone writing programs).
  function automatic logic [31:0] enc_r(opcode_t op, logic [4:0] rd, logic [4:0] rs,
                                        logic [4:0] rt, logic [10:0] fn);
    return {op, rd, rs, rt, fn};
  endfunction

  function automatic logic [31:0] enc_i(opcode_t op, logic [4:0] rd, logic [4:0] rs,
                                        logic [15:0] imm);
    return {op, rd, rs, imm};
  endfunction

endpackage
