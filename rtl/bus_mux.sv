// bus_mux: write-back bus multiplexer.
//
// Connects the result of one source, chosen by the decoder's wb_sel, to the
// bus that carries data back to the register bank: integer ALU, single
// precision unit, complex unit, memory read data, immediate, or the sticky
// exception flags. Purely combinational.
// The multiplexer between register bank and units is specified; its exact
// sources and select encoding are this design's choices.
module bus_mux
  import cfp_pkg::*;
(
  input  wb_sel_t     sel,
  input  logic [31:0] alu,
  input  logic [31:0] fpu,
  input  logic [31:0] cpx,
  input  logic [31:0] mem,
  input  logic [31:0] imm,
  input  logic [31:0] flags,
  output logic [31:0] y
);
  always_comb begin
    unique case (sel)
      WB_ALU:   y = alu;
      WB_FPU:   y = fpu;
      WB_CPX:   y = cpx;
      WB_MEM:   y = mem;
      WB_IMM:   y = imm;
      WB_FLAGS: y = flags;
      default:  y = '0;
    endcase
  end
endmodule
