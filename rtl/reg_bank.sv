// reg_bank: register bank of NREGS registers of WIDTH bits.
//
// Two read ports deliver two operands in the same cycle (combinational read);
// one write port stores at the rising clock edge when we is high. A read of
// the register being written returns the old value until the edge. All
// registers clear on the synchronous active-low reset. Register 0 is an
// ordinary register.
// The size (32 x 32 bits) and the two simultaneous reads are as specified;
// clearing at reset and the write timing are this design's choices.
module reg_bank #(
  parameter int unsigned NREGS = 32,
  parameter int unsigned WIDTH = 32
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [$clog2(NREGS)-1:0] ra_a,
  output logic [WIDTH-1:0]         rd_a,
  input  logic [$clog2(NREGS)-1:0] ra_b,
  output logic [WIDTH-1:0]         rd_b,
  input  logic                     we,
  input  logic [$clog2(NREGS)-1:0] wa,
  input  logic [WIDTH-1:0]         wd
);
  logic [WIDTH-1:0] regs [NREGS];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= '0;
    end else if (we) begin
      regs[wa] <= wd;
    end
  end

  assign rd_a = regs[ra_a];
  assign rd_b = regs[ra_b];
endmodule
