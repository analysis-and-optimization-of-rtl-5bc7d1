// onchip_ram: on-chip program and data memory, BYTES bytes of 32-bit words.
//
// Port A is a read-only port for instruction fetch, port B a read/write port
// for loads, stores and the host. Both are word-addressed and read
// synchronously: the word at the address presented before a rising edge is on
// the read data output after it (one cycle latency, block-RAM style). A write
// on port B takes effect at the edge; a read of the same address in that cycle
// returns the old word. The default is 8 KB (2048 words); BYTES may be raised
// to 64 KB. Contents are not reset.
// The 8 KB size and the 64 KB upper limit are as specified; the dual-port,
// word-addressed, synchronous-read organisation is this design's choice.
module onchip_ram #(
  parameter int unsigned BYTES = 8192,
  localparam int unsigned WORDS = BYTES / 4,
  localparam int unsigned AW = $clog2(WORDS)
) (
  input  logic          clk,
  input  logic [AW-1:0] a_addr,
  output logic [31:0]   a_rdata,
  input  logic [AW-1:0] b_addr,
  input  logic          b_we,
  input  logic [31:0]   b_wdata,
  output logic [31:0]   b_rdata
);
  logic [31:0] mem [WORDS];

  always_ff @(posedge clk) begin
    a_rdata <= mem[a_addr];
  end

  always_ff @(posedge clk) begin
    if (b_we) mem[b_addr] <= b_wdata;
    b_rdata <= mem[b_addr];
  end
endmodule
