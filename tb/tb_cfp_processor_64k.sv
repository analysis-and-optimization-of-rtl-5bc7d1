// tb_cfp_processor_64k: the processor in its largest memory configuration,
// 64 KB of on-chip RAM (RAM_BYTES = 65536, 16384 words, 14-bit word address).
//
// The host writes two complex operand words near the top of the RAM and a
// marker at the word that a 11-bit (8 KB) address would alias to. A short
// program builds a high address with ORI, loads the operands, multiplies them
// as complex numbers and adds them as single-precision numbers, and stores both
// results in the last two words. The testbench reads them back, compares them
// with fp_ref_pkg, checks that the marker is untouched (no address aliasing)
// and checks the cycle count (instructions + loads + 1).
module tb_cfp_processor_64k;
  import cfp_pkg::*;
  import fp_ref_pkg::*;

  localparam int WORDS = 16384;
  int checks = 0, failures = 0;
  logic        clk = 0, rst_n = 0, start = 0;
  logic        busy, done, host_we;
  logic [13:0] host_addr;
  logic [31:0] host_wdata, host_rdata;
  fp_flags_t   fp_flags;
  logic [31:0] stall_count, flush_count, instr_count;

  always #5 clk = ~clk;

  cfp_processor #(.RAM_BYTES(65536)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .busy(busy), .done(done),
    .host_we(host_we), .host_addr(host_addr), .host_wdata(host_wdata), .host_rdata(host_rdata),
    .fp_flags(fp_flags), .stall_count(stall_count), .flush_count(flush_count),
    .instr_count(instr_count));

  task automatic chk(logic [31:0] got, logic [31:0] want, string what);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL %s got %h want %h", what, got, want);
    end
  endtask

  task automatic host_write(int addr, logic [31:0] w);
    host_addr = 14'(addr); host_wdata = w; host_we = 1'b1;
    @(posedge clk); #1;
    host_we = 1'b0;
  endtask

  task automatic host_read(int addr, output logic [31:0] w);
    host_addr = 14'(addr);
    @(posedge clk); #1;
    w = host_rdata;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] prog [9];
    logic [31:0] ca, cb, got, p1, p2, p3, p4, rr, ri, s;
    logic [4:0]  f;
    int          cycles;
    host_we = 0; host_addr = 0; host_wdata = 0;
    prog[0] = enc_i(OP_ORI, 5'd1, 5'd0, 16'd16000);
    prog[1] = enc_i(OP_LW, 5'd2, 5'd1, 16'd0);
    prog[2] = enc_i(OP_LW, 5'd3, 5'd1, 16'd1);
    prog[3] = enc_r(OP_CPX, 5'd4, 5'd2, 5'd3, {4'd0, RM_RNE, 2'd0, CPX_MUL});
    prog[4] = enc_r(OP_FPU, 5'd5, 5'd2, 5'd3, {4'd0, RM_RNE, 2'd0, FPU_ADD});
    prog[5] = enc_i(OP_ORI, 5'd6, 5'd0, 16'(WORDS - 1));
    prog[6] = enc_i(OP_SW, 5'd4, 5'd6, 16'd0);
    prog[7] = enc_i(OP_SW, 5'd5, 5'd6, 16'hffff);
    prog[8] = enc_i(OP_HALT, 5'd0, 5'd0, 16'd0);

    ca = {16'h3c00, 16'h4000};                      // 1 + 2j
    cb = {16'h4200, 16'h4400};                      // 3 + 4j
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 9; i++) host_write(i, prog[i]);
    host_write(16000, ca);
    host_write(16001, cb);
    host_write((WORDS - 1) % 2048, 32'hcafef00d);    // where an 8 KB address would land
    @(posedge clk); #1 start = 1;
    @(posedge clk); #1 start = 0;
    cycles = 0;
    while (!done) begin @(posedge clk); #1 cycles++; end

    p1 = ref_mul({16'd0, ca[31:16]}, {16'd0, cb[31:16]}, 5, 10, 0, f);
    p2 = ref_mul({16'd0, ca[15:0]},  {16'd0, cb[15:0]},  5, 10, 0, f);
    p3 = ref_mul({16'd0, ca[31:16]}, {16'd0, cb[15:0]},  5, 10, 0, f);
    p4 = ref_mul({16'd0, ca[15:0]},  {16'd0, cb[31:16]}, 5, 10, 0, f);
    rr = ref_add(p1, p2, 1'b1, 5, 10, 0, f);
    ri = ref_add(p3, p4, 1'b0, 5, 10, 0, f);
    s  = ref_add(ca, cb, 1'b0, 8, 23, 0, f);
    host_read(WORDS - 1, got); chk(got, {rr[15:0], ri[15:0]}, "complex product at top word");
    chk(got, {16'hc500, 16'h4900}, "(1+2j)(3+4j) = -5+10j");
    host_read(WORDS - 2, got); chk(got, s, "single add at second-to-top word");
    host_read((WORDS - 1) % 2048, got); chk(got, 32'hcafef00d, "no aliasing into the low 8 KB");
    chk(instr_count, 32'd9, "instructions");
    chk(32'(cycles), 32'(9 + 2 + 1), "cycles start to done");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
