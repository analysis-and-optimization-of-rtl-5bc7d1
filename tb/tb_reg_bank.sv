// tb_reg_bank: self-checking testbench of the register bank.
//
// Checks that reset clears all 32 registers, then runs random cycles of one
// write and two reads against an array model: reads are combinational and
// return the value before a write in the same cycle, the write lands at the
// clock edge, and both ports can read the same or different registers at once.
module tb_reg_bank;
  int checks = 0, failures = 0;
  logic        clk = 0, rst_n = 0;
  logic [4:0]  ra_a, ra_b, wa;
  logic [31:0] rd_a, rd_b, wd;
  logic        we;
  logic [31:0] model [32];

  always #5 clk = ~clk;

  reg_bank #(.NREGS(32), .WIDTH(32)) dut (
    .clk(clk), .rst_n(rst_n), .ra_a(ra_a), .rd_a(rd_a), .ra_b(ra_b), .rd_b(rd_b),
    .we(we), .wa(wa), .wd(wd));

  task automatic chk(logic [31:0] got, logic [31:0] want, string what);
    checks++;
    if (got !== want) begin
      failures++;
      if (failures < 20) $display("FAIL %s got %h want %h", what, got, want);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; wa = 0; wd = 0; ra_a = 0; ra_b = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int r = 0; r < 32; r++) begin
      model[r] = '0;
      ra_a = 5'(r); ra_b = 5'(31 - r);
      #1 chk(rd_a, 32'h0, "reset A"); chk(rd_b, 32'h0, "reset B");
    end
    for (int i = 0; i < 3000; i++) begin
      we = 1'($urandom_range(1)); wa = 5'($urandom); wd = $urandom;
      ra_a = (i % 4 == 0) ? wa : 5'($urandom); ra_b = 5'($urandom);
      #1 chk(rd_a, model[ra_a], "read A"); chk(rd_b, model[ra_b], "read B");
      @(posedge clk);
      if (we) model[wa] = wd;
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
