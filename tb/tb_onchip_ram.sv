// tb_onchip_ram: self-checking testbench of the 8 KB dual-port RAM.
//
// Fills all 2048 words through port B, reads them back on both ports and
// checks the one-cycle read latency (data appears after exactly one edge), then
// runs random mixed writes and two-port reads against an array model,
// including read-during-write on port B (old data returned).
module tb_onchip_ram;
  localparam int WORDS = 2048;
  int checks = 0, failures = 0;
  logic        clk = 0;
  logic [10:0] a_addr, b_addr;
  logic [31:0] a_rdata, b_rdata, b_wdata;
  logic        b_we;
  logic [31:0] model [WORDS];

  always #5 clk = ~clk;

  onchip_ram dut (.clk(clk), .a_addr(a_addr), .a_rdata(a_rdata), .b_addr(b_addr),
                  .b_we(b_we), .b_wdata(b_wdata), .b_rdata(b_rdata));

  task automatic chk(logic [31:0] got, logic [31:0] want, string what);
    checks++;
    if (got !== want) begin
      failures++;
      if (failures < 20) $display("FAIL %s got %h want %h", what, got, want);
    end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a_addr = 0; b_addr = 0; b_we = 0; b_wdata = 0;
    for (int i = 0; i < WORDS; i++) begin
      model[i] = $urandom;
      b_addr = 11'(i); b_wdata = model[i]; b_we = 1;
      @(posedge clk); #1;
    end
    b_we = 0;
    for (int i = 0; i < WORDS; i++) begin
      a_addr = 11'(i); b_addr = 11'(WORDS - 1 - i);
      @(posedge clk); #1;
      chk(a_rdata, model[i], "port A");
      chk(b_rdata, model[WORDS - 1 - i], "port B");
    end
    // latency: a new address must not show before the edge
    a_addr = 11'd5; @(posedge clk); #1;
    a_addr = 11'd6; #1 chk(a_rdata, model[5], "latency before edge");
    @(posedge clk); #1 chk(a_rdata, model[6], "latency after edge");
    for (int i = 0; i < 4000; i++) begin
      logic [10:0] wa_now;
      logic [31:0] old_b;
      a_addr = 11'($urandom); b_addr = (i % 3 == 0) ? a_addr : 11'($urandom);
      b_we = 1'($urandom_range(1)); b_wdata = $urandom;
      wa_now = b_addr; old_b = model[b_addr];
      @(posedge clk); #1;
      chk(b_rdata, old_b, "port B read-during-write");
      if (a_addr != wa_now || !b_we) chk(a_rdata, model[a_addr], "port A random");
      if (b_we) model[wa_now] = b_wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
