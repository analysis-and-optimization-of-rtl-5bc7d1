// tb_bus_mux: self-checking testbench of the write-back bus multiplexer.
//
// Puts distinct random words on all six sources and checks that every select
// value routes exactly its own source to the bus (0 for unused codes).
module tb_bus_mux;
  import cfp_pkg::*;
  int checks = 0, failures = 0;
  wb_sel_t     sel;
  logic [31:0] src [6];
  logic [31:0] y;

  bus_mux dut (.sel(sel), .alu(src[0]), .fpu(src[1]), .cpx(src[2]), .mem(src[3]),
               .imm(src[4]), .flags(src[5]), .y(y));

  initial begin
    #100_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 200; i++) begin
      for (int k = 0; k < 6; k++) src[k] = $urandom ^ (32'(k) << 28);
      sel = wb_sel_t'($urandom_range(7));
      #1 checks++;
      if (y !== ((int'(sel) < 6) ? src[int'(sel)] : 32'h0)) begin
        failures++;
        $display("FAIL sel=%0d y=%h", sel, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
