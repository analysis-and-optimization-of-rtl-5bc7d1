// tb_op_decoder3to8: exhaustive testbench of the 3-to-8 operation decoder.
//
// Applies all eight codes with enable high and low and checks that exactly the
// addressed output is high (none when disabled), including the documented
// case din2..din0 = 1,1,0 raising dout6.
module tb_op_decoder3to8;
  int checks = 0, failures = 0;
  logic [2:0] din;
  logic       en;
  logic [7:0] dout;

  op_decoder3to8 dut (.din(din), .en(en), .dout(dout));

  initial begin
    #100_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = 0; e < 2; e++) begin
      for (int c = 0; c < 8; c++) begin
        logic [7:0] want;
        din = 3'(c); en = 1'(e);
        want = 8'd0;
        if (e == 1) want[c] = 1'b1;
        #1 checks++;
        if (dout !== want) begin
          failures++;
          $display("FAIL din=%0d en=%0d dout=%b want %b", din, en, dout, want);
        end
      end
    end
    din = 3'b110; en = 1'b1;
    #1 checks++;
    if (dout !== 8'b0100_0000) begin failures++; $display("FAIL table case"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
