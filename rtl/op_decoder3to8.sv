// op_decoder3to8: 3-to-8 one-hot decoder.
//
// Turns the 3-bit operation code of the complex unit into eight enable lines:
// with en high, exactly the output whose index equals din goes high (din[2] is
// the most significant bit, so din = 3'b110 raises dout[6]); with en low all
// outputs are low. The complex unit uses dout[0] (add), dout[1] (subtract)
// and dout[2] (multiply). Purely combinational.
// The 3-to-8 function and bit order follow the specified simulation case;
// the enable input is this design's addition.
module op_decoder3to8 (
  input  logic [2:0] din,
  input  logic       en,
  output logic [7:0] dout
);
  always_comb begin
    dout = '0;
    for (int i = 0; i < 8; i++)
      dout[i] = en && (din == 3'(i));
  end
endmodule
