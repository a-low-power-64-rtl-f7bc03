// gray_decoder: converts the Gray code stored in a memory cell into binary on
// its way to the readout.  One decoder serves a whole channel, since cells are
// read one at a time.  Purely combinational: bit i of the result is the XOR of
// Gray bits W-1 down to i.  The decoder's existence (one per channel) follows
// the original design; its combinational form is this design's choice.
module gray_decoder #(
  parameter int unsigned W = 12
) (
  input  logic [W-1:0] gray,
  output logic [W-1:0] bin
);

  always_comb begin
    bin[W-1] = gray[W-1];
    for (int i = int'(W) - 2; i >= 0; i--) bin[i] = bin[i+1] ^ gray[i];
  end

endmodule
