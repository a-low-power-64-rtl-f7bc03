// serializer: turns parallel words into a double-data-rate bit stream.
//
// A word is accepted with `in_valid` and `in_ready` and sent most significant
// bit first, two bits per clock: `ddr[1]` is the bit for the rising edge and
// `ddr[0]` the bit for the falling edge of the link clock, to be driven by a
// DDR output cell.  A W-bit word therefore occupies W/2 clocks, and
// `out_valid` is high while bits are being sent.  A new word can be accepted
// in the last clock of the current one, so consecutive words leave without a
// gap.  DDR transmission to the FPGA follows the original design; word width, bit order
// and the handshake are this design's choice.
module serializer #(
  parameter int unsigned W = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  output logic         in_ready,
  input  logic [W-1:0] in_data,
  output logic [1:0]   ddr,
  output logic         out_valid
);

  localparam int unsigned CW = $clog2(W / 2 + 1);

  logic [W-1:0]  shreg;
  logic [CW-1:0] cnt;

  assign out_valid = (cnt != '0);
  assign in_ready  = (cnt == '0) || (cnt == CW'(1));
  assign ddr       = out_valid ? shreg[W-1 -: 2] : 2'b00;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shreg <= '0;
      cnt   <= '0;
    end else if (in_valid && in_ready) begin
      shreg <= in_data;
      cnt   <= CW'(W / 2);
    end else if (out_valid) begin
      shreg <= shreg << 2;
      cnt   <= cnt - CW'(1);
    end
  end

  initial assert (W % 2 == 0) else $error("serializer width must be even");

endmodule
