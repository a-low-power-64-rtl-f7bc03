// gray_counter: the time base of the channel's Wilkinson ADC.
//
// The state register holds a Gray code, so that only one bit of the bus that
// runs past all 256 memory cells changes per clock.  While `en` is high the
// count advances by one per clock until it saturates at 2**res_bits - 1, where
// it stays; `sat` is high in the cycle the count equals that maximum.  `clear`
// (synchronous, dominant) returns it to zero.  Resolution is 8 to 12 bits;
// out-of-range settings are clamped.  Counting by one per clock up to
// saturation, the 8-12 bit range and the control by the channel controller
// follow the original design; the binary-increment implementation is this design's.
module gray_counter
  import cherenkov_pkg::*;
#(
  parameter int unsigned W = DATA_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  input  logic         en,
  input  logic [3:0]   res_bits,
  output logic [W-1:0] gray,
  output logic         sat
);

  logic [W-1:0] bin, max_cnt;
  logic [3:0]   res;

  always_comb begin
    res = clamp_res(res_bits);
    max_cnt = W'((32'd1 << res) - 1);
    bin[W-1] = gray[W-1];
    for (int i = int'(W) - 2; i >= 0; i--) bin[i] = bin[i+1] ^ gray[i];
    sat = (bin == max_cnt);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          gray <= '0;
    else if (clear)      gray <= '0;
    else if (en && !sat) gray <= (bin + W'(1)) ^ ((bin + W'(1)) >> 1);
  end

endmodule
