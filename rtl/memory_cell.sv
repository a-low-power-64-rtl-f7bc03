// memory_cell: digital slice of one analog memory cell with its embedded
// Wilkinson ADC.
//
// The analog slice (not logic) holds the sampled voltage on a capacitor and,
// during digitising, compares it with the common ramp; its comparator output
// is `cmp`.  This slice keeps a copy of the channel's Gray count: while
// `convert` is high and the comparator has not yet flipped, the register
// follows `gray_in` every clock; the first clock on which `cmp` is high sets
// `fired` and freezes the register, which then holds the count reached when
// the ramp crossed the stored voltage.  A cell whose comparator never flips
// ends with the saturated count.  `clear` (start of a conversion) resets both.
// The stored word is presented on `data_out` without further timing.  Storing
// the Gray code when the cell comparator switches follows the original design; the
// follow-then-freeze register and the `fired` flag are this design's choice.
module memory_cell #(
  parameter int unsigned W = 12
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  input  logic         convert,
  input  logic         cmp,
  input  logic [W-1:0] gray_in,
  output logic [W-1:0] data_out,
  output logic         fired
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      data_out <= '0;
      fired    <= 1'b0;
    end else if (clear) begin
      data_out <= '0;
      fired    <= 1'b0;
    end else if (convert && !fired) begin
      if (cmp) fired    <= 1'b1;
      else     data_out <= gray_in;
    end
  end

endmodule
