// cell_array_model: behavioural model of the analog side of one channel, for
// testbenches only: the 256 sampling capacitors with their cell comparators
// and the channel's ramp generator.
//
// A cell whose sampling switch is closed at a rising clock edge stores the
// current input level `vin` (an integer in ADC counts).  The ramp is modelled
// as an integer that is 0 while `ramp_en` is low and grows by one per clock
// while it is high, so it tracks an ideal, perfectly linear ramp whose slope
// is one ADC count per clock.  A cell comparator outputs 1 when its section's
// comparator is enabled, its capacitor is connected to the ramp and the ramp
// is above the stored level.  The stored levels and the sampling times are
// brought out for the testbench's reference model.
module cell_array_model #(
  parameter int unsigned NC   = 256,
  parameter int unsigned SECN = 32
) (
  input  logic                   clk,
  input  logic [NC-1:0]          sample_sw,
  input  logic [NC/SECN-1:0]     cmp_en,
  input  logic [NC/SECN-1:0]     ramp_sw,
  input  logic                   ramp_en,
  input  int unsigned            vin,
  output logic [NC-1:0]          cmp,
  output int unsigned            held  [NC],
  output longint unsigned        stamp [NC],
  output int unsigned            ramp_level
);

  longint unsigned now = 0;

  initial begin
    ramp_level = 0;
    for (int i = 0; i < int'(NC); i++) begin
      held[i]  = 0;
      stamp[i] = 0;
    end
  end

  always @(posedge clk) begin
    now <= now + 1;
    ramp_level <= ramp_en ? ramp_level + 1 : 0;
    for (int i = 0; i < int'(NC); i++)
      if (sample_sw[i]) begin
        held[i]  <= vin;
        stamp[i] <= now;
      end
  end

  always_comb
    for (int i = 0; i < int'(NC); i++)
      cmp[i] = cmp_en[i / SECN] && ramp_sw[i / SECN] && (ramp_level > held[i]);

endmodule
