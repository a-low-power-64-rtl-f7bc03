// hitmap_unit: ASIC-level hitmaps of the 64 channels and their transfer.
//
// Each channel has a low-threshold and a high-threshold comparator.  While
// the unit is ARMED their outputs are copied every clock into two 64-bit
// registers.  On a rising edge of `event_trig` the registers take the OR of
// their previous and current inputs and are frozen: the first is the
// low-level hitmap, the second the high-level hitmap.  The unit then raises
// `hm_req` until the FPGA answers with `hm_ack` (REQ), sends the low hitmap and
// then the high hitmap, most significant channel first, through a DDR
// serializer in 64-bit words (SEND: 64 clocks for both), and returns to ARMED.
// An event that comes while a hitmap is pending is not captured and is
// reported on `hm_lost`.  The sequence (latch, low hitmap, high hitmap,
// request, acknowledge, DDR transfer) follows the original design; word order, frame
// size and the one-clock capture window are this design's choice.
module hitmap_unit
  import cherenkov_pkg::*;
#(
  parameter int unsigned NCH = N_CH
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic [NCH-1:0] cmp_low,
  input  logic [NCH-1:0] cmp_high,
  input  logic           event_trig,
  output logic           hm_req,
  input  logic           hm_ack,
  output logic [1:0]     hm_ddr,
  output logic           hm_ddr_valid,
  output logic           hm_lost
);

  typedef enum logic [1:0] { HM_ARMED, HM_REQ, HM_SEND, HM_DRAIN } hm_state_t;

  hm_state_t  state;
  logic [NCH-1:0] hitmap_low, hitmap_high;   // the two maps, frozen from event to transfer
  logic       ev_q, ev_edge;
  logic [1:0] words_sent;
  logic       ser_valid, ser_ready;
  logic [NCH-1:0] ser_data;

  assign ev_edge = event_trig && !ev_q;
  assign hm_lost = ev_edge && state != HM_ARMED;
  assign hm_req  = (state == HM_REQ);

  assign ser_valid = (state == HM_SEND);
  assign ser_data  = (words_sent == 2'd0) ? hitmap_low : hitmap_high;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= HM_ARMED;
      ev_q        <= 1'b0;
      hitmap_low  <= '0;
      hitmap_high <= '0;
      words_sent  <= '0;
    end else begin
      ev_q <= event_trig;
      unique case (state)
        HM_ARMED: begin
          if (ev_edge) begin
            hitmap_low  <= hitmap_low  | cmp_low;
            hitmap_high <= hitmap_high | cmp_high;
            state       <= HM_REQ;
          end else begin
            hitmap_low  <= cmp_low;
            hitmap_high <= cmp_high;
          end
        end
        HM_REQ: if (hm_ack) begin
          state      <= HM_SEND;
          words_sent <= '0;
        end
        HM_SEND: if (ser_ready) begin
          words_sent <= words_sent + 2'd1;
          if (words_sent == 2'd1) state <= HM_DRAIN;
        end
        HM_DRAIN: if (!hm_ddr_valid) begin
          state       <= HM_ARMED;
          hitmap_low  <= cmp_low;
          hitmap_high <= cmp_high;
        end
        default: state <= HM_ARMED;
      endcase
    end
  end

  serializer #(.W(NCH)) u_ser (
    .clk, .rst_n,
    .in_valid  (ser_valid),
    .in_ready  (ser_ready),
    .in_data   (ser_data),
    .ddr       (hm_ddr),
    .out_valid (hm_ddr_valid)
  );

endmodule
