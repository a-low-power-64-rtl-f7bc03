// readout_controller: the data readout of a group of eight channels.
//
// When a channel of the group starts offering a segment (`ch_valid` with
// `ch_first`), the controller picks it (round robin from the last channel
// served), raises `data_req` and waits for the FPGA's `data_ack`.  It then
// sends one frame through its DDR serializer in 16-bit words:
//   header:  {2'b10, channel[2:0], segment[2:0], trigger pointer[7:0]}
//   data:    {3'b000, last, value[11:0]}   one word per cell, oldest first
// The channel's read port is accepted one cell per serializer word, so the
// channel stays in READING for the whole transfer (8 clocks per cell).  After
// the word marked `last` the controller returns to IDLE and serves the next
// channel.  The request/acknowledge sequence and one controller and one
// serializer per eight channels follow the original design; the frame format and the
// arbitration are this design's choice.
module readout_controller
  import cherenkov_pkg::*;
#(
  parameter int unsigned NCH = GROUP_CH
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [NCH-1:0]     ch_valid,
  output logic [NCH-1:0]     ch_ready,
  input  logic [DATA_W-1:0]  ch_data  [NCH],
  input  logic [NCH-1:0]     ch_first,
  input  logic [NCH-1:0]     ch_last,
  input  logic [2:0]         ch_seg   [NCH],
  input  logic [7:0]         ch_ptr   [NCH],
  output logic               data_req,
  input  logic               data_ack,
  output logic [1:0]         ddr,
  output logic               ddr_valid
);

  localparam int unsigned CHW = $clog2(NCH);

  typedef enum logic [1:0] { RO_IDLE, RO_REQ, RO_HDR, RO_DATA } ro_state_t;

  ro_state_t      state;
  logic [CHW-1:0] sel, last_sel, pick;
  logic           any;
  logic           ser_valid, ser_ready;
  logic [15:0]    ser_data;

  // Round robin: first requesting channel after the last one served.
  always_comb begin
    any  = 1'b0;
    pick = last_sel;
    for (int k = 1; k <= int'(NCH); k++) begin
      logic [CHW-1:0] c;
      c = CHW'(int'(last_sel) + k);
      if (!any && ch_valid[c] && ch_first[c]) begin
        any  = 1'b1;
        pick = c;
      end
    end
  end

  assign data_req = (state == RO_REQ);

  always_comb begin
    ser_valid = 1'b0;
    ser_data  = '0;
    ch_ready  = '0;
    unique case (state)
      RO_HDR: begin
        ser_valid = 1'b1;
        ser_data  = {2'b10, 3'(sel), ch_seg[sel], ch_ptr[sel]};
      end
      RO_DATA: begin
        ser_valid = ch_valid[sel];
        ser_data  = {3'b000, ch_last[sel], ch_data[sel]};
        ch_ready[sel] = ser_ready;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= RO_IDLE;
      sel      <= '0;
      last_sel <= CHW'(NCH - 1);
    end else begin
      unique case (state)
        RO_IDLE: if (any) begin
          sel   <= pick;
          state <= RO_REQ;
        end
        RO_REQ:  if (data_ack) state <= RO_HDR;
        RO_HDR:  if (ser_ready) state <= RO_DATA;
        RO_DATA: if (ser_ready && ch_valid[sel] && ch_last[sel]) begin
          state    <= RO_IDLE;
          last_sel <= sel;
        end
        default: state <= RO_IDLE;
      endcase
    end
  end

  serializer #(.W(16)) u_ser (
    .clk, .rst_n,
    .in_valid  (ser_valid),
    .in_ready  (ser_ready),
    .in_data   (ser_data),
    .ddr       (ddr),
    .out_valid (ddr_valid)
  );

endmodule
