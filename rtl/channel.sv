// channel: the digital part of one of the 64 readout channels.
//
// It joins the channel controller, four section controllers (eight 32-cell
// sections, 256 memory cells), the channel's Gray counter and its Gray
// decoder.  The analog parts stay outside and are reached through ports:
// the 256 cell comparators (`cell_cmp`), the sampling switches
// (`sample_sw`), per-section comparator enable and ramp/reference switch, and
// the enable of the channel's ramp generator.  The counter's Gray code is
// distributed to all cells; the cell selected by the read pointer is decoded
// to binary and offered on the read port together with frame markers, the
// segment number and the stored trigger pointer.  Sampling runs at the clock
// rate, one cell per clock; digitising takes 2**res_bits clocks.  The block
// content follows the original design's channel diagram; the port set is this
// design's choice.
module channel
  import cherenkov_pkg::*;
#(
  parameter int unsigned WARMUP_CYCLES = 8
) (
  input  logic                clk,
  input  logic                rst_n,
  input  seg_mode_t           seg_mode,
  input  logic [3:0]          res_bits,
  input  logic [7:0]          post_trig,
  input  logic                trigger,
  // analog memory cells, ramp generator
  input  logic [N_CELLS-1:0]  cell_cmp,
  output logic [N_CELLS-1:0]  sample_sw,
  output logic [N_SEC-1:0]    cmp_en,
  output logic [N_SEC-1:0]    ramp_sw,
  output logic                ramp_en,
  // read port
  output logic                rd_valid,
  input  logic                rd_ready,
  output logic [DATA_W-1:0]   rd_data,
  output logic                rd_first,
  output logic                rd_last,
  output logic [2:0]          rd_seg,
  output logic [7:0]          rd_ptr,
  // status
  output sec_state_t          sec_state [N_SEC],
  output logic                trig_acc,
  output logic                trig_lost
);

  logic start_stb, stop_stb, dig_stb, done_stb, rdone_stb;
  logic [2:0] start_seg, stop_seg, dig_seg, done_seg, rdone_seg;
  logic wr_en;
  logic [7:0] wr_pos, rd_pos;
  logic cnt_clear, cnt_en, gray_sat;
  logic [DATA_W-1:0] gray;
  logic [N_SEC-1:0] warm_ready;
  logic [DATA_W-1:0] pair_rd [4];
  logic [3:0] pair_hit;

  channel_controller u_ctrl (
    .clk, .rst_n, .seg_mode, .post_trig, .trigger,
    .sec_state, .warm_ready, .gray_sat,
    .start_stb, .start_seg, .stop_stb, .stop_seg, .dig_stb, .dig_seg,
    .done_stb, .done_seg, .rdone_stb, .rdone_seg,
    .wr_en, .wr_pos, .rd_pos,
    .cnt_clear, .cnt_en, .ramp_en,
    .rd_valid, .rd_ready, .rd_first, .rd_last, .rd_seg, .rd_ptr,
    .trig_acc, .trig_lost
  );

  for (genvar p = 0; p < 4; p++) begin : g_pair
    sec_state_t st [2];
    section_controller #(.IDX(p), .W(DATA_W), .WARMUP_CYCLES(WARMUP_CYCLES)) u_sc (
      .clk, .rst_n, .seg_mode,
      .start_stb, .start_seg, .stop_stb, .stop_seg, .dig_stb, .dig_seg,
      .done_stb, .done_seg, .rdone_stb, .rdone_seg,
      .wr_en, .wr_pos, .rd_pos,
      .gray_in    (gray),
      .cmp        (cell_cmp[p*2*SEC_CELLS +: 2*SEC_CELLS]),
      .sample_sw  (sample_sw[p*2*SEC_CELLS +: 2*SEC_CELLS]),
      .cmp_en     (cmp_en[2*p +: 2]),
      .ramp_sw    (ramp_sw[2*p +: 2]),
      .state      (st),
      .warm_ready (warm_ready[2*p +: 2]),
      .rd_data    (pair_rd[p]),
      .rd_hit     (pair_hit[p])
    );
    assign sec_state[2*p]   = st[0];
    assign sec_state[2*p+1] = st[1];
  end

  gray_counter #(.W(DATA_W)) u_cnt (
    .clk, .rst_n,
    .clear    (cnt_clear),
    .en       (cnt_en),
    .res_bits (res_bits),
    .gray     (gray),
    .sat      (gray_sat)
  );

  gray_decoder #(.W(DATA_W)) u_dec (
    .gray (pair_rd[rd_pos[7:6]]),
    .bin  (rd_data)
  );

  a_one_pair: assert property (@(posedge clk) disable iff (!rst_n) $onehot(pair_hit));

endmodule
