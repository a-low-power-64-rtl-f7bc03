// asic_top: digital part of the 64-channel SiPM readout ASIC for Cherenkov
// light detection.
//
// Every channel samples its amplified SiPM signal into 256 analog memory
// cells at the clock rate (200 MHz in the intended use), stops on a trigger,
// digitises the stored samples with a Wilkinson ADC (one ramp and one Gray
// counter per channel, 8 to 12 bits) and offers the results for readout.
// Around the 64 channels sit:
//   * the trigger selection: a channel triggers on its own low-threshold
//     comparator (sparse mode), on the OR of all 64 low-threshold comparators
//     (imaging mode), or on the external trigger input when `ext_trig_en` is
//     set, in both modes;
//   * the hitmap unit, which freezes the low- and high-threshold comparator
//     pattern of the whole ASIC on each ASIC-level trigger and sends it to the
//     FPGA after a request/acknowledge exchange;
//   * eight readout controllers, one per group of eight channels, each with
//     its own request/acknowledge pair and DDR serial lane.
// Analog parts (front end, comparators, ramp generators, cell capacitors and
// comparators, DDR pads) are outside; their digital signals are ports.  `cfg`
// is static and must be set while `rst_n` is low.  One clock drives all
// logic; the serial lanes send two bits per clock.  The channel count, the
// grouping by eight and the trigger and mode options follow the original design; the
// single clock domain and the choice of the low-threshold comparator as the
// internal trigger are this design's.
module asic_top
  import cherenkov_pkg::*;
#(
  parameter int unsigned NCH           = N_CH,
  parameter int unsigned WARMUP_CYCLES = 8,
  localparam int unsigned NGRP         = NCH / GROUP_CH
) (
  input  logic                clk,
  input  logic                rst_n,
  input  cfg_t                cfg,
  input  logic                ext_trigger,
  // analog front end
  input  logic [NCH-1:0]      cmp_low,
  input  logic [NCH-1:0]      cmp_high,
  input  logic [N_CELLS-1:0]  cell_cmp  [NCH],
  output logic [N_CELLS-1:0]  sample_sw [NCH],
  output logic [N_SEC-1:0]    cmp_en    [NCH],
  output logic [N_SEC-1:0]    ramp_sw   [NCH],
  output logic [NCH-1:0]      ramp_en,
  // hitmap link
  output logic                hm_req,
  input  logic                hm_ack,
  output logic [1:0]          hm_ddr,
  output logic                hm_ddr_valid,
  output logic                hm_lost,
  // data links, one per group of eight channels
  output logic [NGRP-1:0]     data_req,
  input  logic [NGRP-1:0]     data_ack,
  output logic [1:0]          data_ddr  [NGRP],
  output logic [NGRP-1:0]     data_ddr_valid,
  // events
  output logic [NCH-1:0]      trig_acc,
  output logic [NCH-1:0]      trig_lost
);

  logic              any_low, asic_trig;
  logic [NCH-1:0]    ch_trig;
  logic [NCH-1:0]    rd_valid, rd_ready, rd_first, rd_last;
  logic [DATA_W-1:0] rd_data [NCH];
  logic [2:0]        rd_seg  [NCH];
  logic [7:0]        rd_ptr  [NCH];

  assign any_low   = |cmp_low;
  assign asic_trig = cfg.ext_trig_en ? ext_trigger : any_low;

  always_comb begin
    for (int c = 0; c < int'(NCH); c++) begin
      if (cfg.ext_trig_en)               ch_trig[c] = ext_trigger;
      else if (cfg.mode == MODE_IMAGING) ch_trig[c] = any_low;
      else                               ch_trig[c] = cmp_low[c];
    end
  end

  for (genvar c = 0; c < int'(NCH); c++) begin : g_ch
    sec_state_t st [N_SEC];
    channel #(.WARMUP_CYCLES(WARMUP_CYCLES)) u_ch (
      .clk, .rst_n,
      .seg_mode  (cfg.seg),
      .res_bits  (cfg.res_bits),
      .post_trig (cfg.post_trig),
      .trigger   (ch_trig[c]),
      .cell_cmp  (cell_cmp[c]),
      .sample_sw (sample_sw[c]),
      .cmp_en    (cmp_en[c]),
      .ramp_sw   (ramp_sw[c]),
      .ramp_en   (ramp_en[c]),
      .rd_valid  (rd_valid[c]),
      .rd_ready  (rd_ready[c]),
      .rd_data   (rd_data[c]),
      .rd_first  (rd_first[c]),
      .rd_last   (rd_last[c]),
      .rd_seg    (rd_seg[c]),
      .rd_ptr    (rd_ptr[c]),
      .sec_state (st),
      .trig_acc  (trig_acc[c]),
      .trig_lost (trig_lost[c])
    );
  end

  hitmap_unit #(.NCH(NCH)) u_hitmap (
    .clk, .rst_n,
    .cmp_low, .cmp_high,
    .event_trig   (asic_trig),
    .hm_req, .hm_ack, .hm_ddr, .hm_ddr_valid,
    .hm_lost
  );

  for (genvar g = 0; g < int'(NGRP); g++) begin : g_grp
    logic [DATA_W-1:0] d [GROUP_CH];
    logic [2:0]        s [GROUP_CH];
    logic [7:0]        p [GROUP_CH];
    for (genvar k = 0; k < int'(GROUP_CH); k++) begin : g_map
      assign d[k] = rd_data[g*GROUP_CH + k];
      assign s[k] = rd_seg [g*GROUP_CH + k];
      assign p[k] = rd_ptr [g*GROUP_CH + k];
    end
    readout_controller #(.NCH(GROUP_CH)) u_ro (
      .clk, .rst_n,
      .ch_valid  (rd_valid[g*GROUP_CH +: GROUP_CH]),
      .ch_ready  (rd_ready[g*GROUP_CH +: GROUP_CH]),
      .ch_data   (d),
      .ch_first  (rd_first[g*GROUP_CH +: GROUP_CH]),
      .ch_last   (rd_last [g*GROUP_CH +: GROUP_CH]),
      .ch_seg    (s),
      .ch_ptr    (p),
      .data_req  (data_req[g]),
      .data_ack  (data_ack[g]),
      .ddr       (data_ddr[g]),
      .ddr_valid (data_ddr_valid[g])
    );
  end

endmodule
