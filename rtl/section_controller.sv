// section_controller: manages one pair of 32-cell sections.
//
// The channel controller broadcasts its commands to all four section
// controllers as (strobe, segment index) pairs and its write and read pointers
// as cell indices 0..255.  This block decides which of its two sections a
// command concerns, according to the segmentation: with 32-cell segments each
// section is a segment of its own (segment = section index), with 64-cell
// segments the pair forms one segment, with 256 cells all eight sections form
// segment 0.  The sections of one segment therefore change state together.
// It also times the warm-up: when a section enters WARMUP a counter starts
// and `warm_ready` rises after WARMUP_CYCLES clocks, telling the channel
// controller that the cell comparators are biased and the section may be
// digitised.  `rd_data` returns the Gray word of the cell at `rd_pos` if that
// cell is in this pair (`rd_hit`).  The pairing of two sections per controller
// (four controllers, eight sections) follows the original design; the broadcast
// command encoding and the warm-up timer length are this design's choice.
module section_controller
  import cherenkov_pkg::*;
#(
  parameter int unsigned IDX           = 0,   // which pair: sections 2*IDX, 2*IDX+1
  parameter int unsigned W             = DATA_W,
  parameter int unsigned WARMUP_CYCLES = 8
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  seg_mode_t            seg_mode,
  // commands from the channel controller
  input  logic                 start_stb,
  input  logic [2:0]           start_seg,
  input  logic                 stop_stb,
  input  logic [2:0]           stop_seg,
  input  logic                 dig_stb,
  input  logic [2:0]           dig_seg,
  input  logic                 done_stb,
  input  logic [2:0]           done_seg,
  input  logic                 rdone_stb,
  input  logic [2:0]           rdone_seg,
  input  logic                 wr_en,
  input  logic [7:0]           wr_pos,
  input  logic [7:0]           rd_pos,
  input  logic [W-1:0]         gray_in,
  // analog slices of the 64 cells of the pair
  input  logic [2*SEC_CELLS-1:0] cmp,
  output logic [2*SEC_CELLS-1:0] sample_sw,
  output logic [1:0]           cmp_en,
  output logic [1:0]           ramp_sw,
  // status to the channel controller
  output sec_state_t           state [2],
  output logic [1:0]           warm_ready,
  output logic [W-1:0]         rd_data,
  output logic                 rd_hit
);

  localparam int unsigned TW = $clog2(WARMUP_CYCLES + 1);

  logic [W-1:0] sec_rd [2];
  logic [TW-1:0] warm_cnt [2];

  for (genvar s = 0; s < 2; s++) begin : g_sec
    localparam logic [2:0] SEC = 3'(2 * IDX + s);
    logic [2:0] my_seg;
    logic go_sample, go_stop, go_dig, go_done, go_rdone;

    always_comb begin
      unique case (seg_mode)
        SEG_64:  my_seg = SEC >> 1;
        SEG_256: my_seg = 3'd0;
        default: my_seg = SEC;
      endcase
    end

    assign go_sample = start_stb && start_seg == my_seg && state[s] == ST_IDLE;
    assign go_stop   = stop_stb  && stop_seg  == my_seg && state[s] == ST_SAMPLING;
    assign go_dig    = dig_stb   && dig_seg   == my_seg && state[s] == ST_WARMUP;
    assign go_done   = done_stb  && done_seg  == my_seg && state[s] == ST_DIGITIZING;
    assign go_rdone  = rdone_stb && rdone_seg == my_seg && state[s] == ST_READING;

    section #(.CELLS(SEC_CELLS), .W(W)) u_section (
      .clk         (clk),
      .rst_n       (rst_n),
      .go_sample   (go_sample),
      .go_stop     (go_stop),
      .go_digitize (go_dig),
      .conv_done   (go_done),
      .read_done   (go_rdone),
      .wr_en       (wr_en && wr_pos[7:5] == SEC),
      .wr_cell     (wr_pos[4:0]),
      .rd_cell     (rd_pos[4:0]),
      .gray_in     (gray_in),
      .cmp         (cmp[s*SEC_CELLS +: SEC_CELLS]),
      .state       (state[s]),
      .sample_sw   (sample_sw[s*SEC_CELLS +: SEC_CELLS]),
      .cmp_en      (cmp_en[s]),
      .ramp_sw     (ramp_sw[s]),
      .rd_data     (sec_rd[s])
    );

    // Warm-up timer: counts up while the section is in WARMUP.
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)                      warm_cnt[s] <= '0;
      else if (state[s] != ST_WARMUP)  warm_cnt[s] <= '0;
      else if (!warm_ready[s])         warm_cnt[s] <= warm_cnt[s] + TW'(1);
    end
    assign warm_ready[s] = (state[s] == ST_WARMUP) &&
                           (warm_cnt[s] >= TW'(WARMUP_CYCLES));
  end

  assign rd_hit  = (rd_pos[7:6] == 2'(IDX));
  assign rd_data = sec_rd[rd_pos[5]];

endmodule
