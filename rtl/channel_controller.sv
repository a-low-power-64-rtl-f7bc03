// channel_controller: the manager of one channel's sections.
//
// The 256 cells are split into segments of 32, 64 or 256 cells (8, 4 or 1
// segments).  Each segment is a circular buffer that goes through IDLE,
// SAMPLING, WARMUP, DIGITIZING and READING.  Segments are used in a fixed
// rotation 0, 1, ..., so that while one segment is being digitised or read
// the next one can already record the next event (derandomisation).  Three
// pointers walk the rotation:
//   * samp_seg: the segment being written.  While it samples, the write
//     offset advances one cell per clock and wraps at the segment end.  On a
//     rising edge of `trigger` a post-trigger count of `post_trig` cells
//     starts; when it ends the segment is stopped, the offset of its last
//     written cell is stored in the pointer memory, and sampling moves to the
//     next segment as soon as that one is IDLE.  A trigger edge that arrives
//     while no segment is free is lost (`trig_lost`).
//   * conv_seg: the segment that owns the single Gray counter and ramp.  It is
//     granted when its sections report warm-up complete; the counter is
//     cleared and then runs (`cnt_en`, `ramp_en`) until it saturates, after
//     which the segment goes to READING.  Other stopped segments wait in
//     WARMUP.
//   * read_seg: the segment being read.  Its cells are offered on the read
//     port oldest first, starting one cell after the stored pointer, one cell
//     per accepted transfer (`rd_valid` and `rd_ready`); `rd_first` and
//     `rd_last` mark the frame, `rd_seg` and `rd_ptr` identify it.
// Commands to the section controllers are one-clock strobes with a segment
// index.  `cfg` fields must be static while the channel runs.  The five
// states, the segmentation, the pointer memory and the counter control follow
// the original design; the fixed rotation, the post-trigger count and the read order
// are this design's choices.
module channel_controller
  import cherenkov_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  seg_mode_t   seg_mode,
  input  logic [7:0]  post_trig,
  input  logic        trigger,
  // status from the sections
  input  sec_state_t  sec_state [N_SEC],
  input  logic [N_SEC-1:0] warm_ready,
  input  logic        gray_sat,
  // commands to the section controllers
  output logic        start_stb,
  output logic [2:0]  start_seg,
  output logic        stop_stb,
  output logic [2:0]  stop_seg,
  output logic        dig_stb,
  output logic [2:0]  dig_seg,
  output logic        done_stb,
  output logic [2:0]  done_seg,
  output logic        rdone_stb,
  output logic [2:0]  rdone_seg,
  output logic        wr_en,
  output logic [7:0]  wr_pos,
  output logic [7:0]  rd_pos,
  // Gray counter and ramp generator control
  output logic        cnt_clear,
  output logic        cnt_en,
  output logic        ramp_en,
  // read port (data itself comes from the cells through the Gray decoder)
  output logic        rd_valid,
  input  logic        rd_ready,
  output logic        rd_first,
  output logic        rd_last,
  output logic [2:0]  rd_seg,
  output logic [7:0]  rd_ptr,
  // events
  output logic        trig_acc,
  output logic        trig_lost
);

  logic [8:0] len;         // segment length in cells
  logic [3:0] nseg;        // number of segments
  logic [3:0] sec_per_seg;

  always_comb begin
    unique case (seg_mode)
      SEG_64:  begin len = 9'd64;  nseg = 4'd4; sec_per_seg = 4'd2; end
      SEG_256: begin len = 9'd256; nseg = 4'd1; sec_per_seg = 4'd8; end
      default: begin len = 9'd32;  nseg = 4'd8; sec_per_seg = 4'd1; end
    endcase
  end

  function automatic logic [2:0] nxt(logic [2:0] s, logic [3:0] n);
    return (4'(s) + 4'd1 >= n) ? 3'd0 : s + 3'd1;
  endfunction

  function automatic logic [7:0] base_of(logic [2:0] s, logic [8:0] l);
    return 8'(9'(s) * l);
  endfunction

  function automatic sec_state_t seg_state(logic [2:0] s);
    return sec_state[3'(4'(s) * sec_per_seg)];
  endfunction

  function automatic logic seg_warm(logic [2:0] s);
    return warm_ready[3'(4'(s) * sec_per_seg)];
  endfunction

  // ---------------------------------------------------------------- sampling
  logic [2:0] samp_seg;
  logic       sampling;
  logic [7:0] wr_off;
  logic       post_act;
  logic [7:0] post_cnt;
  logic       trig_q, trig_edge, stop_now;
  logic [7:0] ptr_mem [N_SEC];

  assign trig_edge = trigger && !trig_q;
  assign start_stb = !sampling && seg_state(samp_seg) == ST_IDLE;
  assign start_seg = samp_seg;
  assign stop_now  = sampling && ((trig_edge && !post_act && post_trig == 8'd0) ||
                                  (post_act && post_cnt == 8'd0));
  assign stop_stb  = stop_now;
  assign stop_seg  = samp_seg;
  assign wr_en     = sampling;
  assign wr_pos    = base_of(samp_seg, len) + wr_off;
  assign trig_acc  = sampling && trig_edge && !post_act;
  assign trig_lost = !sampling && trig_edge;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      samp_seg <= '0;
      sampling <= 1'b0;
      wr_off   <= '0;
      post_act <= 1'b0;
      post_cnt <= '0;
      trig_q   <= 1'b0;
      for (int i = 0; i < int'(N_SEC); i++) ptr_mem[i] <= '0;
    end else begin
      trig_q <= trigger;
      if (start_stb) begin
        sampling <= 1'b1;
        wr_off   <= '0;
      end else if (sampling) begin
        wr_off <= (9'(wr_off) + 9'd1 >= len) ? 8'd0 : wr_off + 8'd1;
        if (stop_now) begin
          ptr_mem[samp_seg] <= wr_off;
          sampling <= 1'b0;
          post_act <= 1'b0;
          samp_seg <= nxt(samp_seg, nseg);
        end else if (post_act) begin
          post_cnt <= post_cnt - 8'd1;
        end else if (trig_edge) begin
          post_act <= 1'b1;
          post_cnt <= post_trig - 8'd1;
        end
      end
    end
  end

  // -------------------------------------------------------------- digitizing
  logic [2:0] conv_seg;
  logic       conv_busy;

  assign dig_stb   = !conv_busy && seg_state(conv_seg) == ST_WARMUP && seg_warm(conv_seg);
  assign dig_seg   = conv_seg;
  assign cnt_clear = dig_stb;
  assign cnt_en    = conv_busy;
  assign ramp_en   = conv_busy;
  assign done_stb  = conv_busy && gray_sat;
  assign done_seg  = conv_seg;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      conv_seg  <= '0;
      conv_busy <= 1'b0;
    end else if (dig_stb) begin
      conv_busy <= 1'b1;
    end else if (done_stb) begin
      conv_busy <= 1'b0;
      conv_seg  <= nxt(conv_seg, nseg);
    end
  end

  // ----------------------------------------------------------------- reading
  logic [2:0] read_seg;
  logic       reading;
  logic [7:0] rd_off;
  logic [8:0] rd_rel;

  always_comb begin
    rd_rel = 9'(ptr_mem[read_seg]) + 9'd1 + 9'(rd_off);
    if (rd_rel >= len) rd_rel = rd_rel - len;
    if (rd_rel >= len) rd_rel = rd_rel - len;
  end

  assign rd_pos    = base_of(read_seg, len) + rd_rel[7:0];
  assign rd_valid  = reading;
  assign rd_first  = (rd_off == 8'd0);
  assign rd_last   = (9'(rd_off) == len - 9'd1);
  assign rd_seg    = read_seg;
  assign rd_ptr    = ptr_mem[read_seg];
  assign rdone_stb = reading && rd_ready && rd_last;
  assign rdone_seg = read_seg;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      read_seg <= '0;
      reading  <= 1'b0;
      rd_off   <= '0;
    end else if (!reading) begin
      if (seg_state(read_seg) == ST_READING) begin
        reading <= 1'b1;
        rd_off  <= '0;
      end
    end else if (rd_ready) begin
      if (rd_last) begin
        reading  <= 1'b0;
        read_seg <= nxt(read_seg, nseg);
      end else begin
        rd_off <= rd_off + 8'd1;
      end
    end
  end

  // The counter must only be granted to a segment that waits for it.
  a_dig_order: assert property (@(posedge clk) disable iff (!rst_n)
                                dig_stb |-> seg_state(conv_seg) == ST_WARMUP);
  a_read_hold: assert property (@(posedge clk) disable iff (!rst_n)
                                rd_valid && !rd_ready |=> rd_valid && $stable(rd_pos));

endmodule
