// tb_channel: end-to-end test of one readout channel (channel controller,
// section controllers, sections, memory cells, Gray counter and decoder)
// against a behavioural model of the analog cells and ramp.
//
// The testbench drives a random input level every clock and trigger pulses,
// and follows on its own which cell is sampled in each clock.  From that it
// predicts, for every accepted trigger, the segment and the stop cell
// (post_trig cells after the trigger clock), the read order (oldest cell
// first) and every value (the stored level, saturated at 2**res - 1).  It
// checks: one cell sampled per clock in circular order; accepted and lost
// triggers; the conversion time of 2**res clocks; every frame's header
// fields, order and values.  Four runs cover 32-, 64- and 256-cell
// segmentation and 8, 9 and 12-bit resolution, with random read stalls.  It
// also counts overlap of sampling with digitising (derandomisation), lost
// triggers and read stalls, and fails if one of them never happened.
module tb_channel;
  import cherenkov_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  seg_mode_t   seg_mode = SEG_32;
  logic [3:0]  res_bits = 4'd8;
  logic [7:0]  post_trig = 8'd10;
  logic        trigger = 1'b0;
  logic [N_CELLS-1:0] cell_cmp, sample_sw;
  logic [N_SEC-1:0]   cmp_en, ramp_sw;
  logic        ramp_en;
  logic        rd_valid, rd_ready = 1'b1;
  logic [DATA_W-1:0] rd_data;
  logic        rd_first, rd_last;
  logic [2:0]  rd_seg;
  logic [7:0]  rd_ptr;
  sec_state_t  sec_state [N_SEC];
  logic        trig_acc, trig_lost;
  int unsigned vin = 0;
  int unsigned held [N_CELLS];
  longint unsigned stamp [N_CELLS];
  int unsigned ramp_level;

  channel #(.WARMUP_CYCLES(8)) dut (
    .clk, .rst_n, .seg_mode, .res_bits, .post_trig, .trigger,
    .cell_cmp, .sample_sw, .cmp_en, .ramp_sw, .ramp_en,
    .rd_valid, .rd_ready, .rd_data, .rd_first, .rd_last, .rd_seg, .rd_ptr,
    .sec_state, .trig_acc, .trig_lost
  );

  cell_array_model #(.NC(N_CELLS), .SECN(SEC_CELLS)) model (
    .clk, .sample_sw, .cmp_en, .ramp_sw, .ramp_en, .vin,
    .cmp (cell_cmp), .held, .stamp, .ramp_level
  );

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, msg);
    end
  endtask

  // ------------------------------------------------------------ reference
  int L, M;                 // segment length, full-scale count
  int prev_idx;
  bit trig_prev;
  longint cyc;
  longint stop_due;
  int frames_q [$];         // stop cells of accepted triggers, in order
  int cur_stop, k;
  int ramp_cnt; bit ramp_prev;
  int n_acc, n_lost, n_frames, n_conv, n_overlap, n_stall, n_sat;
  int n_frames_mode [3];

  function automatic int find_one(logic [N_CELLS-1:0] v);
    int r = -1;
    for (int i = 0; i < int'(N_CELLS); i++) if (v[i]) r = i;
    return r;
  endfunction

  always @(negedge clk) begin
    if (!rst_n) begin
      prev_idx = -1; trig_prev = 0; cyc = 0; stop_due = -1;
      frames_q.delete(); ramp_cnt = 0; ramp_prev = 0; k = 0;
    end else begin
      int idx;
      bit samp, digi;
      cyc++;
      idx = find_one(sample_sw);
      check($countones(sample_sw) <= 1, "more than one sampling switch closed");
      if (idx >= 0 && prev_idx >= 0 && idx / L == prev_idx / L)
        check(idx == (prev_idx / L) * L + (prev_idx % L + 1) % L,
              $sformatf("sampling order: %0d after %0d", idx, prev_idx));
      // triggers
      if (trigger && !trig_prev) begin
        if (idx >= 0 && stop_due < 0) begin
          check(trig_acc && !trig_lost, "trigger should be accepted");
          stop_due = cyc + post_trig;
          n_acc++;
        end else if (idx < 0) begin
          check(trig_lost && !trig_acc, "trigger should be lost");
          n_lost++;
        end
      end else begin
        check(!trig_acc && !trig_lost, "trigger event without trigger edge");
      end
      if (cyc == stop_due) begin
        check(idx >= 0, "no cell sampled at the stop clock");
        frames_q.push_back(idx);
        stop_due = -1;
      end
      trig_prev = trigger;
      prev_idx = idx;
      // conversion time
      if (ramp_en) ramp_cnt++;
      if (ramp_prev && !ramp_en) begin
        check(ramp_cnt == M + 1, $sformatf("conversion took %0d clocks, expected %0d", ramp_cnt, M + 1));
        n_conv++;
        ramp_cnt = 0;
      end
      ramp_prev = ramp_en;
      // derandomisation: one section samples while another digitises
      samp = 0; digi = 0;
      foreach (sec_state[s]) begin
        if (sec_state[s] == ST_SAMPLING) samp = 1;
        if (sec_state[s] == ST_DIGITIZING) digi = 1;
      end
      if (samp && digi) n_overlap++;
      if (rd_valid && !rd_ready) n_stall++;
      // readout
      if (rd_valid && rd_ready) begin
        int ec, ev;
        if (rd_first) begin
          check(frames_q.size() > 0, "frame without accepted trigger");
          cur_stop = (frames_q.size() > 0) ? frames_q.pop_front() : 0;
          k = 0;
          check(rd_seg == 3'(cur_stop / L), $sformatf("rd_seg %0d, expected %0d", rd_seg, cur_stop / L));
          check(rd_ptr == 8'(cur_stop % L), $sformatf("rd_ptr %0d, expected %0d", rd_ptr, cur_stop % L));
        end
        ec = (cur_stop / L) * L + (cur_stop % L + 1 + k) % L;
        ev = (held[ec] > M) ? M : held[ec];
        if (held[ec] > M) n_sat++;
        check(int'(rd_data) == ev, $sformatf("cell %0d: read %0d, expected %0d", ec, rd_data, ev));
        check(rd_last == (k == L - 1), "rd_last position");
        k++;
        if (rd_last) begin
          n_frames++;
          n_frames_mode[seg_mode]++;
        end
      end
    end
  end

  // ------------------------------------------------------------ stimulus
  always @(posedge clk) begin
    #1;
    vin <= $urandom_range(M + 8, 0);
    rd_ready <= ($urandom_range(99, 0) < 80);
  end

  task automatic run(input seg_mode_t sm, input int res, input int pt,
                     input int ntrig, input int spacing);
    rst_n = 1'b0;
    seg_mode = sm; res_bits = 4'(res); post_trig = 8'(pt);
    L = seg_len(sm); M = (1 << res) - 1;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    repeat (L + 5) @(posedge clk);
    for (int t = 0; t < ntrig; t++) begin
      #1 trigger = 1'b1;
      @(posedge clk);
      #1 trigger = 1'b0;
      repeat (spacing + $urandom_range(7, 0)) @(posedge clk);
    end
    // drain: all frames read
    while (frames_q.size() > 0 || stop_due >= 0 || rd_valid) @(posedge clk);
    repeat (20) @(posedge clk);
    check(frames_q.size() == 0, "frames left unread");
  endtask

  initial begin
    n_acc = 0; n_lost = 0; n_frames = 0; n_conv = 0; n_overlap = 0; n_stall = 0; n_sat = 0;
    n_frames_mode = '{0, 0, 0};
    L = 32; M = 255;
    run(SEG_32, 8, 10, 14, 40);
    run(SEG_64, 9, 20, 6, 120);
    run(SEG_256, 8, 100, 3, 300);
    run(SEG_32, 12, 0, 2, 50);
    check(n_frames == n_acc, $sformatf("%0d frames for %0d accepted triggers", n_frames, n_acc));
    check(n_lost > 0, "no trigger was lost");
    check(n_overlap > 0, "sampling never overlapped digitising");
    check(n_stall > 0, "read port never stalled");
    check(n_sat > 0, "no saturated cell");
    check(n_frames_mode[SEG_32] > 0 && n_frames_mode[SEG_64] > 0 && n_frames_mode[SEG_256] > 0,
          "a segmentation produced no frame");
    $display("accepted=%0d lost=%0d frames=%0d conversions=%0d overlap=%0d stalls=%0d saturated=%0d",
             n_acc, n_lost, n_frames, n_conv, n_overlap, n_stall, n_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
