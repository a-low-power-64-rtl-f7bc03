// tb_asic_top: end-to-end test of the whole ASIC at its full size (64
// channels of 256 cells, 8 readout groups, hitmap unit), with a behavioural
// model of each channel's analog cells and ramp and a model of the FPGA.
//
// The testbench plays the front end (a random level per channel and clock,
// low- and high-threshold comparator pulses), the external trigger and the
// FPGA, which acknowledges hitmap and data requests after random delays and
// rebuilds the serial words of all nine lanes.  It keeps its own reference:
// from the trigger source selected by the configuration it works out which
// channels trigger, whether each trigger is accepted or lost, and which cell
// each channel stops on; every data frame must then match a pending trigger
// of its channel in order, with the right segment, pointer and the stored
// level of every cell oldest first (saturated at full scale).  Every hitmap
// must equal the comparator pattern of the event clock and the clock before.
// Three runs: sparse mode with internal triggers and 32-cell segments at 8
// bits; imaging mode with 64-cell segments at 9 bits; external trigger with
// 256-cell segments at 12 bits.  It counts each mechanism (sparse frames,
// imaging frames, external trigger, each segmentation, lost triggers,
// hitmaps sent and lost, readout arbitration waits, sampling overlapping
// digitising) and fails if one never happened.
module tb_asic_top;
  import cherenkov_pkg::*;

  localparam int NCH  = N_CH;
  localparam int NGRP = NCH / GROUP_CH;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  cfg_t cfg;
  logic ext_trigger = 1'b0;
  logic [NCH-1:0] cmp_low = '0, cmp_high = '0;
  logic [N_CELLS-1:0] cell_cmp [NCH];
  logic [N_CELLS-1:0] sample_sw [NCH];
  logic [N_SEC-1:0] cmp_en [NCH], ramp_sw [NCH];
  logic [NCH-1:0] ramp_en;
  logic hm_req, hm_ack = 1'b0, hm_ddr_valid, hm_lost;
  logic [1:0] hm_ddr;
  logic [NGRP-1:0] data_req, data_ack = '0, data_ddr_valid;
  logic [1:0] data_ddr [NGRP];
  logic [NCH-1:0] trig_acc, trig_lost;

  asic_top dut (
    .clk, .rst_n, .cfg, .ext_trigger, .cmp_low, .cmp_high,
    .cell_cmp, .sample_sw, .cmp_en, .ramp_sw, .ramp_en,
    .hm_req, .hm_ack, .hm_ddr, .hm_ddr_valid, .hm_lost,
    .data_req, .data_ack, .data_ddr, .data_ddr_valid,
    .trig_acc, .trig_lost
  );

  int unsigned vin [NCH];
  int unsigned held [NCH][N_CELLS];
  longint unsigned stamp [NCH][N_CELLS];
  int unsigned ramp_level [NCH];

  for (genvar c = 0; c < NCH; c++) begin : g_model
    cell_array_model #(.NC(N_CELLS), .SECN(SEC_CELLS)) model (
      .clk, .sample_sw(sample_sw[c]), .cmp_en(cmp_en[c]), .ramp_sw(ramp_sw[c]),
      .ramp_en(ramp_en[c]), .vin(vin[c]), .cmp(cell_cmp[c]),
      .held(held[c]), .stamp(stamp[c]), .ramp_level(ramp_level[c])
    );
  end

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, msg);
    end
  endtask

  // which channel each readout controller is serving (observation only)
  logic [NGRP-1:0] ro_busy;
  logic [2:0]      ro_sel [NGRP];
  for (genvar g = 0; g < NGRP; g++) begin : g_obs
    assign ro_busy[g] = (dut.g_grp[g].u_ro.state != 2'd0);
    assign ro_sel[g]  = dut.g_grp[g].u_ro.sel;
  end

  // ------------------------------------------------------------ reference
  int L, M;
  longint cyc;
  bit trig_prev [NCH];
  longint stop_due [NCH];
  int stop_q [NCH][$];
  // levels of a channel's cells frozen one clock after each stop, so that a
  // segment sampled again while its last words are still in flight is judged
  // against what it held when it was read
  int unsigned snap_mem [NCH][N_SEC][N_CELLS];
  int snap_wr [NCH], snap_rd [NCH];
  longint snap_due [NCH];
  int cur_slot [NGRP];
  bit asic_prev;
  logic [NCH-1:0] low_prev, high_prev;
  logic [127:0] hm_q [$];
  int hm_pending_until;      // cycle until which a new event must be lost
  bit hm_busy;
  // counters of mechanisms
  int n_acc, n_lost, n_frames, n_frames_sparse, n_frames_imaging, n_frames_ext;
  int n_seg [3];
  int n_hm, n_hm_lost, n_arb_wait, n_overlap, n_conv;

  function automatic int find_one(logic [N_CELLS-1:0] v);
    int r = -1;
    for (int i = 0; i < int'(N_CELLS); i++) if (v[i]) r = i;
    return r;
  endfunction

  function automatic bit tb_trig(int c);
    if (cfg.ext_trig_en) return ext_trigger;
    if (cfg.mode == MODE_IMAGING) return |cmp_low;
    return cmp_low[c];
  endfunction

  always @(negedge clk) begin
    if (!rst_n) begin
      cyc = 0;
      asic_prev = 0; low_prev = '0; high_prev = '0;
      hm_busy = 0;
      for (int c = 0; c < NCH; c++) begin
        trig_prev[c] = 0; stop_due[c] = -1; stop_q[c].delete();
        snap_due[c] = -1; snap_wr[c] = 0; snap_rd[c] = 0;
      end
      hm_q.delete();
    end else begin
      bit asic_now;
      cyc++;
      for (int c = 0; c < NCH; c++) begin
        int idx;
        bit t;
        idx = find_one(sample_sw[c]);
        t = tb_trig(c);
        if (t && !trig_prev[c]) begin
          if (idx >= 0 && stop_due[c] < 0) begin
            check(trig_acc[c] && !trig_lost[c], $sformatf("ch %0d: trigger should be accepted", c));
            stop_due[c] = cyc + cfg.post_trig;
            n_acc++;
          end else if (idx < 0) begin
            check(trig_lost[c] && !trig_acc[c], $sformatf("ch %0d: trigger should be lost", c));
            n_lost++;
          end
        end
        if (cyc == snap_due[c]) begin
          for (int i = 0; i < int'(N_CELLS); i++) snap_mem[c][snap_wr[c]][i] = held[c][i];
          snap_wr[c] = (snap_wr[c] + 1) % N_SEC;
          snap_due[c] = -1;
        end
        if (cyc == stop_due[c]) begin
          check(idx >= 0, "no cell sampled at the stop clock");
          stop_q[c].push_back(idx);
          stop_due[c] = -1;
          snap_due[c] = cyc + 1;
        end
        trig_prev[c] = t;
        if (ramp_en[c] && ramp_level[c] == 0) n_conv++;
        if (c == 0 && ramp_en[c] && sample_sw[c] != '0) n_overlap++;
      end
      // ASIC-level event for the hitmap
      asic_now = cfg.ext_trig_en ? ext_trigger : |cmp_low;
      if (asic_now && !asic_prev) begin
        if (hm_busy) begin
          check(hm_lost, "hitmap event while busy must be lost");
        end else if (!hm_lost) begin
          hm_q.push_back({low_prev | cmp_low, high_prev | cmp_high});
          hm_busy = 1;
        end
        if (hm_lost) n_hm_lost++;
      end
      asic_prev = asic_now;
      low_prev = cmp_low; high_prev = cmp_high;
      // readout arbitration: a channel waits while its group serves another
      for (int g = 0; g < NGRP; g++)
        for (int k = 0; k < GROUP_CH; k++)
          if (dut.rd_valid[g*GROUP_CH + k] && dut.rd_first[g*GROUP_CH + k] &&
              ro_busy[g] && ro_sel[g] != 3'(k))
            n_arb_wait++;
    end
  end

  // ------------------------------------------------------------ FPGA model
  always @(posedge clk) begin
    if (!rst_n) begin
      hm_ack <= 0; data_ack <= '0;
    end else begin
      hm_ack <= hm_req && !hm_ack && ($urandom_range(3, 0) == 0);
      for (int g = 0; g < NGRP; g++)
        data_ack[g] <= data_req[g] && !data_ack[g] && ($urandom_range(3, 0) == 0);
    end
  end

  // hitmap lane
  logic [127:0] hm_rx;
  int hm_nb;
  always @(negedge clk) begin
    if (!rst_n) hm_nb = 0;
    else if (hm_ddr_valid) begin
      hm_rx = {hm_rx[125:0], hm_ddr};
      hm_nb += 2;
      if (hm_nb == 128) begin
        hm_nb = 0;
        check(hm_q.size() > 0, "hitmap without event");
        if (hm_q.size() > 0) begin
          logic [127:0] e;
          e = hm_q.pop_front();
          check(hm_rx == e, $sformatf("hitmap %h, expected %h", hm_rx, e));
        end
        n_hm++;
        hm_busy = 0;
      end
    end
  end

  // data lanes
  logic [15:0] w [NGRP];
  int nb [NGRP], cur [NGRP], kk [NGRP], cstop [NGRP];
  always @(negedge clk) begin
    if (!rst_n) begin
      for (int g = 0; g < NGRP; g++) begin nb[g] = 0; cur[g] = -1; end
    end else begin
      for (int g = 0; g < NGRP; g++) if (data_ddr_valid[g]) begin
        w[g] = {w[g][13:0], data_ddr[g]};
        nb[g] += 2;
        if (nb[g] == 16) begin
          nb[g] = 0;
          if (cur[g] < 0) begin
            int c;
            check(w[g][15:14] == 2'b10, "header marker");
            c = g * GROUP_CH + int'(w[g][13:11]);
            cur[g] = c; kk[g] = 0;
            check(stop_q[c].size() > 0, $sformatf("ch %0d: frame without trigger", c));
            cstop[g] = (stop_q[c].size() > 0) ? stop_q[c].pop_front() : 0;
            cur_slot[g] = snap_rd[c];
            snap_rd[c] = (snap_rd[c] + 1) % N_SEC;
            check(int'(w[g][10:8]) == cstop[g] / L, $sformatf("ch %0d: segment %0d, expected %0d", c, w[g][10:8], cstop[g] / L));
            check(int'(w[g][7:0]) == cstop[g] % L, $sformatf("ch %0d: pointer %0d, expected %0d", c, w[g][7:0], cstop[g] % L));
          end else begin
            int c, cidx, ev;
            c = cur[g];
            cidx = (cstop[g] / L) * L + (cstop[g] % L + 1 + kk[g]) % L;
            ev = snap_mem[c][cur_slot[g]][cidx] > M ? M : snap_mem[c][cur_slot[g]][cidx];
            check(int'(w[g][11:0]) == ev, $sformatf("ch %0d cidx %0d: %0d, expected %0d", c, cidx, w[g][11:0], ev));
            check(w[g][12] == (kk[g] == L - 1), "last flag");
            kk[g]++;
            if (w[g][12] || kk[g] >= L) begin
              n_frames++;
              n_seg[cfg.seg]++;
              if (cfg.ext_trig_en) n_frames_ext++;
              else if (cfg.mode == MODE_IMAGING) n_frames_imaging++;
              else n_frames_sparse++;
              cur[g] = -1;
            end
          end
        end
      end
    end
  end

  // ------------------------------------------------------------ stimulus
  always @(posedge clk) begin
    #1;
    for (int c = 0; c < NCH; c++) vin[c] <= $urandom_range(M + 8, 0);
  end

  function automatic bit all_done();
    for (int c = 0; c < NCH; c++) if (stop_q[c].size() > 0 || stop_due[c] >= 0) return 0;
    if (hm_q.size() > 0) return 0;
    for (int g = 0; g < NGRP; g++) if (cur[g] >= 0 || data_req[g] || data_ddr_valid[g]) return 0;
    if (dut.rd_valid != '0) return 0;
    return 1;
  endfunction

  task automatic start(input acq_mode_t mode, input seg_mode_t sm, input int res,
                       input int pt, input bit ext = 1'b0);
    rst_n = 1'b0;
    cfg.mode = mode; cfg.seg = sm; cfg.res_bits = 4'(res);
    cfg.post_trig = 8'(pt); cfg.ext_trig_en = ext;
    L = seg_len(sm); M = (1 << res) - 1;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    repeat (L + 4) @(posedge clk);
    #1;
  endtask

  task automatic pulse_channels(input logic [NCH-1:0] mask);
    cmp_low = mask;
    cmp_high = mask & {$urandom, $urandom};
    @(posedge clk); #1;
    cmp_low = '0; cmp_high = '0;
  endtask

  task automatic finish_run(input int limit);
    int n = 0;
    while (!all_done() && n < limit) begin @(posedge clk); n++; end
    repeat (50) @(posedge clk);
    #1 check(all_done(), "frames or hitmaps left undelivered");
  endtask

  initial begin
    n_acc = 0; n_lost = 0; n_frames = 0; n_frames_sparse = 0; n_frames_imaging = 0;
    n_frames_ext = 0; n_seg = '{0, 0, 0}; n_hm = 0; n_hm_lost = 0; n_arb_wait = 0;
    n_overlap = 0; n_conv = 0;
    cfg = '0; L = 32; M = 255;

    // 1. sparse mode, internal trigger, 32-cell segments, 8 bits
    start(MODE_SPARSE, SEG_32, 8, 8);
    for (int e = 0; e < 6; e++) begin
      logic [NCH-1:0] m;
      m = '0;
      for (int j = 0; j < 3; j++) m[$urandom_range(NCH - 1, 0)] = 1'b1;
      pulse_channels(m);
      repeat (30 + $urandom_range(20, 0)) @(posedge clk);
      #1;
    end
    // one channel fired in quick succession: its segments run out
    for (int e = 0; e < 11; e++) begin
      pulse_channels(64'd1 << 5);
      repeat (24) @(posedge clk);
      #1;
    end
    finish_run(100000);

    // 2. imaging mode, internal trigger, 64-cell segments, 9 bits
    start(MODE_IMAGING, SEG_64, 9, 20);
    for (int e = 0; e < 2; e++) begin
      pulse_channels(64'd1 << $urandom_range(NCH - 1, 0));
      repeat (150) @(posedge clk);
      #1;
    end
    finish_run(100000);

    // 3. external trigger, 256-cell segments, 12 bits
    start(MODE_SPARSE, SEG_256, 12, 128, 1'b1);
    cmp_low = 64'h00F0_0000_0000_0F00; cmp_high = 64'h0010_0000_0000_0100;
    ext_trigger = 1'b1;
    @(posedge clk); #1 ext_trigger = 1'b0;
    cmp_low = '0; cmp_high = '0;
    finish_run(200000);

    check(n_frames == n_acc, $sformatf("%0d frames for %0d accepted triggers", n_frames, n_acc));
    check(n_frames_sparse > 0, "no sparse-mode frame");
    check(n_frames_imaging >= 2 * NCH, "imaging mode did not read every channel");
    check(n_frames_ext == NCH, "external trigger did not read every channel");
    check(n_seg[SEG_32] > 0 && n_seg[SEG_64] > 0 && n_seg[SEG_256] > 0, "a segmentation never ran");
    check(n_lost > 0, "no trigger was lost");
    check(n_hm > 0, "no hitmap sent");
    check(n_hm_lost > 0, "no hitmap event was lost");
    check(n_arb_wait > 0, "readout arbitration never made a channel wait");
    check(n_overlap > 0, "sampling never overlapped digitising");
    $display("accepted=%0d lost=%0d frames=%0d (sparse %0d imaging %0d ext %0d) hitmaps=%0d hm_lost=%0d arb_wait=%0d overlap=%0d conversions=%0d",
             n_acc, n_lost, n_frames, n_frames_sparse, n_frames_imaging, n_frames_ext,
             n_hm, n_hm_lost, n_arb_wait, n_overlap, n_conv);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
