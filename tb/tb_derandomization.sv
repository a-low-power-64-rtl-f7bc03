// tb_derandomization: event-loss workload for one channel.
//
// Triggers arrive as a Poisson process (exponential gaps drawn here) at a
// rate chosen so that the mean number of events within one segment's busy
// time T is mu = 0.8, the operating point quoted for the design (100 kHz
// events, 8 us dead time).  The channel runs once with a single 256-cell
// segment and once with four 64-cell segments, with 10-bit conversion and an
// always-ready reader.  T is worked out from the documented timing:
// post-trigger + 1 + warm-up + 2**res conversion + one clock per cell read
// + 2 clocks of hand-over.  Checks: with one segment the lost fraction must
// match the non-paralysable dead-time law mu/(1+mu) within 0.05; with four
// segments it must be below a quarter of that; every accepted trigger must
// produce a complete frame.  A third run uses 100 kHz events (mean gap 2000
// clocks) with four segments and 8-bit conversion; its lost fraction must be
// below 0.5 %.  The measured fractions are printed.
module tb_derandomization;
  import cherenkov_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int          res = 10;
  localparam int PT  = 16;
  localparam int WU  = 8;
  localparam int NEV = 1500;

  seg_mode_t   seg_mode = SEG_256;
  logic        trigger = 1'b0;
  logic [N_CELLS-1:0] cell_cmp, sample_sw;
  logic [N_SEC-1:0]   cmp_en, ramp_sw;
  logic        ramp_en, rd_valid, rd_first, rd_last, trig_acc, trig_lost;
  logic [DATA_W-1:0] rd_data;
  logic [2:0]  rd_seg;
  logic [7:0]  rd_ptr;
  sec_state_t  sec_state [N_SEC];
  int unsigned vin = 0;
  int unsigned held [N_CELLS];
  longint unsigned stamp [N_CELLS];
  int unsigned ramp_level;

  channel #(.WARMUP_CYCLES(WU)) dut (
    .clk, .rst_n, .seg_mode, .res_bits(4'(res)), .post_trig(8'(PT)), .trigger,
    .cell_cmp, .sample_sw, .cmp_en, .ramp_sw, .ramp_en,
    .rd_valid, .rd_ready(1'b1), .rd_data, .rd_first, .rd_last, .rd_seg, .rd_ptr,
    .sec_state, .trig_acc, .trig_lost
  );

  cell_array_model #(.NC(N_CELLS), .SECN(SEC_CELLS)) model (
    .clk, .sample_sw, .cmp_en, .ramp_sw, .ramp_en, .vin,
    .cmp (cell_cmp), .held, .stamp, .ramp_level
  );

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, msg); end
  endtask

  int n_acc, n_lost, n_frames;
  always @(negedge clk) if (rst_n) begin
    if (trig_acc) n_acc++;
    if (trig_lost) n_lost++;
    if (rd_valid && rd_last) n_frames++;
  end

  always @(posedge clk) begin
    #1 vin <= $urandom_range(1023, 0);
  end

  // gap_clk = 0: mean gap set for mu = 0.8; otherwise the mean gap in clocks
  task automatic run(input seg_mode_t sm, input int r, input real gap_clk, output real lost_frac);
    int busy;
    real mean_gap;
    busy = PT + 1 + WU + (1 << r) + seg_len(sm) + 2;
    mean_gap = (gap_clk == 0.0) ? real'(busy) / 0.8 : gap_clk;
    rst_n = 1'b0; seg_mode = sm; res = r;
    n_acc = 0; n_lost = 0; n_frames = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    repeat (seg_len(sm) + 4) @(posedge clk);
    for (int e = 0; e < NEV; e++) begin
      real u;
      int gap;
      u = (real'($urandom_range(1000000, 1))) / 1000001.0;
      gap = int'(-$ln(u) * mean_gap);
      if (gap < 2) gap = 2;
      repeat (gap - 1) @(posedge clk);
      #1 trigger = 1'b1;
      @(posedge clk);
      #1 trigger = 1'b0;
    end
    repeat (8 * busy) @(posedge clk);
    check(n_frames == n_acc, $sformatf("%0d frames for %0d accepted triggers", n_frames, n_acc));
    lost_frac = real'(n_lost) / real'(n_acc + n_lost);
    $display("%0d segment(s), %0d bits: busy time %0d clocks, mean gap %0.0f clocks, accepted %0d, lost %0d, lost fraction %0.4f",
             seg_count(sm), r, busy, mean_gap, n_acc, n_lost, lost_frac);
  endtask

  initial begin
    real l1, l4, l100k, expect1;
    run(SEG_256, 10, 0.0, l1);
    run(SEG_64, 10, 0.0, l4);
    // 100 kHz at 200 MHz: mean gap 2000 clocks, 8-bit conversion
    run(SEG_64, 8, 2000.0, l100k);
    expect1 = 0.8 / 1.8;
    check(l1 > expect1 - 0.05 && l1 < expect1 + 0.05,
          $sformatf("one segment: lost %0.3f, expected %0.3f", l1, expect1));
    check(l4 < l1 / 4.0, $sformatf("four segments: lost %0.3f, not well below %0.3f", l4, l1));
    check(l100k < 0.005, $sformatf("100 kHz, four segments, 8 bits: lost %0.4f", l100k));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
