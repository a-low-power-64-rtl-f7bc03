// tb_hitmap_unit: plays the comparators and the FPGA.  It drives random
// low- and high-threshold patterns, raises ASIC-level trigger events, answers
// each hitmap request after a random delay and rebuilds the 128 transmitted
// bits.  The first 64 must equal the low-threshold pattern of the event clock
// ORed with that of the clock before, the next 64 the same for the high
// threshold.  It checks the request/acknowledge order, that the transfer
// takes 64 clocks, that an event during a pending hitmap is reported lost,
// and counts both outcomes.
module tb_hitmap_unit;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [63:0] cmp_low = 0, cmp_high = 0;
  logic event_trig = 0, hm_req, hm_ack = 0, hm_ddr_valid, hm_lost;
  logic [1:0] hm_ddr;

  hitmap_unit #(.NCH(64)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL @%0t: %s", $time, msg); end
  endtask

  logic [63:0] prev_low, prev_high, exp_low, exp_high;
  logic [127:0] rx;
  int nbits, valid_cycles, n_maps = 0, n_lost = 0;

  always @(negedge clk) if (rst_n) begin
    if (hm_ddr_valid) begin
      check(!hm_req, "data while requesting");
      rx = {rx[125:0], hm_ddr};
      nbits += 2;
      valid_cycles++;
    end
    if (hm_lost) n_lost++;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int e = 0; e < 12; e++) begin
      repeat ($urandom_range(6, 2)) begin
        cmp_low = {$urandom, $urandom} & {$urandom, $urandom};
        cmp_high = cmp_low & {$urandom, $urandom} & {$urandom, $urandom};
        @(posedge clk); #1;
      end
      prev_low = cmp_low; prev_high = cmp_high;
      cmp_low = {$urandom, $urandom} & {$urandom, $urandom};
      cmp_high = cmp_low & {$urandom, $urandom};
      exp_low = prev_low | cmp_low; exp_high = prev_high | cmp_high;
      event_trig = 1;
      check(!hm_lost, "event in armed state must not be lost");
      @(posedge clk); #1 event_trig = 0;
      cmp_low = '1; cmp_high = '1;    // later activity must not enter the frozen map
      check(hm_req, "request after event");
      repeat ($urandom_range(10, 0)) begin
        @(posedge clk); #1;
        check(hm_req && !hm_ddr_valid, "request held until acknowledge");
      end
      if (e % 3 == 1) begin
        event_trig = 1; #1;
        check(hm_lost, "event during pending hitmap must be reported lost");
        @(posedge clk); #1 event_trig = 0;
      end
      nbits = 0; valid_cycles = 0;
      hm_ack = 1;
      @(posedge clk); #1 hm_ack = 0;
      check(!hm_req, "request dropped after acknowledge");
      while (nbits < 128 && valid_cycles < 200) @(posedge clk);
      #1;
      repeat (3) @(posedge clk);
      #1;
      check(valid_cycles == 64, $sformatf("transfer took %0d clocks", valid_cycles));
      check(rx[127:64] == exp_low, $sformatf("low hitmap %h, expected %h", rx[127:64], exp_low));
      check(rx[63:0] == exp_high, $sformatf("high hitmap %h, expected %h", rx[63:0], exp_high));
      n_maps++;
    end
    check(n_maps == 12 && n_lost == 4, $sformatf("maps %0d lost %0d", n_maps, n_lost));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
