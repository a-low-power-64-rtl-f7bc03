// tb_section: takes a 32-cell section through its five states several times.
// The testbench commands each transition, checks the state and the analog
// controls (sampling switch of the addressed cell only while sampling,
// comparator enable in warm-up and digitising, ramp switch while digitising),
// plays the ADC itself (Gray count one step per clock, cell comparator high
// once the count passes a random level it chose for that cell) and then reads
// every cell, expecting the Gray code of min(level, 2**res-1).
module tb_section;
  import cherenkov_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic go_sample = 0, go_stop = 0, go_digitize = 0, conv_done = 0, read_done = 0;
  logic wr_en = 0;
  logic [4:0] wr_cell = 0, rd_cell = 0;
  logic [11:0] gray_in = 0;
  logic [31:0] cmp = 0, sample_sw;
  sec_state_t state;
  logic cmp_en, ramp_sw;
  logic [11:0] rd_data;

  section #(.CELLS(32), .W(12)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL @%0t: %s", $time, msg); end
  endtask

  function automatic logic [11:0] to_gray(int unsigned n);
    logic [11:0] b = 12'(n);
    return b ^ {1'b0, b[11:1]};
  endfunction

  task automatic pulse(ref logic s);
    s = 1'b1; @(posedge clk); #1 s = 1'b0;
  endtask

  int level [32];

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int round = 0; round < 3; round++) begin
      int maxc;
      maxc = (round == 2) ? 511 : 255;
      check(state == ST_IDLE, "idle");
      check(sample_sw == 0 && !cmp_en && !ramp_sw, "idle controls");
      pulse(go_sample);
      check(state == ST_SAMPLING, "sampling");
      // sample 40 clocks: the pointer wraps, the last write of a cell counts
      for (int t = 0; t < 40; t++) begin
        wr_en = (t != 17);
        wr_cell = 5'(t + round);
        #1;
        if (wr_en) begin
          check(sample_sw == (32'd1 << wr_cell), "one-hot sampling switch");
          level[wr_cell] = (t % 9 == 0) ? maxc + 3 : $urandom_range(maxc, 0);
        end else check(sample_sw == 0, "no switch without wr_en");
        @(posedge clk); #1;
      end
      wr_en = 0;
      pulse(go_stop);
      check(state == ST_WARMUP && cmp_en && !ramp_sw && sample_sw == 0, "warm-up controls");
      repeat (5) @(posedge clk);
      #1 pulse(go_digitize);
      check(state == ST_DIGITIZING && cmp_en && ramp_sw, "digitizing controls");
      for (int n = 0; n <= maxc; n++) begin
        gray_in = to_gray(n);
        for (int i = 0; i < 32; i++) cmp[i] = (n > level[i]);
        if (n == maxc) conv_done = 1'b1;
        @(posedge clk); #1;
      end
      conv_done = 0; cmp = 0;
      check(state == ST_READING && !cmp_en && !ramp_sw, "reading");
      for (int i = 0; i < 32; i++) begin
        int e;
        e = level[i] > maxc ? maxc : level[i];
        rd_cell = 5'(i); #1;
        check(rd_data == to_gray(e), $sformatf("cell %0d: %h, expected %h", i, rd_data, to_gray(e)));
        @(posedge clk); #1;
      end
      pulse(read_done);
      check(state == ST_IDLE, "back to idle");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
