// tb_section_controller: checks the second pair (sections 2 and 3) under the
// three segmentations.  Segment commands must reach section 2 only as
// segment 2 and section 3 only as segment 3 with 32-cell segments, both as
// segment 1 with 64-cell segments and both as segment 0 with 256-cell
// segments; commands for other segments must be ignored.  The write pointer
// must close only the sampling switch of its own cell, `warm_ready` must rise
// exactly WARMUP_CYCLES clocks after warm-up starts, and the read port must
// return the word of the addressed cell with `rd_hit` only for cells 64..127.
module tb_section_controller;
  import cherenkov_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  localparam int WU = 6;
  seg_mode_t seg_mode = SEG_32;
  logic start_stb = 0, stop_stb = 0, dig_stb = 0, done_stb = 0, rdone_stb = 0;
  logic [2:0] start_seg = 0, stop_seg = 0, dig_seg = 0, done_seg = 0, rdone_seg = 0;
  logic wr_en = 0;
  logic [7:0] wr_pos = 0, rd_pos = 0;
  logic [11:0] gray_in = 0;
  logic [63:0] cmp = 0, sample_sw;
  logic [1:0] cmp_en, ramp_sw, warm_ready;
  sec_state_t state [2];
  logic [11:0] rd_data;
  logic rd_hit;

  section_controller #(.IDX(1), .W(12), .WARMUP_CYCLES(WU)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL @%0t: %s", $time, msg); end
  endtask

  function automatic logic [11:0] to_gray(int unsigned n);
    logic [11:0] b = 12'(n);
    return b ^ {1'b0, b[11:1]};
  endfunction

  // issue one strobe for segment sg: which 0 start,1 stop,2 dig,3 done,4 rdone
  task automatic cmd(input int which, input int sg);
    case (which)
      0: begin start_stb = 1; start_seg = 3'(sg); end
      1: begin stop_stb  = 1; stop_seg  = 3'(sg); end
      2: begin dig_stb   = 1; dig_seg   = 3'(sg); end
      3: begin done_stb  = 1; done_seg  = 3'(sg); end
      default: begin rdone_stb = 1; rdone_seg = 3'(sg); end
    endcase
    @(posedge clk); #1;
    start_stb = 0; stop_stb = 0; dig_stb = 0; done_stb = 0; rdone_stb = 0;
  endtask

  task automatic expect_states(input sec_state_t a, input sec_state_t b, input string msg);
    check(state[0] == a && state[1] == b,
          $sformatf("%s: states %s %s, expected %s %s", msg, state[0].name(), state[1].name(), a.name(), b.name()));
  endtask

  int seg_a, seg_b, wrong;
  int vals [128];

  initial begin
    seg_mode_t modes [3] = '{SEG_32, SEG_64, SEG_256};
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    foreach (modes[m]) begin
      seg_mode = modes[m];
      case (modes[m])
        SEG_32:  begin seg_a = 2; seg_b = 3; wrong = 1; end
        SEG_64:  begin seg_a = 1; seg_b = 1; wrong = 2; end
        default: begin seg_a = 0; seg_b = 0; wrong = 1; end
      endcase
      expect_states(ST_IDLE, ST_IDLE, "start");
      cmd(0, wrong);
      expect_states(ST_IDLE, ST_IDLE, "foreign start ignored");
      cmd(0, seg_a);
      if (seg_a == seg_b) expect_states(ST_SAMPLING, ST_SAMPLING, "start");
      else begin
        expect_states(ST_SAMPLING, ST_IDLE, "start a");
        cmd(0, seg_b);
        expect_states(ST_SAMPLING, ST_SAMPLING, "start b");
      end
      // write pointer: every cell of the pair, and one cell outside it
      for (int c = 0; c < 128; c++) begin
        wr_en = 1; wr_pos = 8'(48 + c); #1;
        if (48 + c >= 64 && 48 + c < 128)
          check(sample_sw == (64'd1 << (48 + c - 64)), $sformatf("switch for cell %0d", 48 + c));
        else
          check(sample_sw == 0, $sformatf("no switch for foreign cell %0d", 48 + c));
      end
      wr_en = 0;
      cmd(1, seg_a);
      if (seg_a != seg_b) cmd(1, seg_b);
      expect_states(ST_WARMUP, ST_WARMUP, "warm-up");
      begin
        int n;
        n = 0;   // counted from the entry of section 3, the later one
        while (!warm_ready[1] && n < 50) begin @(posedge clk); #1 n++; end
        check(n == WU, $sformatf("warm-up lasted %0d clocks, expected %0d", n, WU));
        check(warm_ready == 2'b11, "both sections ready");
      end
      cmd(2, seg_a);
      if (seg_a != seg_b) cmd(2, seg_b);
      expect_states(ST_DIGITIZING, ST_DIGITIZING, "digitizing");
      check(ramp_sw == 2'b11 && cmp_en == 2'b11, "ramp switches");
      for (int i = 0; i < 64; i++) vals[i] = $urandom_range(255, 0);
      for (int n = 0; n < 256; n++) begin
        gray_in = to_gray(n);
        for (int i = 0; i < 64; i++) cmp[i] = (n > vals[i]);
        @(posedge clk); #1;
      end
      cmd(3, seg_a);
      if (seg_a != seg_b) cmd(3, seg_b);
      expect_states(ST_READING, ST_READING, "reading");
      for (int c = 0; c < 256; c += 3) begin
        rd_pos = 8'(c); #1;
        check(rd_hit == (c >= 64 && c < 128), $sformatf("rd_hit for cell %0d", c));
        if (c >= 64 && c < 128)
          check(rd_data == to_gray(vals[c - 64]), $sformatf("read cell %0d", c));
      end
      cmd(4, seg_a);
      if (seg_a != seg_b) cmd(4, seg_b);
      expect_states(ST_IDLE, ST_IDLE, "done");
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
