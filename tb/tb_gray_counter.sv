// tb_gray_counter: checks the channel's Gray counter at every resolution from
// 8 to 12 bits and with out-of-range settings (clamped to 8 and 12).  For each
// it clears the counter, enables it and compares every clock with a count
// kept by the testbench and converted to Gray code here; it checks that only
// one bit changes per step, that `sat` rises after exactly 2**res - 1 steps,
// that the count then stays, and that `en` low holds it.
module tb_gray_counter;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        clear = 1'b0, en = 1'b0;
  logic [3:0]  res_bits = 4'd8;
  logic [11:0] gray, prev;
  logic        sat;

  gray_counter #(.W(12)) dut (.clk, .rst_n, .clear, .en, .res_bits, .gray, .sat);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL @%0t: %s", $time, msg); end
  endtask

  function automatic logic [11:0] to_gray(int unsigned n);
    logic [11:0] b = 12'(n);
    return b ^ {1'b0, b[11:1]};
  endfunction

  initial begin
    int settings [7] = '{8, 9, 10, 11, 12, 3, 15};
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    check(gray == 12'd0 && !sat, "reset value");
    foreach (settings[i]) begin
      int r, maxc, n;
      r = settings[i] < 8 ? 8 : (settings[i] > 12 ? 12 : settings[i]);
      maxc = (1 << r) - 1;
      res_bits = 4'(settings[i]);
      clear = 1'b1; en = 1'b0;
      @(posedge clk); #1 clear = 1'b0;
      check(gray == 12'd0, "clear");
      en = 1'b1;
      n = 0;
      while (!sat && n < 5000) begin
        prev = gray;
        check(gray == to_gray(n), $sformatf("res %0d step %0d: %h, expected %h", r, n, gray, to_gray(n)));
        @(posedge clk); #1;
        n++;
        check($countones(gray ^ prev) == 1, "more than one bit changed");
      end
      check(n == maxc, $sformatf("res %0d: saturated after %0d steps, expected %0d", r, n, maxc));
      check(gray == to_gray(maxc), "saturation value");
      repeat (3) @(posedge clk);
      #1 check(gray == to_gray(maxc) && sat, "stays saturated");
      // hold with en low after a partial count
      clear = 1'b1; @(posedge clk); #1 clear = 1'b0;
      repeat (5) @(posedge clk);
      #1 en = 1'b0;
      prev = gray;
      repeat (4) @(posedge clk);
      #1 check(gray == prev && gray == to_gray(5), "en low must hold the count");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
