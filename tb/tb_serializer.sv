// tb_serializer: sends random 16-bit words, some back to back and some with
// gaps, rebuilds them from the DDR bit pairs (rising-edge bit first, most
// significant first) and compares them with the words sent.  It also checks
// the rate: a burst of back-to-back words must leave in 8 clocks per word
// without a gap in `out_valid`.
module tb_serializer;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic in_valid = 0, in_ready;
  logic [15:0] in_data = 0;
  logic [1:0] ddr;
  logic out_valid;

  serializer #(.W(16)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL @%0t: %s", $time, msg); end
  endtask

  logic [15:0] sent_q [$];
  logic [15:0] shift;
  int nbits = 0, nwords = 0, valid_cycles = 0;
  bit in_burst = 0, burst_started = 0;
  int burst_gaps = 0;

  always @(negedge clk) if (rst_n) begin
    if (in_burst && out_valid) burst_started = 1;
    if (in_burst && burst_started && in_valid && !out_valid) burst_gaps++;
    if (out_valid) begin
      valid_cycles++;
      shift = {shift[13:0], ddr};
      nbits += 2;
      if (nbits == 16) begin
        check(sent_q.size() > 0, "word without a send");
        if (sent_q.size() > 0) check(shift == sent_q.pop_front(), $sformatf("received %h", shift));
        nbits = 0;
        nwords++;
      end
    end
  end

  always @(posedge clk) begin
    if (rst_n && in_valid && in_ready) sent_q.push_back(in_data);
  end

  initial begin
    int t0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    // words with random gaps
    for (int i = 0; i < 40; i++) begin
      in_valid = 1; in_data = 16'($urandom);
      do @(posedge clk); while (!in_ready);
      #1 in_valid = 0;
      repeat ($urandom_range(4, 0)) @(posedge clk);
      #1;
    end
    while (out_valid) @(posedge clk);
    #1;
    // a back-to-back burst: 20 words in 160 clocks
    t0 = valid_cycles;
    in_burst = 1;
    for (int i = 0; i < 20; i++) begin
      in_valid = 1; in_data = 16'($urandom);
      do @(posedge clk); while (!in_ready);
      #1;
    end
    in_valid = 0;
    in_burst = 0;
    repeat (2) @(posedge clk);
    while (out_valid) @(posedge clk);
    check(valid_cycles - t0 == 160, $sformatf("burst sent for %0d clocks", valid_cycles - t0));
    check(burst_gaps == 0, $sformatf("%0d idle clocks inside a back-to-back burst", burst_gaps));
    repeat (3) @(posedge clk);
    check(nwords == 60 && sent_q.size() == 0, $sformatf("%0d words received", nwords));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
