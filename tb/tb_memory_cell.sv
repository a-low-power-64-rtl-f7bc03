// tb_memory_cell: runs Wilkinson conversions through the digital slice of a
// memory cell.  For each random stored level v and resolution the testbench
// produces the Gray count 0..2**res-1, one step per clock, and a comparator
// that is high once the count exceeds v (with random glitches after that
// point).  The cell must end holding the Gray code of min(v, 2**res-1), flag
// `fired` only when the comparator flipped, keep its word when `convert` is
// low, and return to zero on `clear`.
module tb_memory_cell;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        clear = 1'b0, convert = 1'b0, cmp = 1'b0;
  logic [11:0] gray_in = '0, data_out;
  logic        fired;

  memory_cell #(.W(12)) dut (.clk, .rst_n, .clear, .convert, .cmp, .gray_in, .data_out, .fired);

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
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int t = 0; t < 60; t++) begin
      int res, maxc, v, exp;
      res = (t < 50) ? 8 : 12;
      maxc = (1 << res) - 1;
      v = (t % 7 == 0) ? maxc + 5 : $urandom_range(maxc, 0);
      exp = v > maxc ? maxc : v;
      clear = 1'b1;
      @(posedge clk); #1 clear = 1'b0;
      check(data_out == 12'd0 && !fired, "clear");
      convert = 1'b1;
      for (int n = 0; n <= maxc; n++) begin
        gray_in = to_gray(n);
        cmp = (n > v) ? ($urandom_range(3, 0) != 0) || (n == v + 1) : 1'b0;
        @(posedge clk); #1;
      end
      convert = 1'b0; cmp = 1'b0;
      check(data_out == to_gray(exp), $sformatf("level %0d res %0d: stored %h, expected %h", v, res, data_out, to_gray(exp)));
      check(fired == (v < maxc), "fired flag");
      // holds when not converting
      gray_in = 12'hABC; cmp = 1'b0;
      repeat (3) @(posedge clk);
      #1 check(data_out == to_gray(exp), "word must hold outside conversion");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
