// tb_readout_controller: eight channel sources and an FPGA model around one
// readout controller.  Each source offers frames of cells (random values,
// segment and pointer) on its read port; the FPGA model answers each data
// request after a random delay and rebuilds the 16-bit words from the DDR
// pairs.  Every frame must arrive complete: a header {2'b10, channel,
// segment, pointer} and then the values in order with the last one marked.
// When all eight sources start together they must be served in round-robin
// order 0..7, and a frame of N cells must leave in 8*(N+1) consecutive clocks.
module tb_readout_controller;
  import cherenkov_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  localparam int NCH = 8;
  logic [NCH-1:0] ch_valid, ch_ready, ch_first, ch_last;
  logic [11:0] ch_data [NCH];
  logic [2:0]  ch_seg [NCH];
  logic [7:0]  ch_ptr [NCH];
  logic data_req, data_ack = 0, ddr_valid;
  logic [1:0] ddr;

  readout_controller #(.NCH(NCH)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL @%0t: %s", $time, msg); end
  endtask

  // sources: one frame at a time per channel
  int len [NCH], idx [NCH];
  bit active [NCH];
  logic [11:0] vals [NCH][64];
  int sent_frames = 0, rx_frames = 0;

  always_comb
    for (int c = 0; c < NCH; c++) begin
      ch_valid[c] = active[c];
      ch_first[c] = (idx[c] == 0);
      ch_last[c]  = (idx[c] == len[c] - 1);
      ch_data[c]  = vals[c][idx[c] % 64];
    end

  always @(posedge clk) if (rst_n)
    for (int c = 0; c < NCH; c++)
      if (active[c] && ch_ready[c]) begin
        if (idx[c] == len[c] - 1) begin active[c] <= 0; idx[c] <= 0; end
        else idx[c] <= idx[c] + 1;
      end

  task automatic offer(input int c, input int n);
    len[c] = n; idx[c] = 0;
    for (int i = 0; i < n; i++) vals[c][i] = 12'($urandom);
    ch_seg[c] = 3'($urandom); ch_ptr[c] = 8'($urandom);
    active[c] = 1;
    sent_frames++;
  endtask

  // FPGA: acknowledge and receive
  always @(posedge clk) if (rst_n) begin
    if (data_req && !data_ack && $urandom_range(3, 0) == 0) data_ack <= 1;
    else data_ack <= 0;
  end

  logic [15:0] w;
  int nb = 0, cur_ch = -1, k = 0, span = 0;
  int order [$];
  always @(negedge clk) if (rst_n) begin
    if (cur_ch >= 0) span++;
    if (ddr_valid) begin
      w = {w[13:0], ddr};
      nb += 2;
      if (nb == 16) begin
        nb = 0;
        if (cur_ch < 0) begin
          check(w[15:14] == 2'b10, $sformatf("header expected, got %h", w));
          cur_ch = int'(w[13:11]);
          order.push_back(cur_ch);
          check(w[10:8] == ch_seg[cur_ch] && w[7:0] == ch_ptr[cur_ch], "header segment and pointer");
          k = 0; span = 8;
        end else begin
          check(w[15:13] == 3'b000, "data word marker");
          check(w[11:0] == vals[cur_ch][k], $sformatf("ch %0d cell %0d: %h, expected %h", cur_ch, k, w[11:0], vals[cur_ch][k]));
          check(w[12] == (k == len[cur_ch] - 1), "last flag");
          k++;
          if (w[12]) begin
            check(span == 8 * (len[cur_ch] + 1), $sformatf("frame took %0d clocks, expected %0d", span, 8 * (len[cur_ch] + 1)));
            rx_frames++;
            cur_ch = -1;
          end
        end
      end
    end
  end

  initial begin
    for (int c = 0; c < NCH; c++) begin active[c] = 0; idx[c] = 0; len[c] = 1; ch_seg[c] = 0; ch_ptr[c] = 0; end
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk); #1;
    for (int c = 0; c < NCH; c++) offer(c, 32);
    while (rx_frames < 8) @(posedge clk);
    for (int i = 0; i < 8; i++) check(order[i] == i, $sformatf("service order %0d at %0d", order[i], i));
    // random arrivals and lengths
    for (int r = 0; r < 30; r++) begin
      int c;
      c = $urandom_range(NCH - 1, 0);
      if (!active[c]) offer(c, (r % 4 == 0) ? 64 : $urandom_range(40, 1));
      repeat ($urandom_range(120, 0)) @(posedge clk);
      #1;
    end
    while (rx_frames < sent_frames) @(posedge clk);
    repeat (10) @(posedge clk);
    check(rx_frames == sent_frames && rx_frames > 8, $sformatf("%0d of %0d frames", rx_frames, sent_frames));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
