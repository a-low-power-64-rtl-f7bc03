// tb_gray_decoder: applies every 12-bit Gray code, formed here from a binary
// count as n ^ (n >> 1), and checks that the decoder returns n.
module tb_gray_decoder;
  logic [11:0] gray, bin;
  int checks = 0, failures = 0;

  gray_decoder #(.W(12)) dut (.gray, .bin);

  initial begin
    for (int n = 0; n < 4096; n++) begin
      gray = 12'(n) ^ 12'(n >> 1);
      #1;
      checks++;
      if (bin != 12'(n)) begin
        failures++;
        if (failures < 20) $display("FAIL: gray %h decoded to %0d, expected %0d", gray, bin, n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
