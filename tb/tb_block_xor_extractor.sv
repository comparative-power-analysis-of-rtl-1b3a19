// tb_block_xor_extractor -- exhaustive test of the block-XOR extractor.
//
// Applies all 2^16 words, compares each parameter with the reference model
// and checks the resulting distribution: codes of odd parity occur
// 4096 + 512 times, codes of even parity 4096 times, and 4'b1111 (the empty
// code) never. Before the multiplexer every code would occur 4096 times
// (6.25 %); the multiplexer moves the 4096 words with A = 1111 onto the eight
// odd-parity codes.
module tb_block_xor_extractor;
  import pbcam_pkg::*;
  import pbcam_tb_pkg::*;

  logic [15:0] data;
  logic [3:0]  param;
  int checks = 0, failures = 0;
  int hist [16];

  block_xor_extractor dut (.data(data), .param(param));

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (hist[v]) hist[v] = 0;
    for (int w = 0; w < 65536; w++) begin
      data = 16'(w);
      #1;
      checks++;
      if (param !== xor_param_model(data)) begin
        failures++;
        if (failures < 10) $display("FAIL data=%h param=%h expected=%h", data, param, xor_param_model(data));
      end
      hist[param]++;
    end
    for (int v = 0; v < 16; v++) begin
      int expect_n, ones;
      ones = $countones(4'(v));
      expect_n = (v == 15) ? 0 : ((ones % 2) ? 4096 + 512 : 4096);
      checks++;
      if (hist[v] != expect_n) begin
        failures++;
        $display("FAIL histogram code %0d: %0d words, expected %0d", v, hist[v], expect_n);
      end
      $display("code %2d: %5d words (%0.2f %%)", v, hist[v], 100.0 * hist[v] / 65536.0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
