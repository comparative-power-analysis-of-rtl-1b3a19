// tb_ones_count_extractor -- exhaustive test of the ones-count extractor.
//
// Applies all 2^16 words, compares each parameter with a bit count, and
// checks the distribution: count r occurs C(16,r) times, a bell shape peaking
// at r = 8 with 12870 words (19.6 %). The empty code 17 never occurs.
module tb_ones_count_extractor;
  import pbcam_pkg::*;
  import pbcam_tb_pkg::*;

  logic [15:0] data;
  logic [4:0]  param;
  int checks = 0, failures = 0;
  int hist [32];
  longint mid = 0;

  ones_count_extractor dut (.data(data), .param(param));

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
      if (param !== oc_param_model(data)) begin
        failures++;
        if (failures < 10) $display("FAIL data=%h param=%0d expected=%0d", data, param, oc_param_model(data));
      end
      hist[param]++;
    end
    for (int v = 0; v < 32; v++) begin
      longint expect_n;
      expect_n = (v <= 16) ? choose(16, v) : 0;
      checks++;
      if (hist[v] != expect_n) begin
        failures++;
        $display("FAIL histogram count %0d: %0d words, expected %0d", v, hist[v], expect_n);
      end
      if (v <= 16) $display("count %2d: %5d words (%0.2f %%)", v, hist[v], 100.0 * hist[v] / 65536.0);
      if (v >= 4 && v <= 12) mid += hist[v];
    end
    $display("counts 4..12 together: %0.2f %% of all words", 100.0 * mid / 65536.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
