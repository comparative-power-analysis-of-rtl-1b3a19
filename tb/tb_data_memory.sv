// tb_data_memory -- randomised test of the gated CAM data memory.
//
// Fills every word, then searches with random compare enables. A word may
// match only when it is enabled and equal; the words are drawn from a small
// set of values so that equal words (and enabled-but-unequal words) are
// common.
module tb_data_memory;
  localparam int unsigned WORDS  = 64;
  localparam int unsigned DATA_W = 16;

  logic clk = 0;
  logic wr_en = 0;
  logic [$clog2(WORDS)-1:0] wr_addr = '0;
  logic [DATA_W-1:0] wr_data = '0, srch_data = '0;
  logic [WORDS-1:0] cmp_en = '0, match;
  logic [DATA_W-1:0] shadow [WORDS];
  int checks = 0, failures = 0, hits = 0, gated = 0;

  data_memory #(.WORDS(WORDS), .DATA_W(DATA_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [DATA_W-1:0] pick();
    return 16'h1000 * 16'($urandom_range(0, 3)) + 16'h00a5;
  endfunction

  task automatic write(int a, logic [DATA_W-1:0] d);
    @(negedge clk);
    wr_en = 1; wr_addr = a[$clog2(WORDS)-1:0]; wr_data = d;
    @(posedge clk);
    shadow[a] = d;
    @(negedge clk);
    wr_en = 0;
  endtask

  initial begin
    for (int i = 0; i < WORDS; i++) write(i, pick());
    for (int step = 0; step < 3000; step++) begin
      logic [WORDS-1:0] exp_m;
      if ($urandom_range(0, 9) == 0) write($urandom_range(0, WORDS - 1), pick());
      @(negedge clk);
      cmp_en = {$urandom, $urandom};
      srch_data = pick();
      #1;
      for (int i = 0; i < WORDS; i++) begin
        exp_m[i] = cmp_en[i] && (shadow[i] == srch_data);
        if (!cmp_en[i] && shadow[i] == srch_data) gated++;
      end
      if (exp_m != 0) hits++;
      checks++;
      if (match !== exp_m) begin
        failures++;
        $display("FAIL search %h: match=%h expected=%h", srch_data, match, exp_m);
      end
    end
    checks++;
    if (hits == 0 || gated == 0) begin
      failures++;
      $display("FAIL coverage hits=%0d gated=%0d", hits, gated);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
