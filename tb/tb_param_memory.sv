// tb_param_memory -- randomised test of the parameter memory.
//
// After reset every word must hold the empty code. Random writes and searches
// follow, over a narrow parameter range so that many words match; after each
// step the compare-enable vector is checked against a shadow copy.
module tb_param_memory;
  localparam int unsigned WORDS   = 64;
  localparam int unsigned PARAM_W = 5;
  localparam logic [PARAM_W-1:0] EMPTY = 5'd17;

  logic clk = 0, rst_n = 0;
  logic wr_en = 0;
  logic [$clog2(WORDS)-1:0] wr_addr = '0;
  logic [PARAM_W-1:0] wr_param = '0, srch_param = '0;
  logic [WORDS-1:0] cmp_en;
  logic [PARAM_W-1:0] shadow [WORDS];
  int checks = 0, failures = 0;

  param_memory #(.WORDS(WORDS), .PARAM_W(PARAM_W), .EMPTY(EMPTY)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_search(logic [PARAM_W-1:0] p);
    logic [WORDS-1:0] exp_en;
    srch_param = p;
    #1;
    for (int i = 0; i < WORDS; i++) exp_en[i] = (shadow[i] == p);
    checks++;
    if (cmp_en !== exp_en) begin
      failures++;
      $display("FAIL search %0d: cmp_en=%h expected=%h", p, cmp_en, exp_en);
    end
  endtask

  initial begin
    foreach (shadow[i]) shadow[i] = EMPTY;
    #12 rst_n = 1;
    @(negedge clk);
    check_search(EMPTY);           // all words empty
    check_search(5'd3);            // nothing stored
    for (int step = 0; step < 3000; step++) begin
      @(negedge clk);
      wr_en = ($urandom_range(0, 2) == 0);
      wr_addr = $urandom_range(0, WORDS - 1);
      wr_param = 5'($urandom_range(0, 6));
      if (wr_en) begin
        @(posedge clk);
        shadow[wr_addr] = wr_param;
        @(negedge clk);
        wr_en = 0;
      end
      check_search(5'($urandom_range(0, 7)));
    end
    check_search(EMPTY);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
