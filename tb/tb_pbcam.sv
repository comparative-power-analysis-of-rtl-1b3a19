// tb_pbcam -- randomised test of the PB-CAM with each parameter extractor.
//
// Two instances, one XPCAM (block-XOR) and one OCCAM (ones count), receive
// the same requests. A shadow array holds what was written. For each search
// the testbench predicts, per instance, the match lines, hit, lowest matching
// address and the number of stage-2 comparisons (stored words whose
// parameter, from the reference model, equals the search word's), and checks
// them one cycle later. It also checks that rsp_valid is high exactly in the
// cycle after each search, and that no word matches before it is written.
// Data are drawn from a small pool so that repeats, multiple matches,
// parameter-only matches and parameter misses all occur.
module tb_pbcam;
  import pbcam_pkg::*;
  import pbcam_tb_pkg::*;

  localparam int unsigned WORDS = 32;
  localparam int unsigned AW = $clog2(WORDS);
  localparam int unsigned CW = $clog2(WORDS + 1);

  logic clk = 0, rst_n = 0;
  logic req_valid = 0, req_write = 0;
  logic [AW-1:0] req_addr = '0;
  logic [15:0] req_data = '0;

  logic          xp_valid, xp_hit, oc_valid, oc_hit;
  logic [AW-1:0] xp_addr, oc_addr;
  logic [WORDS-1:0] xp_match, oc_match;
  logic [CW-1:0] xp_cmp, oc_cmp;

  pbcam #(.EXT(EXT_BLOCK_XOR), .WORDS(WORDS)) dut_xp (
    .clk, .rst_n, .req_valid, .req_write, .req_addr, .req_data,
    .rsp_valid(xp_valid), .rsp_hit(xp_hit), .rsp_addr(xp_addr),
    .rsp_match(xp_match), .rsp_compares(xp_cmp));
  pbcam #(.EXT(EXT_ONES_COUNT), .WORDS(WORDS)) dut_oc (
    .clk, .rst_n, .req_valid, .req_write, .req_addr, .req_data,
    .rsp_valid(oc_valid), .rsp_hit(oc_hit), .rsp_addr(oc_addr),
    .rsp_match(oc_match), .rsp_compares(oc_cmp));

  logic        sh_valid [WORDS];
  logic [15:0] sh_data  [WORDS];
  logic [15:0] pool [8];
  int checks = 0, failures = 0;
  int n_multi = 0, n_hit = 0, n_param_only = 0, n_filtered = 0;

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic do_write(int a, logic [15:0] d);
    @(negedge clk);
    req_valid = 1; req_write = 1; req_addr = AW'(a); req_data = d;
    @(posedge clk);
    sh_valid[a] = 1; sh_data[a] = d;
    @(negedge clk);
    req_valid = 0; req_write = 0;
    chk("no response to a write", !xp_valid && !oc_valid);
  endtask

  task automatic do_search(logic [15:0] key);
    logic [WORDS-1:0] em;
    int ex_addr, ex_xp, ex_oc;
    em = '0; ex_addr = 0; ex_xp = 0; ex_oc = 0;
    for (int i = WORDS - 1; i >= 0; i--) begin
      if (sh_valid[i] && sh_data[i] == key) begin em[i] = 1; ex_addr = i; end
      if (sh_valid[i] && xor_param_model(sh_data[i]) == xor_param_model(key)) ex_xp++;
      if (sh_valid[i] && oc_param_model(sh_data[i]) == oc_param_model(key)) ex_oc++;
    end
    if ($countones(em) > 1) n_multi++;
    if (em != 0) n_hit++;
    if (em == 0 && (ex_xp > 0 || ex_oc > 0)) n_param_only++;
    if (ex_xp == 0 || ex_oc == 0) n_filtered++;
    @(negedge clk);
    req_valid = 1; req_write = 0; req_data = key; req_addr = AW'($urandom);
    chk("no response before the search edge", !xp_valid && !oc_valid);
    @(negedge clk);
    req_valid = 0;
    chk("xp rsp_valid one cycle after search", xp_valid);
    chk("oc rsp_valid one cycle after search", oc_valid);
    chk("xp match lines", xp_match == em);
    chk("oc match lines", oc_match == em);
    chk("xp hit", xp_hit == (em != 0));
    chk("oc hit", oc_hit == (em != 0));
    chk("xp address", em == 0 || int'(xp_addr) == ex_addr);
    chk("oc address", em == 0 || int'(oc_addr) == ex_addr);
    chk("xp compare count", int'(xp_cmp) == ex_xp);
    chk("oc compare count", int'(oc_cmp) == ex_oc);
    @(negedge clk);
    chk("rsp_valid lasts one cycle", !xp_valid && !oc_valid);
  endtask

  initial begin
    foreach (sh_valid[i]) sh_valid[i] = 0;
    // pool: pairs sharing a ones count, block-XOR parameter, or both
    pool[0] = 16'h0000; pool[1] = 16'h0003; pool[2] = 16'h0005; pool[3] = 16'h1111;
    pool[4] = 16'hF000; pool[5] = 16'h8421; pool[6] = 16'hFFFF; pool[7] = 16'h7E81;
    #12 rst_n = 1;
    // empty CAM: nothing may match, nothing is compared
    for (int k = 0; k < 8; k++) do_search(pool[k]);
    for (int step = 0; step < 2000; step++) begin
      logic [15:0] d;
      d = ($urandom_range(0, 3) == 0) ? 16'($urandom) : pool[$urandom_range(0, 7)];
      if ($urandom_range(0, 1) == 0) do_write($urandom_range(0, WORDS - 1), d);
      else do_search(d);
    end
    $display("hits=%0d multi=%0d param_only=%0d filtered=%0d", n_hit, n_multi, n_param_only, n_filtered);
    chk("coverage", n_hit > 0 && n_multi > 0 && n_param_only > 0 && n_filtered > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
