// tb_pbcam_top -- end-to-end test of the XPCAM / OCCAM pair at full size.
//
// The top runs with its default size (256 words of 16 bits). Both CAMs get
// the same requests:
//   1. searches of an empty CAM (no word may be selected or compared);
//   2. every word written with random data, a few of them duplicated;
//   3. searches for stored words (hits, some multiple), for random keys
//      (mostly rejected by the parameter stage or by the data stage), and
//      overwrites of stored words in between.
// Every response is checked against a shadow model: match lines, hit, lowest
// address, compare count and the one-cycle latency. The testbench counts how
// often each mechanism occurred -- write, overwrite, hit, multiple match,
// all words rejected by the parameter stage, a parameter match that fails
// the data compare, search of an empty word -- and fails if one never did.
// Finally it reports the mean number of stage-2 comparisons per search for
// each CAM and checks that the block-XOR parameter needs fewer than the
// ones count on random data, the advantage the XPCAM is built for.
module tb_pbcam_top;
  import pbcam_pkg::*;
  import pbcam_tb_pkg::*;

  localparam int unsigned WORDS = 256;   // the top's default size
  localparam int unsigned AW = $clog2(WORDS);
  localparam int unsigned CW = $clog2(WORDS + 1);

  logic clk = 0, rst_n = 0;
  logic req_valid = 0, req_write = 0;
  logic [AW-1:0] req_addr = '0;
  logic [15:0] req_data = '0;

  logic             xp_valid, xp_hit, oc_valid, oc_hit;
  logic [AW-1:0]    xp_addr, oc_addr;
  logic [WORDS-1:0] xp_match, oc_match;
  logic [CW-1:0]    xp_cmp, oc_cmp;

  pbcam_top dut (
    .clk, .rst_n,
    .xp_req_valid(req_valid), .xp_req_write(req_write),
    .xp_req_addr(req_addr), .xp_req_data(req_data),
    .xp_rsp_valid(xp_valid), .xp_rsp_hit(xp_hit), .xp_rsp_addr(xp_addr),
    .xp_rsp_match(xp_match), .xp_rsp_compares(xp_cmp),
    .oc_req_valid(req_valid), .oc_req_write(req_write),
    .oc_req_addr(req_addr), .oc_req_data(req_data),
    .oc_rsp_valid(oc_valid), .oc_rsp_hit(oc_hit), .oc_rsp_addr(oc_addr),
    .oc_rsp_match(oc_match), .oc_rsp_compares(oc_cmp));

  logic        sh_valid [WORDS];
  logic [15:0] sh_data  [WORDS];
  int checks = 0, failures = 0;
  int n_write = 0, n_overwrite = 0, n_hit = 0, n_multi = 0;
  int n_param_reject = 0, n_data_reject = 0, n_empty = 0;
  longint xp_sum = 0, oc_sum = 0;
  int n_rand = 0;

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (500_000) @(posedge clk);
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
    n_write++;
    if (sh_valid[a]) n_overwrite++;
    @(negedge clk);
    req_valid = 1; req_write = 1; req_addr = AW'(a); req_data = d;
    @(posedge clk);
    sh_valid[a] = 1; sh_data[a] = d;
    @(negedge clk);
    req_valid = 0; req_write = 0;
  endtask

  task automatic do_search(logic [15:0] key, bit random_key);
    logic [WORDS-1:0] em;
    int ex_addr, ex_xp, ex_oc, n_stored;
    em = '0; ex_addr = 0; ex_xp = 0; ex_oc = 0; n_stored = 0;
    for (int i = WORDS - 1; i >= 0; i--) begin
      if (sh_valid[i]) n_stored++;
      if (sh_valid[i] && sh_data[i] == key) begin em[i] = 1; ex_addr = i; end
      if (sh_valid[i] && xor_param_model(sh_data[i]) == xor_param_model(key)) ex_xp++;
      if (sh_valid[i] && oc_param_model(sh_data[i]) == oc_param_model(key)) ex_oc++;
    end
    if (n_stored < int'(WORDS)) n_empty++;
    if (em != 0) n_hit++;
    if ($countones(em) > 1) n_multi++;
    if (ex_xp == 0 || ex_oc == 0) n_param_reject++;
    if (em == 0 && (ex_xp > 0 || ex_oc > 0)) n_data_reject++;
    if (random_key) begin xp_sum += ex_xp; oc_sum += ex_oc; n_rand++; end
    @(negedge clk);
    req_valid = 1; req_write = 0; req_data = key;
    @(negedge clk);
    req_valid = 0;
    chk("xp rsp_valid after one cycle", xp_valid);
    chk("oc rsp_valid after one cycle", oc_valid);
    chk("xp match lines", xp_match == em);
    chk("oc match lines", oc_match == em);
    chk("xp hit", xp_hit == (em != 0));
    chk("oc hit", oc_hit == (em != 0));
    chk("xp address", em == 0 || int'(xp_addr) == ex_addr);
    chk("oc address", em == 0 || int'(oc_addr) == ex_addr);
    chk("xp compare count", int'(xp_cmp) == ex_xp);
    chk("oc compare count", int'(oc_cmp) == ex_oc);
  endtask

  initial begin
    foreach (sh_valid[i]) sh_valid[i] = 0;
    #12 rst_n = 1;
    // 1. empty CAM
    do_search(16'h0000, 0);
    do_search(16'hFFFF, 0);
    do_search(16'h5A5A, 0);
    // 2. fill; every 16th word repeats the previous one
    for (int i = 0; i < int'(WORDS); i++) begin
      logic [15:0] d;
      d = (i % 16 == 15) ? sh_data[i-1] : 16'($urandom);
      do_write(i, d);
    end
    // 3. mixed traffic
    for (int step = 0; step < 3000; step++) begin
      case ($urandom_range(0, 9))
        0:       do_write($urandom_range(0, WORDS - 1), 16'($urandom));
        1, 2, 3: do_search(sh_data[$urandom_range(0, WORDS - 1)], 0);
        default: do_search(16'($urandom), 1);
      endcase
    end
    $display("writes=%0d overwrites=%0d hits=%0d multi=%0d param_reject=%0d data_reject=%0d empty_searches=%0d",
             n_write, n_overwrite, n_hit, n_multi, n_param_reject, n_data_reject, n_empty);
    chk("write happened",            n_write > 0);
    chk("overwrite happened",        n_overwrite > 0);
    chk("hit happened",              n_hit > 0);
    chk("multiple match happened",   n_multi > 0);
    chk("parameter reject happened", n_param_reject > 0);
    chk("data reject happened",      n_data_reject > 0);
    chk("empty search happened",     n_empty > 0);
    $display("mean stage-2 comparisons per random search: XPCAM %0.2f, OCCAM %0.2f (of %0d words)",
             real'(xp_sum) / n_rand, real'(oc_sum) / n_rand, WORDS);
    chk("XPCAM compares fewer words than OCCAM", xp_sum < oc_sum);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
