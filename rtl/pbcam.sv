// pbcam -- precomputation-based content addressable memory (PB-CAM).
//
// A search is split into two stages so that few full-width comparisons are
// made:
//   1. A parameter extractor reduces the search word to a short parameter,
//      which is compared in parallel with the parameter stored for every word
//      (param_memory).
//   2. Only the words whose parameter matched are compared at full width with
//      the search word (data_memory). All others cannot match and stay idle.
// The extractor is chosen by EXT: EXT_BLOCK_XOR gives the XPCAM, whose
// block-XOR parameter spreads words evenly over 16 codes, and EXT_ONES_COUNT
// the OCCAM, whose ones-count parameter crowds most words into the middle
// counts. Fewer words per parameter value means fewer second-stage compares.
//
// Interface: one request port carries the input data word for both writes and
// searches, as a single extractor serves both (the stored parameter is the
// extractor's output for the stored word).
//   req_valid & req_write   : word req_addr <= req_data, parameter likewise
//   req_valid & !req_write  : search for req_data
// One cycle after a search, rsp_valid is high for one cycle with
//   rsp_match     one match line per word,
//   rsp_hit       any match line high,
//   rsp_addr      lowest matching word (0 when no hit),
//   rsp_compares  how many words passed stage 1 and were compared in stage 2.
// A write is visible to a search in the next cycle. Reset (active low,
// asynchronous) empties the CAM.
//
// The two-stage organisation and both extractors follow the design
// description. The request/response port, the one-cycle registered latency,
// the lowest-index priority encoder and the compare counter are this design's
// choices; the compare count is the quantity the precomputation is meant to
// reduce and is brought out so it can be observed.
module pbcam
  import pbcam_pkg::*;
#(
  parameter extractor_e  EXT   = EXT_BLOCK_XOR,
  parameter int unsigned WORDS = 256,
  localparam int unsigned AW      = (WORDS > 1) ? $clog2(WORDS) : 1,
  localparam int unsigned CW      = $clog2(WORDS + 1),
  localparam int unsigned PARAM_W = param_width(EXT)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              req_valid,
  input  logic              req_write,
  input  logic [AW-1:0]     req_addr,
  input  logic [DATA_W-1:0] req_data,
  output logic              rsp_valid,
  output logic              rsp_hit,
  output logic [AW-1:0]     rsp_addr,
  output logic [WORDS-1:0]  rsp_match,
  output logic [CW-1:0]     rsp_compares
);

  localparam logic [PARAM_W-1:0] EMPTY = PARAM_W'(empty_code(EXT));

  logic [PARAM_W-1:0] param;      // extractor output for req_data
  logic [WORDS-1:0]   cmp_en;     // stage-1 survivors
  logic [WORDS-1:0]   match;      // stage-2 match lines
  logic               wr_en;
  logic               srch;

  assign wr_en = req_valid &&  req_write;
  assign srch  = req_valid && !req_write;

  // ---- parameter extractor --------------------------------------------------
  if (EXT == EXT_BLOCK_XOR) begin : g_xor
    block_xor_extractor u_ext (.data(req_data), .param(param));
  end else begin : g_oc
    ones_count_extractor u_ext (.data(req_data), .param(param));
  end

  // ---- stage 1: parameter memory --------------------------------------------
  param_memory #(.WORDS(WORDS), .PARAM_W(PARAM_W), .EMPTY(EMPTY)) u_pmem (
    .clk       (clk),
    .rst_n     (rst_n),
    .wr_en     (wr_en),
    .wr_addr   (req_addr),
    .wr_param  (param),
    .srch_param(param),
    .cmp_en    (cmp_en)
  );

  // ---- stage 2: data memory, compared only where enabled ---------------------
  data_memory #(.WORDS(WORDS), .DATA_W(DATA_W)) u_dmem (
    .clk      (clk),
    .wr_en    (wr_en),
    .wr_addr  (req_addr),
    .wr_data  (req_data),
    .cmp_en   (cmp_en & {WORDS{srch}}),
    .srch_data(req_data),
    .match    (match)
  );

  // ---- result: priority encoder and compare count ---------------------------
  logic [AW-1:0] first_addr;
  logic [CW-1:0] n_compares;

  always_comb begin
    first_addr = '0;
    for (int i = WORDS - 1; i >= 0; i--) begin
      if (match[i]) first_addr = AW'(i);
    end
    n_compares = '0;
    for (int i = 0; i < WORDS; i++) n_compares += CW'(cmp_en[i]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rsp_valid    <= 1'b0;
      rsp_hit      <= 1'b0;
      rsp_addr     <= '0;
      rsp_match    <= '0;
      rsp_compares <= '0;
    end else begin
      rsp_valid <= srch;
      if (srch) begin
        rsp_hit      <= |match;
        rsp_addr     <= first_addr;
        rsp_match    <= match;
        rsp_compares <= n_compares;
      end
    end
  end

  // A write must address an existing word.
  a_wr_addr_in_range : assert property (@(posedge clk) disable iff (!rst_n)
    wr_en |-> (32'(req_addr) < WORDS))
    else $error("pbcam: write address %0d out of range", req_addr);

  // The extractor never produces the empty code, so a search can never select
  // an unwritten word.
  a_param_not_empty : assert property (@(posedge clk) disable iff (!rst_n)
    req_valid |-> (param != EMPTY))
    else $error("pbcam: extractor produced the empty code");

endmodule
