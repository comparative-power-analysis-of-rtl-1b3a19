// pbcam_top -- the two compared precomputation-based CAMs side by side.
//
// xp_*: XPCAM, a PB-CAM whose parameter extractor is the block-XOR circuit
//       (4-bit parameter, words spread evenly over the codes).
// oc_*: OCCAM, a PB-CAM whose parameter extractor counts ones (5-bit
//       parameter, words crowded into the middle counts).
// Each has its own request port and response port; see pbcam for the timing
// (writes take effect at the clock edge, a search answers one cycle later
// with match lines, hit, lowest matching address and the number of
// second-stage comparisons). Both share clock and active-low reset. Driving
// both with the same requests shows how many fewer full-width comparisons the
// block-XOR parameter leaves for the same contents.
//
// Pairing the two CAMs in one top is this design's choice: the description
// presents both architectures and compares them.
module pbcam_top
  import pbcam_pkg::*;
#(
  parameter int unsigned WORDS = 256,
  localparam int unsigned AW = (WORDS > 1) ? $clog2(WORDS) : 1,
  localparam int unsigned CW = $clog2(WORDS + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  // XPCAM
  input  logic              xp_req_valid,
  input  logic              xp_req_write,
  input  logic [AW-1:0]     xp_req_addr,
  input  logic [DATA_W-1:0] xp_req_data,
  output logic              xp_rsp_valid,
  output logic              xp_rsp_hit,
  output logic [AW-1:0]     xp_rsp_addr,
  output logic [WORDS-1:0]  xp_rsp_match,
  output logic [CW-1:0]     xp_rsp_compares,
  // OCCAM
  input  logic              oc_req_valid,
  input  logic              oc_req_write,
  input  logic [AW-1:0]     oc_req_addr,
  input  logic [DATA_W-1:0] oc_req_data,
  output logic              oc_rsp_valid,
  output logic              oc_rsp_hit,
  output logic [AW-1:0]     oc_rsp_addr,
  output logic [WORDS-1:0]  oc_rsp_match,
  output logic [CW-1:0]     oc_rsp_compares
);

  pbcam #(.EXT(EXT_BLOCK_XOR), .WORDS(WORDS)) u_xpcam (
    .clk, .rst_n,
    .req_valid   (xp_req_valid),
    .req_write   (xp_req_write),
    .req_addr    (xp_req_addr),
    .req_data    (xp_req_data),
    .rsp_valid   (xp_rsp_valid),
    .rsp_hit     (xp_rsp_hit),
    .rsp_addr    (xp_rsp_addr),
    .rsp_match   (xp_rsp_match),
    .rsp_compares(xp_rsp_compares)
  );

  pbcam #(.EXT(EXT_ONES_COUNT), .WORDS(WORDS)) u_occam (
    .clk, .rst_n,
    .req_valid   (oc_req_valid),
    .req_write   (oc_req_write),
    .req_addr    (oc_req_addr),
    .req_data    (oc_req_data),
    .rsp_valid   (oc_rsp_valid),
    .rsp_hit     (oc_rsp_hit),
    .rsp_addr    (oc_rsp_addr),
    .rsp_match   (oc_rsp_match),
    .rsp_compares(oc_rsp_compares)
  );

endmodule
