// param_memory -- parameter memory of a precomputation-based CAM (first stage).
//
// Holds one PARAM_W-bit parameter per CAM word (P0 .. P(WORDS-1)). On every
// cycle the search parameter is compared with all stored parameters in
// parallel; word i's enable goes high when they are equal. Those enables
// decide which words of the data memory take part in the second, full-width
// comparison. The parameter memory is always searched in full, but it is only
// PARAM_W bits wide, far narrower than the data words.
//
// Reset (active low, asynchronous) fills every word with EMPTY, a code the
// extractor never produces, so a word that was never written can never be
// enabled. A write (wr_en) stores wr_param into word wr_addr at the rising
// clock edge. The compare outputs are combinational from srch_param and the
// stored words; a word written at an edge is seen by compares after it.
//
// The parallel compare follows the design description; the reset to an
// empty code, the write port and the combinational compare are this design's
// choices.
module param_memory #(
  parameter int unsigned WORDS   = 256,
  parameter int unsigned PARAM_W = 4,
  parameter logic [PARAM_W-1:0] EMPTY = '1,
  localparam int unsigned AW = (WORDS > 1) ? $clog2(WORDS) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               wr_en,       // store wr_param at wr_addr
  input  logic [AW-1:0]      wr_addr,
  input  logic [PARAM_W-1:0] wr_param,
  input  logic [PARAM_W-1:0] srch_param,  // parameter of the search word
  output logic [WORDS-1:0]   cmp_en       // 1: word may match, compare it
);

  logic [PARAM_W-1:0] mem [WORDS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < WORDS; i++) mem[i] <= EMPTY;
    end else if (wr_en) begin
      mem[wr_addr] <= wr_param;
    end
  end

  always_comb begin
    for (int i = 0; i < WORDS; i++) cmp_en[i] = (mem[i] == srch_param);
  end

endmodule
