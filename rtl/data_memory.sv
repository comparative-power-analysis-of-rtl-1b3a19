// data_memory -- CAM data memory of a precomputation-based CAM (second stage).
//
// Holds WORDS stored words of DATA_W bits. A search compares srch_data with
// stored word i only when cmp_en[i] is high (its parameter matched in the
// parameter memory); match[i] is high when the word is enabled and equal. A
// disabled word's comparator is idle, which is where the precomputation saves
// match-line power: only the words that survived the first stage are
// compared.
//
// A write (wr_en) stores wr_data into word wr_addr at the rising clock edge.
// The array has no reset: a word that was never written is never enabled,
// because its parameter word holds the empty code. Match outputs are
// combinational.
//
// The gated full-width compare follows the design description; the write
// port and the combinational compare are this design's choices.
module data_memory #(
  parameter int unsigned WORDS  = 256,
  parameter int unsigned DATA_W = 16,
  localparam int unsigned AW = (WORDS > 1) ? $clog2(WORDS) : 1
) (
  input  logic              clk,
  input  logic              wr_en,      // store wr_data at wr_addr
  input  logic [AW-1:0]     wr_addr,
  input  logic [DATA_W-1:0] wr_data,
  input  logic [WORDS-1:0]  cmp_en,     // words to compare (from parameters)
  input  logic [DATA_W-1:0] srch_data,  // search word
  output logic [WORDS-1:0]  match       // match lines
);

  logic [DATA_W-1:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
  end

  always_comb begin
    for (int i = 0; i < WORDS; i++) match[i] = cmp_en[i] && (mem[i] == srch_data);
  end

endmodule
