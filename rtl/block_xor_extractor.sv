// block_xor_extractor -- Block-XOR parameter extractor of the XPCAM.
//
// The 16-bit word is cut into four 4-bit blocks: D[15:12] (block 0),
// D[11:8] (block 1), D[7:4] (block 2) and D[3:0] (block 3). Each block is
// reduced by XOR to one bit, giving A3 (block 0) down to A0 (block 3). Over all
// 2^16 words every value of A3..A0 occurs 8*8*8*8 = 4096 times, a uniform
// spread, unlike the bell-shaped spread of a ones count.
//
// A multiplexer follows. Its select is the AND of A3..A0 (S = A3A2A1A0).
// With S = 0 the parameter is A3..A0; with S = 1 it is D[15:12] instead.
// When S = 1, A3 = 1 means D[15:12] has odd parity, so the output is never
// 4'b1111 (even parity). That free code is what the parameter memory stores
// for an empty word.
//
// The block split, the XOR reduction, the AND select and the two multiplexer
// inputs follow the design description; which multiplexer input S = 1 picks
// (the D[15:12] input) is this design's reading, and the one that leaves
// 4'b1111 unused.
//
// Purely combinational; no clock.
module block_xor_extractor
  import pbcam_pkg::*;
(
  input  logic [DATA_W-1:0]      data,   // D[15:0]
  output logic [XOR_PARAM_W-1:0] param   // extracted parameter
);

  logic [3:0] a;      // a[3] = A3 (from D[15:12]) ... a[0] = A0 (from D[3:0])
  logic       sel;    // S = A3 & A2 & A1 & A0

  always_comb begin
    for (int b = 0; b < 4; b++) begin
      a[b] = ^data[4*b +: 4];
    end
    sel   = &a;
    param = sel ? data[15:12] : a;
  end

endmodule
