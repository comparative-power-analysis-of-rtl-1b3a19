// ones_count_extractor -- ones-count parameter extractor of the OCCAM.
//
// Counts the ones in the 16-bit word with a tree of small adders:
//   * four full adders (FA) each reduce a 3-bit group D[2:0], D[5:3], D[8:6],
//     D[11:9] to a 2-bit count;
//   * two 2-bit adders (ADDER2) add pairs of those counts, using D[12] and
//     D[13] as their carry-ins, for two 3-bit sums;
//   * a 3-bit adder (ADDER3) adds the two sums with D[14] as carry-in;
//   * an incrementer (INCR4) adds D[15].
// The adder tree follows the design description. Its final output is 4 bits
// there, which cannot hold a count of 16; here the incrementer keeps its carry
// as a fifth bit, matching a parameter of ceil(log2(16+2)) = 5 bits
// (counts 0..16 plus one code for an empty word).
//
// Purely combinational; no clock.
module ones_count_extractor
  import pbcam_pkg::*;
(
  input  logic [DATA_W-1:0]     data,   // D[15:0]
  output logic [OC_PARAM_W-1:0] param   // number of ones, 0..16
);

  logic [1:0] fa_cnt [4];   // FA outputs {carry, sum}
  logic [2:0] add2_a;       // upper ADDER2: groups 0,1 + D[12]
  logic [2:0] add2_b;       // lower ADDER2: groups 2,3 + D[13]
  logic [3:0] add3;         // ADDER3 + D[14]

  // One full adder: {carry, sum} of three bits.
  function automatic logic [1:0] full_add(logic x, logic y, logic z);
    return {(x & y) | (x & z) | (y & z), x ^ y ^ z};
  endfunction

  always_comb begin
    for (int g = 0; g < 4; g++) begin
      fa_cnt[g] = full_add(data[3*g], data[3*g+1], data[3*g+2]);
    end
    add2_a = 3'(fa_cnt[0]) + 3'(fa_cnt[1]) + 3'(data[12]);
    add2_b = 3'(fa_cnt[2]) + 3'(fa_cnt[3]) + 3'(data[13]);
    add3   = 4'(add2_a) + 4'(add2_b) + 4'(data[14]);
    param  = 5'(add3) + 5'(data[15]);
  end

endmodule
