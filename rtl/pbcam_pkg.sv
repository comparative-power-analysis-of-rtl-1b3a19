// pbcam_pkg -- constants and types shared by the precomputation-based CAM
// (PB-CAM) blocks.
//
// The data word is 16 bits wide, the width both parameter extractors are drawn
// for. The block-XOR extractor of the XPCAM produces a 4-bit parameter (log2 of
// 16) and the ones-count extractor of the OCCAM a 5-bit one (ceil(log2(16+2)):
// seventeen possible counts plus one code for "no data stored"). Each
// parameter memory marks an unused word with a code its extractor can never
// produce, so an empty word can never pass the first comparison stage.
package pbcam_pkg;

  // Width of a stored / searched data word.
  localparam int unsigned DATA_W = 16;

  // Block-XOR (XPCAM) parameter: 4 bits. The extractor's multiplexer never
  // outputs 4'b1111, which therefore marks an empty word.
  localparam int unsigned XOR_PARAM_W = 4;
  localparam logic [XOR_PARAM_W-1:0] XOR_EMPTY = 4'b1111;

  // Ones-count (OCCAM) parameter: counts 0..16 plus an empty code.
  localparam int unsigned OC_PARAM_W = 5;
  localparam logic [OC_PARAM_W-1:0] OC_EMPTY = 5'd17;

  // Which parameter extractor a PB-CAM instance uses.
  typedef enum logic {
    EXT_BLOCK_XOR  = 1'b0,   // XPCAM
    EXT_ONES_COUNT = 1'b1    // OCCAM
  } extractor_e;

  // Parameter width for an extractor.
  function automatic int unsigned param_width(extractor_e ext);
    return (ext == EXT_BLOCK_XOR) ? XOR_PARAM_W : OC_PARAM_W;
  endfunction

  // Empty-word code for an extractor, zero-extended to the OCCAM width.
  function automatic logic [OC_PARAM_W-1:0] empty_code(extractor_e ext);
    return (ext == EXT_BLOCK_XOR) ? OC_PARAM_W'(XOR_EMPTY) : OC_EMPTY;
  endfunction

endpackage
