// pbcam_tb_pkg -- reference models shared by the PB-CAM testbenches.
//
// The models are written from the definitions of the two parameters, not
// from the circuits: the block-XOR parameter from the parity of each 4-bit
// block (counted bit by bit) and the ones-count parameter from a bit count.
package pbcam_tb_pkg;

  // Parity of the 4-bit block D[4b+3:4b], by counting its ones.
  function automatic logic block_parity(logic [15:0] d, int b);
    int n = 0;
    for (int i = 0; i < 4; i++) if (d[4*b+i]) n++;
    return logic'(n % 2);
  endfunction

  // Block-XOR parameter: A3..A0 unless all are 1, then D[15:12].
  function automatic logic [3:0] xor_param_model(logic [15:0] d);
    logic [3:0] a;
    for (int b = 0; b < 4; b++) a[b] = block_parity(d, b);
    return (a == 4'b1111) ? d[15:12] : a;
  endfunction

  // Ones-count parameter.
  function automatic logic [4:0] oc_param_model(logic [15:0] d);
    int n = 0;
    for (int i = 0; i < 16; i++) if (d[i]) n++;
    return 5'(n);
  endfunction

  // n choose r.
  function automatic longint choose(int n, int r);
    longint c = 1;
    for (int i = 0; i < r; i++) c = c * (n - i) / (i + 1);
    return c;
  endfunction

endpackage
