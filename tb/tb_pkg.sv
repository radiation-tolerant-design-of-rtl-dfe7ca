// tb_pkg: reference functions shared by the testbenches.
//
// The configuration bitstream used in all tests is a fixed pseudo-random bit
// sequence, bit_at(i). Words and blocks are built here from first principles
// (counting zeroes bit by bit, XOR parity) so the checks do not depend on the
// design's own encoder.
package tb_pkg;

  function automatic bit bit_at(input int unsigned i);
    int unsigned h;
    h = i * 32'h9E37_79B1 + 32'h7F4A_7C15;
    h = h ^ (h >> 15);
    h = h * 32'h2C1B_3C6D;
    h = h ^ (h >> 12);
    return h[7];
  endfunction

  // Data word w of a bitstream of nbits bits: bit 26 is stream bit 27*w.
  function automatic logic [26:0] data_word(input int unsigned w, input int unsigned nbits);
    logic [26:0] d;
    for (int j = 0; j < 27; j++) begin
      int unsigned idx;
      idx = w * 27 + j;
      d[26-j] = (idx < nbits) ? bit_at(idx) : 1'b0;
    end
    return d;
  endfunction

  function automatic logic [4:0] ref_zeros(input logic [26:0] d);
    int n;
    n = 0;
    for (int i = 0; i < 27; i++) if (d[i] == 1'b0) n++;
    return 5'(n);
  endfunction

  function automatic logic [31:0] ref_word(input logic [26:0] d);
    return {ref_zeros(d), d};
  endfunction

  // Word k (0..3) of block b of the bitstream.
  function automatic logic [31:0] block_word(input int unsigned b, input int unsigned k,
                                             input int unsigned nbits);
    logic [26:0] p;
    if (k < 3) return ref_word(data_word(b * 3 + k, nbits));
    p = data_word(b * 3, nbits) ^ data_word(b * 3 + 1, nbits) ^ data_word(b * 3 + 2, nbits);
    return ref_word(p);
  endfunction

  function automatic int unsigned ref_blocks(input int unsigned nbits);
    return (((nbits + 26) / 27) + 2) / 3;
  endfunction

endpackage
