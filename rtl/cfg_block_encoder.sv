// cfg_block_encoder: builds one protected 4-word FLASH block from three
// 27-bit configuration words.
//
// Words 0..2 carry the data fields d[0..2]; word 3 carries their bitwise XOR.
// Every word gets the zero-count checksum in bits [31:27] (see rlbcs_pkg).
// Checksum and block structure follow the document; XOR as the parity
// function and the bit positions are this design's choices. Purely
// combinational.
module cfg_block_encoder
  import rlbcs_pkg::*;
(
  input  cfg_data_t   d [BLK_DATA],   // three configuration words
  output flash_word_t w [BLK_WORDS]   // words 0..2: data, word 3: parity
);

  always_comb begin
    for (int i = 0; i < BLK_DATA; i++) w[i] = make_word(d[i]);
    w[BLK_DATA] = make_word(d[0] ^ d[1] ^ d[2]);
  end

endmodule
