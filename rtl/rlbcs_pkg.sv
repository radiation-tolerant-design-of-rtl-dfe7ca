// rlbcs_pkg: types, constants and helper functions shared by the RLBCS
// configuration logic.
//
// Configuration data is kept in FLASH as 32-bit words. Bits [26:0] of a word
// hold configuration data and bits [31:27] hold a checksum equal to the number
// of zero bits among the 27 data bits. Radiation in FLASH mostly turns a 0 into
// a 1; such a flip lowers the zero count of the data or raises the stored
// checksum, so it can never leave a consistent word behind. Three data words
// and one parity word (the XOR of the three data fields, itself checksum
// protected) form a 4-word block, from which one corrupted word can be
// rebuilt. The 27/5 split, the zero-count checksum and the 3+1 block follow
// the document; the bit positions inside the word and the use of XOR parity
// are this design's choices.
package rlbcs_pkg;

  localparam int unsigned DATA_W     = 27;  // configuration bits per FLASH word
  localparam int unsigned CSUM_W     = 5;   // checksum bits per FLASH word
  localparam int unsigned WORD_W     = DATA_W + CSUM_W;  // 32
  localparam int unsigned BLK_DATA   = 3;   // data words per block
  localparam int unsigned BLK_WORDS  = BLK_DATA + 1;     // plus the parity word

  typedef logic [DATA_W-1:0] cfg_data_t;
  typedef logic [WORD_W-1:0] flash_word_t;

  // Result of checking one 4-word block.
  typedef enum logic [1:0] {
    BLK_OK        = 2'd0,  // all four words consistent
    BLK_RECOVERED = 2'd1,  // one word was corrupted and has been rebuilt
    BLK_BAD       = 2'd2   // data cannot be trusted
  } blk_status_e;

  // FLASH operations issued by the controllers.
  typedef enum logic [1:0] {
    FL_READ  = 2'd0,  // read one word
    FL_PROG  = 2'd1,  // program one (erased) word
    FL_ERASE = 2'd2   // erase the configuration set that holds addr
  } flash_op_e;

  // Number of zeroes in a data field: the checksum of the document.
  function automatic logic [CSUM_W-1:0] zero_count(input cfg_data_t d);
    logic [CSUM_W-1:0] n;
    n = '0;
    for (int i = 0; i < DATA_W; i++) n += CSUM_W'(!d[i]);
    return n;
  endfunction

  function automatic flash_word_t make_word(input cfg_data_t d);
    return {zero_count(d), d};
  endfunction

  function automatic logic word_ok(input flash_word_t w);
    return zero_count(w[DATA_W-1:0]) == w[WORD_W-1:DATA_W];
  endfunction

  // Blocks needed for a bitstream of nbits bits (the last ones padded).
  function automatic int unsigned blocks_for_bits(input int unsigned nbits);
    int unsigned words;
    words = (nbits + DATA_W - 1) / DATA_W;
    return (words + BLK_DATA - 1) / BLK_DATA;
  endfunction

endpackage
