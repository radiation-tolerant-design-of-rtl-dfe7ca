// cfg_block_decoder: checks a 4-word FLASH block and recovers from a single
// corrupted word.
//
// Each word's checksum (number of zeroes among its 27 data bits) is
// recomputed and compared. With all four words consistent the block is OK,
// unless the data fields do not XOR to zero, which only errors in both
// directions can cause and which is then reported as BAD. With exactly one
// inconsistent word the block is RECOVERED: a bad data word is rebuilt as the
// XOR of the other three fields, a bad parity word is simply ignored. Two or
// more bad words make the block BAD. The checksum, the block of three data
// words plus a parity word and the single-word recovery follow the document;
// the parity cross-check is this design's addition. Purely combinational.
module cfg_block_decoder
  import rlbcs_pkg::*;
(
  input  flash_word_t w [BLK_WORDS],  // words as read from FLASH
  output cfg_data_t   d [BLK_DATA],   // corrected data words
  output blk_status_e status,
  output logic [BLK_WORDS-1:0] bad_mask  // words whose checksum failed
);

  cfg_data_t f [BLK_WORDS];
  cfg_data_t par;
  logic [2:0] nbad;

  always_comb begin
    nbad = '0;
    par  = '0;
    for (int i = 0; i < BLK_WORDS; i++) begin
      f[i]        = w[i][DATA_W-1:0];
      bad_mask[i] = !word_ok(w[i]);
      nbad       += 3'(bad_mask[i]);
      par        ^= f[i];
    end
    for (int i = 0; i < BLK_DATA; i++) d[i] = f[i];
    if (nbad == 0) begin
      status = (par == '0) ? BLK_OK : BLK_BAD;
    end else if (nbad == 1) begin
      status = BLK_RECOVERED;
      // XOR of all four fields with the bad one replaced by zero gives it back.
      for (int i = 0; i < BLK_DATA; i++)
        if (bad_mask[i]) d[i] = par ^ f[i];
    end else begin
      status = BLK_BAD;
    end
  end

endmodule
