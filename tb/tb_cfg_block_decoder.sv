// tb_cfg_block_decoder: feeds reference-encoded blocks with 0->1 bit flips in
// zero, one or two words (data or checksum field), and errors that keep the
// checksum (a swapped 0 and 1), and checks status, bad_mask and corrected
// data.
module tb_cfg_block_decoder;
  import rlbcs_pkg::*;
  flash_word_t w [BLK_WORDS];
  cfg_data_t   d [BLK_DATA];
  blk_status_e status;
  logic [3:0]  bad_mask;
  int checks = 0, failures = 0;
  int n_ok = 0, n_rec = 0, n_bad = 0;

  cfg_block_decoder dut (.w, .d, .status, .bad_mask);

  // set one random zero bit of x to one (x must have a zero)
  function automatic logic [31:0] flip01(input logic [31:0] x);
    int b;
    do b = $urandom_range(0, 31); while (x[b]);
    x[b] = 1'b1;
    return x;
  endfunction

  initial begin
    for (int t = 0; t < 600; t++) begin
      logic [26:0] dd [3];
      logic [31:0] good [4];
      logic [3:0]  hit;
      int          mode;
      blk_status_e exp_st;
      for (int i = 0; i < 3; i++) dd[i] = 27'($urandom);
      if (t == 1) begin dd[0] = '1; dd[1] = '1; dd[2] = '1; end  // no zero anywhere
      good[0] = tb_pkg::ref_word(dd[0]);
      good[1] = tb_pkg::ref_word(dd[1]);
      good[2] = tb_pkg::ref_word(dd[2]);
      good[3] = tb_pkg::ref_word(dd[0] ^ dd[1] ^ dd[2]);
      for (int k = 0; k < 4; k++) w[k] = good[k];
      mode = t % 4;
      hit  = '0;
      if (mode == 1) hit[$urandom_range(0, 3)] = 1'b1;
      if (mode == 2) begin
        int a, b;
        a = $urandom_range(0, 3);
        do b = $urandom_range(0, 3); while (b == a);
        hit[a] = 1'b1; hit[b] = 1'b1;
      end
      for (int k = 0; k < 4; k++) if (hit[k]) w[k] = flip01(w[k]);
      if (mode == 3) begin
        // swap a 0 and a 1 in the data field of word 0: checksum still fits
        int z, o;
        do z = $urandom_range(0, 26); while (w[0][z]);
        do o = $urandom_range(0, 26); while (!w[0][o]);
        w[0][z] = 1'b1; w[0][o] = 1'b0;
      end
      #1;
      exp_st = (mode == 0) ? BLK_OK : (mode == 1) ? BLK_RECOVERED : BLK_BAD;
      checks++;
      if (status !== exp_st || (mode != 3 && bad_mask !== hit)) begin
        failures++;
        $display("FAIL t=%0d mode=%0d status=%0d exp=%0d mask=%b exp=%b", t, mode, status, exp_st, bad_mask, hit);
      end
      if (mode < 2) begin
        for (int i = 0; i < 3; i++) begin
          checks++;
          if (d[i] !== dd[i]) begin
            failures++;
            $display("FAIL t=%0d data %0d: %h exp %h", t, i, d[i], dd[i]);
          end
        end
      end
      case (status) BLK_OK: n_ok++; BLK_RECOVERED: n_rec++; default: n_bad++; endcase
    end
    $display("ok=%0d recovered=%0d bad=%0d", n_ok, n_rec, n_bad);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
