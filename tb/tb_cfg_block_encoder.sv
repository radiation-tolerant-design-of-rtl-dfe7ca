// tb_cfg_block_encoder: encodes random and corner-case data and compares the
// four words with a reference built bit by bit (zero count, XOR parity).
module tb_cfg_block_encoder;
  import rlbcs_pkg::*;
  cfg_data_t   d [BLK_DATA];
  flash_word_t w [BLK_WORDS];
  int checks = 0, failures = 0;

  cfg_block_encoder dut (.d, .w);

  task automatic run(input logic [26:0] a, input logic [26:0] b, input logic [26:0] c);
    logic [31:0] e [4];
    d[0] = a; d[1] = b; d[2] = c;
    #1;
    e[0] = tb_pkg::ref_word(a);
    e[1] = tb_pkg::ref_word(b);
    e[2] = tb_pkg::ref_word(c);
    e[3] = tb_pkg::ref_word(a ^ b ^ c);
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (w[k] !== e[k]) begin
        failures++;
        $display("FAIL word %0d: %h exp %h", k, w[k], e[k]);
      end
    end
  endtask

  initial begin
    run('0, '0, '0);          // 27 zeroes each
    run('1, '1, '1);
    run(27'h1, 27'h4000000, 27'h2AAAAAA);
    for (int i = 0; i < 200; i++) run(27'($urandom), 27'($urandom), 27'($urandom));
    // checksum of all-zero data is 27
    checks++;
    d[0] = '0; #1;
    if (w[0][31:27] !== 5'd27) begin failures++; $display("FAIL zero word checksum"); end
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
