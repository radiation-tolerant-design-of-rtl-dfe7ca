// tb_flash_programmer: erases set 1 of a FLASH model, programs ten
// configuration words pushed back-to-back into a 4-deep FIFO (so the FIFO
// fills and stalls the writer), flushes the last partial block, and compares
// every programmed word with reference blocks. Then fills the set to its
// NBLK-block limit and checks that a further block is refused with overflow.
module tb_flash_programmer;
  import rlbcs_pkg::*;
  localparam int unsigned AW = 10, NBLK = 5, NBITS = 270;  // 10 words
  logic clk = 0, arst_n = 1;
  logic [2:0] rst_n = 3'b111;
  logic cmd_start = 0, cmd_erase = 0, cmd_set = 0, cmd_flush = 0;
  logic wr_valid = 0, wr_ready;
  cfg_data_t wr_data = '0;
  logic busy, overflow;
  logic [AW-4:0] blocks;
  logic fl_req, fl_done;
  flash_op_e fl_op;
  logic [AW-1:0] fl_addr;
  flash_word_t fl_wdata, fl_rdata;
  int checks = 0, failures = 0, stalls = 0;

  flash_programmer #(.AW(AW), .NBLK(NBLK), .FIFO_DEPTH(4)) dut (.*);
  flash_model #(.AW(AW), .LAT(3)) u_fl (
    .clk, .req(fl_req), .op(fl_op), .addr(fl_addr), .wdata(fl_wdata), .done(fl_done), .rdata(fl_rdata)
  );

  always #5 clk = ~clk;
  always @(posedge clk) if (wr_valid && !wr_ready) stalls++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic pulse(ref logic sig);
    @(negedge clk) sig = 1;
    @(negedge clk) sig = 0;
    while (busy) @(negedge clk);
  endtask

  task automatic push(input cfg_data_t v);
    wr_valid = 1; wr_data = v;
    @(posedge clk);
    while (!wr_ready) @(posedge clk);
    @(negedge clk) wr_valid = 0;
  endtask

  initial begin
    for (int i = 0; i < 2**(AW-1); i++) u_fl.mem[{1'b1, (AW-1)'(i)}] = '0;
    #1 arst_n = 0;
    #1 arst_n = 1;
    cmd_set = 1;
    pulse(cmd_erase);
    check(u_fl.n_erase == 1 && u_fl.peek(1, 0) == '1 && u_fl.peek(1, 2**(AW-1) - 1) == '1, "erase");
    pulse(cmd_start);
    @(negedge clk);
    for (int w = 0; w < 10; w++) begin
      wr_valid = 1; wr_data = tb_pkg::data_word(w, NBITS);
      @(posedge clk);
      while (!wr_ready) @(posedge clk);
      #1;
    end
    @(negedge clk) wr_valid = 0;
    repeat (100) @(negedge clk);
    check(blocks == 3, $sformatf("three full blocks written, blocks=%0d", blocks));
    pulse(cmd_flush);
    repeat (5) @(negedge clk);
    while (busy) @(negedge clk);
    check(blocks == 4, $sformatf("flush wrote the partial block, blocks=%0d", blocks));
    for (int b = 0; b < 4; b++)
      for (int k = 0; k < 4; k++)
        check(u_fl.peek(1, 4 * b + k) == tb_pkg::block_word(b, k, NBITS),
              $sformatf("block %0d word %0d: %h exp %h", b, k, u_fl.peek(1, 4 * b + k), tb_pkg::block_word(b, k, NBITS)));
    check(u_fl.peek(1, 16) == '1 && u_fl.peek(0, 0) == '1, "nothing else written");
    check(stalls > 0, "FIFO full stalled the writer");
    for (int i = 0; i < 3; i++) push(27'h1234567 + 27'(i));
    repeat (40) @(negedge clk);
    check(blocks == 5 && !overflow, "fifth block written");
    for (int i = 0; i < 3; i++) push(27'h7654321);
    repeat (40) @(negedge clk);
    check(overflow && u_fl.n_prog == 20 && blocks == 5, $sformatf("overflow refused, prog=%0d", u_fl.n_prog));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
