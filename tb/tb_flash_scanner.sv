// tb_flash_scanner: fills both sets of a small FLASH model, corrupts set 0
// so that two blocks need recovery, makes one block of set 1 unusable, and
// checks the counts, the bad/checked flags, notify and the sticky alarm after
// the scanner has passed over both sets. Then repairs set 1 and checks that
// the next pass clears its bad flag.
module tb_flash_scanner;
  import rlbcs_pkg::*;
  localparam int unsigned AW = 10, NBITS = 1000;
  localparam int unsigned NBLK = tb_pkg::ref_blocks(NBITS);   // 13
  localparam int unsigned CW = $clog2(NBLK + 1);
  logic clk = 0, arst_n = 1, enable = 0, alarm_clr = 0;
  logic [2:0] rst_n = 3'b111;
  logic [1:0] set_checked, set_bad;
  logic [CW-1:0] recov_cnt [2], bad_cnt [2];
  logic notify, alarm;
  logic fl_req, fl_done;
  flash_op_e fl_op;
  logic [AW-1:0] fl_addr;
  flash_word_t fl_wdata, fl_rdata;
  int checks = 0, failures = 0, n_notify = 0;

  flash_scanner #(.AW(AW), .NBLK(NBLK)) dut (.*);
  flash_model #(.AW(AW), .LAT(2)) u_fl (
    .clk, .req(fl_req), .op(fl_op), .addr(fl_addr), .wdata(fl_wdata), .done(fl_done), .rdata(fl_rdata)
  );

  always #5 clk = ~clk;
  always @(posedge clk) if (notify) n_notify++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    u_fl.fill_set(0, NBITS);
    u_fl.fill_set(1, NBITS);
    u_fl.flip01(0, 5, 32'h0000_0100 & ~u_fl.peek(0, 5) | 32'h8000_0000 & ~u_fl.peek(0, 5));
    u_fl.flip01(0, 4*7+3, ~u_fl.peek(0, 4*7+3) & 32'h0000_F000);          // parity word
    u_fl.flip01(1, 4*2+0, ~u_fl.peek(1, 4*2+0));                           // word to all ones
    u_fl.flip01(1, 4*2+2, ~u_fl.peek(1, 4*2+2) & 32'h00FF_0000);
    #1 arst_n = 0;
    #1 arst_n = 1;
    @(negedge clk);
    check(set_checked == 2'b00 && !alarm, "nothing reported before scanning");
    enable = 1;
    wait (set_checked == 2'b11);
    @(negedge clk);
    check(recov_cnt[0] == 2 && bad_cnt[0] == 0, $sformatf("set 0 counts rec=%0d bad=%0d", recov_cnt[0], bad_cnt[0]));
    check(recov_cnt[1] == 0 && bad_cnt[1] == 1, $sformatf("set 1 counts rec=%0d bad=%0d", recov_cnt[1], bad_cnt[1]));
    check(set_bad == 2'b10, $sformatf("set_bad=%b", set_bad));
    check(alarm && n_notify == 2, $sformatf("alarm=%b notify=%0d", alarm, n_notify));
    check(u_fl.n_read == 2 * 4 * NBLK || u_fl.n_read == 2 * 4 * NBLK + 1, $sformatf("reads %0d", u_fl.n_read));
    alarm_clr = 1; @(negedge clk) alarm_clr = 0;
    check(!alarm, "alarm cleared");
    // repair set 1 (erase and rewrite, as a host would) and scan again
    for (int i = 0; i < 4 * NBLK; i++) u_fl.mem[{1'b1, (AW-1)'(i)}] = '1;
    u_fl.fill_set(1, NBITS);
    wait (dut.s_q.set == 1'b1 && dut.s_q.blk == 0);
    wait (dut.s_q.set == 1'b0);
    @(negedge clk);
    check(set_bad == 2'b00 && bad_cnt[1] == 0, $sformatf("after repair set_bad=%b", set_bad));
    enable = 0;
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
