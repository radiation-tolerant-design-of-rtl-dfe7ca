// tb_cfg_loader: loads a 1000-bit bitstream into the FPGA model from a small
// FLASH model and checks every bit (in the model), the chosen set, the
// fall-back to the second set after an unusable block, recovery of a single
// corrupted word, emergency mode fed word by word with random gaps, giving up
// when emergency mode is disabled, skipping a set the scanner reported bad,
// and the load time against 2 cycles per bit plus the block reads.
module tb_cfg_loader;
  import rlbcs_pkg::*;
  localparam int unsigned AW = 10, NBITS = 1000, LAT = 2;
  localparam int unsigned NBLK = tb_pkg::ref_blocks(NBITS);
  localparam int unsigned NWORDS = (NBITS + 26) / 27;
  logic clk = 0, arst_n = 1, start = 0, pref_set = 0, em_enable = 1;
  logic [2:0] rst_n = 3'b111;
  logic [1:0] set_bad = 0, set_failed;
  logic em_valid = 0, em_ready;
  cfg_data_t em_data = '0;
  logic busy, emergency, loaded, failed, used_set;
  logic prog_b, init_b, done, cclk, din;
  logic fl_req, fl_done;
  flash_op_e fl_op;
  logic [AW-1:0] fl_addr;
  flash_word_t fl_wdata, fl_rdata;
  int checks = 0, failures = 0;

  cfg_loader #(.AW(AW), .CFG_BITS(NBITS), .PROG_CYC(8), .INIT_TO(100), .DONE_TO(100)) dut (.*);
  flash_model #(.AW(AW), .LAT(LAT)) u_fl (
    .clk, .req(fl_req), .op(fl_op), .addr(fl_addr), .wdata(fl_wdata), .done(fl_done), .rdata(fl_rdata)
  );
  fpga_cfg_model #(.CFG_BITS(NBITS), .INIT_DLY(10)) u_fpga (.clk, .prog_b, .cclk, .din, .init_b, .done);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // start a load and wait for it to end; returns its length in cycles
  task automatic run_load(output int cyc);
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    cyc = 1;
    while (busy) begin @(negedge clk); cyc++; end
  endtask

  // emergency data source: offers the next data word with random gaps
  int em_count = 0;
  always @(negedge clk) begin
    em_valid = busy && emergency && ($urandom_range(0, 3) != 0);
    em_data  = tb_pkg::data_word(em_count, NBITS);
  end
  always @(posedge clk) begin
    if (!(busy && emergency)) em_count <= 0;
    else if (em_valid && em_ready) em_count <= em_count + 1;
  end

  initial begin
    int cyc, p0, c0;
    u_fl.fill_set(0, NBITS);
    u_fl.fill_set(1, NBITS);
    #1 arst_n = 0;
    #1 arst_n = 1;
    // A: clean load from the preferred set
    p0 = u_fpga.n_prog; c0 = u_fpga.n_configs;
    run_load(cyc);
    check(loaded && !failed && !emergency && used_set == 0, "A: loaded from set 0");
    check(u_fpga.n_configs == c0 + 1 && u_fpga.errors == 0 && u_fpga.bits == NBITS, "A: FPGA got every bit");
    check(u_fpga.n_prog == p0 + 1, "A: one prog pulse");
    check(cyc >= 2 * NBITS && cyc <= 2 * NBITS + NBLK * (4 * (LAT + 2) + 6) + 60,
          $sformatf("A: load took %0d cycles", cyc));
    // B: unusable block in set 0 -> set 1
    u_fl.flip01(0, 4 * 5 + 1, 32'h0F00_0000);
    u_fl.flip01(0, 4 * 5 + 2, 32'h0000_00FF);
    p0 = u_fpga.n_prog; c0 = u_fpga.n_configs;
    run_load(cyc);
    check(loaded && used_set == 1 && set_failed == 2'b01 && !emergency,
          $sformatf("B: fell back to set 1 (loaded=%b set=%b failed=%b em=%b fail=%b)", loaded, used_set, set_failed, emergency, failed));
    check(u_fpga.n_prog == p0 + 2 && u_fpga.n_configs == c0 + 1 && u_fpga.errors == 0, "B: reprogrammed once more, loaded once");
    // C: set 1 has one corrupted word per block in some blocks -> recovered
    for (int b = 0; b < NBLK; b += 3) u_fl.flip01(1, 4 * b + (b % 4), 32'hFFFF_FFFF);
    c0 = u_fpga.n_configs;
    run_load(cyc);
    check(loaded && used_set == 1 && u_fpga.n_configs == c0 + 1 && u_fpga.errors == 0, "C: recovered words loaded");
    // F: scanner says set 0 is bad: go straight to set 1
    set_bad = 2'b01;
    p0 = u_fpga.n_prog;
    run_load(cyc);
    check(loaded && used_set == 1 && set_failed == 2'b00 && u_fpga.n_prog == p0 + 1, "F: skipped known-bad set");
    set_bad = 2'b00;
    // D: both sets unusable -> emergency mode
    u_fl.flip01(1, 4 * 9, 32'hFFFF_FFFF);
    u_fl.flip01(1, 4 * 9 + 1, 32'hFFFF_FFFF);
    c0 = u_fpga.n_configs;
    run_load(cyc);
    check(loaded && emergency && set_failed == 2'b11 && u_fpga.n_configs == c0 + 1 && u_fpga.errors == 0,
          "D: emergency load");
    // E: emergency disabled -> give up
    em_enable = 0;
    run_load(cyc);
    check(failed && !loaded, "E: gave up without emergency mode");
    // G: both known bad, emergency allowed -> straight to emergency
    em_enable = 1; set_bad = 2'b11;
    p0 = u_fpga.n_prog;
    run_load(cyc);
    check(loaded && emergency && u_fpga.n_prog == p0 + 1, "G: straight to emergency");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
