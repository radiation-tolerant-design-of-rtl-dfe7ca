// tb_cfg_ctrl: one configuration controller with its FLASH and FPGA models,
// at reduced size (1000-bit bitstream). Checks the power-up load, the scan of
// an empty second set, programming that set over the control link, a load
// from it selected through the asynchronous register bus, the fall-back to
// set 0 and the emergency-mode load, and the load time.
module tb_cfg_ctrl;
  import rlbcs_pkg::*;
  localparam int unsigned AW = 10, NBITS = 1000;
  localparam int unsigned NBLK = tb_pkg::ref_blocks(NBITS);
  localparam int unsigned NWORDS = (NBITS + 26) / 27;
  localparam int unsigned CW = $clog2(NBLK + 1);

  logic clk = 0, arst_n = 1;
  logic [2:0] rst_n = 3'b111, bus_nreset = 3'b111;
  logic bus_ncs = 1, bus_nwr = 1;
  logic [3:0] bus_addr = 0, reg1;
  logic [7:0] bus_data = 0, reg2;
  logic cmd_reconfig = 0, cmd_prog_start = 0, cmd_erase = 0, cmd_set = 0, cmd_flush = 0, alarm_clr = 0;
  logic host_valid = 0, host_ready;
  cfg_data_t host_data = '0;
  logic ld_busy, ld_emergency, ld_loaded, ld_failed, ld_used_set;
  logic [1:0] ld_set_failed, sc_set_checked, sc_set_bad;
  logic pg_busy, pg_overflow, sc_notify, sc_alarm;
  logic [AW-4:0] pg_blocks;
  logic [CW-1:0] sc_recov_cnt [2], sc_bad_cnt [2];
  logic prog_b, init_b, done, cclk, din;
  logic fl_req, fl_done;
  flash_op_e fl_op;
  logic [AW-1:0] fl_addr;
  flash_word_t fl_wdata, fl_rdata;
  int checks = 0, failures = 0, prog_n = 0, prog_i = 0, em_i = 0;

  cfg_ctrl #(.AW(AW), .CFG_BITS(NBITS), .PRESCALE(50), .FIFO_DEPTH(8),
             .PROG_CYC(8), .INIT_TO(200), .DONE_TO(200)) dut (.*);
  flash_model #(.AW(AW), .LAT(2)) u_fl (
    .clk, .req(fl_req), .op(fl_op), .addr(fl_addr), .wdata(fl_wdata), .done(fl_done), .rdata(fl_rdata)
  );
  fpga_cfg_model #(.CFG_BITS(NBITS), .INIT_DLY(10)) u_fpga (.clk, .prog_b, .cclk, .din, .init_b, .done);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  always @(negedge clk) begin
    if (ld_busy && ld_emergency) begin
      host_valid = ($urandom_range(0, 2) != 0);
      host_data  = tb_pkg::data_word(em_i, NBITS);
    end else begin
      host_valid = (prog_i < prog_n);
      host_data  = tb_pkg::data_word(prog_i, NBITS);
    end
  end
  always @(posedge clk) begin
    if (!(ld_busy && ld_emergency)) em_i <= 0;
    if (host_valid && host_ready) begin
      if (ld_busy && ld_emergency) em_i <= em_i + 1;
      else prog_i <= prog_i + 1;
    end
  end

  task automatic bus_write(input logic [3:0] a, input logic [7:0] v);
    #3 bus_addr = a; bus_data = v; bus_nwr = 0;
    #3 bus_ncs = 0;
    #5 bus_ncs = 1;
    #3 bus_nwr = 1;
    repeat (3) @(negedge clk);   // two-stage synchroniser
  endtask

  task automatic wait_load(output int cyc);
    @(negedge clk);
    while (!ld_busy) @(negedge clk);
    cyc = 0;
    while (ld_busy) begin @(negedge clk); cyc++; end
  endtask

  initial begin
    int cyc;
    u_fl.fill_set(0, NBITS);
    #1 arst_n = 0; bus_nreset = 3'b000;
    #1 arst_n = 1; bus_nreset = 3'b111;
    @(negedge clk);
    cyc = 0;
    while (ld_busy) begin @(negedge clk); cyc++; end
    check(ld_loaded && ld_used_set == 0 && u_fpga.n_configs == 1 && u_fpga.errors == 0, "power-up load");
    check(cyc >= 2 * NBITS && cyc < 2 * NBITS + NBLK * 40 + 100, $sformatf("power-up load took %0d cycles", cyc));
    wait (sc_set_checked == 2'b11);
    check(sc_set_bad == 2'b10 && sc_alarm, "erased set 1 reported");
    @(negedge clk) alarm_clr = 1;
    @(negedge clk) alarm_clr = 0;
    check(!sc_alarm, "alarm cleared");
    cmd_set = 1;
    @(negedge clk) cmd_erase = 1;
    @(negedge clk) cmd_erase = 0;
    @(negedge clk);
    while (pg_busy) @(negedge clk);
    @(negedge clk) cmd_prog_start = 1;
    @(negedge clk) cmd_prog_start = 0;
    prog_n = NWORDS;
    while (prog_i < prog_n) @(negedge clk);
    @(negedge clk) cmd_flush = 1;
    @(negedge clk) cmd_flush = 0;
    while (pg_busy || pg_blocks != (AW-3)'(NBLK)) @(negedge clk);
    while (sc_set_bad != 2'b00) @(negedge clk);
    check(1'b1, "set 1 accepted by the scanner");
    bus_write(0, 8'b0100);   // prefer set 1
    @(negedge clk) cmd_reconfig = 1;
    @(negedge clk) cmd_reconfig = 0;
    wait_load(cyc);
    check(reg1 == 4'b0100 && ld_loaded && ld_used_set == 1 && u_fpga.n_configs == 2 && u_fpga.errors == 0,
          $sformatf("load from programmed set 1: reg1=%b loaded=%b set=%b n=%0d err=%0d em=%b", reg1, ld_loaded, ld_used_set, u_fpga.n_configs, u_fpga.errors, ld_emergency));
    u_fl.flip01(1, 8, 32'hFFFF_FFFF);
    u_fl.flip01(1, 9, 32'hFFFF_FFFF);
    @(negedge clk) cmd_reconfig = 1;
    @(negedge clk) cmd_reconfig = 0;
    wait_load(cyc);
    check(ld_loaded && ld_used_set == 0 && u_fpga.n_configs == 3, "fall-back to set 0");
    u_fl.flip01(0, 0, 32'hFFFF_FFFF);
    u_fl.flip01(0, 1, 32'hFFFF_FFFF);
    @(negedge clk) cmd_reconfig = 1;
    @(negedge clk) cmd_reconfig = 0;
    wait_load(cyc);
    check(ld_loaded && ld_emergency && u_fpga.n_configs == 4 && u_fpga.errors == 0, "emergency load");
    bus_write(0, 8'b0110);   // emergency mode disabled
    check(sc_set_bad == 2'b11, "scanner reports both sets bad");
    @(negedge clk) cmd_reconfig = 1;
    @(negedge clk) cmd_reconfig = 0;
    repeat (20) @(negedge clk);
    check(ld_failed && !ld_loaded, $sformatf("gives up with emergency mode disabled: failed=%b loaded=%b bad=%b", ld_failed, ld_loaded, sc_set_bad));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
