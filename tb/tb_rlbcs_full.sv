// tb_rlbcs_full: one complete power-up configuration of both boards at full
// size: FLASH of 2 x 262,144 words per board, each set holding the 3,223,488-
// bit bitstream of a Link System FPGA (39,797 blocks). Both controllers load
// their FPGA from set 0 while their scanners run; every bit is checked by the
// FPGA models, and the load time is checked against two clock cycles per bit
// plus the block reads. The scanners' first pass over set 0 must find it
// clean.
module tb_rlbcs_full;
  import rlbcs_pkg::*;
  localparam int unsigned AW = 19, NBITS = 3_223_488, NB = 2;
  localparam int unsigned NBLK = tb_pkg::ref_blocks(NBITS);
  localparam int unsigned CW = $clog2(NBLK + 1);

  logic          clk [NB], arst_n [NB];
  logic [2:0]    rst_n [NB];
  logic          bus_ncs [NB], bus_nwr [NB];
  logic [3:0]    bus_addr [NB];
  logic [7:0]    bus_data [NB];
  logic [2:0]    bus_nreset [NB];
  logic          cmd_reconfig [NB], cmd_prog_start [NB], cmd_erase [NB], cmd_set [NB];
  logic          cmd_flush [NB], alarm_clr [NB];
  logic          host_valid [NB], host_ready [NB];
  cfg_data_t     host_data [NB];
  logic [3:0]    reg1 [NB];
  logic [7:0]    reg2 [NB];
  logic          ld_busy [NB], ld_emergency [NB], ld_loaded [NB], ld_failed [NB], ld_used_set [NB];
  logic [1:0]    ld_set_failed [NB];
  logic          pg_busy [NB], pg_overflow [NB];
  logic [AW-4:0] pg_blocks [NB];
  logic [1:0]    sc_set_checked [NB], sc_set_bad [NB];
  logic [CW-1:0] sc_recov_cnt [NB][2], sc_bad_cnt [NB][2];
  logic          sc_notify [NB], sc_alarm [NB];
  logic          prog_b [NB], init_b [NB], done [NB], cclk [NB], din [NB];
  logic          fl_req [NB], fl_done [NB];
  flash_op_e     fl_op [NB];
  logic [AW-1:0] fl_addr [NB];
  flash_word_t   fl_wdata [NB], fl_rdata [NB];
  logic          ex_clk = 0, ex_arst_n = 1, ex_in1 = 0, ex_out2;
  logic [2:0]    ex_rst_n = 3'b111, ex_state;
  logic [1:0]    ex_rout1;

  int checks = 0, failures = 0;
  bit board_done [NB];

  rlbcs_top dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  for (genvar b = 0; b < NB; b++) begin : g_board
    flash_model #(.AW(AW), .LAT(2)) u_fl (
      .clk(clk[b]), .req(fl_req[b]), .op(fl_op[b]), .addr(fl_addr[b]), .wdata(fl_wdata[b]),
      .done(fl_done[b]), .rdata(fl_rdata[b])
    );
    fpga_cfg_model #(.CFG_BITS(NBITS), .INIT_DLY(10)) u_fpga (
      .clk(clk[b]), .prog_b(prog_b[b]), .cclk(cclk[b]), .din(din[b]), .init_b(init_b[b]), .done(done[b])
    );

    initial begin
      clk[b] = 0;
      #(3 + b) forever #5 clk[b] = ~clk[b];
    end

    initial begin
      int cyc;
      {cmd_reconfig[b], cmd_prog_start[b], cmd_erase[b], cmd_set[b], cmd_flush[b], alarm_clr[b]} = '0;
      bus_ncs[b] = 1; bus_nwr[b] = 1; bus_addr[b] = 0; bus_data[b] = 0; bus_nreset[b] = 3'b111;
      host_valid[b] = 0; host_data[b] = '0;
      arst_n[b] = 1; rst_n[b] = 3'b111;
      u_fl.fill_set(0, NBITS);
      #1 arst_n[b] = 0; bus_nreset[b] = 3'b000;
      #1 arst_n[b] = 1; bus_nreset[b] = 3'b111;
      @(negedge clk[b]);
      cyc = 0;
      while (ld_busy[b]) begin @(negedge clk[b]); cyc++; end
      check(ld_loaded[b] && !ld_emergency[b] && ld_used_set[b] == 0, $sformatf("board %0d: loaded from set 0", b));
      check(u_fpga.n_configs == 1 && u_fpga.errors == 0 && u_fpga.bits == NBITS,
            $sformatf("board %0d: FPGA got %0d bits, %0d wrong", b, u_fpga.bits, u_fpga.errors));
      check(cyc >= 2 * NBITS && cyc <= 2 * NBITS + NBLK * 40 + 1000,
            $sformatf("board %0d: load took %0d cycles", b, cyc));
      $display("board %0d: %0d bits loaded in %0d cycles (%0d FLASH reads)", b, u_fpga.bits, cyc, u_fl.n_read);
      while (!sc_set_checked[b][0]) @(negedge clk[b]);
      check(!sc_set_bad[b][0] && sc_recov_cnt[b][0] == '0, $sformatf("board %0d: set 0 scanned clean", b));
      board_done[b] = 1;
    end
  end

  initial begin
    wait (board_done[0] && board_done[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (12_000_000) @(posedge clk[0]);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
