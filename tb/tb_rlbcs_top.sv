// tb_rlbcs_top: end-to-end test of the configuration path of a Control Board
// and a Link Board, at reduced size (1000-bit bitstream, 1 KiB-word FLASH).
//
// For each board, with its own FLASH and FPGA models, it runs: the power-up
// load from set 0; a scan that finds the erased set 1 unusable and raises the
// alarm; erasing and programming set 1 from the control link (with the FIFO
// full now and then); a scan that accepts set 1 and later counts a recovered
// block; a periodic reconfiguration from set 1 set up over the asynchronous
// register bus; the fall-back to set 0 when set 1 is destroyed; and an
// emergency-mode load over the control link when set 0 is destroyed too.
// Every bit delivered to an FPGA is checked by its model. The example state
// machine is cycled beside them. Each mechanism is counted, and one that never
// happened counts as a failure.
module tb_rlbcs_top;
  import rlbcs_pkg::*;
  localparam int unsigned AW = 10, NBITS = 1000, NB = 2;
  localparam int unsigned NBLK = tb_pkg::ref_blocks(NBITS);
  localparam int unsigned NWORDS = (NBITS + 26) / 27;
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

  // mechanism counters
  typedef enum int {
    M_POWERUP, M_SCAN_BAD, M_ALARM, M_ERASE, M_PROGRAM, M_FIFO_STALL, M_SCAN_OK,
    M_RECOVERED, M_BUS_WRITE, M_PERIODIC, M_FALLBACK, M_EMERGENCY, M_ARB_CONFLICT,
    M_EXAMPLE_FSM, M_NUM
  } mech_e;
  int mech [M_NUM];
  string mech_name [M_NUM] = '{"power-up load", "scan finds bad set", "alarm raised", "set erased",
    "set programmed", "FIFO full stall", "scan accepts set", "block recovered", "bus register write",
    "periodic reconfiguration", "fall-back to other set", "emergency-mode load",
    "FLASH arbitration conflict", "example FSM sequence"};

  rlbcs_top #(
    .AW(AW), .CFG_BITS(NBITS), .PRESCALE(50), .FIFO_DEPTH(4),
    .PROG_CYC(8), .INIT_TO(200), .DONE_TO(200)
  ) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  always #5 ex_clk = ~ex_clk;

  for (genvar b = 0; b < NB; b++) begin : g_board
    int prog_n = 0, prog_i = 0, em_i = 0, prog0;

    flash_model #(.AW(AW), .LAT(2)) u_fl (
      .clk(clk[b]), .req(fl_req[b]), .op(fl_op[b]), .addr(fl_addr[b]), .wdata(fl_wdata[b]),
      .done(fl_done[b]), .rdata(fl_rdata[b])
    );
    fpga_cfg_model #(.CFG_BITS(NBITS), .INIT_DLY(10)) u_fpga (
      .clk(clk[b]), .prog_b(prog_b[b]), .cclk(cclk[b]), .din(din[b]), .init_b(init_b[b]), .done(done[b])
    );

    initial begin
      clk[b] = 0;
      #(3 + b) forever #5 clk[b] = ~clk[b];   // the boards run unrelated clocks
    end

    // control-link data: programming words, or the bitstream in emergency mode
    always @(negedge clk[b]) begin
      if (ld_busy[b] && ld_emergency[b]) begin
        host_valid[b] = ($urandom_range(0, 2) != 0);
        host_data[b]  = tb_pkg::data_word(em_i, NBITS);
      end else begin
        host_valid[b] = (prog_i < prog_n);
        host_data[b]  = tb_pkg::data_word(prog_i, NBITS);
      end
    end
    always @(posedge clk[b]) begin
      if (!(ld_busy[b] && ld_emergency[b])) em_i <= 0;
      if (host_valid[b] && host_ready[b]) begin
        if (ld_busy[b] && ld_emergency[b]) em_i <= em_i + 1;
        else prog_i <= prog_i + 1;
      end
      if (host_valid[b] && !host_ready[b] && !(ld_busy[b] && ld_emergency[b])) mech[M_FIFO_STALL]++;
      if (dut.g_board[b].u_ctrl.c_req[1] && dut.g_board[b].u_ctrl.c_req[2]) mech[M_ARB_CONFLICT]++;
      if (sc_notify[b]) mech[M_ALARM]++;
    end

    task automatic bus_write(input logic [3:0] a, input logic [7:0] v);
      #3 bus_addr[b] = a; bus_data[b] = v; bus_nwr[b] = 0;
      #3 bus_ncs[b] = 0;
      #5 bus_ncs[b] = 1;
      #3 bus_nwr[b] = 1;
      mech[M_BUS_WRITE]++;
    endtask

    task automatic wait_load();
      @(negedge clk[b]);
      while (!ld_busy[b]) @(negedge clk[b]);
      while (ld_busy[b]) @(negedge clk[b]);
    endtask

    initial begin
      {cmd_reconfig[b], cmd_prog_start[b], cmd_erase[b], cmd_set[b], cmd_flush[b], alarm_clr[b]} = '0;
      bus_ncs[b] = 1; bus_nwr[b] = 1; bus_addr[b] = 0; bus_data[b] = 0; bus_nreset[b] = 3'b111;
      arst_n[b] = 1; rst_n[b] = 3'b111;
      u_fl.fill_set(0, NBITS);
      #1 arst_n[b] = 0; bus_nreset[b] = 3'b000;
      #1 arst_n[b] = 1; bus_nreset[b] = 3'b111;
      // 1. power-up load
      @(negedge clk[b]);
      while (ld_busy[b]) @(negedge clk[b]);
      check(ld_loaded[b] && ld_used_set[b] == 0 && u_fpga.n_configs == 1 && u_fpga.errors == 0,
            $sformatf("board %0d: power-up load", b));
      if (ld_loaded[b]) mech[M_POWERUP]++;
      // 2. scan: set 1 is erased, hence unusable
      wait (sc_set_checked[b] == 2'b11);
      check(sc_set_bad[b] == 2'b10 && sc_alarm[b] && sc_bad_cnt[b][1] == CW'(NBLK),
            $sformatf("board %0d: scan of erased set 1", b));
      if (sc_set_bad[b][1]) mech[M_SCAN_BAD]++;
      begin @(negedge clk[b]) alarm_clr[b] = 1; @(negedge clk[b]) alarm_clr[b] = 0; end
      // 3. erase and program set 1 over the control link
      cmd_set[b] = 1;
      begin @(negedge clk[b]) cmd_erase[b] = 1; @(negedge clk[b]) cmd_erase[b] = 0; end
      @(negedge clk[b]);
      while (pg_busy[b]) @(negedge clk[b]);
      if (u_fl.n_erase == 1) mech[M_ERASE]++;
      begin @(negedge clk[b]) cmd_prog_start[b] = 1; @(negedge clk[b]) cmd_prog_start[b] = 0; end
      prog_n = NWORDS;
      while (prog_i < prog_n) @(negedge clk[b]);
      repeat (3) @(negedge clk[b]);
      begin @(negedge clk[b]) cmd_flush[b] = 1; @(negedge clk[b]) cmd_flush[b] = 0; end
      while (pg_busy[b] || pg_blocks[b] != (AW-3)'(NBLK)) @(negedge clk[b]);
      begin
        int bad;
        bad = 0;
        for (int w = 0; w < 4 * NBLK; w++)
          if (u_fl.peek(1, w) != tb_pkg::block_word(w / 4, w % 4, NBITS)) bad++;
        check(bad == 0 && !pg_overflow[b], $sformatf("board %0d: set 1 programmed, %0d wrong words", b, bad));
        if (bad == 0) mech[M_PROGRAM]++;
      end
      // 4. the scanner accepts set 1 on its next pass
      while (sc_set_bad[b] != 2'b00) @(negedge clk[b]);
      mech[M_SCAN_OK]++;
      // 5. one corrupted word in set 1 is counted as recovered
      u_fl.flip01(1, 4 * 2 + 1, 32'hFFFF_FFFF);
      while (sc_recov_cnt[b][1] == '0) @(negedge clk[b]);
      check(sc_bad_cnt[b][1] == '0 && sc_set_bad[b] == 2'b00, $sformatf("board %0d: recovered block", b));
      mech[M_RECOVERED]++;
      // 6. periodic reconfiguration from the preferred set 1
      bus_write(4'd1, 8'd80);              // 80 ticks of 50 cycles
      bus_write(4'd0, 8'b1100);            // periodic on, prefer set 1
      prog0 = u_fpga.n_prog;
      wait_load();
      check(reg2[b] == 8'd80 && reg1[b] == 4'b1100, $sformatf("board %0d: registers", b));
      check(ld_loaded[b] && ld_used_set[b] == 1 && u_fpga.n_prog == prog0 + 1 && u_fpga.errors == 0,
            $sformatf("board %0d: periodic load from set 1", b));
      if (ld_loaded[b] && u_fpga.n_prog == prog0 + 1) mech[M_PERIODIC]++;
      bus_write(4'd0, 8'b0100);            // periodic off
      // 7. set 1 destroyed: fall back to set 0
      u_fl.flip01(1, 4 * 4, 32'hFFFF_FFFF);
      u_fl.flip01(1, 4 * 4 + 2, 32'hFFFF_FFFF);
      begin @(negedge clk[b]) cmd_reconfig[b] = 1; @(negedge clk[b]) cmd_reconfig[b] = 0; end
      wait_load();
      check(ld_loaded[b] && ld_used_set[b] == 0 && !ld_emergency[b] && u_fpga.errors == 0,
            $sformatf("board %0d: fall-back load from set 0", b));
      if (ld_loaded[b] && ld_used_set[b] == 0) mech[M_FALLBACK]++;
      // 8. set 0 destroyed too: emergency mode over the control link
      u_fl.flip01(0, 4 * 6, 32'hFFFF_FFFF);
      u_fl.flip01(0, 4 * 6 + 3, 32'hFFFF_FFFF);
      begin @(negedge clk[b]) cmd_reconfig[b] = 1; @(negedge clk[b]) cmd_reconfig[b] = 0; end
      wait_load();
      check(ld_loaded[b] && ld_emergency[b] && u_fpga.errors == 0, $sformatf("board %0d: emergency load", b));
      if (ld_loaded[b] && ld_emergency[b]) mech[M_EMERGENCY]++;
      check(u_fpga.n_configs == 4, $sformatf("board %0d: %0d configurations", b, u_fpga.n_configs));
      board_done[b] = 1;
    end
  end

  // example state machine beside the boards
  initial begin
    #1 ex_arst_n = 0;
    #1 ex_arst_n = 1;
    repeat (3) begin
      @(negedge ex_clk) ex_in1 = 1;
      @(negedge ex_clk) ex_in1 = 0;
      check(ex_state == 3'd1 && ex_rout1 == 2'b10, "example FSM left idle");
      repeat (4) @(negedge ex_clk);
      check(ex_state == 3'd0 && ex_rout1 == 2'b00, "example FSM back in idle");
      mech[M_EXAMPLE_FSM]++;
    end
  end

  initial begin
    wait (board_done[0] && board_done[1]);
    for (int m = 0; m < M_NUM; m++) begin
      $display("%-28s %0d", mech_name[m], mech[m]);
      check(mech[m] > 0, $sformatf("mechanism never happened: %s", mech_name[m]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge ex_clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
