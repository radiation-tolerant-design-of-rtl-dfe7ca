// cfg_ctrl: configuration controller of an RLBCS board, the part shared by
// the Control Board Initialization Controller (CBIC) and the Link Board
// Controller (LBC).
//
// It owns the board's FLASH, which holds two protected configuration sets, and
// the configuration port of one SRAM FPGA. After reset, on cmd_reconfig and
// periodically (reconfig_timer), cfg_loader reconfigures the FPGA from FLASH,
// falling back to the other set and then to emergency mode, in which the
// bitstream arrives over the control link on the host_* stream. In the
// background flash_scanner keeps reading both sets and reports corruption.
// flash_programmer writes a new or refreshed set from host_* data. The three
// share the FLASH port through flash_arbiter (programmer first, then loader,
// then scanner). While the loader is in emergency mode the host stream feeds
// it; otherwise the stream feeds the programmer.
//
// Control registers are written over the board's asynchronous bus into TMR
// registers clocked by the chip-select edge (tmr_bus_regs) and brought into
// the clock domain through a two-stage TMR synchroniser:
//   REG1 (address 0): [0] scan disable, [1] emergency disable,
//                     [2] preferred set, [3] periodic reconfiguration enable
//   REG2 (address 1): reconfiguration period in ticks (seconds at 40 MHz)
// Their reset values (all zero) give a working controller: scanning and
// emergency mode on, set 0 preferred, no periodic reconfiguration. As the
// bus registers are not refreshed by a clock, the host should rewrite them
// from time to time. One-cycle command pulses and the data stream are
// synchronous to clk; the document does not describe the CBus or the CCU25
// link, so these are this design's stand-ins for them.
// All state of the controller is kept in TMR registers, following the
// document; the FIFO memory of the programmer is a plain array.
module cfg_ctrl
  import rlbcs_pkg::*;
#(
  parameter int unsigned AW         = 19,          // FLASH word address width
  parameter int unsigned CFG_BITS   = 3_223_488,   // bitstream length
  parameter int unsigned PRESCALE   = 40_000_000,  // clock cycles per tick
  parameter int unsigned FIFO_DEPTH = 16,
  parameter int unsigned PROG_CYC   = 64,
  parameter int unsigned INIT_TO    = 65_535,
  parameter int unsigned DONE_TO    = 65_535,
  localparam int unsigned NBLK      = blocks_for_bits(CFG_BITS),
  localparam int unsigned BW        = AW - 3,
  localparam int unsigned CW        = $clog2(NBLK + 1)
) (
  input  logic          clk,
  input  logic          arst_n,
  input  logic [2:0]    rst_n,
  // asynchronous register bus
  input  logic          bus_ncs,
  input  logic          bus_nwr,
  input  logic [3:0]    bus_addr,
  input  logic [7:0]    bus_data,
  input  logic [2:0]    bus_nreset,
  // commands, one-cycle pulses
  input  logic          cmd_reconfig,
  input  logic          cmd_prog_start,
  input  logic          cmd_erase,
  input  logic          cmd_set,
  input  logic          cmd_flush,
  input  logic          alarm_clr,
  // configuration data from the control link
  input  logic          host_valid,
  input  cfg_data_t     host_data,
  output logic          host_ready,
  // status
  output logic [3:0]    reg1,
  output logic [7:0]    reg2,
  output logic          ld_busy,
  output logic          ld_emergency,
  output logic          ld_loaded,
  output logic          ld_failed,
  output logic          ld_used_set,
  output logic [1:0]    ld_set_failed,
  output logic          pg_busy,
  output logic [BW-1:0] pg_blocks,
  output logic          pg_overflow,
  output logic [1:0]    sc_set_checked,
  output logic [1:0]    sc_set_bad,
  output logic [CW-1:0] sc_recov_cnt [2],
  output logic [CW-1:0] sc_bad_cnt   [2],
  output logic          sc_notify,
  output logic          sc_alarm,
  // FPGA configuration port
  output logic          prog_b,
  input  logic          init_b,
  input  logic          done,
  output logic          cclk,
  output logic          din,
  // FLASH port
  output logic          fl_req,
  output flash_op_e     fl_op,
  output logic [AW-1:0] fl_addr,
  output flash_word_t   fl_wdata,
  input  logic          fl_done,
  input  flash_word_t   fl_rdata
);

  // ---- control registers on the asynchronous bus ----
  logic [3:0]  r1_async;
  logic [7:0]  r2_async;
  logic [11:0] sync1, sync2;

  tmr_bus_regs #(.AW(4)) u_regs (
    .ncs(bus_ncs), .nwr(bus_nwr), .addr(bus_addr), .data(bus_data),
    .nreset(bus_nreset), .reg1(r1_async), .reg2(r2_async)
  );

  tmr_reg #(.W(12)) u_sync1 (
    .clk, .arst_n, .rst_n, .init('0), .d({r1_async, r2_async}), .q(sync1)
  );
  tmr_reg #(.W(12)) u_sync2 (
    .clk, .arst_n, .rst_n, .init('0), .d(sync1), .q(sync2)
  );

  assign reg1 = sync2[11:8];
  assign reg2 = sync2[7:0];

  logic scan_en, em_en, pref_set, periodic_en;
  assign scan_en     = !reg1[0];
  assign em_en       = !reg1[1];
  assign pref_set    = reg1[2];
  assign periodic_en = reg1[3];

  // ---- power-up load request ----
  logic boot_q, timer_req, ld_start;

  tmr_reg #(.W(1)) u_boot (
    .clk, .arst_n, .rst_n, .init(1'b0), .d(1'b1), .q(boot_q)
  );

  reconfig_timer #(.PRESCALE(PRESCALE)) u_timer (
    .clk, .arst_n, .rst_n, .enable(periodic_en), .period(reg2), .req(timer_req)
  );

  assign ld_start = !boot_q || cmd_reconfig || timer_req;

  // ---- FLASH clients ----
  localparam int unsigned C_PRG = 0, C_LD = 1, C_SC = 2;
  logic        c_req   [3];
  flash_op_e   c_op    [3];
  logic [AW-1:0] c_addr [3];
  flash_word_t c_wdata [3];
  logic        c_done  [3];

  flash_arbiter #(.N(3), .AW(AW)) u_arb (
    .clk, .arst_n, .rst_n,
    .c_req, .c_op, .c_addr, .c_wdata, .c_done,
    .fl_req, .fl_op, .fl_addr, .fl_wdata, .fl_done
  );

  logic em_ready, em_active, pg_ready;
  assign em_active  = ld_busy && ld_emergency;
  assign host_ready = em_active ? em_ready : pg_ready;

  cfg_loader #(
    .AW(AW), .CFG_BITS(CFG_BITS), .PROG_CYC(PROG_CYC), .INIT_TO(INIT_TO), .DONE_TO(DONE_TO)
  ) u_loader (
    .clk, .arst_n, .rst_n,
    .start(ld_start), .pref_set, .set_bad(sc_set_bad), .em_enable(em_en),
    .em_valid(host_valid && em_active), .em_data(host_data), .em_ready,
    .busy(ld_busy), .emergency(ld_emergency), .loaded(ld_loaded), .failed(ld_failed),
    .used_set(ld_used_set), .set_failed(ld_set_failed),
    .prog_b, .init_b, .done, .cclk, .din,
    .fl_req(c_req[C_LD]), .fl_op(c_op[C_LD]), .fl_addr(c_addr[C_LD]),
    .fl_wdata(c_wdata[C_LD]), .fl_done(c_done[C_LD]), .fl_rdata
  );

  flash_scanner #(.AW(AW), .NBLK(NBLK)) u_scan (
    .clk, .arst_n, .rst_n,
    .enable(scan_en), .alarm_clr,
    .set_checked(sc_set_checked), .set_bad(sc_set_bad),
    .recov_cnt(sc_recov_cnt), .bad_cnt(sc_bad_cnt),
    .notify(sc_notify), .alarm(sc_alarm),
    .fl_req(c_req[C_SC]), .fl_op(c_op[C_SC]), .fl_addr(c_addr[C_SC]),
    .fl_wdata(c_wdata[C_SC]), .fl_done(c_done[C_SC]), .fl_rdata
  );

  flash_programmer #(.AW(AW), .NBLK(NBLK), .FIFO_DEPTH(FIFO_DEPTH)) u_prog (
    .clk, .arst_n, .rst_n,
    .cmd_start(cmd_prog_start), .cmd_erase, .cmd_set, .cmd_flush,
    .wr_valid(host_valid && !em_active), .wr_data(host_data), .wr_ready(pg_ready),
    .busy(pg_busy), .blocks(pg_blocks), .overflow(pg_overflow),
    .fl_req(c_req[C_PRG]), .fl_op(c_op[C_PRG]), .fl_addr(c_addr[C_PRG]),
    .fl_wdata(c_wdata[C_PRG]), .fl_done(c_done[C_PRG])
  );

endmodule
