// rlbcs_top: configuration path of the RPC Link Box Control System.
//
// Index 0 of every array port is the Control Board: its CBIC reconfigures the
// board's SRAM-based controller FPGA from the Control Board FLASH. Index 1 is
// a Link Board: its LBC reconfigures the Link System FPGA (Xilinx XC3S1000,
// 3,223,488 configuration bits) from the Link Board FLASH. Both use cfg_ctrl:
// two protected configuration sets in FLASH, background scanning, buffered
// programming, periodic reconfiguration and an emergency mode fed over the
// control link. The CCU25 link, the CBus and the Link Board's internal bus
// are not modelled; their traffic appears here as the bus_*, cmd_* and host_*
// ports of each board. The FLASH chips and the configured FPGAs are outside
// this module.
//
// Beside them stands tmr_fsm_example, the small redundant state machine that
// shows the coding style every state machine here follows.
//
// Each board has its own clock and resets; each reset is a set of one
// asynchronous and three synchronous active-low lines (the three are tied
// together on the board). The CBIC's target size is not given by the
// document and is assumed equal to the Link System FPGA's.
module rlbcs_top
  import rlbcs_pkg::*;
#(
  parameter int unsigned AW         = 19,
  parameter int unsigned CFG_BITS   = 3_223_488,
  parameter int unsigned PRESCALE   = 40_000_000,
  parameter int unsigned FIFO_DEPTH = 16,
  parameter int unsigned PROG_CYC   = 64,
  parameter int unsigned INIT_TO    = 65_535,
  parameter int unsigned DONE_TO    = 65_535,
  localparam int unsigned NB        = 2,   // 0: Control Board, 1: Link Board
  localparam int unsigned NBLK      = blocks_for_bits(CFG_BITS),
  localparam int unsigned BW        = AW - 3,
  localparam int unsigned CW        = $clog2(NBLK + 1)
) (
  input  logic          clk            [NB],
  input  logic          arst_n         [NB],
  input  logic [2:0]    rst_n          [NB],
  input  logic          bus_ncs        [NB],
  input  logic          bus_nwr        [NB],
  input  logic [3:0]    bus_addr       [NB],
  input  logic [7:0]    bus_data       [NB],
  input  logic [2:0]    bus_nreset     [NB],
  input  logic          cmd_reconfig   [NB],
  input  logic          cmd_prog_start [NB],
  input  logic          cmd_erase      [NB],
  input  logic          cmd_set        [NB],
  input  logic          cmd_flush      [NB],
  input  logic          alarm_clr      [NB],
  input  logic          host_valid     [NB],
  input  cfg_data_t     host_data      [NB],
  output logic          host_ready     [NB],
  output logic [3:0]    reg1           [NB],
  output logic [7:0]    reg2           [NB],
  output logic          ld_busy        [NB],
  output logic          ld_emergency   [NB],
  output logic          ld_loaded      [NB],
  output logic          ld_failed      [NB],
  output logic          ld_used_set    [NB],
  output logic [1:0]    ld_set_failed  [NB],
  output logic          pg_busy        [NB],
  output logic [BW-1:0] pg_blocks      [NB],
  output logic          pg_overflow    [NB],
  output logic [1:0]    sc_set_checked [NB],
  output logic [1:0]    sc_set_bad     [NB],
  output logic [CW-1:0] sc_recov_cnt   [NB][2],
  output logic [CW-1:0] sc_bad_cnt     [NB][2],
  output logic          sc_notify      [NB],
  output logic          sc_alarm       [NB],
  output logic          prog_b         [NB],
  input  logic          init_b         [NB],
  input  logic          done           [NB],
  output logic          cclk           [NB],
  output logic          din            [NB],
  output logic          fl_req         [NB],
  output flash_op_e     fl_op          [NB],
  output logic [AW-1:0] fl_addr        [NB],
  output flash_word_t   fl_wdata       [NB],
  input  logic          fl_done        [NB],
  input  flash_word_t   fl_rdata       [NB],
  // example state machine
  input  logic          ex_clk,
  input  logic          ex_arst_n,
  input  logic [2:0]    ex_rst_n,
  input  logic          ex_in1,
  output logic [1:0]    ex_rout1,
  output logic          ex_out2,
  output logic [2:0]    ex_state
);

  for (genvar b = 0; b < NB; b++) begin : g_board
    cfg_ctrl #(
      .AW(AW), .CFG_BITS(CFG_BITS), .PRESCALE(PRESCALE), .FIFO_DEPTH(FIFO_DEPTH),
      .PROG_CYC(PROG_CYC), .INIT_TO(INIT_TO), .DONE_TO(DONE_TO)
    ) u_ctrl (
      .clk(clk[b]), .arst_n(arst_n[b]), .rst_n(rst_n[b]),
      .bus_ncs(bus_ncs[b]), .bus_nwr(bus_nwr[b]), .bus_addr(bus_addr[b]),
      .bus_data(bus_data[b]), .bus_nreset(bus_nreset[b]),
      .cmd_reconfig(cmd_reconfig[b]), .cmd_prog_start(cmd_prog_start[b]),
      .cmd_erase(cmd_erase[b]), .cmd_set(cmd_set[b]), .cmd_flush(cmd_flush[b]),
      .alarm_clr(alarm_clr[b]),
      .host_valid(host_valid[b]), .host_data(host_data[b]), .host_ready(host_ready[b]),
      .reg1(reg1[b]), .reg2(reg2[b]),
      .ld_busy(ld_busy[b]), .ld_emergency(ld_emergency[b]), .ld_loaded(ld_loaded[b]),
      .ld_failed(ld_failed[b]), .ld_used_set(ld_used_set[b]), .ld_set_failed(ld_set_failed[b]),
      .pg_busy(pg_busy[b]), .pg_blocks(pg_blocks[b]), .pg_overflow(pg_overflow[b]),
      .sc_set_checked(sc_set_checked[b]), .sc_set_bad(sc_set_bad[b]),
      .sc_recov_cnt(sc_recov_cnt[b]), .sc_bad_cnt(sc_bad_cnt[b]),
      .sc_notify(sc_notify[b]), .sc_alarm(sc_alarm[b]),
      .prog_b(prog_b[b]), .init_b(init_b[b]), .done(done[b]), .cclk(cclk[b]), .din(din[b]),
      .fl_req(fl_req[b]), .fl_op(fl_op[b]), .fl_addr(fl_addr[b]), .fl_wdata(fl_wdata[b]),
      .fl_done(fl_done[b]), .fl_rdata(fl_rdata[b])
    );
  end

  tmr_fsm_example u_example (
    .clk(ex_clk), .arst_n(ex_arst_n), .rst_n(ex_rst_n), .in1(ex_in1),
    .rout1(ex_rout1), .out2(ex_out2), .state(ex_state)
  );

endmodule
