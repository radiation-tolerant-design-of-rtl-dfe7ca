// flash_programmer: buffered writing of a configuration set into FLASH.
//
// Configuration words (27 bits each) arrive over the slow control link at an
// irregular pace and are queued in a FIFO. Whenever three words are queued
// (or fewer after a flush request, padded with zeroes) the programmer pops
// them, encodes them into a protected 4-word block with cfg_block_encoder and
// programs the four words at the next block of the selected set. cmd_start
// selects the set and rewinds to block 0; cmd_erase erases a whole set so it
// can be refreshed while the other one is in use. cmd_start and cmd_erase are
// accepted only while `busy` is low; a flush request and data are taken at
// any time. Writing beyond the
// NBLK blocks of a set is refused and sets the sticky `overflow`. The
// document asks for an intelligent FLASH controller with buffering; the FIFO
// depth, the command set and the padding are this design's choices.
// Timing: four FLASH transfers plus four cycles per block.
module flash_programmer
  import rlbcs_pkg::*;
#(
  parameter int unsigned AW         = 19,
  parameter int unsigned NBLK       = 39797,
  parameter int unsigned FIFO_DEPTH = 16,
  localparam int unsigned BW        = AW - 3
) (
  input  logic          clk,
  input  logic          arst_n,
  input  logic [2:0]    rst_n,
  input  logic          cmd_start,   // select cmd_set, rewind to block 0
  input  logic          cmd_erase,   // erase cmd_set
  input  logic          cmd_set,
  input  logic          cmd_flush,   // write out a partly filled block
  // configuration data from the control link
  input  logic          wr_valid,
  input  cfg_data_t     wr_data,
  output logic          wr_ready,
  // status
  output logic          busy,
  output logic [BW-1:0] blocks,      // blocks written since cmd_start
  output logic          overflow,
  // FLASH client port
  output logic          fl_req,
  output flash_op_e     fl_op,
  output logic [AW-1:0] fl_addr,
  output flash_word_t   fl_wdata,
  input  logic          fl_done
);

  typedef enum logic [2:0] {P_IDLE, P_ERASE, P_POP, P_PROG} pst_e;

  typedef struct packed {
    pst_e                            st;
    logic                            set;
    logic                            flush;
    logic                            ovf;
    logic [BW-1:0]                   blk;
    logic [1:0]                      k;
    logic [BLK_DATA-1:0][DATA_W-1:0] d;
  } st_t;

  st_t s_q, s_d;

  logic          f_rd, f_valid;
  cfg_data_t     f_data;
  logic [$clog2(FIFO_DEPTH):0] f_count;
  cfg_data_t     enc_d [BLK_DATA];
  flash_word_t   enc_w [BLK_WORDS];

  tmr_reg #(.W($bits(st_t))) u_st (
    .clk, .arst_n, .rst_n, .init('0), .d(s_d), .q(s_q)
  );

  sync_fifo #(.W(DATA_W), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .arst_n, .rst_n,
    .wr_valid, .wr_data, .wr_ready,
    .rd_en(f_rd), .rd_valid(f_valid), .rd_data(f_data), .count(f_count)
  );

  always_comb for (int i = 0; i < BLK_DATA; i++) enc_d[i] = s_q.d[i];

  cfg_block_encoder u_enc (.d(enc_d), .w(enc_w));

  always_comb begin
    s_d    = s_q;
    f_rd   = 1'b0;
    fl_req = 1'b0;
    fl_op  = FL_PROG;
    if (cmd_flush) s_d.flush = 1'b1;   // a flush request is kept until done
    unique case (s_q.st)
      P_IDLE: begin
        if (cmd_erase) begin
          s_d.set = cmd_set;
          s_d.st  = P_ERASE;
        end else if (cmd_start) begin
          s_d.set = cmd_set;
          s_d.blk = '0;
          s_d.ovf = 1'b0;
        end else if (f_count >= ($clog2(FIFO_DEPTH)+1)'(BLK_DATA) ||
                     ((s_q.flush || cmd_flush) && f_valid)) begin
          s_d.st = P_POP;
          s_d.k  = '0;
          s_d.d  = '0;
        end else if (!f_valid) begin
          s_d.flush = 1'b0;
        end
      end
      P_ERASE: begin
        fl_req = 1'b1;
        fl_op  = FL_ERASE;
        if (fl_done) s_d.st = P_IDLE;
      end
      P_POP: begin
        // one word per cycle; missing words of a flushed block stay zero
        f_rd = 1'b1;
        if (f_valid) s_d.d[s_q.k] = f_data;
        s_d.k = s_q.k + 2'd1;
        if (s_q.k == 2'(BLK_DATA - 1) || !f_valid) begin
          s_d.k = '0;
          if (s_q.blk == BW'(NBLK) || s_q.ovf) begin
            s_d.ovf = 1'b1;      // set full: drop the block
            s_d.st  = P_IDLE;
          end else begin
            s_d.st = P_PROG;
          end
        end
      end
      P_PROG: begin
        fl_req = 1'b1;
        if (fl_done) begin
          s_d.k = s_q.k + 2'd1;
          if (s_q.k == 2'd3) begin
            s_d.blk = s_q.blk + 1'b1;
            s_d.st  = P_IDLE;
          end
        end
      end
      default: s_d.st = P_IDLE;
    endcase
  end

  assign fl_addr  = (s_q.st == P_ERASE) ? {s_q.set, {(AW-1){1'b0}}}
                                        : {s_q.set, s_q.blk, s_q.k};
  assign fl_wdata = enc_w[s_q.k];
  assign busy     = (s_q.st != P_IDLE);
  assign blocks   = s_q.blk;
  assign overflow = s_q.ovf;

endmodule
