// flash_block_reader: reads one 4-word protected block from FLASH and
// delivers the checked, corrected data.
//
// A start pulse with the address of the block's first word makes the reader
// fetch the four words one after another over a FLASH client port (see
// flash_arbiter for the request protocol) and keep them in a TMR buffer.
// The buffer feeds cfg_block_decoder; valid pulses for one cycle when d,
// status and bad_mask describe the block. start is ignored while busy.
// Timing: four FLASH transfers plus one cycle.
module flash_block_reader
  import rlbcs_pkg::*;
#(
  parameter int unsigned AW = 19
) (
  input  logic          clk,
  input  logic          arst_n,
  input  logic [2:0]    rst_n,
  input  logic          start,
  input  logic [AW-1:0] base,      // address of word 0 of the block
  output logic          busy,
  output logic          valid,     // one-cycle pulse: result below is valid
  output cfg_data_t     d [BLK_DATA],
  output blk_status_e   status,
  output logic [BLK_WORDS-1:0] bad_mask,
  // FLASH client port
  output logic          fl_req,
  output flash_op_e     fl_op,
  output logic [AW-1:0] fl_addr,
  output flash_word_t   fl_wdata,
  input  logic          fl_done,
  input  flash_word_t   fl_rdata
);

  typedef enum logic [1:0] {R_IDLE, R_READ, R_DONE} rst_e;

  typedef struct packed {
    rst_e                             st;
    logic [1:0]                       k;
    logic [AW-1:0]                    addr;
    logic [BLK_WORDS-1:0][WORD_W-1:0] w;
  } st_t;

  st_t s_q, s_d;
  flash_word_t wv [BLK_WORDS];

  tmr_reg #(.W($bits(st_t))) u_st (
    .clk, .arst_n, .rst_n, .init('0), .d(s_d), .q(s_q)
  );

  always_comb begin
    s_d    = s_q;
    fl_req = 1'b0;
    unique case (s_q.st)
      R_IDLE: if (start) begin
        s_d.st   = R_READ;
        s_d.addr = base;
        s_d.k    = '0;
      end
      R_READ: begin
        fl_req = 1'b1;
        if (fl_done) begin
          s_d.w[s_q.k] = fl_rdata;
          s_d.k        = s_q.k + 2'd1;
          if (s_q.k == 2'd3) s_d.st = R_DONE;
        end
      end
      default: s_d.st = R_IDLE;  // R_DONE: result shown for one cycle
    endcase
  end

  assign fl_op    = FL_READ;
  assign fl_addr  = s_q.addr + AW'(s_q.k);
  assign fl_wdata = '0;
  assign busy     = (s_q.st != R_IDLE);
  assign valid    = (s_q.st == R_DONE);

  always_comb for (int i = 0; i < BLK_WORDS; i++) wv[i] = s_q.w[i];

  cfg_block_decoder u_dec (.w(wv), .d(d), .status(status), .bad_mask(bad_mask));

endmodule
