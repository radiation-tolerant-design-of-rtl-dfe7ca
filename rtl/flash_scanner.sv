// flash_scanner: background check of the two configuration sets in FLASH.
//
// While enabled, the scanner reads every block of set 0 and then of set 1,
// over and over, through a flash_block_reader. For the set being scanned it
// counts blocks that had to be recovered (one corrupted word) and blocks that
// are unusable. At the end of each pass over a set it publishes the counts for
// that set, marks the set checked, marks it bad when any block was unusable,
// and raises `notify` for one cycle if anything was corrupted, setting the
// sticky `alarm` bit until alarm_clr. This lets the managing computer reload
// a damaged set before it is needed, as the document asks; the reporting
// format is this design's own. Set s occupies the FLASH words from
// s * 2**(AW-1) on; block b starts at word 4*b of its set.
// Timing: about five FLASH transfers per block, lower priority than loading
// and programming.
module flash_scanner
  import rlbcs_pkg::*;
#(
  parameter int unsigned AW   = 19,
  parameter int unsigned NBLK = 39797,   // blocks per configuration set
  localparam int unsigned BW  = AW - 3,  // block index width
  localparam int unsigned CW  = $clog2(NBLK + 1)
) (
  input  logic          clk,
  input  logic          arst_n,
  input  logic [2:0]    rst_n,
  input  logic          enable,
  input  logic          alarm_clr,
  output logic [1:0]    set_checked,   // a full pass of the set has completed
  output logic [1:0]    set_bad,       // last pass found an unusable block
  output logic [CW-1:0] recov_cnt [2], // recovered blocks in last pass
  output logic [CW-1:0] bad_cnt   [2], // unusable blocks in last pass
  output logic          notify,        // pulse: a pass found corruption
  output logic          alarm,         // sticky notify
  // FLASH client port
  output logic          fl_req,
  output flash_op_e     fl_op,
  output logic [AW-1:0] fl_addr,
  output flash_word_t   fl_wdata,
  input  logic          fl_done,
  input  flash_word_t   fl_rdata
);

  typedef enum logic [1:0] {S_IDLE, S_REQ, S_WAIT} sst_e;

  typedef struct packed {
    sst_e                st;
    logic                set;
    logic [BW-1:0]       blk;
    logic [CW-1:0]       n_rec;
    logic [CW-1:0]       n_bad;
    logic [1:0]          checked;
    logic [1:0]          bad;
    logic [1:0][CW-1:0]  rec_res;
    logic [1:0][CW-1:0]  bad_res;
    logic                alarm;
  } st_t;

  st_t s_q, s_d;
  logic [CW-1:0] nr, nb;  // pass counts including the block just read

  logic          rd_start, rd_valid, rd_busy;
  cfg_data_t     rd_d [BLK_DATA];
  blk_status_e   rd_status;
  logic [BLK_WORDS-1:0] rd_bad_mask;

  tmr_reg #(.W($bits(st_t))) u_st (
    .clk, .arst_n, .rst_n, .init('0), .d(s_d), .q(s_q)
  );

  flash_block_reader #(.AW(AW)) u_rd (
    .clk, .arst_n, .rst_n,
    .start(rd_start), .base({s_q.set, s_q.blk, 2'b00}),
    .busy(rd_busy), .valid(rd_valid), .d(rd_d), .status(rd_status), .bad_mask(rd_bad_mask),
    .fl_req, .fl_op, .fl_addr, .fl_wdata, .fl_done, .fl_rdata
  );

  always_comb begin
    s_d      = s_q;
    rd_start = 1'b0;
    notify   = 1'b0;
    nr       = s_q.n_rec + CW'(rd_status == BLK_RECOVERED);
    nb       = s_q.n_bad + CW'(rd_status == BLK_BAD);
    if (alarm_clr) s_d.alarm = 1'b0;
    unique case (s_q.st)
      S_IDLE: if (enable) s_d.st = S_REQ;
      S_REQ: begin
        rd_start = 1'b1;
        s_d.st   = S_WAIT;
      end
      S_WAIT: if (rd_valid) begin
        s_d.n_rec = nr;
        s_d.n_bad = nb;
        s_d.st    = enable ? S_REQ : S_IDLE;
        if (s_q.blk == BW'(NBLK - 1)) begin
          s_d.checked[s_q.set] = 1'b1;
          s_d.bad[s_q.set]     = (nb != '0);
          s_d.rec_res[s_q.set] = nr;
          s_d.bad_res[s_q.set] = nb;
          s_d.n_rec = '0;
          s_d.n_bad = '0;
          s_d.blk   = '0;
          s_d.set   = !s_q.set;
          if (nr != '0 || nb != '0) begin
            notify    = 1'b1;
            s_d.alarm = 1'b1;
          end
        end else begin
          s_d.blk = s_q.blk + 1'b1;
        end
      end
      default: s_d.st = S_IDLE;
    endcase
  end

  assign set_checked = s_q.checked;
  assign set_bad     = s_q.bad;
  assign alarm       = s_q.alarm;
  always_comb for (int i = 0; i < 2; i++) begin
    recov_cnt[i] = s_q.rec_res[i];
    bad_cnt[i]   = s_q.bad_res[i];
  end

endmodule
