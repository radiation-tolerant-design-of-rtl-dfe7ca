// cfg_loader: (re)configures an SRAM FPGA from FLASH, with fall-back to the
// second configuration set and to emergency mode.
//
// On `start` the loader picks the preferred set, or the other one when the
// scanner has found the preferred set bad and the other not. It pulls prog_b
// low for PROG_CYC cycles (longer if bits of an aborted attempt are still
// being shifted out), waits for init_b to rise, and then streams the
// set block by block: each block is read and corrected by a
// flash_block_reader and its three 27-bit words are shifted out by a
// cfg_serializer, MSB first, until CFG_BITS bits have been sent (the last word
// is cut short). When all bits are out it waits up to DONE_TO cycles for the
// FPGA's done pin. An unusable block, an init_b or done time-out ends the
// attempt: the loader restarts with the other set, and when both sets have
// failed (or both are known bad) it enters emergency mode if em_enable is set.
// In emergency mode the same bitstream is taken as 27-bit words from the
// em_* stream, which carries data sent over the control link, and shifted out
// the same way. Two stored sets, the fall-back and the emergency mode follow
// the document; the slave-serial pins, the time-outs and the order of
// attempts are this design's choices. All state is in TMR registers.
// Timing: two cycles per bit. The serializer holds one word while the next
// block is read, so with a FLASH read latency of a few cycles the block reads
// hide behind the shifting and a load takes about 2*CFG_BITS cycles.
module cfg_loader
  import rlbcs_pkg::*;
#(
  parameter int unsigned AW       = 19,
  parameter int unsigned CFG_BITS = 3_223_488,
  parameter int unsigned PROG_CYC = 64,       // prog_b low time, cycles
  parameter int unsigned INIT_TO  = 65_535,   // init_b time-out, cycles
  parameter int unsigned DONE_TO  = 65_535,   // done time-out, cycles
  localparam int unsigned NBLK    = blocks_for_bits(CFG_BITS),
  localparam int unsigned BW      = AW - 3,
  localparam int unsigned RW      = $clog2(CFG_BITS + 1),
  localparam int unsigned TW      = $clog2(((INIT_TO > DONE_TO) ? INIT_TO : DONE_TO) + PROG_CYC + 1)
) (
  input  logic          clk,
  input  logic          arst_n,
  input  logic [2:0]    rst_n,
  input  logic          start,       // ignored while busy
  input  logic          pref_set,
  input  logic [1:0]    set_bad,     // sets the scanner found unusable
  input  logic          em_enable,   // emergency mode allowed
  // emergency data stream
  input  logic          em_valid,
  input  cfg_data_t     em_data,
  output logic          em_ready,
  // status
  output logic          busy,
  output logic          emergency,   // current/last load uses emergency mode
  output logic          loaded,      // last load ended with done high
  output logic          failed,      // last load gave up
  output logic          used_set,    // set of the current/last FLASH attempt
  output logic [1:0]    set_failed,  // sets that failed during the last load
  // FPGA slave-serial configuration port
  output logic          prog_b,
  input  logic          init_b,
  input  logic          done,
  output logic          cclk,
  output logic          din,
  // FLASH client port
  output logic          fl_req,
  output flash_op_e     fl_op,
  output logic [AW-1:0] fl_addr,
  output flash_word_t   fl_wdata,
  input  logic          fl_done,
  input  flash_word_t   fl_rdata
);

  typedef enum logic [2:0] {
    L_IDLE, L_PROG, L_INIT, L_FETCH, L_WAITBLK, L_SEND, L_EMSEND, L_DONE
  } lst_e;

  typedef struct packed {
    lst_e                   st;
    logic                   set;
    logic                   em;
    logic [1:0]             tried;
    logic                   loaded;
    logic                   failed;
    logic [BW-1:0]          blk;
    logic [1:0]             widx;
    logic [RW-1:0]          rem;     // bits still to send
    logic [TW-1:0]          tmr;
    logic [BLK_DATA-1:0][DATA_W-1:0] buf_w;
  } st_t;

  st_t s_q, s_d;

  logic          rd_start, rd_valid, rd_busy;
  cfg_data_t     rd_d [BLK_DATA];
  blk_status_e   rd_status;
  logic [BLK_WORDS-1:0] rd_bad_mask;

  logic          ser_valid, ser_ready, ser_idle;
  cfg_data_t     ser_data;
  logic [4:0]    ser_nbits;

  tmr_reg #(.W($bits(st_t))) u_st (
    .clk, .arst_n, .rst_n, .init('0), .d(s_d), .q(s_q)
  );

  flash_block_reader #(.AW(AW)) u_rd (
    .clk, .arst_n, .rst_n,
    .start(rd_start), .base({s_q.set, s_q.blk, 2'b00}),
    .busy(rd_busy), .valid(rd_valid), .d(rd_d), .status(rd_status), .bad_mask(rd_bad_mask),
    .fl_req, .fl_op, .fl_addr, .fl_wdata, .fl_done, .fl_rdata
  );

  cfg_serializer u_ser (
    .clk, .arst_n, .rst_n,
    .in_valid(ser_valid), .in_data(ser_data), .in_nbits(ser_nbits), .in_ready(ser_ready),
    .idle(ser_idle), .cclk, .din
  );

  // Bits of the next word: 27, or what is left.
  assign ser_nbits = (s_q.rem >= RW'(DATA_W)) ? 5'(DATA_W) : 5'(s_q.rem);

  // Begin an attempt: with FLASH set `set`, or in emergency mode.
  function automatic st_t begin_attempt(input st_t s, input logic use_em, input logic set);
    st_t r;
    r      = s;
    r.st   = L_PROG;
    r.em   = use_em;
    r.set  = set;
    r.blk  = '0;
    r.widx = '0;
    r.rem  = RW'(CFG_BITS);
    r.tmr  = '0;
    return r;
  endfunction

  // The current attempt failed: try the other set, then emergency mode.
  function automatic st_t next_attempt(input st_t s);
    st_t r;
    r = s;
    if (!s.em) r.tried[s.set] = 1'b1;
    if (!s.em && !r.tried[!s.set] && !set_bad[!s.set])
      r = begin_attempt(r, 1'b0, !s.set);
    else if (!s.em && em_enable)
      r = begin_attempt(r, 1'b1, s.set);
    else begin
      r.st     = L_IDLE;
      r.failed = 1'b1;
    end
    return r;
  endfunction

  always_comb begin
    s_d       = s_q;
    rd_start  = 1'b0;
    ser_valid = 1'b0;
    ser_data  = s_q.buf_w[s_q.widx];
    em_ready  = 1'b0;
    unique case (s_q.st)
      L_IDLE: if (start) begin
        s_d.tried  = '0;
        s_d.loaded = 1'b0;
        s_d.failed = 1'b0;
        if (set_bad[pref_set] && set_bad[!pref_set])
          s_d = em_enable ? begin_attempt(s_d, 1'b1, pref_set) : s_q;
        else if (set_bad[pref_set])
          s_d = begin_attempt(s_d, 1'b0, !pref_set);
        else
          s_d = begin_attempt(s_d, 1'b0, pref_set);
        if (set_bad[pref_set] && set_bad[!pref_set] && !em_enable) begin
          s_d.failed = 1'b1;
          s_d.loaded = 1'b0;
        end
      end
      L_PROG: begin
        // prog_b stays low until the serializer has dropped any word left
        // over from an aborted attempt, then for PROG_CYC more cycles
        if (ser_idle) s_d.tmr = s_q.tmr + 1'b1;
        if (ser_idle && s_q.tmr == TW'(PROG_CYC - 1)) begin
          s_d.st  = L_INIT;
          s_d.tmr = '0;
        end
      end
      L_INIT: begin
        s_d.tmr = s_q.tmr + 1'b1;
        if (init_b) begin
          s_d.st  = s_q.em ? L_EMSEND : L_FETCH;
          s_d.tmr = '0;
        end else if (s_q.tmr == TW'(INIT_TO)) begin
          s_d = next_attempt(s_q);
        end
      end
      L_FETCH: begin
        rd_start = 1'b1;
        s_d.st   = L_WAITBLK;
      end
      L_WAITBLK: if (rd_valid) begin
        if (rd_status == BLK_BAD) begin
          s_d = next_attempt(s_q);
        end else begin
          for (int i = 0; i < BLK_DATA; i++) s_d.buf_w[i] = rd_d[i];
          s_d.widx = '0;
          s_d.st   = L_SEND;
        end
      end
      L_SEND: begin
        ser_valid = 1'b1;
        if (ser_ready) begin
          s_d.rem  = s_q.rem - RW'(ser_nbits);
          s_d.widx = s_q.widx + 2'd1;
          if (s_q.rem == RW'(ser_nbits)) begin
            s_d.st  = L_DONE;
            s_d.tmr = '0;
          end else if (s_q.widx == 2'(BLK_DATA - 1)) begin
            s_d.blk = s_q.blk + 1'b1;
            s_d.st  = L_FETCH;
          end
        end
      end
      L_EMSEND: begin
        ser_valid = em_valid;
        ser_data  = em_data;
        em_ready  = ser_ready;
        if (ser_ready && em_valid) begin
          s_d.rem = s_q.rem - RW'(ser_nbits);
          if (s_q.rem == RW'(ser_nbits)) begin
            s_d.st  = L_DONE;
            s_d.tmr = '0;
          end
        end
      end
      L_DONE: begin
        if (ser_idle) s_d.tmr = s_q.tmr + 1'b1;
        if (ser_idle && done) begin
          s_d.st     = L_IDLE;
          s_d.loaded = 1'b1;
        end else if (s_q.tmr == TW'(DONE_TO)) begin
          s_d = next_attempt(s_q);
        end
      end
      default: s_d.st = L_IDLE;
    endcase
  end

  assign prog_b     = (s_q.st != L_PROG);
  assign busy       = (s_q.st != L_IDLE);
  assign emergency  = s_q.em;
  assign loaded     = s_q.loaded;
  assign failed     = s_q.failed;
  assign used_set   = s_q.set;
  assign set_failed = s_q.tried;

  initial begin
    assert (NBLK <= 2 ** BW) else $error("cfg_loader: CFG_BITS does not fit in one set of 2**(AW-1) words");
  end

endmodule
