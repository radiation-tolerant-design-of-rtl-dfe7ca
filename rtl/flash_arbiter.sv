// flash_arbiter: shares the single FLASH port of a controller between several
// clients (programmer, loader, scanner).
//
// Every client uses the same request protocol: it raises req with op, addr
// and wdata and holds them until done pulses for one cycle, after which it
// may drop req or present the next request. The arbiter grants the
// lowest-numbered requesting client, keeps the grant until the FLASH returns
// done, and then re-arbitrates, so one word transfer is never interrupted.
// Read data is broadcast; only the owner sees done. The grant state is held
// in TMR registers. Timing: one idle cycle between consecutive transfers.
// The document does not describe this part; fixed priority is this design's
// choice.
module flash_arbiter
  import rlbcs_pkg::*;
#(
  parameter int unsigned N  = 3,
  parameter int unsigned AW = 19
) (
  input  logic        clk,
  input  logic        arst_n,
  input  logic [2:0]  rst_n,
  // clients
  input  logic        c_req   [N],
  input  flash_op_e   c_op    [N],
  input  logic [AW-1:0] c_addr [N],
  input  flash_word_t c_wdata [N],
  output logic        c_done  [N],
  // FLASH side
  output logic        fl_req,
  output flash_op_e   fl_op,
  output logic [AW-1:0] fl_addr,
  output flash_word_t fl_wdata,
  input  logic        fl_done
);

  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;

  typedef struct packed {
    logic          busy;
    logic [IW-1:0] owner;
  } st_t;

  st_t s_q, s_d;

  tmr_reg #(.W($bits(st_t))) u_st (
    .clk, .arst_n, .rst_n, .init('0), .d(s_d), .q(s_q)
  );

  always_comb begin
    s_d = s_q;
    if (!s_q.busy) begin
      for (int i = N - 1; i >= 0; i--)
        if (c_req[i]) begin
          s_d.busy  = 1'b1;
          s_d.owner = IW'(i);
        end
    end else if (fl_done) begin
      s_d.busy = 1'b0;
    end
  end

  always_comb begin
    fl_req   = s_q.busy && c_req[s_q.owner];
    fl_op    = c_op[s_q.owner];
    fl_addr  = c_addr[s_q.owner];
    fl_wdata = c_wdata[s_q.owner];
    for (int i = 0; i < N; i++) c_done[i] = fl_done && s_q.busy && (s_q.owner == IW'(i));
  end

endmodule
