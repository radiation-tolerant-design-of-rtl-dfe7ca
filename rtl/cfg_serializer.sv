// cfg_serializer: shifts configuration words into an FPGA's slave-serial
// configuration port.
//
// A word of up to 27 bits is taken with a valid/ready handshake together with
// the number of its bits to send (1..27). Bits go out most significant first,
// starting at bit 26, so a short last word uses its upper bits. Each bit takes
// two clock cycles: din is set while cclk is low, then cclk rises and the FPGA
// samples din. Both pins are driven from TMR registers. A new word is taken in
// the cycle of the last bit of the previous one, so the bit stream has no
// gaps: the configuration clock runs at half the system clock. The serial
// port is this design's choice; the document only says the controller
// reconfigures the FPGA.
module cfg_serializer
  import rlbcs_pkg::*;
(
  input  logic        clk,
  input  logic        arst_n,
  input  logic [2:0]  rst_n,
  input  logic        in_valid,
  input  cfg_data_t   in_data,
  input  logic [4:0]  in_nbits,   // bits of in_data to send, 1..27
  output logic        in_ready,
  output logic        idle,       // nothing in flight
  output logic        cclk,
  output logic        din
);

  typedef struct packed {
    logic       busy;
    logic       ph;     // 0: set data, 1: raise clock
    logic [4:0] cnt;    // bits left in the shift register
    cfg_data_t  sh;
    logic       cclk;
    logic       din;
  } st_t;

  st_t s_q, s_d;

  tmr_reg #(.W($bits(st_t))) u_st (
    .clk, .arst_n, .rst_n, .init('0), .d(s_d), .q(s_q)
  );

  always_comb begin
    s_d      = s_q;
    in_ready = !s_q.busy || (s_q.ph && s_q.cnt == 5'd1);
    if (s_q.busy) begin
      if (!s_q.ph) begin
        s_d.din  = s_q.sh[DATA_W-1];
        s_d.cclk = 1'b0;
        s_d.ph   = 1'b1;
      end else begin
        s_d.cclk = 1'b1;
        s_d.sh   = s_q.sh << 1;
        s_d.cnt  = s_q.cnt - 5'd1;
        s_d.ph   = 1'b0;
        if (s_q.cnt == 5'd1) s_d.busy = 1'b0;
      end
    end else begin
      s_d.cclk = 1'b0;
    end
    if (in_ready && in_valid && in_nbits != '0) begin
      s_d.busy = 1'b1;
      s_d.ph   = 1'b0;
      s_d.sh   = in_data;
      s_d.cnt  = in_nbits;
    end
  end

  assign cclk = s_q.cclk;
  assign din  = s_q.din;
  assign idle = !s_q.busy;

endmodule
