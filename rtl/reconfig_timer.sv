// reconfig_timer: requests the periodic reconfiguration of an SRAM FPGA.
//
// A prescaler divides the system clock by PRESCALE to make a tick (one second
// at the assumed 40 MHz clock); after `period` ticks a one-cycle `req` pulse
// is given and counting starts again. A period of zero or a low `enable`
// stops the timer and clears it. Both counters are TMR registers. The
// document requires periodic reconfiguration but gives no interval; the
// 8-bit period in seconds is this design's choice.
module reconfig_timer #(
  parameter int unsigned PRESCALE = 40_000_000,
  localparam int unsigned PW = (PRESCALE > 1) ? $clog2(PRESCALE) : 1
) (
  input  logic       clk,
  input  logic       arst_n,
  input  logic [2:0] rst_n,
  input  logic       enable,
  input  logic [7:0] period,   // ticks between requests, 0 = off
  output logic       req
);

  typedef struct packed {
    logic [PW-1:0] pre;
    logic [7:0]    cnt;
  } st_t;

  st_t s_q, s_d;

  tmr_reg #(.W($bits(st_t))) u_st (
    .clk, .arst_n, .rst_n, .init('0), .d(s_d), .q(s_q)
  );

  always_comb begin
    s_d = s_q;
    req = 1'b0;
    if (!enable || period == '0) begin
      s_d = '0;
    end else if (s_q.pre == PW'(PRESCALE - 1)) begin
      s_d.pre = '0;
      if (s_q.cnt + 8'd1 >= period) begin
        s_d.cnt = '0;
        req     = 1'b1;
      end else begin
        s_d.cnt = s_q.cnt + 8'd1;
      end
    end else begin
      s_d.pre = s_q.pre + 1'b1;
    end
  end

endmodule
