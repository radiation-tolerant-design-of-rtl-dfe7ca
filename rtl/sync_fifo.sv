// sync_fifo: single-clock first-in first-out buffer.
//
// DEPTH words of W bits in a plain memory array; the read and write pointers
// and the fill count are kept in TMR registers. A word is written when
// wr_valid and wr_ready, and removed when rd_en and rd_valid; rd_data shows
// the oldest word without delay. DEPTH must be a power of two.
module sync_fifo #(
  parameter int unsigned W     = 27,
  parameter int unsigned DEPTH = 16
) (
  input  logic         clk,
  input  logic         arst_n,
  input  logic [2:0]   rst_n,
  input  logic         wr_valid,
  input  logic [W-1:0] wr_data,
  output logic         wr_ready,
  input  logic         rd_en,
  output logic         rd_valid,
  output logic [W-1:0] rd_data,
  output logic [$clog2(DEPTH):0] count
);

  localparam int unsigned PW = $clog2(DEPTH);

  typedef struct packed {
    logic [PW-1:0] wp;
    logic [PW-1:0] rp;
    logic [PW:0]   n;
  } st_t;

  st_t s_q, s_d;
  logic [W-1:0] mem [DEPTH];
  logic do_wr, do_rd;

  tmr_reg #(.W($bits(st_t))) u_st (
    .clk, .arst_n, .rst_n, .init('0), .d(s_d), .q(s_q)
  );

  assign wr_ready = (s_q.n != (PW+1)'(DEPTH));
  assign rd_valid = (s_q.n != '0);
  assign do_wr    = wr_valid && wr_ready;
  assign do_rd    = rd_en && rd_valid;
  assign rd_data  = mem[s_q.rp];
  assign count    = s_q.n;

  always_comb begin
    s_d = s_q;
    if (do_wr) s_d.wp = s_q.wp + 1'b1;
    if (do_rd) s_d.rp = s_q.rp + 1'b1;
    s_d.n = s_q.n + (PW+1)'(do_wr) - (PW+1)'(do_rd);
  end

  always_ff @(posedge clk) if (do_wr) mem[s_q.wp] <= wr_data;

endmodule
