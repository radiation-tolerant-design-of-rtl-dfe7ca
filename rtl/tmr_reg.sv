// tmr_reg: multi-bit register built from triple redundant flip-flops.
//
// W instances of tmr_ff share the clock and resets; q is the bitwise 2-of-3
// vote. This is the register used for every state variable, counter and
// control register of the RLBCS controllers: the logic around it is written
// as a combinational process whose default assignment loops q back to d, so
// each clock rewrites all three copies with the voted value and a single
// upset is scrubbed within one cycle. The document describes such components
// for words and integers; here one parameterised module serves both.
// Timing: q follows d one clock later; init is loaded on either reset.
module tmr_reg #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         arst_n,   // asynchronous reset, active low
  input  logic [2:0]   rst_n,    // one synchronous reset per copy, active low
  input  logic [W-1:0] init,     // value taken on reset
  input  logic [W-1:0] d,
  output logic [W-1:0] q         // voted output
);

  for (genvar b = 0; b < W; b++) begin : g_bit
    tmr_ff u_ff (
      .clk   (clk),
      .arst_n(arst_n),
      .rst_n (rst_n),
      .init  (init[b]),
      .d     (d[b]),
      .q     (q[b])
    );
  end

endmodule
