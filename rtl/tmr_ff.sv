// tmr_ff: triple redundant flip-flop with majority voter.
//
// Three flip-flops capture the same input on the rising clock edge and the
// output is their 2-of-3 majority, so an upset in any one copy never reaches
// the output. Each copy has its own active-low synchronous reset line,
// rst_n[i]; the three lines are tied together outside the chip, so a
// synthesis tool cannot prove the copies equal and merge them. An active-low
// asynchronous reset arst_n is shared. Both resets load the value on `init`.
// All of this follows the document's basic redundant flip-flop. Timing: q
// follows d one clock later; reset acts at once (arst_n) or at the next edge
// (rst_n).
module tmr_ff (
  input  logic       clk,
  input  logic       arst_n,   // asynchronous reset, active low
  input  logic [2:0] rst_n,    // one synchronous reset per copy, active low
  input  logic       init,     // value taken on reset
  input  logic       d,
  output logic       q         // voted output
);

  logic [2:0] c;  // the three copies

  for (genvar i = 0; i < 3; i++) begin : g_copy
    always_ff @(posedge clk or negedge arst_n) begin
      if (!arst_n)        c[i] <= init;
      else if (!rst_n[i]) c[i] <= init;
      else                c[i] <= d;
    end
  end

  assign q = (c[2] & c[1]) | (c[1] & c[0]) | (c[2] & c[0]);

endmodule
