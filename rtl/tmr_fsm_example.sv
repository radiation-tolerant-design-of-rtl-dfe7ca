// tmr_fsm_example: the example redundant state machine of the RLBCS coding
// style.
//
// The state and the registered output rout1 live in external tmr_reg
// instances; a single combinational process computes their next values, with
// the default assignment looping the voted outputs back so that every clock
// rewrites all three copies. The sequence is IDLE -(in1)-> S1 -> S2 -> S3 ->
// S4 -> IDLE. Leaving IDLE sets rout1 to 2'b10 and pulses out2; S2 pulses
// out2 again; S4 clears rout1. out2 is combinational (a Mealy output in IDLE,
// a Moore output in S2). The document prints this machine as a coding example;
// its S3 branch is read here as moving on to S4, since S4 is otherwise
// unreachable. Timing: one state per clock once in1 has been seen in IDLE.
module tmr_fsm_example (
  input  logic       clk,
  input  logic       arst_n,   // asynchronous reset, active low
  input  logic [2:0] rst_n,    // per-copy synchronous resets, active low
  input  logic       in1,      // start request, synchronous to clk
  output logic [1:0] rout1,    // registered output
  output logic       out2,     // combinational output
  output logic [2:0] state     // voted state, for observation
);

  typedef enum logic [2:0] {
    ST_IDLE = 3'd0, ST_1 = 3'd1, ST_2 = 3'd2, ST_3 = 3'd3, ST_4 = 3'd4
  } st_e;

  logic [2:0] state_d, state_q;
  logic [1:0] rout1_d, rout1_q;

  tmr_reg #(.W(3)) u_state (
    .clk, .arst_n, .rst_n, .init(3'(ST_IDLE)), .d(state_d), .q(state_q)
  );
  tmr_reg #(.W(2)) u_rout1 (
    .clk, .arst_n, .rst_n, .init(2'b00), .d(rout1_d), .q(rout1_q)
  );

  always_comb begin
    out2    = 1'b0;
    state_d = state_q;   // loop-back refreshes the redundant copies
    rout1_d = rout1_q;
    unique case (st_e'(state_q))
      ST_IDLE: if (in1) begin
        state_d = 3'(ST_1);
        rout1_d = 2'b10;
        out2    = 1'b1;
      end
      ST_1: begin
        rout1_d = 2'b10;
        state_d = 3'(ST_2);
      end
      ST_2: begin
        state_d = 3'(ST_3);
        out2    = 1'b1;
      end
      ST_3: state_d = 3'(ST_4);
      ST_4: begin
        rout1_d = 2'b00;
        state_d = 3'(ST_IDLE);
      end
      default: state_d = 3'(ST_IDLE);  // illegal code: recover to idle
    endcase
  end

  assign rout1 = rout1_q;
  assign state = state_q;

endmodule
