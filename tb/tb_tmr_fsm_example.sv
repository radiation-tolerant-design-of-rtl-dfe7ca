// tb_tmr_fsm_example: runs the example state machine through its sequence,
// checks rout1/out2 in every state, and checks that an upset in one copy of
// the state register is outvoted and scrubbed by the loop-back.
module tb_tmr_fsm_example;
  logic clk = 0, arst_n = 1, in1 = 0, out2;
  logic [2:0] rst_n = 3'b111, state;
  logic [1:0] rout1;
  int checks = 0, failures = 0;

  tmr_fsm_example dut (.clk, .arst_n, .rst_n, .in1, .rout1, .out2, .state);

  always #5 clk = ~clk;

  task automatic check(input logic [2:0] st, input logic [1:0] r, input logic o2, input string what);
    checks++;
    if (state !== st || rout1 !== r || out2 !== o2) begin
      failures++;
      $display("FAIL %s: state=%0d rout1=%b out2=%b exp %0d %b %b", what, state, rout1, out2, st, r, o2);
    end
  endtask

  initial begin
    #1 arst_n = 0;
    #1 arst_n = 1;
    @(negedge clk) check(0, 2'b00, 0, "idle");
    @(negedge clk) check(0, 2'b00, 0, "idle holds without in1");
    in1 = 1; #1 check(0, 2'b00, 1, "idle with in1: out2 pulses");
    @(negedge clk) in1 = 0; check(1, 2'b10, 0, "S1");
    @(negedge clk) check(2, 2'b10, 1, "S2: out2");
    @(negedge clk) check(3, 2'b10, 0, "S3");
    @(negedge clk) check(4, 2'b10, 0, "S4");
    @(negedge clk) check(0, 2'b00, 0, "back to idle, rout1 cleared");
    // second run with an upset in the state register
    in1 = 1;
    @(negedge clk) in1 = 0; check(1, 2'b10, 0, "S1 again");
    dut.u_state.g_bit[1].u_ff.c[2] = 1'b1;   // copy 2 now says 3
    #1 check(1, 2'b10, 0, "upset outvoted");
    @(negedge clk) check(2, 2'b10, 1, "S2 after upset");
    checks++;
    if (dut.u_state.g_bit[1].u_ff.c !== 3'b111) begin
      failures++;
      $display("FAIL scrub: copies %b", dut.u_state.g_bit[1].u_ff.c);
    end
    @(negedge clk) check(3, 2'b10, 0, "S3");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
