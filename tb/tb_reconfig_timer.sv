// tb_reconfig_timer: with a prescaler of 4 and a period of 3 ticks the timer
// must request reconfiguration every 12 cycles; period 0 or enable low must
// stop it.
module tb_reconfig_timer;
  logic clk = 0, arst_n = 0, enable = 0, req;
  logic [2:0] rst_n = 3'b111;
  logic [7:0] period = 0;
  int checks = 0, failures = 0;
  int n_req = 0, last = -1, cyc = 0;

  reconfig_timer #(.PRESCALE(4)) dut (.clk, .arst_n, .rst_n, .enable, .period, .req);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc++;
    if (req) begin
      if (last >= 0) begin
        checks++;
        if (cyc - last != 12) begin
          failures++;
          $display("FAIL request interval %0d, expected 12", cyc - last);
        end
      end
      last = cyc;
      n_req++;
    end
  end

  initial begin
    #2 arst_n = 1;
    enable = 1; period = 0;
    repeat (50) @(posedge clk);
    checks++;
    if (n_req != 0) begin failures++; $display("FAIL request with period 0"); end
    @(negedge clk) period = 3;
    repeat (12 * 10 + 2) @(posedge clk);
    checks++;
    if (n_req != 10) begin failures++; $display("FAIL %0d requests, expected 10", n_req); end
    @(negedge clk) begin enable = 0; n_req = 0; last = -1; end
    repeat (60) @(posedge clk);
    checks++;
    if (n_req != 0) begin failures++; $display("FAIL request while disabled"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
