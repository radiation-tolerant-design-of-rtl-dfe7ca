// tb_tmr_ff: checks the triple redundant flip-flop: both resets load init,
// data is captured on the clock edge, an upset in one copy is outvoted and one
// copy's synchronous reset alone does not change the output.
module tb_tmr_ff;
  logic clk = 0, arst_n = 1, init = 1, d = 0, q;
  logic [2:0] rst_n = 3'b111;
  int checks = 0, failures = 0;

  tmr_ff dut (.clk, .arst_n, .rst_n, .init, .d, .q);

  always #5 clk = ~clk;

  task automatic check(input logic exp, input string what);
    checks++;
    if (q !== exp) begin
      failures++;
      $display("FAIL %s: q=%b exp=%b", what, q, exp);
    end
  endtask

  initial begin
    #1 arst_n = 0;
    #1 check(1'b1, "async reset loads init=1");
    arst_n = 1; init = 0;
    #1 arst_n = 0;
    #1 check(1'b0, "async reset loads init=0");
    arst_n = 1;
    for (int i = 0; i < 40; i++) begin
      logic v;
      v = 1'($urandom);
      @(negedge clk) d = v;
      @(posedge clk) #1 check(v, "capture");
    end
    // upset in each single copy is outvoted
    for (int c = 0; c < 3; c++) begin
      @(negedge clk) d = 1;
      @(posedge clk) #1;
      dut.c[c] = 1'b0;
      #1 check(1'b1, "single upset outvoted");
      dut.c[(c + 1) % 3] = 1'b0;
      #1 check(1'b0, "double upset wins");
    end
    // synchronous reset of a single copy
    @(negedge clk) begin d = 1; init = 0; end
    @(posedge clk) #1;
    @(negedge clk) rst_n = 3'b110;
    @(posedge clk) #1 check(1'b1, "one sync reset outvoted");
    @(negedge clk) rst_n = 3'b000;
    @(posedge clk) #1 check(1'b0, "all sync resets");
    rst_n = 3'b111;
    @(posedge clk) #1 check(1'b1, "capture after sync reset");
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
