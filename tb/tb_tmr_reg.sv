// tb_tmr_reg: checks the multi-bit TMR register: reset value, capture of
// random words and outvoting of random single-copy upsets in every bit.
module tb_tmr_reg;
  localparam int W = 12;
  logic clk = 0, arst_n = 1;
  logic [2:0] rst_n = 3'b111;
  logic [W-1:0] init = 12'hA5C, d = '0, q;
  int checks = 0, failures = 0;

  tmr_reg #(.W(W)) dut (.clk, .arst_n, .rst_n, .init, .d, .q);

  always #5 clk = ~clk;

  task automatic check(input logic [W-1:0] exp, input string what);
    checks++;
    if (q !== exp) begin
      failures++;
      $display("FAIL %s: q=%h exp=%h", what, q, exp);
    end
  endtask

  initial begin
    #1 arst_n = 0;
    #1 check(12'hA5C, "async reset value");
    arst_n = 1;
    for (int i = 0; i < 50; i++) begin
      logic [W-1:0] v;
      v = W'($urandom);
      @(negedge clk) d = v;
      @(posedge clk) #1 check(v, "capture");
    end
    @(negedge clk) d = 12'h3C5;
    @(posedge clk) #1;
    // upset one copy of several bits (different copies per bit)
    dut.g_bit[0].u_ff.c[0] = ~dut.g_bit[0].u_ff.c[0];
    dut.g_bit[3].u_ff.c[1] = ~dut.g_bit[3].u_ff.c[1];
    dut.g_bit[7].u_ff.c[2] = ~dut.g_bit[7].u_ff.c[2];
    dut.g_bit[11].u_ff.c[0] = ~dut.g_bit[11].u_ff.c[0];
    #1 check(12'h3C5, "single upsets outvoted");
    dut.g_bit[4].u_ff.c[0] = ~dut.g_bit[4].u_ff.c[0];
    dut.g_bit[4].u_ff.c[2] = ~dut.g_bit[4].u_ff.c[2];
    #1 check(12'h3C5 ^ 12'h010, "double upset in bit 4 wins");
    @(negedge clk) rst_n = 3'b000;
    @(posedge clk) #1 check(12'hA5C, "synchronous reset");
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
