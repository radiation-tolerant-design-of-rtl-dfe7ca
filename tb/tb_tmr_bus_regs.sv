// tb_tmr_bus_regs: writes the two registers over the asynchronous bus
// (rising edge of ncs with nwr low), checks that reads, other addresses and
// cycles with nwr high leave them alone, that an upset in one copy is
// outvoted, and that the per-copy resets clear them.
module tb_tmr_bus_regs;
  logic ncs = 1, nwr = 1;
  logic [3:0] addr = 0;
  logic [7:0] data = 0, reg2;
  logic [3:0] reg1;
  logic [2:0] nreset = 3'b111;
  logic [3:0] exp1 = 0;
  logic [7:0] exp2 = 0;
  int checks = 0, failures = 0;

  tmr_bus_regs dut (.ncs, .nwr, .addr, .data, .nreset, .reg1, .reg2);

  task automatic bus_cycle(input logic wr, input logic [3:0] a, input logic [7:0] v);
    #3 addr = a; data = v; nwr = !wr;
    #3 ncs = 0;
    #5 ncs = 1;
    #3 nwr = 1;
  endtask

  task automatic check(input string what);
    checks++;
    if (reg1 !== exp1 || reg2 !== exp2) begin
      failures++;
      $display("FAIL %s: reg1=%h reg2=%h exp %h %h", what, reg1, reg2, exp1, exp2);
    end
  endtask

  initial begin
    #1 nreset = 3'b000;
    #1 check("reset");
    nreset = 3'b111;
    for (int i = 0; i < 40; i++) begin
      logic [3:0] a;
      logic [7:0] v;
      logic       w;
      a = 4'($urandom_range(0, 3));
      v = 8'($urandom);
      w = 1'($urandom);
      bus_cycle(w, a, v);
      if (w && a == 0) exp1 = v[3:0];
      if (w && a == 1) exp2 = v;
      check("bus cycle");
    end
    bus_cycle(1, 0, 8'h0B); exp1 = 4'hB;
    bus_cycle(1, 1, 8'h6D); exp2 = 8'h6D;
    check("known values");
    dut.reg2_r[1] = 8'h00;
    dut.reg1_r[0] = 4'h0;
    #1 check("single-copy upsets outvoted");
    // periodic rewrite clears the upsets
    bus_cycle(1, 0, 8'h0B);
    bus_cycle(1, 1, 8'h6D);
    checks++;
    if (dut.reg2_r[1] !== 8'h6D || dut.reg1_r[0] !== 4'hB) begin
      failures++;
      $display("FAIL rewrite did not refresh the copies");
    end
    nreset = 3'b011;
    #1 check("one copy reset outvoted");
    nreset = 3'b000;
    #1 exp1 = 0; exp2 = 0; check("all copies reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
