// tmr_bus_regs: redundant registers written from an external asynchronous
// bus.
//
// The bus has no clock: a write is marked by the rising edge of the active-low
// chip select ncs while the active-low write strobe nwr is low, with the
// address and data stable around that edge. Each register is kept in three
// copies, each copy clocked by that edge and cleared by its own active-low
// asynchronous reset nreset[i] (the three lines are tied together outside the
// chip, which keeps synthesis from merging the copies). The outputs are the
// bitwise 2-of-3 votes. As in the document, a 4-bit register REG1 and an
// 8-bit register REG2 are provided; their addresses and the address width are
// this design's choices. The copies are not refreshed by any clock, so the
// bus master must rewrite the registers periodically to clear accumulated
// upsets. Outputs change right after the ncs edge and are asynchronous to any
// system clock: a user must synchronise them.
module tmr_bus_regs #(
  parameter int unsigned            AW        = 4,
  parameter logic [AW-1:0]          ADDR_REG1 = 'd0,
  parameter logic [AW-1:0]          ADDR_REG2 = 'd1
) (
  input  logic          ncs,      // chip select, active low; rising edge writes
  input  logic          nwr,      // write strobe, active low
  input  logic [AW-1:0] addr,
  input  logic [7:0]    data,
  input  logic [2:0]    nreset,   // one asynchronous reset per copy, active low
  output logic [3:0]    reg1,     // voted REG1
  output logic [7:0]    reg2      // voted REG2
);

  logic [2:0][3:0] reg1_r;
  logic [2:0][7:0] reg2_r;

  for (genvar i = 0; i < 3; i++) begin : g_copy
    logic nrst;
    assign nrst = nreset[i];
    always_ff @(posedge ncs or negedge nrst) begin
      if (!nrst) begin
        reg1_r[i] <= '0;
        reg2_r[i] <= '0;
      end else if (!nwr) begin
        if (addr == ADDR_REG1) reg1_r[i] <= data[3:0];
        if (addr == ADDR_REG2) reg2_r[i] <= data;
      end
    end
  end

  assign reg1 = (reg1_r[0] & reg1_r[1]) | (reg1_r[1] & reg1_r[2]) | (reg1_r[0] & reg1_r[2]);
  assign reg2 = (reg2_r[0] & reg2_r[1]) | (reg2_r[1] & reg2_r[2]) | (reg2_r[0] & reg2_r[2]);

endmodule
