// fpga_cfg_model: behavioural model of the slave-serial configuration port of
// an SRAM FPGA (not synthesizable).
//
// prog_b low clears the device and pulls init_b low; INIT_DLY clock cycles
// after prog_b rises init_b goes high and the device accepts bits on rising
// cclk edges. Each bit is compared with the reference bitstream bit_at(i).
// After CFG_BITS bits done rises, unless a bit was wrong, in which case
// init_b is pulled low as a CRC error. Counters give the completed
// configurations, wrong bits and the bits of the current configuration.
module fpga_cfg_model #(
  parameter int unsigned CFG_BITS = 3_223_488,
  parameter int unsigned INIT_DLY = 10
) (
  input  logic clk,
  input  logic prog_b,
  input  logic cclk,
  input  logic din,
  output logic init_b,
  output logic done
);

  int unsigned bits, errors, n_configs, n_prog, dly;
  logic        clearing, crc_err;

  initial begin
    bits = 0; errors = 0; n_configs = 0; n_prog = 0; dly = 0; done = 0;
    clearing = 0; crc_err = 0;
  end

  assign init_b = !clearing && dly >= INIT_DLY && !crc_err;

  always @(posedge clk) begin
    if (!prog_b) begin
      if (!clearing) n_prog++;
      clearing <= 1'b1;
      dly      <= 0;
    end else begin
      clearing <= 1'b0;
      if (dly < INIT_DLY) dly <= dly + 1;
    end
  end

  always @(posedge cclk or negedge prog_b) begin
    if (!prog_b) begin
      bits    <= 0;
      done    <= 1'b0;
      crc_err <= 1'b0;
    end else if (init_b && !done) begin
      if (din != tb_pkg::bit_at(bits)) begin
        errors++;
        crc_err <= 1'b1;
      end
      if (bits + 1 == CFG_BITS && !crc_err && din == tb_pkg::bit_at(bits)) begin
        done <= 1'b1;
        n_configs++;
      end
      bits <= bits + 1;
    end
  end

endmodule
