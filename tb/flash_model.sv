// flash_model: behavioural model of the board FLASH memory (not
// synthesizable), 32-bit words, 2**AW of them.
//
// A request (req with op, addr, wdata held) is answered after LAT cycles by a
// one-cycle done pulse; read data is on rdata with done. Programming can only
// clear bits, as in a NOR FLASH; erase sets every word of the half of the
// memory (configuration set) holding addr to all ones. Tasks let a testbench
// fill a set with a bitstream and flip bits from 0 to 1 as radiation does.
// Counters record the operations seen.
module flash_model
  import rlbcs_pkg::*;
#(
  parameter int unsigned AW  = 19,
  parameter int unsigned LAT = 2
) (
  input  logic          clk,
  input  logic          req,
  input  flash_op_e     op,
  input  logic [AW-1:0] addr,
  input  flash_word_t   wdata,
  output logic          done,
  output flash_word_t   rdata
);

  logic [31:0] mem [2**AW];
  int unsigned cnt;
  logic        active;
  int unsigned n_read, n_prog, n_erase;

  initial begin
    for (int i = 0; i < 2**AW; i++) mem[i] = '1;
    done = 0; rdata = '0; active = 0; cnt = 0;
    n_read = 0; n_prog = 0; n_erase = 0;
  end

  always @(posedge clk) begin
    done <= 1'b0;
    if (!active) begin
      if (req && !done) begin
        active <= 1'b1;
        cnt    <= 0;
      end
    end else if (cnt + 1 >= LAT) begin
      active <= 1'b0;
      done   <= 1'b1;
      unique case (op)
        FL_READ:  begin rdata <= mem[addr]; n_read++; end
        FL_PROG:  begin mem[addr] = mem[addr] & wdata; n_prog++; end
        default:  begin
          for (int i = 0; i < 2**(AW-1); i++) mem[{addr[AW-1], (AW-1)'(i)}] = '1;
          n_erase++;
        end
      endcase
    end else begin
      cnt <= cnt + 1;
    end
  end

  task automatic fill_set(input int unsigned set, input int unsigned nbits);
    int unsigned nb;
    nb = tb_pkg::ref_blocks(nbits);
    for (int unsigned b = 0; b < nb; b++)
      for (int unsigned k = 0; k < 4; k++)
        mem[{set[0], (AW-1)'(b * 4 + k)}] = tb_pkg::block_word(b, k, nbits);
  endtask

  task automatic flip01(input int unsigned set, input int unsigned word, input logic [31:0] mask);
    mem[{set[0], (AW-1)'(word)}] |= mask;
  endtask

  function automatic logic [31:0] peek(input int unsigned set, input int unsigned word);
    return mem[{set[0], (AW-1)'(word)}];
  endfunction

endmodule
