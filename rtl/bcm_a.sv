// bcm_a: Banked Cell Memory A, the tag / hardblock / softblock bits of every
// grid cell.
//
// Four banks of BANK_DEPTH 3-bit words. Each of the NPORT ports addresses one
// bank; the bank mapping guarantees that the three stage 1 processors, which
// look at three different neighbours of one cell, never address the same bank
// in one cycle, so every bank needs a single read-modify-write port (an
// assertion checks this). Reads are asynchronous: rdata shows the word
// selected by bank/addr in the same cycle; a write (en & we) takes effect at
// the rising clock edge, so a port can read a word and set its softblock bit
// in one cycle as the stage 1 processors do. The port-to-bank crossbar and the
// asynchronous read are this design's choice; the contents and the four-bank
// split follow the published architecture. The memory has no reset: the host
// loads every word before routing.
module bcm_a
  import maze_pkg::*;
#(
  parameter int unsigned NPORT = 3
) (
  input  logic              clk,
  input  logic              en    [NPORT],
  input  logic              we    [NPORT],
  input  logic [1:0]        bank  [NPORT],
  input  logic [ADDR_W-1:0] addr  [NPORT],
  input  bcma_cell_t        wdata [NPORT],
  output bcma_cell_t        rdata [NPORT]
);

  bcma_cell_t mem [4][BANK_DEPTH];

  always_comb begin
    for (int p = 0; p < NPORT; p++) rdata[p] = mem[bank[p]][addr[p]];
  end

  always_ff @(posedge clk) begin
    for (int p = 0; p < NPORT; p++) begin
      if (en[p] && we[p]) mem[bank[p]][addr[p]] <= wdata[p];
    end
  end

  // no two active ports on one bank
  always_ff @(posedge clk) begin
    for (int p = 0; p < NPORT; p++)
      for (int q = p + 1; q < NPORT; q++)
        assert (!(en[p] && en[q] && bank[p] == bank[q]))
          else $error("bcm_a: ports %0d and %0d both address bank %0d", p, q, bank[p]);
  end

endmodule
