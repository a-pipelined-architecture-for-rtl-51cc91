// bcm_b: Banked Cell Memory B, the 2-bit direction label of every grid cell.
//
// Four banks of BANK_DEPTH words. The three stage 3 processors write the
// labels of the cells they enqueue through NWR write ports; as in BCMA, the
// cells written in one cycle are neighbours of one cell and so lie in
// different banks (asserted). One asynchronous read port serves path recovery
// and the host. Writes take effect at the rising clock edge. Contents and
// banking follow the published architecture; the port arrangement is this
// design's choice. No reset: a label is read only after it was written.
module bcm_b
  import maze_pkg::*;
#(
  parameter int unsigned NWR = 3
) (
  input  logic              clk,
  input  logic              we      [NWR],
  input  logic [1:0]        wbank   [NWR],
  input  logic [ADDR_W-1:0] waddr   [NWR],
  input  dir_t              wdata   [NWR],
  input  logic [1:0]        rbank,
  input  logic [ADDR_W-1:0] raddr,
  output dir_t              rdata
);

  dir_t mem [4][BANK_DEPTH];

  assign rdata = mem[rbank][raddr];

  always_ff @(posedge clk) begin
    for (int p = 0; p < NWR; p++) begin
      if (we[p]) mem[wbank[p]][waddr[p]] <= wdata[p];
    end
  end

  always_ff @(posedge clk) begin
    for (int p = 0; p < NWR; p++)
      for (int q = p + 1; q < NWR; q++)
        assert (!(we[p] && we[q] && wbank[p] == wbank[q]))
          else $error("bcm_b: write ports %0d and %0d both address bank %0d", p, q, wbank[p]);
  end

endmodule
