// bqm_mem: storage of the Banked Queue Memory.
//
// Four queue buffers, each split into three banks of BUF_SIZE/3 cell
// descriptors; queue position p of a buffer lives in bank p mod 3, word p/3,
// so the up to three cells that stage 3 enqueues in one cycle (consecutive
// positions) land in three different banks. Ports:
//   - NPIPE write ports from stage 3, all into buffer wbuf (asserted to hit
//     different banks);
//   - one write port for a buffer load coming back from the disk;
//   - one read port for the queue read processor;
//   - one read port for a buffer load going out to the disk.
// The disk ports always use a buffer other than the ones the queue read and
// the stage 3 writes use, so no bank sees two accesses of one kind at a time.
// Reads are asynchronous, writes happen at the rising clock edge. The
// buffer/bank organisation follows the published architecture; the port set
// and BUF_SIZE (not given there) are this design's.
module bqm_mem
  import maze_pkg::*;
#(
  parameter int unsigned BUF_SIZE = 48,
  localparam int unsigned DEPTH = (BUF_SIZE + 2) / 3,
  localparam int unsigned IDX_W = $clog2(DEPTH)
) (
  input  logic             clk,
  // stage 3 writes
  input  logic [1:0]       wbuf,
  input  logic             we     [NPIPE],
  input  logic [1:0]       wbank  [NPIPE],
  input  logic [IDX_W-1:0] widx   [NPIPE],
  input  cell_t            wdata  [NPIPE],
  // disk load in
  input  logic             dwe,
  input  logic [1:0]       dwbuf,
  input  logic [1:0]       dwbank,
  input  logic [IDX_W-1:0] dwidx,
  input  cell_t            dwdata,
  // queue read
  input  logic [1:0]       rbuf,
  input  logic [1:0]       rbank,
  input  logic [IDX_W-1:0] ridx,
  output cell_t            rdata,
  // disk load out
  input  logic [1:0]       drbuf,
  input  logic [1:0]       drbank,
  input  logic [IDX_W-1:0] dridx,
  output cell_t            drdata
);

  cell_t mem [4][3][DEPTH];

  assign rdata  = mem[rbuf][rbank][ridx];
  assign drdata = mem[drbuf][drbank][dridx];

  always_ff @(posedge clk) begin
    for (int p = 0; p < NPIPE; p++) begin
      if (we[p]) mem[wbuf][wbank[p]][widx[p]] <= wdata[p];
    end
    if (dwe) mem[dwbuf][dwbank][dwidx] <= dwdata;
  end

  always_ff @(posedge clk) begin
    for (int p = 0; p < NPIPE; p++) begin
      assert (!we[p] || wbank[p] < 2'd3) else $error("bqm_mem: bank %0d out of range", wbank[p]);
      for (int q = p + 1; q < NPIPE; q++)
        assert (!(we[p] && we[q] && wbank[p] == wbank[q]))
          else $error("bqm_mem: write ports %0d and %0d both address bank %0d", p, q, wbank[p]);
    end
    assert (!(dwe && dwbuf == wbuf && (we[0] || we[1] || we[2])))
      else $error("bqm_mem: disk load into the write buffer");
  end

endmodule
