// pp_stage1: stage 1 of pipeline IDX (1..3) of the pipelined processor.
//
// Each cycle it receives the cell broadcast by the queue read processor
// (cur/cur_valid; cur_valid = 0 is the nil cell). It examines the neighbour in
// direction dir = (direction to predecessor + IDX) mod 4, so the three
// pipelines cover the three neighbours that are not the predecessor without
// consulting each other. The neighbour's descriptor comes from
// neighbor_table; its BCMA word is read and rewritten in the same cycle
// through this stage's memory port.
//   expand mode: NextCell is the neighbour unless hardblock = 1 or softblock
//                was already 1; softblock is set to 1 whatever was read.
//   sweep mode:  the roles of softblock 0 and 1 are swapped (NextCell unless
//                hardblock = 1 or softblock was 0); softblock is cleared and a
//                tagged cell loses its tag and becomes hardblocked.
// A neighbour outside the grid is treated as blocked and not accessed (this
// design's choice). NextCell, dir and the predecessor direction are
// registered towards stage 2. While stall is high nothing is written and the
// output register holds; flush clears its valid bit.
// The direction rule, the blocking test and the softblock update follow the
// published stage 1 program; the pipeline register, stall and flush are
// this design's additions.
module pp_stage1
  import maze_pkg::*;
#(
  parameter int unsigned IDX = 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              stall,
  input  logic              flush,
  input  mode_t             mode,
  input  cell_t             cur,
  input  logic              cur_valid,
  // BCMA port
  output logic              m_en,
  output logic              m_we,
  output logic [1:0]        m_bank,
  output logic [ADDR_W-1:0] m_addr,
  output bcma_cell_t        m_wdata,
  input  bcma_cell_t        m_rdata,
  // to stage 2
  output cell_t             nxt,
  output logic              nxt_valid,
  output dir_t              nxt_dir,
  output dir_t              nxt_pred
);

  dir_t  dir;
  cell_t nb;
  logic  in_grid;
  logic  blocked;

  assign dir = dir_t'(2'(cur.pred + 2'(IDX)));

  neighbor_table u_tab (
    .cur    (cur),
    .dir    (dir),
    .nb     (nb),
    .in_grid(in_grid)
  );

  always_comb begin
    m_en   = cur_valid && in_grid;
    m_we   = m_en && !stall;
    m_bank = nb.bank;
    m_addr = nb.addr;
    if (mode == MODE_EXPAND) begin
      blocked = m_rdata.hblk || m_rdata.sblk;
      m_wdata = '{tag: m_rdata.tag, hblk: m_rdata.hblk, sblk: 1'b1};
    end else begin
      blocked = m_rdata.hblk || !m_rdata.sblk;
      m_wdata = '{tag: 1'b0, hblk: m_rdata.hblk || m_rdata.tag, sblk: 1'b0};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      nxt       <= '0;
      nxt_valid <= 1'b0;
      nxt_dir   <= DIR_N;
      nxt_pred  <= DIR_N;
    end else if (flush) begin
      nxt_valid <= 1'b0;
    end else if (!stall) begin
      nxt       <= nb;
      nxt_valid <= m_en && !blocked;
      nxt_dir   <= dir;
      nxt_pred  <= cur.pred;
    end
  end

endmodule
