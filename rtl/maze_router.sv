// maze_router: hardware Lee router with three 3-stage pipelines, a banked cell
// memory and a banked queue memory.
//
// The queue read processor (queue_ctrl) takes one cell per cycle from the
// Banked Queue Memory (bqm_mem) and broadcasts it to stage 1 of three
// pipelines. Pipeline i (1..3) looks at the neighbour in direction
// (predecessor + i) mod 4: stage 1 reads and softblocks it in Banked Cell
// Memory A (bcm_a), stage 2 (one block for all three, pp_stage2) checks for the
// target and gives each surviving neighbour a queue position, stage 3 labels
// it with the direction back to its predecessor, enqueues it and writes the
// label into Banked Cell Memory B (bcm_b). Cell memory and queue memory are
// banked so that none of these accesses ever collide: one cell in and up to
// three cells out every cycle. path_ctrl sequences a complete route:
// expansion from the source, path recovery from the target and sweeping.
//
// Interface
//   host port  (hst_*): read/write one grid cell's BCMA bits by (row, col) and
//              read its direction label; only while busy = 0, combinational
//              read, write at the clock edge.
//   start      pulse with src/tgt coordinates while busy = 0; done pulses when
//              the route is finished, path_found/path_len give the result.
//   disk port  (dsk_*): a store for whole queue buffers, kept in first-in
//              first-out order, used when the front wave outgrows the four
//              queue buffers; dsk_clear empties it.
//   ev_*       one-cycle event pulses for monitoring (pipeline stall, queue
//              buffer changes, disk spill and refill).
// The block structure follows the published architecture; ports, host access
// and monitoring outputs are this design's.
// Lint reports rst_n as used both asynchronously and synchronously; the
// clocked use is only the disable condition of assertions in queue_ctrl.
module maze_router
  import maze_pkg::*;
#(
  parameter int unsigned BUF_SIZE = 48,
  localparam int unsigned POS_W = $clog2(BUF_SIZE + 1),
  localparam int unsigned DEPTH = (BUF_SIZE + 2) / 3,
  localparam int unsigned IDX_W = $clog2(DEPTH)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // host access to the grid
  input  logic                  hst_en,
  input  logic                  hst_we,
  input  logic [ROW_W-1:0]      hst_row,
  input  logic [COL_W-1:0]      hst_col,
  input  bcma_cell_t            hst_wdata,
  output bcma_cell_t            hst_rdata,
  output dir_t                  hst_dir,
  // routing command
  input  logic                  start,
  input  logic [ROW_W-1:0]      src_row,
  input  logic [COL_W-1:0]      src_col,
  input  logic [ROW_W-1:0]      tgt_row,
  input  logic [COL_W-1:0]      tgt_col,
  output logic                  busy,
  output logic                  done,
  output logic                  path_found,
  output logic [ROW_W+COL_W:0]  path_len,
  // disk
  output logic                  dsk_clear,
  output logic                  dsk_wr_valid,
  output cell_t                 dsk_wr_data,
  output logic                  dsk_wr_last,
  input  logic                  dsk_wr_ready,
  output logic                  dsk_rd_req,
  input  logic                  dsk_rd_valid,
  input  cell_t                 dsk_rd_data,
  input  logic                  dsk_rd_last,
  // monitoring
  output logic                  ev_stall,
  output logic                  ev_wswitch,
  output logic                  ev_rswitch,
  output logic                  ev_spill,
  output logic                  ev_refill,
  output logic                  ev_defer,
  output logic                  ev_expand   // a cell was broadcast to the pipelines
);

  // ---------------- control ----------------
  mode_t      mode;
  logic       run, init, flush, inj_valid, check_target, empty4, stall;
  cell_t      inj_cell, target;
  logic       found_in;
  logic       p_en, p_we;
  logic [1:0] p_bank, b_bank;
  logic [ADDR_W-1:0] p_addr, b_addr;
  bcma_cell_t p_wdata;
  dir_t       b_rdata;

  // ---------------- queue ----------------
  cell_t            cur;
  logic             cur_valid;
  logic [1:0]       wb;
  logic [1:0]       rbuf, rbank, dwbuf, dwbank, drbuf, drbank;
  logic [IDX_W-1:0] ridx, dwidx, dridx;
  cell_t            rdata, dwdata, drdata;
  logic             dwe;

  // ---------------- pipelines ----------------
  cell_t             s2_in_cell  [NPIPE];
  logic              s2_in_valid [NPIPE];
  dir_t              s2_in_dir   [NPIPE];
  dir_t              s2_in_pred  [NPIPE];
  cell_t             s3_cell  [NPIPE];
  logic              s3_valid [NPIPE];
  dir_t              s3_dir   [NPIPE];
  logic [POS_W-1:0]  s3_pos   [NPIPE];
  logic [1:0]        s3_bank  [NPIPE];
  logic              s3_grp, s3_full, s3_target;
  logic [POS_W-1:0]  s3_last;
  logic [1:0]        s3_num;

  // memory ports
  logic              a_en    [NPIPE];
  logic              a_we    [NPIPE];
  logic [1:0]        a_bank  [NPIPE];
  logic [ADDR_W-1:0] a_addr  [NPIPE];
  bcma_cell_t        a_wdata [NPIPE];
  bcma_cell_t        a_rdata [NPIPE];
  logic              s1_en    [NPIPE];
  logic              s1_we    [NPIPE];
  logic [1:0]        s1_bank  [NPIPE];
  logic [ADDR_W-1:0] s1_addr  [NPIPE];
  bcma_cell_t        s1_wdata [NPIPE];
  logic              q_we   [NPIPE];
  logic [1:0]        q_bank [NPIPE];
  logic [IDX_W-1:0]  q_idx  [NPIPE];
  cell_t             q_data [NPIPE];
  logic              bb_we   [NPIPE];
  logic [1:0]        bb_bank [NPIPE];
  logic [ADDR_W-1:0] bb_addr [NPIPE];
  dir_t              bb_data [NPIPE];

  cell_t hst_cell;
  assign hst_cell = cell_of(hst_row, hst_col);

  path_ctrl u_ctrl (
    .clk, .rst_n, .start, .src_row, .src_col, .tgt_row, .tgt_col,
    .found_in, .empty4, .mode, .run, .init, .flush, .inj_valid, .inj_cell,
    .check_target, .target, .busy, .done, .path_found, .path_len,
    .p_en, .p_we, .p_bank, .p_addr, .p_wdata, .p_rdata(a_rdata[0]),
    .b_bank, .b_addr, .b_rdata
  );

  assign found_in = s3_target && !stall;

  queue_ctrl #(.BUF_SIZE(BUF_SIZE)) u_queue (
    .clk, .rst_n, .init, .run, .flush, .inj_valid, .inj_cell,
    .cur, .cur_valid,
    .grp(s3_grp), .grp_full(s3_full), .grp_last(s3_last),
    .wb, .stall, .empty4,
    .rbuf, .rbank, .ridx, .rdata,
    .dwe, .dwbuf, .dwbank, .dwidx, .dwdata,
    .drbuf, .drbank, .dridx, .drdata,
    .dsk_clear, .dsk_wr_valid, .dsk_wr_data, .dsk_wr_last, .dsk_wr_ready,
    .dsk_rd_req, .dsk_rd_valid, .dsk_rd_data, .dsk_rd_last,
    .ev_wswitch, .ev_rswitch, .ev_spill, .ev_refill, .ev_defer
  );

  bqm_mem #(.BUF_SIZE(BUF_SIZE)) u_bqm (
    .clk, .wbuf(wb), .we(q_we), .wbank(q_bank), .widx(q_idx), .wdata(q_data),
    .dwe, .dwbuf, .dwbank, .dwidx, .dwdata,
    .rbuf, .rbank, .ridx, .rdata,
    .drbuf, .drbank, .dridx, .drdata
  );

  for (genvar p = 0; p < NPIPE; p++) begin : g_pipe
    pp_stage1 #(.IDX(p + 1)) u_s1 (
      .clk, .rst_n, .stall, .flush(flush || init), .mode,
      .cur, .cur_valid,
      .m_en(s1_en[p]), .m_we(s1_we[p]), .m_bank(s1_bank[p]), .m_addr(s1_addr[p]),
      .m_wdata(s1_wdata[p]), .m_rdata(a_rdata[p]),
      .nxt(s2_in_cell[p]), .nxt_valid(s2_in_valid[p]), .nxt_dir(s2_in_dir[p]),
      .nxt_pred(s2_in_pred[p])
    );

    pp_stage3 #(.BUF_SIZE(BUF_SIZE)) u_s3 (
      .hold(stall), .mode, .ncell(s3_cell[p]), .valid(s3_valid[p]), .dir(s3_dir[p]),
      .pos(s3_pos[p]), .bank(s3_bank[p]),
      .q_we(q_we[p]), .q_bank(q_bank[p]), .q_idx(q_idx[p]), .q_data(q_data[p]),
      .b_we(bb_we[p]), .b_bank(bb_bank[p]), .b_addr(bb_addr[p]), .b_data(bb_data[p])
    );
  end

  pp_stage2 #(.BUF_SIZE(BUF_SIZE)) u_s2 (
    .clk, .rst_n, .stall, .flush, .init, .check_target, .target,
    .nxt(s2_in_cell), .nxt_valid(s2_in_valid), .nxt_dir(s2_in_dir), .nxt_pred(s2_in_pred[0]),
    .s3_cell, .s3_valid, .s3_dir, .s3_pos, .s3_bank,
    .s3_grp, .s3_full, .s3_last, .s3_target, .s3_num
  );

  // BCMA port 0 is shared by pipeline 1, the sequencer and the host
  always_comb begin
    for (int p = 0; p < NPIPE; p++) begin
      a_en[p]    = s1_en[p];
      a_we[p]    = s1_we[p];
      a_bank[p]  = s1_bank[p];
      a_addr[p]  = s1_addr[p];
      a_wdata[p] = s1_wdata[p];
    end
    if (p_en) begin
      a_en[0] = 1'b1; a_we[0] = p_we; a_bank[0] = p_bank; a_addr[0] = p_addr; a_wdata[0] = p_wdata;
    end else if (!busy) begin
      a_en[0] = hst_en; a_we[0] = hst_en && hst_we;
      a_bank[0] = hst_cell.bank; a_addr[0] = hst_cell.addr; a_wdata[0] = hst_wdata;
    end
    hst_rdata = a_rdata[0];
  end

  bcm_a #(.NPORT(NPIPE)) u_bcma (
    .clk, .en(a_en), .we(a_we), .bank(a_bank), .addr(a_addr), .wdata(a_wdata), .rdata(a_rdata)
  );

  bcm_b #(.NWR(NPIPE)) u_bcmb (
    .clk, .we(bb_we), .wbank(bb_bank), .waddr(bb_addr), .wdata(bb_data),
    .rbank(busy ? b_bank : hst_cell.bank), .raddr(busy ? b_addr : hst_cell.addr), .rdata(b_rdata)
  );
  assign hst_dir = b_rdata;

  assign ev_stall  = stall;
  assign ev_expand = cur_valid && !stall;

endmodule
