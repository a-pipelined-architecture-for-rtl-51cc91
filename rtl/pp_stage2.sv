// pp_stage2: the three stage 2 processors of the pipelined processor.
//
// From the three stage 1 results of one broadcast cell it
//  - reports when a NextCell is the target cell (only while check_target),
//  - sets the shared flag of each direction whose NextCell is not nil,
//  - reads Num (number of set flags) and each processor's Priority from the
//    priority table for the predecessor direction, and
//  - computes Position = Next + Priority and Bank = Position mod 3, so that the
//    up to three new cells occupy consecutive queue positions, one per BQM
//    bank; Next then advances by Num.
// Priority follows the rule that expansion should continue in the direction
// of the current wire: the straight-ahead neighbour (opposite of the
// predecessor) gets the lowest position, then the other two in pipeline
// order; Priority is the number of set flags ranked ahead. That ranking is
// this design's reading of the table. Next is the write pointer of the current
// write buffer: when the group leaves fewer than 3 free places
// (BUF_SIZE - (Next+Num) < 3) the buffer is full, grp_full tells the queue to
// change write buffer and Next restarts at 0. All results are registered
// towards stage 3 (one cycle). stall holds everything; flush clears the
// valid bits; init resets Next.
module pp_stage2
  import maze_pkg::*;
#(
  parameter int unsigned BUF_SIZE = 48,
  localparam int unsigned POS_W = $clog2(BUF_SIZE + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             stall,
  input  logic             flush,
  input  logic             init,
  input  logic             check_target,
  input  cell_t            target,
  // from stage 1
  input  cell_t            nxt       [NPIPE],
  input  logic             nxt_valid [NPIPE],
  input  dir_t             nxt_dir   [NPIPE],
  input  dir_t             nxt_pred,
  // to stage 3
  output cell_t            s3_cell   [NPIPE],
  output logic             s3_valid  [NPIPE],
  output dir_t             s3_dir    [NPIPE],
  output logic [POS_W-1:0] s3_pos    [NPIPE],
  output logic [1:0]       s3_bank   [NPIPE],
  output logic             s3_grp,       // a group (possibly empty) is in stage 3
  output logic             s3_full,      // write buffer is full after this group
  output logic [POS_W-1:0] s3_last,      // write buffer fill after this group
  output logic             s3_target,    // this group holds the target cell
  output logic [1:0]       s3_num
);

  logic [POS_W-1:0] next_q;
  logic [3:0]       flag;            // indexed by dir_t
  logic [1:0]       prio [4];        // priority table row, indexed by dir_t
  logic [1:0]       num;
  logic [POS_W-1:0] pos  [NPIPE];
  logic [POS_W-1:0] next_sum;
  logic             full;
  logic             hit;

  // rank 0 = straight ahead, then (pred+1), (pred+2), (pred+3) skipping it
  function automatic logic [1:0] rank_of(dir_t pred, dir_t d);
    logic [1:0] i;
    i = 2'(d - pred);
    if (d == opposite(pred)) return 2'd0;
    else if (2'(opposite(pred) - pred) < i) return i - 2'd1;
    else return i;
  endfunction

  always_comb begin
    flag = '0;
    hit  = 1'b0;
    for (int p = 0; p < NPIPE; p++) begin
      if (nxt_valid[p]) begin
        flag[nxt_dir[p]] = 1'b1;
        if (check_target && same_cell(nxt[p], target)) hit = 1'b1;
      end
    end
    // priority table for the predecessor direction
    num = 2'd0;
    for (int d = 0; d < 4; d++) begin
      prio[d] = 2'd0;
      if (flag[d]) num = num + 2'd1;
      for (int e = 0; e < 4; e++)
        if (flag[e] && rank_of(nxt_pred, dir_t'(e)) < rank_of(nxt_pred, dir_t'(d)))
          prio[d] = prio[d] + 2'd1;
    end
    for (int p = 0; p < NPIPE; p++) pos[p] = next_q + POS_W'(prio[nxt_dir[p]]);
    next_sum = next_q + POS_W'(num);
    full     = (POS_W'(BUF_SIZE) - next_sum) < POS_W'(3);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      next_q    <= '0;
      s3_grp    <= 1'b0;
      s3_full   <= 1'b0;
      s3_last   <= '0;
      s3_target <= 1'b0;
      s3_num    <= '0;
      for (int p = 0; p < NPIPE; p++) begin
        s3_cell[p]  <= '0;
        s3_valid[p] <= 1'b0;
        s3_dir[p]   <= DIR_N;
        s3_pos[p]   <= '0;
        s3_bank[p]  <= '0;
      end
    end else if (init || flush) begin
      if (init) next_q <= '0;
      s3_grp    <= 1'b0;
      s3_full   <= 1'b0;
      s3_target <= 1'b0;
      s3_num    <= '0;
      for (int p = 0; p < NPIPE; p++) s3_valid[p] <= 1'b0;
    end else if (!stall) begin
      next_q    <= full ? '0 : next_sum;
      s3_grp    <= 1'b1;
      s3_full   <= full;
      s3_last   <= next_sum;
      s3_target <= hit;
      s3_num    <= num;
      for (int p = 0; p < NPIPE; p++) begin
        s3_cell[p]  <= nxt[p];
        s3_valid[p] <= nxt_valid[p];
        s3_dir[p]   <= nxt_dir[p];
        s3_pos[p]   <= pos[p];
        s3_bank[p]  <= 2'(pos[p] % POS_W'(3));
      end
    end
  end

endmodule
