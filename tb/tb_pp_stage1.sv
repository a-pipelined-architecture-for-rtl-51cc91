// tb_pp_stage1: the three stage 1 processors (IDX = 1, 2, 3) fed with random
// cells over a shadow cell memory held in the testbench. Checks, in expand and
// sweep mode: the direction each pipeline picks, the neighbour descriptor
// (from row/column arithmetic), whether NextCell is nil, the word written
// back into the cell memory, no access for off-grid neighbours, and that a
// stall neither writes nor changes the output register.
// No ports; free-running clock, one random cell per cycle, each result
// checked one cycle later at the registered outputs. The rule under test is
// the published stage 1 program.
module tb_pp_stage1;
  import maze_pkg::*;

  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;
  initial #1 rst_n = 0;

  logic  stall = 0, flush = 0;
  mode_t mode = MODE_EXPAND;
  cell_t cur = '0;
  logic  cur_valid = 0;

  logic              m_en    [3];
  logic              m_we    [3];
  logic [1:0]        m_bank  [3];
  logic [ADDR_W-1:0] m_addr  [3];
  bcma_cell_t        m_wdata [3];
  bcma_cell_t        m_rdata [3];
  cell_t             nxt       [3];
  logic              nxt_valid [3];
  dir_t              nxt_dir   [3];
  dir_t              nxt_pred  [3];

  bcma_cell_t shadow [4][BANK_DEPTH];
  int checks = 0, failures = 0;

  for (genvar p = 0; p < 3; p++) begin : g
    pp_stage1 #(.IDX(p + 1)) dut (
      .clk, .rst_n, .stall, .flush, .mode, .cur, .cur_valid,
      .m_en(m_en[p]), .m_we(m_we[p]), .m_bank(m_bank[p]), .m_addr(m_addr[p]),
      .m_wdata(m_wdata[p]), .m_rdata(m_rdata[p]),
      .nxt(nxt[p]), .nxt_valid(nxt_valid[p]), .nxt_dir(nxt_dir[p]), .nxt_pred(nxt_pred[p])
    );
    assign m_rdata[p] = shadow[m_bank[p]][m_addr[p]];
  end

  always @(posedge clk)
    for (int p = 0; p < 3; p++) if (m_en[p] && m_we[p]) shadow[m_bank[p]][m_addr[p]] <= m_wdata[p];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int dr [4] = '{-1, 1, 0, 0};
    int dc [4] = '{0, 0, 1, -1};
    for (int b = 0; b < 4; b++) for (int a = 0; a < BANK_DEPTH; a++) shadow[b][a] = bcma_cell_t'($urandom);
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 6000; t++) begin
      automatic int r = $urandom % GRID_ROWS;
      automatic int c = $urandom % GRID_COLS;
      automatic dir_t pred = dir_t'($urandom % 4);
      automatic bit stall_now = ($urandom % 8) == 0;
      automatic bcma_cell_t old_w [3];
      automatic bit exp_in [3];
      automatic int nr [3], nc [3];
      automatic cell_t prev_nxt [3];
      automatic bit prev_valid [3];
      mode = (t < 3000) ? MODE_EXPAND : MODE_SWEEP;
      cur = cell_of(ROW_W'(r), COL_W'(c));
      cur.pred = pred;
      cur_valid = ($urandom % 10) != 0;
      stall = stall_now;
      for (int p = 0; p < 3; p++) begin
        automatic int d = (int'(pred) + p + 1) % 4;
        nr[p] = r + dr[d];
        nc[p] = c + dc[d];
        exp_in[p] = nr[p] >= 0 && nr[p] < GRID_ROWS && nc[p] >= 0 && nc[p] < GRID_COLS;
        if (exp_in[p]) old_w[p] = shadow[cell_of(ROW_W'(nr[p]), COL_W'(nc[p])).bank][cell_of(ROW_W'(nr[p]), COL_W'(nc[p])).addr];
        prev_nxt[p] = nxt[p];
        prev_valid[p] = nxt_valid[p];
      end
      @(negedge clk);
      for (int p = 0; p < 3; p++) begin
        automatic int d = (int'(pred) + p + 1) % 4;
        automatic cell_t en;
        automatic bcma_cell_t new_w;
        if (stall_now) begin
          check(nxt_valid[p] == prev_valid[p] && (!prev_valid[p] || nxt[p] == prev_nxt[p]),
                $sformatf("t%0d p%0d output changed during stall", t, p));
          if (exp_in[p]) begin
            en = cell_of(ROW_W'(nr[p]), COL_W'(nc[p]));
            check(shadow[en.bank][en.addr] == old_w[p], $sformatf("t%0d p%0d wrote during stall", t, p));
          end
          continue;
        end
        check(nxt_dir[p] == dir_t'(d), $sformatf("t%0d p%0d dir %0d expected %0d", t, p, nxt_dir[p], d));
        check(nxt_pred[p] == pred, "predecessor passed on");
        if (!cur_valid || !exp_in[p]) begin
          check(!nxt_valid[p], $sformatf("t%0d p%0d NextCell should be nil", t, p));
          continue;
        end
        en = cell_of(ROW_W'(nr[p]), COL_W'(nc[p]));
        new_w = shadow[en.bank][en.addr];
        check(nxt[p].bank == en.bank && nxt[p].addr == en.addr && nxt[p].rowpar == en.rowpar &&
              nxt[p].colpar == en.colpar, $sformatf("t%0d p%0d neighbour descriptor", t, p));
        if (mode == MODE_EXPAND) begin
          check(nxt_valid[p] == !(old_w[p].hblk || old_w[p].sblk),
                $sformatf("t%0d p%0d expand: valid %0d for %b", t, p, nxt_valid[p], old_w[p]));
          check(new_w == '{tag: old_w[p].tag, hblk: old_w[p].hblk, sblk: 1'b1},
                $sformatf("t%0d p%0d expand: wrote %b over %b", t, p, new_w, old_w[p]));
        end else begin
          check(nxt_valid[p] == !(old_w[p].hblk || !old_w[p].sblk),
                $sformatf("t%0d p%0d sweep: valid %0d for %b", t, p, nxt_valid[p], old_w[p]));
          check(new_w == '{tag: 1'b0, hblk: old_w[p].hblk | old_w[p].tag, sblk: 1'b0},
                $sformatf("t%0d p%0d sweep: wrote %b over %b", t, p, new_w, old_w[p]));
        end
        // refresh a little of the memory so both outcomes keep occurring
        shadow[en.bank][en.addr] = bcma_cell_t'($urandom);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
