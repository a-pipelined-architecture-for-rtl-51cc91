// tb_path_ctrl: the phase sequencer against cell-memory models in the
// testbench. A route is played with a hand-made label chain from the target
// back to the source; the test checks the source initialisation write, the
// two injections (predecessor N then S), the expansion controls, the flush on
// reaching the target, the cell-by-cell path recovery (tag bits set exactly
// on the chain, path_len), the sweep set-up (source tag turned into
// hardblock) and the done pulse. A second route ends by an empty queue and
// must report no path and tag nothing.
// No ports; free-running clock, the memory models answer combinationally.
// The phase order (expand, recover, sweep) is the published one; injecting
// the source twice and the start/done handshake are this design's.
module tb_path_ctrl;
  import maze_pkg::*;

  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;
  initial #1 rst_n = 0;

  logic start = 0;
  logic [ROW_W-1:0] src_row = '0, tgt_row = '0;
  logic [COL_W-1:0] src_col = '0, tgt_col = '0;
  logic found_in = 0, empty4 = 0;
  mode_t mode;
  logic run, init, flush, inj_valid, check_target, busy, done, path_found;
  cell_t inj_cell, target;
  logic [ROW_W+COL_W:0] path_len;
  logic p_en, p_we;
  logic [1:0] p_bank, b_bank;
  logic [ADDR_W-1:0] p_addr, b_addr;
  bcma_cell_t p_wdata, p_rdata;
  dir_t b_rdata;

  path_ctrl dut (.*);

  bcma_cell_t amem [4][BANK_DEPTH];
  dir_t       bmem [4][BANK_DEPTH];
  assign p_rdata = amem[p_bank][p_addr];
  assign b_rdata = bmem[b_bank][b_addr];
  always @(posedge clk) if (p_en && p_we) amem[p_bank][p_addr] <= p_wdata;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic bcma_cell_t rd(int r, int c);
    cell_t x = cell_of(ROW_W'(r), COL_W'(c));
    return amem[x.bank][x.addr];
  endfunction

  task automatic label(int r, int c, dir_t d);
    cell_t x = cell_of(ROW_W'(r), COL_W'(c));
    bmem[x.bank][x.addr] = d;
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // path from target (12,13) back to source (10,10):
    // (12,13) W-> (12,12) W-> (12,11) W-> (12,10) N-> (11,10) N-> (10,10)
    int pr [6] = '{12, 12, 12, 12, 11, 10};
    int pc [6] = '{13, 12, 11, 10, 10, 10};
    for (int b = 0; b < 4; b++) for (int a = 0; a < BANK_DEPTH; a++) begin
      amem[b][a] = '0;
      bmem[b][a] = DIR_E;
    end
    label(12, 13, DIR_W); label(12, 12, DIR_W); label(12, 11, DIR_W);
    label(12, 10, DIR_N); label(11, 10, DIR_N);
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    src_row = 10; src_col = 10; tgt_row = 12; tgt_col = 13;
    start = 1;
    @(negedge clk);
    start = 0;
    // E_INIT
    check(busy && init && mode == MODE_EXPAND && p_en && p_we, "expansion set-up cycle");
    check(p_bank == cell_of(10, 10).bank && p_addr == cell_of(10, 10).addr, "source addressed");
    @(negedge clk);
    check(rd(10, 10).sblk, "source softblocked");
    check(inj_valid && inj_cell.pred == DIR_N && same_cell(inj_cell, cell_of(10, 10)), "first injection");
    check(same_cell(target, cell_of(12, 13)) && check_target, "target set");
    @(negedge clk);
    check(inj_valid && inj_cell.pred == DIR_S, "second injection");
    @(negedge clk);
    check(run && !inj_valid && check_target && !init, "expansion running");
    repeat (5) @(negedge clk);
    found_in = 1;
    #1;
    check(flush, "flush when the target reaches stage 3");
    @(negedge clk);
    found_in = 0;
    // recovery: one cell per cycle
    for (int k = 0; k < 6; k++) begin
      check(p_en && p_we && !run && p_bank == cell_of(ROW_W'(pr[k]), COL_W'(pc[k])).bank &&
            p_addr == cell_of(ROW_W'(pr[k]), COL_W'(pc[k])).addr,
            $sformatf("recovery step %0d at (%0d,%0d)", k, pr[k], pc[k]));
      @(negedge clk);
    end
    for (int k = 0; k < 6; k++) check(rd(pr[k], pc[k]).tag, $sformatf("tag on (%0d,%0d)", pr[k], pc[k]));
    check(!rd(12, 14).tag && !rd(11, 11).tag, "no tag off the path");
    check(path_found && path_len == 6, $sformatf("path_len %0d", path_len));
    // sweep set-up
    check(init && mode == MODE_SWEEP, "sweep set-up cycle");
    @(negedge clk);
    check(rd(10, 10) == '{tag: 1'b0, hblk: 1'b1, sblk: 1'b0}, "source tag turned into hardblock");
    check(inj_valid && mode == MODE_SWEEP && inj_cell.pred == DIR_N, "sweep injection 1");
    @(negedge clk);
    check(inj_valid && inj_cell.pred == DIR_S, "sweep injection 2");
    @(negedge clk);
    check(run && !check_target && mode == MODE_SWEEP, "sweep running");
    repeat (3) @(negedge clk);
    empty4 = 1;
    @(negedge clk);
    empty4 = 0;
    check(busy && !run, "finishing");
    @(negedge clk);
    check(done && !busy && path_found && path_len == 6, "done pulse with result");
    @(negedge clk);
    check(!done, "done is one cycle");

    // second route: queue runs empty, no path
    src_row = 30; src_col = 30; tgt_row = 40; tgt_col = 41;
    start = 1;
    @(negedge clk);
    start = 0;
    repeat (6) @(negedge clk);
    empty4 = 1;
    @(negedge clk);
    empty4 = 0;
    check(init && mode == MODE_SWEEP, "no path: straight to sweeping");
    repeat (4) @(negedge clk);
    empty4 = 1;
    @(negedge clk);
    empty4 = 0;
    @(negedge clk);
    check(done && !path_found && path_len == 0, "no path reported");
    check(!rd(30, 30).tag && !rd(30, 30).hblk && !rd(30, 30).sblk, "source left free");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
