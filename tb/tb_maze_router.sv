// tb_maze_router: end-to-end test of the maze router at its default size
// (64 x 64 grid, 48-cell queue buffers).
//
// It loads a grid with random obstacles through the host port, routes a
// series of wires and checks each against a breadth-first search written in
// the testbench: a path must be found exactly when one exists, its length
// must be the shortest distance + 1, and afterwards every softblock and tag
// bit must be clear and exactly the cells of one connected shortest path from
// source to target must have become hardblocked. Later wires must route
// around earlier ones. It also counts the mechanisms of the design (target
// reached, no path, pipeline stall, write/read buffer changes, disk spill and
// refill, read change deferred for a write change) and fails for any that
// never occurred. The disk model is slowed down so that stalls happen.
// Throughput: at most one cell leaves the queue per cycle, and every cycle
// without an expansion must be explained by a stall, a read-buffer change, a
// wait for a disk load, an empty queue or the path walk, within a small fixed
// overhead per route (the rate of one expanded cell per clock).
// No ports; runs the top with its default parameters. The expected results
// come from Lee's algorithm itself (shortest path, labels, sweep clean-up);
// the host and disk interfaces it drives are this design's.
module tb_maze_router;
  import maze_pkg::*;

  localparam int R = GRID_ROWS;
  localparam int C = GRID_COLS;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = ~clk;

  logic hst_en = 0, hst_we = 0;
  logic [ROW_W-1:0] hst_row = '0;
  logic [COL_W-1:0] hst_col = '0;
  bcma_cell_t hst_wdata = '0, hst_rdata;
  dir_t hst_dir;
  logic start = 0;
  logic [ROW_W-1:0] src_row = '0, tgt_row = '0;
  logic [COL_W-1:0] src_col = '0, tgt_col = '0;
  logic busy, done, path_found;
  logic [ROW_W+COL_W:0] path_len;
  logic dsk_clear, dsk_wr_valid, dsk_wr_last, dsk_wr_ready, dsk_rd_req, dsk_rd_valid, dsk_rd_last;
  cell_t dsk_wr_data, dsk_rd_data;
  logic ev_stall, ev_wswitch, ev_rswitch, ev_spill, ev_refill, ev_defer, ev_expand;
  int loads_stored;

  maze_router dut (.*);

  disk_model #(.WR_WAIT(3), .RD_LATENCY(10)) u_disk (
    .clk, .clear(dsk_clear), .wr_valid(dsk_wr_valid), .wr_data(dsk_wr_data),
    .wr_last(dsk_wr_last), .wr_ready(dsk_wr_ready), .rd_req(dsk_rd_req),
    .rd_valid(dsk_rd_valid), .rd_data(dsk_rd_data), .rd_last(dsk_rd_last),
    .loads_stored(loads_stored)
  );

  int checks = 0, failures = 0;
  int n_found = 0, n_nopath = 0, n_stall = 0, n_wsw = 0, n_rsw = 0;
  int n_spill = 0, n_refill = 0, n_defer = 0, n_expand = 0, n_rdwait = 0, n_qempty = 0;

  always @(posedge clk) begin
    if (rst_n) begin
      n_stall  += int'(ev_stall);
      n_wsw    += int'(ev_wswitch);
      n_rsw    += int'(ev_rswitch);
      n_spill  += int'(ev_spill);
      n_refill += int'(ev_refill);
      n_defer  += int'(ev_defer);
      n_expand += int'(ev_expand);
      n_rdwait += int'(dut.u_queue.run && !dut.u_queue.rb_v && !ev_stall);
      n_qempty += int'(dut.u_queue.run && dut.u_queue.rd_empty && !ev_stall);
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // reference grid
  bit hard [R][C];

  function automatic int bfs_dist(int sr, int sc, int tr, int tc);
    int dst [R][C];
    int qr [R*C];
    int qc [R*C];
    int h = 0, t = 0;
    int dr [4] = '{-1, 1, 0, 0};
    int dc [4] = '{0, 0, 1, -1};
    for (int i = 0; i < R; i++) for (int j = 0; j < C; j++) dst[i][j] = -1;
    dst[sr][sc] = 0; qr[t] = sr; qc[t] = sc; t++;
    while (h < t) begin
      int r = qr[h], c = qc[h];
      h++;
      for (int d = 0; d < 4; d++) begin
        int nr = r + dr[d], nc = c + dc[d];
        if (nr >= 0 && nr < R && nc >= 0 && nc < C && !hard[nr][nc] && dst[nr][nc] < 0) begin
          dst[nr][nc] = dst[r][c] + 1;
          qr[t] = nr; qc[t] = nc; t++;
        end
      end
    end
    return dst[tr][tc];
  endfunction

  task automatic host_write(int r, int c, bcma_cell_t v);
    @(negedge clk);
    hst_en = 1; hst_we = 1; hst_row = ROW_W'(r); hst_col = COL_W'(c); hst_wdata = v;
    @(negedge clk);
    hst_en = 0; hst_we = 0;
  endtask

  task automatic load_grid(int density_pct);
    @(negedge clk);
    for (int i = 0; i < R; i++)
      for (int j = 0; j < C; j++) begin
        hard[i][j] = ($urandom % 100) < density_pct;
        hst_en = 1; hst_we = 1; hst_row = ROW_W'(i); hst_col = COL_W'(j);
        hst_wdata = '{tag: 1'b0, hblk: hard[i][j], sblk: 1'b0};
        @(negedge clk);
      end
    hst_en = 0; hst_we = 0;
  endtask

  // after a route: compare the grid with the reference
  task automatic check_grid(int sr, int sc, int tr, int tc, bit found, int len);
    bit path [R][C];
    int npath = 0, bad_bits = 0, bad_old = 0;
    @(negedge clk);
    for (int i = 0; i < R; i++)
      for (int j = 0; j < C; j++) begin
        hst_en = 1; hst_we = 0; hst_row = ROW_W'(i); hst_col = COL_W'(j);
        #1;
        path[i][j] = 1'b0;
        if (hst_rdata.tag) bad_bits++;
        if (hst_rdata.sblk && !hst_rdata.hblk) bad_bits++;
        if (hard[i][j] && !hst_rdata.hblk) bad_old++;
        if (!hard[i][j] && hst_rdata.hblk) begin
          path[i][j] = 1'b1;
          npath++;
        end
        @(negedge clk);
      end
    hst_en = 0;
    check(bad_bits == 0, $sformatf("tag/softblock left set on %0d cells", bad_bits));
    check(bad_old == 0, $sformatf("%0d hardblocks lost", bad_old));
    if (found) begin
      int d;
      check(npath == len, $sformatf("path cells %0d, path_len %0d", npath, len));
      check(path[sr][sc] && path[tr][tc], "source and target on the wire");
      // the new hardblocks must connect S to T along a path of len cells
      for (int i = 0; i < R; i++) for (int j = 0; j < C; j++) hard[i][j] = !path[i][j];
      d = bfs_dist(sr, sc, tr, tc);
      check(d == len - 1, $sformatf("wire connects S and T in %0d steps, expected %0d", d, len - 1));
      for (int i = 0; i < R; i++) for (int j = 0; j < C; j++) hard[i][j] = 1'b0;
      // reference now: old blocks plus the wire
      for (int i = 0; i < R; i++) for (int j = 0; j < C; j++) begin
        hst_en = 1; hst_row = ROW_W'(i); hst_col = COL_W'(j);
        #1;
        hard[i][j] = hst_rdata.hblk;
        @(negedge clk);
      end
      hst_en = 0;
    end else begin
      check(npath == 0, "no cell hardblocked without a path");
    end
  endtask

  task automatic route(int sr, int sc, int tr, int tc);
    int ref_d, cyc = 0, exp0, stl0, rsw0, dfr0, wait0, qe0, idle;
    hard[sr][sc] = 1'b0;
    hard[tr][tc] = 1'b0;
    host_write(sr, sc, '{tag: 1'b0, hblk: 1'b0, sblk: 1'b0});
    host_write(tr, tc, '{tag: 1'b0, hblk: 1'b0, sblk: 1'b0});
    ref_d = bfs_dist(sr, sc, tr, tc);
    exp0 = n_expand; stl0 = n_stall; rsw0 = n_rsw; dfr0 = n_defer; wait0 = n_rdwait; qe0 = n_qempty;
    @(negedge clk);
    src_row = ROW_W'(sr); src_col = COL_W'(sc); tgt_row = ROW_W'(tr); tgt_col = COL_W'(tc);
    start = 1;
    @(negedge clk);
    start = 0;
    while (!done) begin
      @(negedge clk);
      cyc++;
    end
    $display("route (%0d,%0d)->(%0d,%0d): ref %0d, found %0d len %0d, %0d cycles, %0d cells expanded",
             sr, sc, tr, tc, ref_d, path_found, path_len, cyc, n_expand - exp0);
    check(path_found == (ref_d >= 0), "path found exactly when one exists");
    if (ref_d >= 0) begin
      n_found++;
      check(int'(path_len) == ref_d + 1, $sformatf("path_len %0d, shortest %0d", path_len, ref_d + 1));
    end else begin
      n_nopath++;
    end
    // one cell per cycle at most is taken from the queue
    check(n_expand - exp0 <= cyc, "at most one cell expanded per cycle");
    // and one per cycle at least, apart from stalls, buffer changes, waits
    // for a disk load, cycles with an empty queue (cells still in flight),
    // the path walk and a fixed per-phase overhead
    idle = cyc - (n_expand - exp0) - (n_stall - stl0) - int'(path_len);
    $display("  idle %0d: buffer changes %0d, deferred %0d, disk waits %0d, queue empty %0d",
             idle, n_rsw - rsw0, n_defer - dfr0, n_rdwait - wait0, n_qempty - qe0);
    check(idle <= (n_rsw - rsw0) + (n_defer - dfr0) + (n_rdwait - wait0) + (n_qempty - qe0) + 16,
          $sformatf("%0d idle cycles, more than the overhead allows", idle));
    check_grid(sr, sc, tr, tc, path_found, int'(path_len));
  endtask

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    load_grid(20);
    route(32, 32, 2, 60);
    route(31, 33, 60, 3);
    route(0, 0, 63, 63);
    route(10, 50, 50, 10);
    // a target walled in on all four sides: no path
    for (int d = 0; d < 4; d++) begin
      automatic int r = 20 + (d == 0 ? -1 : d == 1 ? 1 : 0);
      automatic int c = 20 + (d == 2 ? 1 : d == 3 ? -1 : 0);
      hard[r][c] = 1'b1;
      host_write(r, c, '{tag: 1'b0, hblk: 1'b1, sblk: 1'b0});
    end
    route(40, 45, 20, 20);
    // an open grid: wide front waves
    load_grid(0);
    route(32, 31, 0, 63);
    route(33, 31, 63, 0);

    $display("mechanisms: found=%0d nopath=%0d stall=%0d wswitch=%0d rswitch=%0d spill=%0d refill=%0d defer=%0d disk_loads=%0d",
             n_found, n_nopath, n_stall, n_wsw, n_rsw, n_spill, n_refill, n_defer, loads_stored);
    check(n_found > 0, "target reached at least once");
    check(n_nopath > 0, "no-path termination at least once");
    check(n_stall > 0, "pipeline stall at least once");
    check(n_wsw > 0, "write buffer change at least once");
    check(n_rsw > 0, "read buffer change at least once");
    check(n_spill > 0, "disk spill at least once");
    check(n_refill > 0, "disk refill at least once");
    check(n_defer > 0, "deferred read buffer change at least once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
