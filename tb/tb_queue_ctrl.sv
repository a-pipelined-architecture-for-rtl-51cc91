// tb_queue_ctrl: the queue read processor and buffer manager with the queue
// memory and a slow disk model, using 9-cell buffers. The testbench plays
// stage 3: each cycle it enqueues a random group of 0..3 numbered cells at
// consecutive positions of the write buffer, with the same buffer-full rule
// as stage 2, and holds the group while stall is high. Phases of heavy
// writing (the queue grows past the four buffers and spills to the disk)
// alternate with phases of light writing (the queue drains and the loads
// come back). Checks: every cell comes out exactly once and in the order
// written, at most one per cycle; injected cells are broadcast; empty4 rises
// exactly when the queue has been empty for four cycles; spills, refills,
// stalls and buffer changes all occur.
// No ports; free-running clock, one group per cycle. Write-first arbitration
// and the empty-four-cycles rule are published; the buffer ordering under
// test is this design's.
module tb_queue_ctrl;
  import maze_pkg::*;

  localparam int BUF = 9;
  localparam int PW  = $clog2(BUF + 1);
  localparam int D   = (BUF + 2) / 3;
  localparam int IW  = $clog2(D);

  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;
  initial #1 rst_n = 0;

  logic init = 0, run = 0, flush = 0, inj_valid = 0;
  cell_t inj_cell = '0, cur;
  logic cur_valid;
  logic grp = 0, grp_full = 0;
  logic [PW-1:0] grp_last = '0;
  logic [1:0] wb;
  logic stall, empty4;
  logic [1:0] rbuf, rbank, dwbuf, dwbank, drbuf, drbank;
  logic [IW-1:0] ridx, dwidx, dridx;
  cell_t rdata, dwdata, drdata;
  logic dwe;
  logic dsk_clear, dsk_wr_valid, dsk_wr_last, dsk_wr_ready, dsk_rd_req, dsk_rd_valid, dsk_rd_last;
  cell_t dsk_wr_data, dsk_rd_data;
  logic ev_wswitch, ev_rswitch, ev_spill, ev_refill, ev_defer;
  int loads_stored;

  logic we [NPIPE];
  logic [1:0] wbank [NPIPE];
  logic [IW-1:0] widx [NPIPE];
  cell_t wdata [NPIPE];

  queue_ctrl #(.BUF_SIZE(BUF)) dut (.*);

  bqm_mem #(.BUF_SIZE(BUF)) u_mem (
    .clk, .wbuf(wb), .we, .wbank, .widx, .wdata,
    .dwe, .dwbuf, .dwbank, .dwidx, .dwdata,
    .rbuf, .rbank, .ridx, .rdata, .drbuf, .drbank, .dridx, .drdata
  );

  disk_model #(.WR_WAIT(1), .RD_LATENCY(6)) u_disk (
    .clk, .clear(dsk_clear), .wr_valid(dsk_wr_valid), .wr_data(dsk_wr_data),
    .wr_last(dsk_wr_last), .wr_ready(dsk_wr_ready), .rd_req(dsk_rd_req),
    .rd_valid(dsk_rd_valid), .rd_data(dsk_rd_data), .rd_last(dsk_rd_last),
    .loads_stored(loads_stored)
  );

  int checks = 0, failures = 0;
  int n_spill = 0, n_refill = 0, n_stall = 0, n_wsw = 0, n_rsw = 0;
  int sent = 0, recv = 0, next = 0, empty_run = 0;
  int heavy = 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic cell_t tagcell(int n);
    cell_t c = '0;
    c.addr = ADDR_W'(n);
    c.bank = 2'(n >> ADDR_W);
    return c;
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // producer (stage 3 stand-in), updated after each clock edge
  int gk = 0;
  task automatic new_group();
    gk = (heavy != 0) ? ($urandom % 4) : (($urandom % 6 == 0) ? 1 : 0);
    if (sent + gk > 3000) gk = 0;
    grp = 1;
    grp_last = PW'(next + gk);
    grp_full = (BUF - (next + gk)) < 3;
    for (int p = 0; p < NPIPE; p++) begin
      we[p] = 0; wbank[p] = '0; widx[p] = '0; wdata[p] = '0;
    end
    for (int p = 0; p < gk; p++) begin
      we[p] = 1;
      wbank[p] = 2'((next + p) % 3);
      widx[p] = IW'((next + p) / 3);
      wdata[p] = tagcell(sent + p);
    end
  endtask

  always @(posedge clk) begin
    if (rst_n && !init) begin
      n_spill  += int'(ev_spill);
      n_refill += int'(ev_refill);
      n_stall  += int'(stall);
      n_wsw    += int'(ev_wswitch);
      n_rsw    += int'(ev_rswitch);
    end
  end

  initial begin
    for (int p = 0; p < NPIPE; p++) begin we[p] = 0; wbank[p] = '0; widx[p] = '0; wdata[p] = '0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    init = 1;
    @(negedge clk);
    init = 0;
    // injection
    inj_valid = 1; inj_cell = tagcell(4095); run = 1;
    @(negedge clk);
    inj_valid = 0;
    check(cur_valid && cur == tagcell(4095), "injected cell broadcast");
    new_group();
    for (int t = 0; t < 60000 && !(empty4 && sent >= 3000); t++) begin
      // stall is decided combinationally on the group being offered
      #1;
      begin
        automatic bit st = stall;
        automatic bit was_empty = !cur_valid;
        @(posedge clk);
        if (!st) begin
          sent += gk;
          next = grp_full ? 0 : next + gk;
        end
        #1;
        if (!st) begin
          if (cur_valid) begin
            check(cur == tagcell(recv), $sformatf("cell %0d out of order (addr %0d)", recv, cur.addr));
            recv++;
            empty_run = 0;
          end
        end
        if ((t / 400) % 2 == 0) heavy = 1; else heavy = 0;
        if (!st) new_group();
      end
      @(negedge clk);
    end
    grp = 0;
    check(sent == 3000 && recv == sent, $sformatf("sent %0d received %0d", sent, recv));
    check(empty4, "empty4 after the queue ran dry");
    $display("spill=%0d refill=%0d stall=%0d wswitch=%0d rswitch=%0d", n_spill, n_refill, n_stall, n_wsw, n_rsw);
    check(n_spill > 0 && n_refill > 0, "disk used");
    check(n_stall > 0, "stall occurred");
    check(n_wsw > 0 && n_rsw > 0, "buffer changes occurred");
    // empty4 timing: reset, then exactly four empty cycles
    init = 1; @(negedge clk); init = 0;
    for (int k = 1; k <= 5; k++) begin
      @(negedge clk);
      check(empty4 == (k >= 4), $sformatf("empty4 after %0d empty cycles = %0d", k, empty4));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
