// tb_pp_stage2: random groups of up to three NextCells into the stage 2
// processors (small 12-cell buffers so the buffer-full rule is exercised).
// A model in the testbench orders the non-nil cells straight-ahead first,
// then by increasing (dir - pred) mod 4, and gives them consecutive
// positions from its own Next pointer; it checks positions, banks
// (position mod 3), Num, the full flag and restart of Next, the target
// detection, and that stall and init behave.
// No ports; free-running clock, one group per cycle, results checked at the
// registered outputs. The reference ranking (straight ahead first) is this
// design's reading of the published priority rule.
module tb_pp_stage2;
  import maze_pkg::*;

  localparam int BUF = 12;
  localparam int PW  = $clog2(BUF + 1);

  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;
  initial #1 rst_n = 0;

  logic stall = 0, flush = 0, init = 0, check_target = 1;
  cell_t target = '0;
  cell_t nxt [NPIPE];
  logic  nxt_valid [NPIPE];
  dir_t  nxt_dir [NPIPE];
  dir_t  nxt_pred = DIR_N;
  cell_t s3_cell [NPIPE];
  logic  s3_valid [NPIPE];
  dir_t  s3_dir [NPIPE];
  logic [PW-1:0] s3_pos [NPIPE];
  logic [1:0] s3_bank [NPIPE];
  logic s3_grp, s3_full, s3_target;
  logic [PW-1:0] s3_last;
  logic [1:0] s3_num;

  pp_stage2 #(.BUF_SIZE(BUF)) dut (.*);

  int checks = 0, failures = 0, n_full = 0, n_hit = 0;

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
    int next = 0;
    for (int p = 0; p < NPIPE; p++) begin nxt[p] = '0; nxt_valid[p] = 0; nxt_dir[p] = DIR_N; end
    target = cell_of(6'd5, 6'd7);
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 5000; t++) begin
      automatic dir_t pred = dir_t'($urandom % 4);
      automatic bit st = ($urandom % 10) == 0;
      automatic bit in = ($urandom % 200) == 0;
      automatic int exp_pos [NPIPE];
      automatic int k = 0, num = 0;
      automatic bit hit = 0;
      automatic int order [3];
      nxt_pred = pred;
      stall = st;
      init = in;
      // the other three directions, straight ahead first
      order[0] = int'(pred) ^ 1;
      k = 1;
      for (int i = 1; i < 4; i++) begin
        automatic int d = (int'(pred) + i) % 4;
        if (d != order[0]) begin order[k] = d; k++; end
      end
      for (int p = 0; p < NPIPE; p++) begin
        nxt_dir[p]   = dir_t'((int'(pred) + p + 1) % 4);
        nxt_valid[p] = $urandom % 2;
        nxt[p]       = ($urandom % 20 == 0) ? target : cell_of(ROW_W'($urandom % 5), COL_W'($urandom));
        if (nxt_valid[p]) begin
          num++;
          if (same_cell(nxt[p], target)) hit = 1;
        end
      end
      for (int p = 0; p < NPIPE; p++) begin
        automatic int rank = 0;
        for (int o = 0; o < 3; o++) if (order[o] == int'(nxt_dir[p])) rank = o;
        exp_pos[p] = next;
        for (int q = 0; q < NPIPE; q++) begin
          automatic int rq = 0;
          for (int o = 0; o < 3; o++) if (order[o] == int'(nxt_dir[q])) rq = o;
          if (nxt_valid[q] && rq < rank) exp_pos[p]++;
        end
      end
      @(negedge clk);
      if (in) begin
        check(!s3_grp && !s3_valid[0] && !s3_valid[1] && !s3_valid[2], "init clears the stage");
        next = 0;
      end else if (!st) begin
        automatic bit full = (BUF - (next + num)) < 3;
        check(s3_grp, "group present");
        check(int'(s3_num) == num, $sformatf("t%0d Num %0d expected %0d", t, s3_num, num));
        check(s3_target == hit, $sformatf("t%0d target flag", t));
        check(s3_full == full, $sformatf("t%0d full %0d expected %0d (next %0d num %0d)", t, s3_full, full, next, num));
        check(int'(s3_last) == next + num, "fill after the group");
        for (int p = 0; p < NPIPE; p++) begin
          check(s3_valid[p] == nxt_valid[p] && s3_dir[p] == nxt_dir[p] && s3_cell[p] == nxt[p], "cell passed on");
          if (nxt_valid[p]) begin
            check(int'(s3_pos[p]) == exp_pos[p], $sformatf("t%0d p%0d pos %0d expected %0d (pred %0d)",
                  t, p, s3_pos[p], exp_pos[p], pred));
            check(int'(s3_bank[p]) == exp_pos[p] % 3, "bank = position mod 3");
          end
        end
        n_full += int'(full);
        n_hit  += int'(hit);
        next = full ? 0 : next + num;
      end
    end
    check(n_full > 10 && n_hit > 10, "full buffer and target both seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
