// tb_neighbor_table: exhaustive check of the neighbour lookup.
// For every grid cell and direction the result is compared with the bank
// mapping and address formula evaluated directly on (row, col) of the
// neighbour; off-grid neighbours must be flagged. It also checks that the
// four neighbours of every interior cell lie in four different banks, and
// that the source/target formula reproduces the published 8 x 8 bank map.
// No ports and no clock: the lookup is combinational and is sampled 1 time
// unit after each input change. The mapping rule and the 8 x 8 example are
// the published ones; the off-grid flag is this design's.
module tb_neighbor_table;
  import maze_pkg::*;

  cell_t cur, nb;
  dir_t  dir;
  logic  in_grid;
  int checks = 0, failures = 0;

  neighbor_table dut (.cur, .dir, .nb, .in_grid);

  function automatic int ref_bank(int i, int j);
    return (i % 4 == 0 || i % 4 == 3) ? j % 4 : (j + 2) % 4;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    static int dr [4] = '{-1, 1, 0, 0};
    static int dc [4] = '{0, 0, 1, -1};
    // Bank numbers of the 8 x 8 example grid, row by row (the same pattern
    // repeats every four rows and columns on any grid size).
    static int ex8 [8][8] = '{'{0,1,2,3,0,1,2,3}, '{2,3,0,1,2,3,0,1},
                       '{2,3,0,1,2,3,0,1}, '{0,1,2,3,0,1,2,3},
                       '{0,1,2,3,0,1,2,3}, '{2,3,0,1,2,3,0,1},
                       '{2,3,0,1,2,3,0,1}, '{0,1,2,3,0,1,2,3}};
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 8; j++) begin
        checks++;
        if (cell_of(ROW_W'(i), COL_W'(j)).bank != 2'(ex8[i][j])) begin
          failures++;
          $display("FAIL: example grid (%0d,%0d) bank %0d, expected %0d", i, j,
                   cell_of(ROW_W'(i), COL_W'(j)).bank, ex8[i][j]);
        end
      end
    for (int i = 0; i < GRID_ROWS; i++)
      for (int j = 0; j < GRID_COLS; j++) begin
        automatic bit [3:0] banks_seen = 4'b0;
        automatic int n_in = 0;
        for (int d = 0; d < 4; d++) begin
          automatic int ni = i + dr[d], nj = j + dc[d];
          automatic bit exp_in = ni >= 0 && ni < GRID_ROWS && nj >= 0 && nj < GRID_COLS;
          cur.rowpar = 1'(i % 2);
          cur.colpar = 2'(j % 4);
          cur.pred   = dir_t'($urandom % 4);
          cur.bank   = 2'(ref_bank(i, j));
          cur.addr   = ADDR_W'(i * (GRID_COLS / 4) + j / 4);
          dir = dir_t'(d);
          #1;
          checks++;
          if (in_grid !== exp_in) begin
            failures++;
            $display("FAIL (%0d,%0d) dir %0d: in_grid %0d", i, j, d, in_grid);
          end
          if (exp_in) begin
            checks++;
            n_in++;
            banks_seen[nb.bank] = 1'b1;
            if (nb.rowpar !== 1'(ni % 2) || nb.colpar !== 2'(nj % 4) ||
                nb.bank !== 2'(ref_bank(ni, nj)) ||
                nb.addr !== ADDR_W'(ni * (GRID_COLS / 4) + nj / 4) ||
                nb.pred !== dir_t'(d ^ 1)) begin
              failures++;
              $display("FAIL (%0d,%0d) dir %0d: got rp%0d cp%0d b%0d a%0d p%0d", i, j, d,
                       nb.rowpar, nb.colpar, nb.bank, nb.addr, nb.pred);
            end
          end
        end
        if (n_in == 4) begin
          checks++;
          if (banks_seen != 4'hf) begin
            failures++;
            $display("FAIL (%0d,%0d): neighbours share a bank", i, j);
          end
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
