// tb_bcm_a: random reads and writes on the three ports of BCMA, each port on
// its own bank per cycle, compared with a shadow array in the testbench.
// Also checks the read-modify-write timing: the read shows the old word in
// the cycle of the write and the new word afterwards.
// No ports; free-running clock, stimulus applied at the falling edge and
// results checked before the next rising edge. The four-bank layout is the
// published one; three ports with an asynchronous read are this design's.
module tb_bcm_a;
  import maze_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  logic              en    [3];
  logic              we    [3];
  logic [1:0]        bank  [3];
  logic [ADDR_W-1:0] addr  [3];
  bcma_cell_t        wdata [3];
  bcma_cell_t        rdata [3];
  bcma_cell_t        shadow [4][BANK_DEPTH];
  int checks = 0, failures = 0;

  bcm_a #(.NPORT(3)) dut (.clk, .en, .we, .bank, .addr, .wdata, .rdata);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < 3; p++) begin en[p] = 0; we[p] = 0; bank[p] = 2'(p); addr[p] = '0; wdata[p] = '0; end
    // fill every word through port 0
    for (int b = 0; b < 4; b++)
      for (int a = 0; a < BANK_DEPTH; a++) begin
        @(negedge clk);
        en[0] = 1; we[0] = 1; bank[0] = 2'(b); addr[0] = ADDR_W'(a);
        wdata[0] = bcma_cell_t'($urandom);
        shadow[b][a] = wdata[0];
      end
    @(negedge clk);
    en[0] = 0; we[0] = 0;
    for (int t = 0; t < 4000; t++) begin
      automatic int perm = $urandom % 4;
      @(negedge clk);
      for (int p = 0; p < 3; p++) begin
        en[p]    = ($urandom % 4) != 0;
        we[p]    = en[p] && ($urandom % 2);
        bank[p]  = 2'((perm + p) % 4);
        addr[p]  = ADDR_W'($urandom % BANK_DEPTH);
        wdata[p] = bcma_cell_t'($urandom);
      end
      #1;
      for (int p = 0; p < 3; p++) begin
        if (en[p]) begin
          checks++;
          if (rdata[p] !== shadow[bank[p]][addr[p]]) begin
            failures++;
            $display("FAIL t%0d port %0d bank %0d addr %0d: %b, expected %b", t, p, bank[p], addr[p],
                     rdata[p], shadow[bank[p]][addr[p]]);
          end
        end
      end
      @(posedge clk);
      for (int p = 0; p < 3; p++) if (en[p] && we[p]) shadow[bank[p]][addr[p]] = wdata[p];
      #1;
      for (int p = 0; p < 3; p++) begin
        if (en[p] && we[p]) begin
          checks++;
          if (rdata[p] !== wdata[p]) begin
            failures++;
            $display("FAIL t%0d port %0d: write not visible after the edge", t, p);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
