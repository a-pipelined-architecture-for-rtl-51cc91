// tb_bcm_b: random label writes through the three write ports (distinct banks
// per cycle) and reads through the read port, compared with a shadow array.
// No ports; free-running clock, stimulus at the falling edge. The four-bank
// layout is the published one; the separate read port is this design's.
module tb_bcm_b;
  import maze_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  logic              we    [3];
  logic [1:0]        wbank [3];
  logic [ADDR_W-1:0] waddr [3];
  dir_t              wdata [3];
  logic [1:0]        rbank;
  logic [ADDR_W-1:0] raddr;
  dir_t              rdata;
  dir_t              shadow [4][BANK_DEPTH];
  bit                known  [4][BANK_DEPTH];
  int checks = 0, failures = 0;

  bcm_b #(.NWR(3)) dut (.clk, .we, .wbank, .waddr, .wdata, .rbank, .raddr, .rdata);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int b = 0; b < 4; b++) for (int a = 0; a < BANK_DEPTH; a++) known[b][a] = 0;
    for (int p = 0; p < 3; p++) begin we[p] = 0; wbank[p] = 2'(p); waddr[p] = '0; wdata[p] = DIR_N; end
    rbank = '0; raddr = '0;
    for (int t = 0; t < 6000; t++) begin
      automatic int perm = $urandom % 4;
      @(negedge clk);
      for (int p = 0; p < 3; p++) begin
        we[p]    = ($urandom % 3) != 0;
        wbank[p] = 2'((perm + p) % 4);
        waddr[p] = ADDR_W'($urandom % 64);
        wdata[p] = dir_t'($urandom % 4);
      end
      rbank = 2'($urandom % 4);
      raddr = ADDR_W'($urandom % 64);
      #1;
      if (known[rbank][raddr]) begin
        checks++;
        if (rdata !== shadow[rbank][raddr]) begin
          failures++;
          $display("FAIL t%0d bank %0d addr %0d: %0d expected %0d", t, rbank, raddr, rdata,
                   shadow[rbank][raddr]);
        end
      end
      @(posedge clk);
      for (int p = 0; p < 3; p++)
        if (we[p]) begin
          shadow[wbank[p]][waddr[p]] = wdata[p];
          known[wbank[p]][waddr[p]] = 1;
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
