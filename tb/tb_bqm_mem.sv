// tb_bqm_mem: random writes through the three stage 3 ports (distinct banks,
// one buffer) and the disk-in port (another buffer), checked through both
// read ports against a shadow copy.
// No ports; free-running clock, one random transaction per cycle. Three banks
// per buffer and four buffers are the published layout; the disk-side ports
// are this design's.
module tb_bqm_mem;
  import maze_pkg::*;

  localparam int BUF = 48;
  localparam int D   = (BUF + 2) / 3;
  localparam int IW  = $clog2(D);

  logic clk = 0;
  always #5 clk = ~clk;

  logic [1:0] wbuf;
  logic we [NPIPE];
  logic [1:0] wbank [NPIPE];
  logic [IW-1:0] widx [NPIPE];
  cell_t wdata [NPIPE];
  logic dwe;
  logic [1:0] dwbuf, dwbank, rbuf, rbank, drbuf, drbank;
  logic [IW-1:0] dwidx, ridx, dridx;
  cell_t dwdata, rdata, drdata;

  bqm_mem #(.BUF_SIZE(BUF)) dut (.*);

  cell_t shadow [4][3][D];
  bit    known  [4][3][D];
  int checks = 0, failures = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Quiet the write ports before the first clock edge.
    for (int p = 0; p < NPIPE; p++) we[p] = 1'b0;
    dwe = 1'b0;
    for (int b = 0; b < 4; b++) for (int k = 0; k < 3; k++) for (int i = 0; i < D; i++) known[b][k][i] = 0;
    for (int t = 0; t < 5000; t++) begin
      automatic int rot = $urandom % 3;
      @(negedge clk);
      wbuf = 2'($urandom % 4);
      for (int p = 0; p < NPIPE; p++) begin
        we[p] = $urandom % 2;
        wbank[p] = 2'((p + rot) % 3);
        widx[p] = IW'($urandom % D);
        wdata[p] = cell_t'($urandom);
      end
      dwe = $urandom % 2;
      dwbuf = 2'((wbuf + 1 + $urandom % 3) % 4);
      dwbank = 2'($urandom % 3);
      dwidx = IW'($urandom % D);
      dwdata = cell_t'($urandom);
      rbuf = 2'($urandom % 4); rbank = 2'($urandom % 3); ridx = IW'($urandom % D);
      drbuf = 2'($urandom % 4); drbank = 2'($urandom % 3); dridx = IW'($urandom % D);
      #1;
      if (known[rbuf][rbank][ridx]) begin
        checks++;
        if (rdata !== shadow[rbuf][rbank][ridx]) begin failures++; $display("FAIL t%0d queue read", t); end
      end
      if (known[drbuf][drbank][dridx]) begin
        checks++;
        if (drdata !== shadow[drbuf][drbank][dridx]) begin failures++; $display("FAIL t%0d disk read", t); end
      end
      @(posedge clk);
      for (int p = 0; p < NPIPE; p++)
        if (we[p]) begin shadow[wbuf][wbank[p]][widx[p]] = wdata[p]; known[wbuf][wbank[p]][widx[p]] = 1; end
      if (dwe) begin shadow[dwbuf][dwbank][dwidx] = dwdata; known[dwbuf][dwbank][dwidx] = 1; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
