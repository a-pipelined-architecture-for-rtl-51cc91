// tb_pp_stage3: random stage 3 inputs; checks the labelled queue entry (pred
// field = opposite of dir), the queue address (bank as given, word =
// position / 3), the BCMB write (only in expand mode), and that hold and nil
// cells write nothing.
// No ports; the stage is combinational, outputs are checked 1 time unit after
// each random input. The dir xor 1 rule is the published one.
module tb_pp_stage3;
  import maze_pkg::*;

  localparam int BUF = 48;
  localparam int PW  = $clog2(BUF + 1);
  localparam int IW  = $clog2((BUF + 2) / 3);

  logic hold;
  mode_t mode;
  cell_t ncell, q_data;
  logic valid, q_we, b_we;
  dir_t dir, b_data;
  logic [PW-1:0] pos;
  logic [1:0] bank, q_bank, b_bank;
  logic [IW-1:0] q_idx;
  logic [ADDR_W-1:0] b_addr;

  pp_stage3 #(.BUF_SIZE(BUF)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    dir_t opp [4] = '{DIR_S, DIR_N, DIR_W, DIR_E};
    for (int t = 0; t < 4000; t++) begin
      automatic int p = $urandom % (BUF - 2);
      hold  = ($urandom % 5) == 0;
      mode  = mode_t'($urandom % 2);
      ncell = cell_t'($urandom);
      valid = $urandom % 2;
      dir   = dir_t'($urandom % 4);
      pos   = PW'(p);
      bank  = 2'(p % 3);
      #1;
      check(q_we == (valid && !hold), "queue write enable");
      check(b_we == (valid && !hold && mode == MODE_EXPAND), "BCMB write enable");
      if (valid) begin
        automatic cell_t e = ncell;
        e.pred = opp[dir];
        check(q_data == e, $sformatf("t%0d labelled entry", t));
        check(q_bank == 2'(p % 3) && int'(q_idx) == p / 3, $sformatf("t%0d queue address", t));
        check(b_bank == ncell.bank && b_addr == ncell.addr && b_data == opp[dir], "BCMB write");
      end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
