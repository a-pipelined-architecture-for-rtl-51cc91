// disk_model: behavioural model of the intermediate store behind the queue
// buffers (a disk, or a slower RAM). Not synthesizable logic of the design.
//
// It keeps buffer loads in first-in first-out order. A load is written as a
// stream of cells (wr_valid/wr_ready, wr_last on the final cell); wr_ready is
// low for WR_WAIT cycles before each cell to model a slow device. A one-cycle
// rd_req asks for the oldest load: after RD_LATENCY cycles its cells come back
// one per cycle with rd_valid, rd_last marking the final one. clear drops all
// loads. loads_stored counts loads ever written, for the testbenches.
// The published design only says that a disk (or slower memory) holds whole
// buffers; the streaming handshake and the timing knobs are this design's.
module disk_model
  import maze_pkg::*;
#(
  parameter int unsigned WORDS      = 8192,
  parameter int unsigned LOADS      = 1024,
  parameter int unsigned WR_WAIT    = 0,
  parameter int unsigned RD_LATENCY = 4
) (
  input  logic  clk,
  input  logic  clear,
  input  logic  wr_valid,
  input  cell_t wr_data,
  input  logic  wr_last,
  output logic  wr_ready,
  input  logic  rd_req,
  output logic  rd_valid,
  output cell_t rd_data,
  output logic  rd_last,
  output int    loads_stored
);

  cell_t words [WORDS];
  int    len   [LOADS];
  int    whead = 0, wtail = 0;       // word ring: next read, next write
  int    lhead = 0, ltail = 0;       // load ring
  int    cur_len = 0;                // cells of the load being written
  int    rptr = 0, rleft = 0, rdelay = -1;
  int    wwait = 0;

  initial loads_stored = 0;

  assign wr_ready = (wwait == 0);

  always_ff @(posedge clk) begin
    if (clear) begin
      whead <= 0; wtail <= 0; lhead <= 0; ltail <= 0; cur_len <= 0;
      rleft <= 0; rdelay <= -1; wwait <= int'(WR_WAIT);
      rd_valid <= 1'b0; rd_last <= 1'b0;
    end else begin
      // write side
      if (wr_valid && wr_ready) begin
        if (wtail == whead && ltail != lhead && cur_len == 0) $error("disk_model: word store full");
        if (wr_last && ltail - lhead >= int'(LOADS)) $error("disk_model: load table full");
        words[wtail] <= wr_data;
        wtail  <= (wtail + 1) % WORDS;
        wwait  <= int'(WR_WAIT);
        if (wr_last) begin
          len[ltail % LOADS] <= cur_len + 1;
          ltail   <= ltail + 1;
          cur_len <= 0;
          loads_stored <= loads_stored + 1;
        end else begin
          cur_len <= cur_len + 1;
        end
      end else if (wr_valid && wwait > 0) begin
        wwait <= wwait - 1;
      end
      // read side
      rd_valid <= 1'b0;
      rd_last  <= 1'b0;
      if (rd_req) begin
        if (lhead == ltail) $error("disk_model: read of an empty disk");
        rdelay <= int'(RD_LATENCY);
        rleft  <= len[lhead % LOADS];
        lhead  <= lhead + 1;
      end else if (rdelay > 0) begin
        rdelay <= rdelay - 1;
      end else if (rdelay == 0 && rleft > 0) begin
        rd_valid <= 1'b1;
        rd_data  <= words[whead];
        rd_last  <= (rleft == 1);
        whead    <= (whead + 1) % WORDS;
        rleft    <= rleft - 1;
        if (rleft == 1) rdelay <= -1;
      end
    end
  end

endmodule
