// pp_stage3: stage 3 of one pipeline of the pipelined processor.
//
// For a NextCell that is not nil it labels the ncell with the direction back to
// its predecessor, dir xor 1 (flipping bit 0 of a direction code gives the
// opposite direction), writes the labelled descriptor into the Banked Queue
// Memory at Position of the current write buffer (bank Position mod 3, word
// Position / 3 of that bank) and, in expand mode, writes the same direction
// into the ncell's BCMB word. The queue write and the BCMB write go to
// different memories and happen in the same cycle. In sweep mode only the
// queue is written (the labels are left as they are; they are rewritten by the
// next expansion before being read). Combinational: the writes are issued in
// the cycle the group sits in stage 3 and take effect at the clock edge;
// hold = 1 (pipeline stalled) suppresses them.
// Labelling with dir xor 1 and the two writes follow the published stage 3
// program; leaving BCMB unwritten while sweeping is this design's choice.
module pp_stage3
  import maze_pkg::*;
#(
  parameter int unsigned BUF_SIZE = 48,
  localparam int unsigned POS_W = $clog2(BUF_SIZE + 1),
  localparam int unsigned IDX_W = $clog2((BUF_SIZE + 2) / 3)
) (
  input  logic              hold,
  input  mode_t             mode,
  input  cell_t             ncell,
  input  logic              valid,
  input  dir_t              dir,
  input  logic [POS_W-1:0]  pos,
  input  logic [1:0]        bank,
  // Banked Queue Memory write (buffer chosen by the queue controller)
  output logic              q_we,
  output logic [1:0]        q_bank,
  output logic [IDX_W-1:0]  q_idx,
  output cell_t             q_data,
  // BCMB write
  output logic              b_we,
  output logic [1:0]        b_bank,
  output logic [ADDR_W-1:0] b_addr,
  output dir_t              b_data
);

  always_comb begin
    q_we        = valid && !hold;
    q_bank      = bank;
    q_idx       = IDX_W'(pos / POS_W'(3));
    q_data      = ncell;
    q_data.pred = opposite(dir);
    b_we        = q_we && (mode == MODE_EXPAND);
    b_bank      = ncell.bank;
    b_addr      = ncell.addr;
    b_data      = opposite(dir);
  end

endmodule
