// neighbor_table: descriptor of the neighbour of a grid cell in one direction.
//
// Given a queue cell descriptor (row parity, column parity, bank, bank
// address) and a direction, it returns the same fields for the adjacent cell,
// plus in_grid = 0 when that cell would lie outside the grid. It replaces the
// per-direction lookup tables of the published architecture with the logic
// those tables encode: the row class (bank == column parity for rows with
// i mod 4 in {0,3}) together with the row parity gives i mod 4, from which the
// neighbour's bank follows; vertical moves change the address by one bank row
// (2**(GRID_N-2) words), horizontal moves change it by one only when the
// column parity wraps. The pred field of the result points back at the cell
// (direction dir xor 1). The edge check (in_grid) is this design's addition.
// Purely combinational.
module neighbor_table
  import maze_pkg::*;
(
  input  cell_t cur,
  input  dir_t  dir,
  output cell_t nb,
  output logic  in_grid
);

  localparam logic [ADDR_W-1:0] ROW_STEP = ADDR_W'(1) << BCOL_W;

  logic       row_a;      // row has i mod 4 in {0,3}
  logic [1:0] imod4;
  logic [1:0] nimod4;
  logic [ROW_W-1:0]  row;
  logic [BCOL_W-1:0] bcol;

  always_comb begin
    row_a = (cur.bank == cur.colpar);
    // (rowpar, class) -> i mod 4 : (0,A)=0 (1,B)=1 (0,B)=2 (1,A)=3
    unique case ({cur.rowpar, row_a})
      2'b01:   imod4 = 2'd0;
      2'b10:   imod4 = 2'd1;
      2'b00:   imod4 = 2'd2;
      default: imod4 = 2'd3;
    endcase
    row  = cur.addr[ADDR_W-1:BCOL_W];
    bcol = cur.addr[BCOL_W-1:0];

    nb      = cur;
    nb.pred = opposite(dir);
    nimod4  = imod4;
    in_grid = 1'b1;
    unique case (dir)
      DIR_N: begin
        nimod4    = imod4 - 2'd1;
        nb.rowpar = ~cur.rowpar;
        nb.bank   = bank_of(nimod4, cur.colpar);
        nb.addr   = cur.addr - ROW_STEP;
        in_grid   = (row != '0);
      end
      DIR_S: begin
        nimod4    = imod4 + 2'd1;
        nb.rowpar = ~cur.rowpar;
        nb.bank   = bank_of(nimod4, cur.colpar);
        nb.addr   = cur.addr + ROW_STEP;
        in_grid   = (row != ROW_W'(GRID_ROWS - 1));
      end
      DIR_E: begin
        nb.colpar = cur.colpar + 2'd1;
        nb.bank   = cur.bank + 2'd1;
        nb.addr   = (cur.colpar == 2'd3) ? cur.addr + ADDR_W'(1) : cur.addr;
        in_grid   = !(cur.colpar == 2'd3 && bcol == '1);
      end
      default: begin  // DIR_W
        nb.colpar = cur.colpar - 2'd1;
        nb.bank   = cur.bank - 2'd1;
        nb.addr   = (cur.colpar == 2'd0) ? cur.addr - ADDR_W'(1) : cur.addr;
        in_grid   = !(cur.colpar == 2'd0 && bcol == '0);
      end
    endcase
  end

endmodule
