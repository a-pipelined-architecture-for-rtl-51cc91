// maze_pkg: types and constants shared by the maze router.
//
// The routing grid has 2**GRID_N columns and GRID_ROWS rows. Every grid cell
// owns a 3-bit cell in Banked Cell Memory A (tag, hardblock, softblock) and a
// 2-bit cell in Banked Cell Memory B (direction label). Each of the two
// memories is split into four banks so that the neighbours of any cell lie in
// four different banks:
//   cell (i,j) is in bank j mod 4 when i mod 4 is 0 or 3,
//   and in bank (j+2) mod 4 when i mod 4 is 1 or 2;
//   its address inside the bank is i*2**(GRID_N-2) + j/4.
// A queue cell (cell_t) carries row parity, column parity (j mod 4), the
// direction to the predecessor, the bank and the bank address, in that order.
// The field widths, the bank mapping and the address formula follow the
// published architecture; the grid size (64 x 64) and the direction codes are
// this design's choice. Directions are coded so that flipping bit 0 gives the
// opposite direction (N<->S, E<->W), which the stage 3 labelling relies on.
package maze_pkg;

  localparam int unsigned GRID_N    = 6;                    // 2**GRID_N columns
  localparam int unsigned GRID_COLS = 1 << GRID_N;
  localparam int unsigned GRID_ROWS = 64;
  localparam int unsigned ROW_W     = $clog2(GRID_ROWS);
  localparam int unsigned COL_W     = GRID_N;
  localparam int unsigned BCOL_W    = GRID_N - 2;           // column bits inside a bank
  localparam int unsigned ADDR_W    = ROW_W + BCOL_W;       // bank address width
  localparam int unsigned BANK_DEPTH = GRID_ROWS << BCOL_W; // words per BCM bank
  localparam int unsigned NPIPE     = 3;                    // pipelines in the processor

  typedef enum logic [1:0] {
    DIR_N = 2'd0,
    DIR_S = 2'd1,
    DIR_E = 2'd2,
    DIR_W = 2'd3
  } dir_t;

  typedef enum logic {
    MODE_EXPAND = 1'b0,
    MODE_SWEEP  = 1'b1
  } mode_t;

  // BCMA cell
  typedef struct packed {
    logic tag;
    logic hblk;
    logic sblk;
  } bcma_cell_t;

  // queue cell descriptor
  typedef struct packed {
    logic              rowpar;
    logic [1:0]        colpar;
    dir_t              pred;
    logic [1:0]        bank;
    logic [ADDR_W-1:0] addr;
  } cell_t;

  localparam int unsigned CELL_W = $bits(cell_t);

  function automatic dir_t opposite(dir_t d);
    return dir_t'({d[1], ~d[0]});
  endfunction

  // bank of a cell from i mod 4 and j mod 4
  function automatic logic [1:0] bank_of(logic [1:0] imod4, logic [1:0] jmod4);
    return (imod4 == 2'd0 || imod4 == 2'd3) ? jmod4 : jmod4 + 2'd2;
  endfunction

  // descriptor of grid cell (row, col); the predecessor field is set to N
  function automatic cell_t cell_of(logic [ROW_W-1:0] row, logic [COL_W-1:0] col);
    cell_t c;
    c.rowpar = row[0];
    c.colpar = col[1:0];
    c.pred   = DIR_N;
    c.bank   = bank_of(row[1:0], col[1:0]);
    c.addr   = {row, col[COL_W-1:2]};
    return c;
  endfunction

  function automatic logic [ROW_W-1:0] row_of(cell_t c);
    return c.addr[ADDR_W-1:BCOL_W];
  endfunction

  function automatic logic [COL_W-1:0] col_of(cell_t c);
    return {c.addr[BCOL_W-1:0], c.colpar};
  endfunction

  // same grid cell (bank and address), whatever the other fields hold
  function automatic logic same_cell(cell_t a, cell_t b);
    return a.bank == b.bank && a.addr == b.addr;
  endfunction

endpackage
