// path_ctrl: phase sequencer of the maze router (source initialisation,
// front wave expansion, path recovery, sweeping).
//
// On start it routes one wire from the source to the target cell:
//  1. Expansion set-up: the queue is emptied, the source's softblock bit is
//     set, and the source is broadcast twice into the pipelines, once as if
//     reached from the north (the pipelines examine S, E, W) and once as if
//     reached from the south (E, W, N; E and W are already softblocked). This
//     enqueues every unblocked neighbour of the source with its label pointing
//     at the source, which is the initial queue the published design asks
//     for; doing it through the pipelines is this design's choice.
//  2. Expansion runs until stage 3 holds the target cell (its label is written
//     in that cycle; the remaining pipeline contents are flushed) or until the
//     queue read processor has seen an empty queue four cycles in a row (no
//     path).
//  3. Path recovery, only if the target was reached: starting at the target,
//     one cell per cycle, the tag bit is set and the BCMB label is followed to
//     the neighbour it points at, until the source has been tagged.
//  4. Sweeping: like expansion with the softblock roles swapped, started from
//     the source (whose softblock is cleared and whose tag, if set, turns into
//     hardblock here) and run until the queue stays empty; afterwards every
//     softblock bit is 0 and every tagged cell is hardblocked, so the new wire
//     blocks later routes.
// done pulses for one cycle at the end; path_found and path_len (cells on the
// path, both ends included) then hold the result until the next start.
// The sequencing and the BCMA/BCMB port use are this design's; the phases and
// what each does follow the published architecture. Source and target must
// differ.
module path_ctrl
  import maze_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [ROW_W-1:0]  src_row,
  input  logic [COL_W-1:0]  src_col,
  input  logic [ROW_W-1:0]  tgt_row,
  input  logic [COL_W-1:0]  tgt_col,
  input  logic              found_in,    // target cell in stage 3 (not stalled)
  input  logic              empty4,      // queue empty four cycles in a row
  output mode_t             mode,
  output logic              run,
  output logic              init,
  output logic              flush,
  output logic              inj_valid,
  output cell_t             inj_cell,
  output logic              check_target,
  output cell_t             target,
  output logic              busy,
  output logic              done,
  output logic              path_found,
  output logic [ROW_W+COL_W:0] path_len,
  // BCMA port (overrides the stage 1 port of pipeline 1 while p_en)
  output logic              p_en,
  output logic              p_we,
  output logic [1:0]        p_bank,
  output logic [ADDR_W-1:0] p_addr,
  output bcma_cell_t        p_wdata,
  input  bcma_cell_t        p_rdata,
  // BCMB read port
  output logic [1:0]        b_bank,
  output logic [ADDR_W-1:0] b_addr,
  input  dir_t              b_rdata
);

  typedef enum logic [3:0] {
    ST_IDLE, ST_E_INIT, ST_E_INJ1, ST_E_INJ2, ST_E_RUN, ST_REC,
    ST_S_INIT, ST_S_INJ1, ST_S_INJ2, ST_S_RUN, ST_FIN
  } state_t;

  state_t state;
  cell_t  src, walk, walk_nb;
  logic   walk_in;

  neighbor_table u_tab (
    .cur    (walk),
    .dir    (b_rdata),
    .nb     (walk_nb),
    .in_grid(walk_in)
  );

  always_comb begin
    init         = state == ST_E_INIT || state == ST_S_INIT;
    mode         = (state inside {ST_S_INIT, ST_S_INJ1, ST_S_INJ2, ST_S_RUN}) ? MODE_SWEEP : MODE_EXPAND;
    run          = state inside {ST_E_INJ1, ST_E_INJ2, ST_E_RUN, ST_S_INJ1, ST_S_INJ2, ST_S_RUN};
    check_target = state inside {ST_E_INJ1, ST_E_INJ2, ST_E_RUN};
    flush        = state == ST_E_RUN && found_in;
    inj_valid    = state inside {ST_E_INJ1, ST_E_INJ2, ST_S_INJ1, ST_S_INJ2};
    inj_cell     = src;
    inj_cell.pred = (state == ST_E_INJ1 || state == ST_S_INJ1) ? DIR_N : DIR_S;
    busy         = state != ST_IDLE;

    p_en    = 1'b0;
    p_we    = 1'b0;
    p_bank  = src.bank;
    p_addr  = src.addr;
    p_wdata = p_rdata;
    b_bank  = walk.bank;
    b_addr  = walk.addr;
    unique case (state)
      ST_E_INIT: begin
        p_en = 1'b1; p_we = 1'b1;
        p_wdata = '{tag: p_rdata.tag, hblk: p_rdata.hblk, sblk: 1'b1};
      end
      ST_S_INIT: begin
        p_en = 1'b1; p_we = 1'b1;
        p_wdata = '{tag: 1'b0, hblk: p_rdata.hblk || p_rdata.tag, sblk: 1'b0};
      end
      ST_REC: begin
        p_en = 1'b1; p_we = 1'b1;
        p_bank = walk.bank;
        p_addr = walk.addr;
        p_wdata = '{tag: 1'b1, hblk: p_rdata.hblk, sblk: p_rdata.sblk};
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= ST_IDLE;
      src        <= '0;
      target     <= '0;
      walk       <= '0;
      done       <= 1'b0;
      path_found <= 1'b0;
      path_len   <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        ST_IDLE: if (start) begin
          src        <= cell_of(src_row, src_col);
          target     <= cell_of(tgt_row, tgt_col);
          path_found <= 1'b0;
          path_len   <= '0;
          state      <= ST_E_INIT;
        end
        ST_E_INIT: state <= ST_E_INJ1;
        ST_E_INJ1: state <= ST_E_INJ2;
        ST_E_INJ2: state <= ST_E_RUN;
        ST_E_RUN: begin
          if (found_in) begin
            path_found <= 1'b1;
            walk       <= target;
            state      <= ST_REC;
          end else if (empty4) begin
            state <= ST_S_INIT;
          end
        end
        ST_REC: begin
          path_len <= path_len + 1'b1;
          if (same_cell(walk, src) || !walk_in) state <= ST_S_INIT;
          else walk <= walk_nb;
        end
        ST_S_INIT: state <= ST_S_INJ1;
        ST_S_INJ1: state <= ST_S_INJ2;
        ST_S_INJ2: state <= ST_S_RUN;
        ST_S_RUN:  if (empty4) state <= ST_FIN;
        ST_FIN: begin
          done  <= 1'b1;
          state <= ST_IDLE;
        end
        default: state <= ST_IDLE;
      endcase
    end
  end

endmodule
