// queue_ctrl: queue read processor and buffer manager of the Banked Queue
// Memory (BQM).
//
// The front-wave queue is kept in four fixed-size buffers of the BQM with a
// disk (or any slower store) behind them, so a queue of any length fits.
// Queue variables: RB (read buffer) with Front, WB (write buffer) with Last,
// NB (a full buffer to read after RB), #disk (buffer loads on the disk, read
// back in the order written), PF (a load already read back) and a free list.
// The queue order is always RB, NB, PF, the loads on the disk, WB.
//
// Read side, once per cycle while run is high:
//   - RB holds unread cells: the cell at Front is broadcast and Front advances;
//   - RB = WB and nothing is unread: the queue is empty, the nil cell is
//     broadcast, and after four such cycles in a row `empty4` rises: the three
//     pipeline stages are then empty as well and the phase is over;
//   - RB is used up: RB moves on to NB, else to PF (waiting for the disk if
//     the load is still on its way), else to WB; the old RB is freed. This
//     cycle broadcasts nil.
// Write side, when the group in stage 3 leaves WB full (fewer than 3 free
// places): the group is still written into WB; then
//   - WB = RB: a free buffer becomes the new WB;
//   - nothing but RB is ahead of WB and the disk is unused: WB becomes NB;
//   - otherwise WB is written out to the disk (#disk + 1).
// If the needed free buffer or the disk port is not available, `stall` holds
// the whole pipeline (this design's reading of "wait for buffer output to
// complete"). When both sides would change buffers in one cycle the write
// side goes first and the read side broadcasts nil and retries, as in the
// published design. A disk read of the oldest load starts whenever the disk
// port is idle, a load is on the disk, no read-back load is waiting and a
// buffer can be spared. The disk port streams one cell per accepted cycle;
// a load is written as BUF_SIZE-2..BUF_SIZE cells, its length being its size.
//
// Departures from the published procedure, which as printed can lose a
// buffer: NB/NNB there may name the write buffer itself; here only full
// buffers are chained and at most one (NB); the free list is a bit mask
// (lowest free buffer first) rather than a stack; Front counts from 0; a
// buffer change costs the read side one nil cycle; the disk read goes into any
// spare buffer rather than into the old RB. Buffers are numbered 0..3.
// rst_n is the asynchronous reset and also disables the two assertions at
// the end; lint reports that second, clocked use of rst_n, which has no
// effect on the circuit.
module queue_ctrl
  import maze_pkg::*;
#(
  parameter int unsigned BUF_SIZE = 48,
  localparam int unsigned POS_W = $clog2(BUF_SIZE + 1),
  localparam int unsigned DEPTH = (BUF_SIZE + 2) / 3,
  localparam int unsigned IDX_W = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             init,        // empty the queue (start of a phase)
  input  logic             run,         // read processor active
  input  logic             flush,       // drop the broadcast cell
  input  logic             inj_valid,   // broadcast inj_cell instead of reading
  input  cell_t            inj_cell,
  // broadcast to the stage 1 processors
  output cell_t            cur,
  output logic             cur_valid,
  // group in stage 3
  input  logic             grp,
  input  logic             grp_full,
  input  logic [POS_W-1:0] grp_last,
  output logic [1:0]       wb,
  output logic             stall,
  output logic             empty4,
  // BQM ports
  output logic [1:0]       rbuf,
  output logic [1:0]       rbank,
  output logic [IDX_W-1:0] ridx,
  input  cell_t            rdata,
  output logic             dwe,
  output logic [1:0]       dwbuf,
  output logic [1:0]       dwbank,
  output logic [IDX_W-1:0] dwidx,
  output cell_t            dwdata,
  output logic [1:0]       drbuf,
  output logic [1:0]       drbank,
  output logic [IDX_W-1:0] dridx,
  input  cell_t            drdata,
  // disk
  output logic             dsk_clear,
  output logic             dsk_wr_valid,
  output cell_t            dsk_wr_data,
  output logic             dsk_wr_last,
  input  logic             dsk_wr_ready,
  output logic             dsk_rd_req,
  input  logic             dsk_rd_valid,
  input  cell_t            dsk_rd_data,
  input  logic             dsk_rd_last,
  // events, one pulse each
  output logic             ev_wswitch,  // write buffer changed
  output logic             ev_rswitch,  // read buffer changed
  output logic             ev_spill,    // a buffer write-out to disk started
  output logic             ev_refill,   // a buffer load came back from disk
  output logic             ev_defer     // read switch deferred for a write switch
);

  typedef enum logic [1:0] {ENG_IDLE, ENG_WR, ENG_RD} eng_t;

  logic [1:0]       rb, nb, pf, eng_buf, wb_q;
  logic             rb_v, nb_v, pf_v;
  logic [POS_W-1:0] front, last, eng_k, eng_n;
  logic [POS_W-1:0] cnt [4];
  logic [3:0]       free;
  logic [15:0]      ndisk;       // loads on the disk
  logic [2:0]       empty_cnt;
  eng_t             eng;

  // free-list helpers
  logic [1:0] free_pick;
  logic       free_any;
  logic [2:0] free_cnt;
  always_comb begin
    free_pick = 2'd0;
    free_any  = 1'b0;
    free_cnt  = '0;
    for (int b = 3; b >= 0; b--) begin
      if (free[b]) begin
        free_pick = 2'(b);
        free_any  = 1'b1;
        free_cnt  = free_cnt + 3'd1;
      end
    end
  end

  // write side decision
  logic case_a, case_b, want_w, wsw_ok, do_wsw;
  always_comb begin
    case_a = rb_v && (rb == wb);
    case_b = !case_a && !nb_v && ndisk == '0 && !pf_v && eng == ENG_IDLE;
    want_w = grp && grp_full;
    wsw_ok = (case_a || case_b) ? free_any : (eng == ENG_IDLE && free_any);
    do_wsw = want_w && wsw_ok;
    stall  = want_w && !wsw_ok;
  end

  // read side decision
  logic [POS_W-1:0] rb_end;
  logic rd_cell, rd_empty;
  always_comb begin
    rb_end    = (rb == wb) ? last : cnt[rb];
    rd_cell   = rb_v && front < rb_end;
    rd_empty  = rb_v && !rd_cell && rb == wb;
  end

  // disk read start
  logic start_rd;
  always_comb begin
    start_rd = eng == ENG_IDLE && ndisk != '0 && !pf_v && !do_wsw && free_any &&
               (free_cnt >= 3'd2 || !rb_v) && !stall;
  end

  // BQM port addresses
  always_comb begin
    rbuf   = rb;
    rbank  = 2'(front % POS_W'(3));
    ridx   = IDX_W'(front / POS_W'(3));
    drbuf  = eng_buf;
    drbank = 2'(eng_k % POS_W'(3));
    dridx  = IDX_W'(eng_k / POS_W'(3));
    dwbuf  = eng_buf;
    dwbank = drbank;
    dwidx  = dridx;
    dwdata = dsk_rd_data;
    dwe    = eng == ENG_RD && dsk_rd_valid;
    dsk_wr_valid = eng == ENG_WR;
    dsk_wr_data  = drdata;
    dsk_wr_last  = eng_k == eng_n - POS_W'(1);
    dsk_rd_req   = start_rd;
    dsk_clear    = init;
  end

  assign wb     = wb_q;
  assign empty4 = empty_cnt == 3'd4;



  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rb <= '0; wb_q <= '0; nb <= '0; pf <= '0; eng_buf <= '0;
      rb_v <= 1'b1; nb_v <= 1'b0; pf_v <= 1'b0;
      front <= '0; last <= '0; eng_k <= '0; eng_n <= '0;
      for (int b = 0; b < 4; b++) cnt[b] <= '0;
      free <= 4'b1110; ndisk <= '0; empty_cnt <= '0; eng <= ENG_IDLE;
      cur <= '0; cur_valid <= 1'b0;
      ev_wswitch <= 1'b0; ev_rswitch <= 1'b0; ev_spill <= 1'b0;
      ev_refill <= 1'b0; ev_defer <= 1'b0;
    end else if (init) begin
      rb <= '0; wb_q <= '0;
      rb_v <= 1'b1; nb_v <= 1'b0; pf_v <= 1'b0;
      front <= '0; last <= '0;
      free <= 4'b1110; ndisk <= '0; empty_cnt <= '0; eng <= ENG_IDLE;
      cur_valid <= 1'b0;
      ev_wswitch <= 1'b0; ev_rswitch <= 1'b0; ev_spill <= 1'b0;
      ev_refill <= 1'b0; ev_defer <= 1'b0;
    end else begin
      logic [3:0] free_n;
      logic [15:0] ndisk_n;
      free_n  = free;
      ndisk_n = ndisk;
      ev_wswitch <= do_wsw;
      ev_rswitch <= 1'b0;
      ev_spill   <= 1'b0;
      ev_refill  <= 1'b0;
      ev_defer   <= 1'b0;

      // ---- write side (queue update following a write) ----
      if (do_wsw) begin
        cnt[wb_q] <= grp_last;
        wb_q      <= free_pick;
        free_n[free_pick] = 1'b0;
        last      <= '0;
        if (!case_a && case_b) begin
          nb   <= wb_q;
          nb_v <= 1'b1;
        end else if (!case_a) begin
          eng     <= ENG_WR;
          eng_buf <= wb_q;
          eng_k   <= '0;
          eng_n   <= grp_last;
          ndisk_n = ndisk_n + 16'd1;
          ev_spill <= 1'b1;
        end
      end else if (grp && !stall) begin
        last <= grp_last;
      end

      // ---- disk engine ----
      if (eng == ENG_WR && dsk_wr_ready) begin
        eng_k <= eng_k + POS_W'(1);
        if (dsk_wr_last) begin
          eng <= ENG_IDLE;
          free_n[eng_buf] = 1'b1;
        end
      end
      if (eng == ENG_RD && dsk_rd_valid) begin
        eng_k <= eng_k + POS_W'(1);
        if (dsk_rd_last) begin
          eng         <= ENG_IDLE;
          pf          <= eng_buf;
          pf_v        <= 1'b1;
          cnt[eng_buf] <= eng_k + POS_W'(1);
          ev_refill   <= 1'b1;
        end
      end
      if (start_rd) begin
        eng     <= ENG_RD;
        eng_buf <= free_pick;
        eng_k   <= '0;
        free_n[free_pick] = 1'b0;
        ndisk_n = ndisk_n - 16'd1;
      end

      // ---- read side (queue read processor) ----
      if (!stall) begin
        if (flush) begin
          cur_valid <= 1'b0;
        end else if (inj_valid) begin
          cur       <= inj_cell;
          cur_valid <= 1'b1;
          empty_cnt <= '0;
        end else if (!run) begin
          cur_valid <= 1'b0;
        end else if (rd_cell) begin
          cur       <= rdata;
          cur_valid <= 1'b1;
          front     <= front + POS_W'(1);
          empty_cnt <= '0;
        end else if (rd_empty) begin
          cur_valid <= 1'b0;
          if (empty_cnt != 3'd4) empty_cnt <= empty_cnt + 3'd1;
        end else begin
          cur_valid <= 1'b0;
          empty_cnt <= '0;
          if (do_wsw) begin
            ev_defer <= 1'b1;
          end else if (!rb_v) begin
            if (pf_v) begin
              rb <= pf; rb_v <= 1'b1; pf_v <= 1'b0; front <= '0;
              ev_rswitch <= 1'b1;
            end
          end else if (nb_v) begin
            free_n[rb] = 1'b1;
            rb <= nb; nb_v <= 1'b0; front <= '0;
            ev_rswitch <= 1'b1;
          end else if (pf_v) begin
            free_n[rb] = 1'b1;
            rb <= pf; pf_v <= 1'b0; front <= '0;
            ev_rswitch <= 1'b1;
          end else if (ndisk != '0 || eng == ENG_RD) begin
            free_n[rb] = 1'b1;
            rb_v <= 1'b0;
          end else begin
            free_n[rb] = 1'b1;
            rb <= wb_q; front <= '0;
            ev_rswitch <= 1'b1;
          end
        end
      end

      free  <= free_n;
      ndisk <= ndisk_n;
    end
  end

  // a group must not be written over a full buffer: WB always has 3 places
  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n || init)
    last <= POS_W'(BUF_SIZE - 3)) else $error("queue_ctrl: write buffer overrun");
  a_load_fits: assert property (@(posedge clk) disable iff (!rst_n || init)
    !(eng == ENG_RD && dsk_rd_valid && eng_k >= POS_W'(BUF_SIZE)))
    else $error("queue_ctrl: disk load longer than a buffer");

endmodule
