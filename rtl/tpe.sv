// tpe: tile processing element, one 7x5 window filter of the pyramid.
//
// A TPE takes the tiles of one floor and produces the co-located tiles of the
// floor above. It has a loading side and a filtering side that run concurrently
// over a shared circular tile buffer (tile_buffer, 8 banks x 5 strips = 40
// columns of up to 28 rows).
//
// Loading (address generator, write side). Tiles arrive on PIXELI in vertical
// snake order: column 0 top to bottom, column 1 bottom to top, and so on, with
// sot on the first pixel, sor on the first tile of a tile row and sof on the
// first tile of a frame. The first tile of a tile row (leftmost) brings all WL =
// s + (4-FLOOR)m columns; later tiles bring s new columns and reuse the last m
// columns of the previous tile, which are still in the buffer (horizontal
// immediate result reuse). Tiles of the first tile row bring HT = t + (4-FLOOR)n
// rows; later tiles bring t rows on PIXELI and take their top n rows from the
// row of tiles above through SEQI (vertical immediate result reuse, read back by
// the sequencer from external memory, column by column, top to bottom). The bottom
// n rows of every loaded column leave on IRRO, tagged with source column and row
// index, for the sequencer to store. PIXELI has priority on the single write port.
// A write to logical column L is held back (ready low) until L < C + 40, where C is
// the oldest column the filtering side still needs, so data that is still to be
// read is never overwritten.
//
// Filtering (read side). A fully loaded tile is filtered with a vertical snake
// scan. A row read returns 8 adjacent columns: 7 go to the active registers (the
// filter window) and 1 to the shadow column. Going down, the arrays shift up and
// the new row enters at the bottom; going up, they shift down and the new row
// enters at the top. At the end of a column, one left shift moves the shadow
// column into the window, which then already holds the first window of the next
// column, so a window reaches the filter core on every cycle except for the 4
// fill cycles at the start of each tile. The filter core (NR, CI or EE) has 3
// pipeline stages. Output tiles leave in the same vertical snake order.
// The output side follows a valid/ready handshake; the whole read pipe stalls
// while out_ready is low.
//
// Follows the document: tile sizes per floor and region, horizontal and vertical
// immediate result reuse, 8 banks in strips, rotator, active/shadow registers,
// snake scan, 3-stage filter core, concurrent load and filter phases. This
// design's choices: the handshakes, the column-level overwrite check, the SEQI
// and IRRO port formats and the source-grid coordinates in the side band.
module tpe
  import ptisp_pkg::*;
#(
  parameter core_kind_e  KIND  = CORE_NR,
  parameter int unsigned FLOOR = 1,
  parameter int unsigned IW    = 10,
  parameter int unsigned OW    = 10
) (
  input  logic            clk,
  input  logic            rst_n,
  input  cfg_t            cfg,
  // PIXELI
  input  logic            in_valid,
  output logic            in_ready,
  input  logic [IW-1:0]   in_pix,
  input  pix_meta_t       in_meta,
  // SEQI: top n rows of non-first-row tiles
  input  logic            seq_valid,
  output logic            seq_ready,
  input  logic [IW-1:0]   seq_pix,
  // IRRO: bottom n rows of every loaded column
  output logic            irr_valid,
  input  logic            irr_ready,
  output logic [IW-1:0]   irr_pix,
  output logic [CW-1:0]   irr_x,
  output logic [2:0]      irr_k,
  // PIXELO
  output logic            out_valid,
  input  logic            out_ready,
  output logic [OW-1:0]   out_pix,
  output pix_meta_t       out_meta,
  output logic            out_flag    // pulses with an output pixel whose median was chosen (NR)
                                      // or whose luma was sharpened (EE)
);
  localparam int unsigned WL  = TS + (NFLOOR - FLOOR) * KM;  // leftmost tile width
  localparam int unsigned HT  = TT + (NFLOOR - FLOOR) * KN;  // topmost tile height
  localparam int unsigned HN  = TT + KN;                     // other tile height
  localparam int unsigned CB  = $clog2(BUFW);
  localparam int unsigned RB  = $clog2(HMAX);

  // -------------------------------------------------------------------------
  // Tile buffer
  // -------------------------------------------------------------------------
  logic                     tb_we, tb_re;
  logic [CB-1:0]            tb_wcol, tb_rcol;
  logic [RB-1:0]            tb_wrow, tb_rrow;
  logic [IW-1:0]            tb_wdata;
  logic [NBANK-1:0][IW-1:0] tb_rdata;

  tile_buffer #(.PW(IW), .NBANK(NBANK), .NSTRIP(NSTRIP), .HMAX(HMAX)) u_buf (
    .clk  (clk),
    .we   (tb_we),
    .wcol (tb_wcol),
    .wrow (tb_wrow),
    .wdata(tb_wdata),
    .re   (tb_re),
    .rcol (tb_rcol),
    .rrow (tb_rrow),
    .rdata(tb_rdata)
  );

  function automatic logic [CB-1:0] pinc(input logic [CB-1:0] p);
    return (p == CB'(BUFW - 1)) ? '0 : p + 1'b1;
  endfunction

  function automatic logic [CB-1:0] psub(input logic [CB-1:0] p, input int unsigned d);
    return (32'(p) >= d) ? CB'(32'(p) - d) : CB'(32'(p) + BUFW - d);
  endfunction

  // -------------------------------------------------------------------------
  // Tile descriptors passed from the loading to the filtering side
  // -------------------------------------------------------------------------
  typedef struct packed {
    logic [31:0]   wstart;  // logical column of window column 0
    logic [CB-1:0] wpcol;   // its physical column
    logic [5:0]    ncin;    // window columns of the tile
    logic [4:0]    h;       // rows of the tile
    logic [CW-1:0] x0;      // source-grid position of window column 0, row 0
    logic [CW-1:0] y0;
    logic          sof;
    logic          sor;
  } desc_t;

  desc_t    dq [2];
  logic [1:0] dq_cnt;
  logic       dq_rd, dq_wr;
  logic       dq_wp, dq_rp;
  desc_t      dq_in;

  // -------------------------------------------------------------------------
  // Loading side
  // -------------------------------------------------------------------------
  logic          slot_v;       // a tile is being loaded or waits to be queued
  logic          px_busy, sq_busy;
  logic          top_row_q;
  desc_t         slot_d;
  logic [31:0]   lnext;        // logical column after the last started tile
  logic [CB-1:0] pnext;        // its physical column
  // PIXELI counters of the tile in the slot
  logic [5:0]    px_c, px_ncol;
  logic [4:0]    px_r, px_nrow, px_rbase;
  logic [31:0]   px_l;
  logic [CB-1:0] px_p;
  // SEQI counters
  logic [5:0]    sq_c;
  logic [4:0]    sq_r;
  logic [31:0]   sq_l;
  logic [CB-1:0] sq_p;

  // Start of a new tile on this cycle's PIXELI pixel
  logic          st_left, st_top, starting;
  logic [5:0]    st_ncol;
  logic [4:0]    st_nrow, st_rbase, st_h;

  always_comb begin
    st_left  = in_meta.sor;
    st_top   = in_meta.sof || (!in_meta.sor && top_row_q);
    st_ncol  = st_left ? 6'(WL) : 6'(TS);
    st_nrow  = st_top ? 5'(HT) : 5'(TT);
    st_rbase = st_top ? 5'd0 : 5'(KN);
    st_h     = st_top ? 5'(HT) : 5'(HN);
  end

  // Current PIXELI write position (from the counters, or a tile starting now)
  logic [5:0]    cur_c;
  logic [4:0]    cur_r, cur_nrow, cur_rbase, cur_h, cur_row;
  logic [31:0]   cur_l;
  logic [CB-1:0] cur_p;
  always_comb begin
    starting = !slot_v;
    if (starting) begin
      cur_c = '0; cur_r = '0; cur_nrow = st_nrow; cur_rbase = st_rbase; cur_h = st_h;
      cur_l = lnext; cur_p = pnext;
    end else begin
      cur_c = px_c; cur_r = px_r; cur_nrow = px_nrow; cur_rbase = px_rbase; cur_h = slot_d.h;
      cur_l = px_l; cur_p = px_p;
    end
    cur_row = cur_rbase + (cur_c[0] ? (cur_nrow - 5'd1 - cur_r) : cur_r);
  end

  // Oldest column still needed by the filtering side
  logic          f_busy;
  desc_t         f_d;
  logic [5:0]    f_k;
  logic          need_v;
  logic [31:0]   need_c;
  always_comb begin
    need_v = f_busy || (dq_cnt != 0);
    need_c = f_busy ? (f_d.wstart + 32'(f_k)) : dq[dq_rp].wstart;
  end

  function automatic logic free_col(input logic [31:0] l, input logic nv, input logic [31:0] nc);
    return !nv || (l < nc + 32'(BUFW));
  endfunction

  logic px_is_irr, px_ok, px_fire;
  logic sq_ok, sq_fire;

  always_comb begin
    px_is_irr = (cur_row >= cur_h - 5'(KN));
    // A new tile may start only once the previous one has been queued.
    px_ok     = (slot_v ? px_busy : 1'b1) && free_col(cur_l, need_v, need_c)
                && (!px_is_irr || irr_ready);
    in_ready  = px_ok;
    px_fire   = in_valid && px_ok;

    irr_valid = in_valid && px_is_irr && (slot_v ? px_busy : 1'b1)
                && free_col(cur_l, need_v, need_c);
    irr_pix   = in_pix;
    irr_x     = in_meta.x;
    irr_k     = 3'(cur_row - (cur_h - 5'(KN)));

    sq_ok     = slot_v && sq_busy && free_col(sq_l, need_v, need_c) && !px_fire;
    seq_ready = sq_ok;
    sq_fire   = seq_valid && sq_ok;

    tb_we    = px_fire || sq_fire;
    tb_wcol  = px_fire ? cur_p : sq_p;
    tb_wrow  = px_fire ? RB'(cur_row) : RB'(sq_r);
    tb_wdata = px_fire ? in_pix : seq_pix;
  end

  // Descriptor of a tile starting now
  always_comb begin
    dq_in        = slot_d;
    dq_wr        = slot_v && !px_busy && !sq_busy && (dq_cnt != 2'd2);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      slot_v    <= 1'b0;
      px_busy   <= 1'b0;
      sq_busy   <= 1'b0;
      top_row_q <= 1'b1;
      slot_d    <= '0;
      lnext     <= 32'(BUFW);
      pnext     <= '0;
      px_c      <= '0;
      px_r      <= '0;
      px_ncol   <= '0;
      px_nrow   <= '0;
      px_rbase  <= '0;
      px_l      <= '0;
      px_p      <= '0;
      sq_c      <= '0;
      sq_r      <= '0;
      sq_l      <= '0;
      sq_p      <= '0;
    end else begin
      if (dq_wr) slot_v <= 1'b0;
      if (px_fire) begin
        if (starting) begin
          slot_v    <= 1'b1;
          px_busy   <= 1'b1;
          sq_busy   <= !st_top;
          top_row_q <= st_top;
          px_ncol   <= st_ncol;
          px_nrow   <= st_nrow;
          px_rbase  <= st_rbase;
          slot_d.wstart <= st_left ? lnext : lnext - 32'(KM);
          slot_d.wpcol  <= st_left ? pnext : psub(pnext, KM);
          slot_d.ncin   <= st_left ? 6'(WL) : 6'(TS + KM);
          slot_d.h      <= st_h;
          slot_d.x0     <= st_left ? in_meta.x : in_meta.x - CW'(KM);
          slot_d.y0     <= in_meta.y - CW'(st_rbase);
          slot_d.sof    <= in_meta.sof;
          slot_d.sor    <= in_meta.sor;
          sq_c      <= '0;
          sq_r      <= '0;
          sq_l      <= lnext;
          sq_p      <= pnext;
          lnext     <= lnext + 32'(st_ncol);
          pnext     <= CB'((32'(pnext) + 32'(st_ncol)) % BUFW);
        end
        // advance the PIXELI counters
        if (cur_r == cur_nrow - 5'd1) begin
          px_r <= '0;
          px_c <= cur_c + 6'd1;
          px_l <= cur_l + 32'd1;
          px_p <= pinc(cur_p);
          if (cur_c == (starting ? st_ncol : px_ncol) - 6'd1) px_busy <= 1'b0;
        end else begin
          px_r <= cur_r + 5'd1;
          px_c <= cur_c;
          px_l <= cur_l;
          px_p <= cur_p;
        end
      end
      if (sq_fire) begin
        if (sq_r == 5'(KN - 1)) begin
          sq_r <= '0;
          sq_c <= sq_c + 6'd1;
          sq_l <= sq_l + 32'd1;
          sq_p <= pinc(sq_p);
          if (sq_c == px_ncol - 6'd1) sq_busy <= 1'b0;
        end else begin
          sq_r <= sq_r + 5'd1;
        end
      end
    end
  end

  // descriptor FIFO
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dq_cnt <= '0;
      dq_wp  <= 1'b0;
      dq_rp  <= 1'b0;
      dq[0]  <= '0;
      dq[1]  <= '0;
    end else begin
      if (dq_wr) begin
        dq[dq_wp] <= dq_in;
        dq_wp     <= !dq_wp;
      end
      if (dq_rd) dq_rp <= !dq_rp;
      dq_cnt <= dq_cnt + 2'(dq_wr) - 2'(dq_rd);
    end
  end

  // -------------------------------------------------------------------------
  // Filtering side: vertical snake scan
  // -------------------------------------------------------------------------
  typedef enum logic [1:0] {OP_DOWN, OP_UP, OP_SHL} op_e;

  logic          adv;
  logic [4:0]    f_st;       // step within the column
  logic [CB-1:0] f_pcol;     // physical column of the current window column 0
  logic [5:0]    f_ncout;
  logic [4:0]    f_hout;

  // step decode
  logic          a_read, a_outv, a_last_step, a_last;
  op_e           a_op;
  logic [4:0]    a_row, a_orow;
  always_comb begin
    f_ncout = f_d.ncin - 6'(KM);
    f_hout  = f_d.h - 5'(KN);
    if (f_k == 0) begin
      a_op        = OP_DOWN;
      a_read      = 1'b1;
      a_row       = f_st;
      a_outv      = (f_st >= 5'(KN));
      a_orow      = f_st - 5'(KN);
      a_last_step = (f_st == f_d.h - 5'd1);
    end else if (f_st == 0) begin
      a_op        = OP_SHL;
      a_read      = 1'b0;
      a_row       = '0;
      a_outv      = 1'b1;
      a_orow      = f_k[0] ? (f_hout - 5'd1) : 5'd0;
      a_last_step = (f_d.h == 5'(KH));
    end else if (f_k[0]) begin
      a_op        = OP_UP;
      a_read      = 1'b1;
      a_row       = f_d.h - 5'(KH) - f_st;
      a_outv      = 1'b1;
      a_orow      = a_row;
      a_last_step = (f_st == f_d.h - 5'(KH));
    end else begin
      a_op        = OP_DOWN;
      a_read      = 1'b1;
      a_row       = 5'(KN) + f_st;
      a_outv      = 1'b1;
      a_orow      = a_row - 5'(KN);
      a_last_step = (f_st == f_d.h - 5'(KH));
    end
    a_last = a_last_step && (f_k == f_ncout - 6'd1);
  end

  assign dq_rd   = !f_busy && (dq_cnt != 0);
  assign tb_re   = f_busy && adv && a_read;
  assign tb_rcol = f_pcol;
  assign tb_rrow = RB'(a_row);

  // stage B: op in flight with its read
  logic      b_valid, b_outv;
  op_e       b_op;
  pix_meta_t b_meta;
  pix_meta_t a_meta;
  logic      f_first;

  always_comb begin
    a_meta.sof = f_d.sof && f_first;
    a_meta.sor = f_d.sor && f_first;
    a_meta.sot = f_first;
    a_meta.x   = f_d.x0 + CW'(f_k) + CW'(KM / 2);
    a_meta.y   = f_d.y0 + CW'(a_orow) + CW'(KN / 2);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      f_busy  <= 1'b0;
      f_d     <= '0;
      f_k     <= '0;
      f_st    <= '0;
      f_pcol  <= '0;
      f_first <= 1'b0;
      b_valid <= 1'b0;
      b_outv  <= 1'b0;
      b_op    <= OP_DOWN;
      b_meta  <= '0;
    end else begin
      if (dq_rd) begin
        f_busy  <= 1'b1;
        f_d     <= dq[dq_rp];
        f_k     <= '0;
        f_st    <= '0;
        f_pcol  <= dq[dq_rp].wpcol;
        f_first <= 1'b1;
      end
      if (adv) begin
        b_valid <= f_busy;
        b_outv  <= f_busy && a_outv;
        b_op    <= a_op;
        b_meta  <= a_meta;
        if (f_busy) begin
          if (a_outv) f_first <= 1'b0;
          if (a_last) begin
            f_busy <= 1'b0;
          end else if (a_last_step) begin
            f_k    <= f_k + 6'd1;
            f_st   <= '0;
            f_pcol <= pinc(f_pcol);
          end else begin
            f_st <= f_st + 5'd1;
          end
        end
      end
    end
  end

  // active (columns 0..KW-1) and shadow (column KW) registers
  logic [KH-1:0][NBANK-1:0][IW-1:0] arr;
  logic                             w_valid;
  pix_meta_t                        w_meta;
  logic [KH-1:0][KW-1:0][IW-1:0]    win;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      arr     <= '0;
      w_valid <= 1'b0;
      w_meta  <= '0;
    end else if (adv) begin
      w_valid <= b_valid && b_outv;
      w_meta  <= b_meta;
      if (b_valid) begin
        unique case (b_op)
          OP_DOWN: begin
            for (int r = 0; r < KH - 1; r++) arr[r] <= arr[r+1];
            arr[KH-1] <= tb_rdata;
          end
          OP_UP: begin
            for (int r = 1; r < KH; r++) arr[r] <= arr[r-1];
            arr[0] <= tb_rdata;
          end
          default: begin
            for (int r = 0; r < KH; r++)
              for (int c = 0; c < NBANK - 1; c++) arr[r][c] <= arr[r][c+1];
          end
        endcase
      end
    end
  end

  always_comb begin
    for (int r = 0; r < KH; r++)
      for (int c = 0; c < KW; c++) win[r][c] = arr[r][c];
  end

  // -------------------------------------------------------------------------
  // Filter core
  // -------------------------------------------------------------------------
  logic      c_valid, c_flag;
  pix_meta_t c_meta;
  assign adv = !c_valid || out_ready;

  if (KIND == CORE_NR) begin : g_nr
    logic [IW-1:0] c_pix;
    nr_core #(.IW(IW)) u_core (
      .clk(clk), .rst_n(rst_n), .en(adv),
      .thr(cfg.nr_thr), .rs(cfg.nr_rs), .ss(cfg.nr_ss),
      .in_valid(w_valid), .win(win), .in_meta(w_meta),
      .out_valid(c_valid), .out_pix(c_pix), .out_meta(c_meta), .out_median(c_flag)
    );
    assign out_pix = OW'(c_pix);
  end else if (KIND == CORE_CI) begin : g_ci
    logic [3*IW-1:0] c_pix;
    ci_core #(.IW(IW)) u_core (
      .clk(clk), .rst_n(rst_n), .en(adv),
      .in_valid(w_valid), .win(win), .in_meta(w_meta),
      .out_valid(c_valid), .out_pix(c_pix), .out_meta(c_meta)
    );
    assign out_pix = OW'(c_pix);
    assign c_flag  = 1'b0;
  end else begin : g_ee
    logic [IW-1:0] c_pix;
    ee_core #(.IW(IW)) u_core (
      .clk(clk), .rst_n(rst_n), .en(adv),
      .thr(cfg.ee_thr), .alpha(cfg.ee_alpha),
      .in_valid(w_valid), .win(win), .in_meta(w_meta),
      .out_valid(c_valid), .out_pix(c_pix), .out_meta(c_meta), .out_enh(c_flag)
    );
    assign out_pix = OW'(c_pix);
  end

  assign out_valid = c_valid;
  assign out_meta  = c_meta;
  assign out_flag  = c_flag && c_valid && out_ready;

  // -------------------------------------------------------------------------
  // Rules of the streams
  // -------------------------------------------------------------------------
  always_ff @(posedge clk) begin
    if (rst_n && in_valid && !slot_v)
      assert (in_meta.sot) else $error("tpe: tile does not start with sot");
    if (rst_n && tb_we && need_v)
      assert (((px_fire ? cur_l : sq_l) - need_c) < 32'(BUFW))
        else $error("tpe: write would overwrite a column still to be filtered");
  end

endmodule
