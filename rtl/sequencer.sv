// sequencer: tile-order fetch of the source frame and external storage of the
// vertical immediate results of the three TPEs.
//
// After start, the sequencer walks the source (floor 1) frame of
// (W+3m) x (H+3n) Bayer pixels tile by tile, tile rows top to bottom and tiles
// left to right, and sends each tile in vertical snake order (even columns top
// to bottom, odd columns bottom to top) to the first PPE, with sof, sor and sot
// flags and the source-grid position of every pixel. The first tile of a row
// is s+3m columns wide, the others s; tiles of the first row are t+3n rows high,
// the others t, because their top n rows reach TPE 1 from the IRR store instead.
//
// The output frame W x H is IMG_W x IMG_H (the build maximum) unless
// cfg.frame_tx / cfg.frame_ty give a smaller number of 16 x 16 tiles; the size
// is taken when start is seen and holds for the frame.
//
// For TPE j (floor j, width W+(4-j)m) it stores the bottom n rows of each tile
// row (IRRO) in external memory, in two alternating banks of n rows, and reads
// them back column by column for the next tile row (SEQI). A read-back of tile
// row r waits until all of tile row r-1 has been stored.
//
// External memory holds one pixel per 32-bit word. Source word address =
// src_base + y*(W+3m) + x; IRR word address = irr_base_j + bank*n*Wj + k*Wj +
// column on floor j. All accesses go through one request port (ahb_master):
// IRR writes first (TPE 3, 2, 1), then IRR reads (TPE 3, 2, 1), then source reads.
// Each read stream has an 8-word return FIFO and issues no more reads than it
// has room for, so a stalled consumer never blocks the bus.
//
// Follows the document: source fetch by tiles, IRR of the three TPEs through
// external memory (the data of its bandwidth table), automatic address
// generation. This design's choices: one pixel per word (the document packs
// vertical reuse data into bursts), the bank scheme and the arbitration order.
module sequencer
  import ptisp_pkg::*;
#(
  parameter int unsigned IMG_W = 3840,
  parameter int unsigned IMG_H = 2160
) (
  input  logic            clk,
  input  logic            rst_n,
  input  cfg_t            cfg,
  input  logic            start,
  output logic            busy,
  // source pixels to PPE f1
  output logic            src_valid,
  input  logic            src_ready,
  output logic [9:0]      src_pix,
  output pix_meta_t       src_meta,
  // IRRO of TPE 1..3
  input  logic [2:0]      irr_valid,
  output logic [2:0]      irr_ready,
  input  logic [2:0][23:0] irr_pix,
  input  logic [2:0][CW-1:0] irr_x,
  input  logic [2:0][2:0] irr_k,
  // SEQI of TPE 1..3
  output logic [2:0]      seq_valid,
  input  logic [2:0]      seq_ready,
  output logic [2:0][23:0] seq_pix,
  // memory request port
  output logic            req_valid,
  input  logic            req_ready,
  output logic            req_we,
  output logic [31:0]     req_addr,
  output logic [31:0]     req_wdata,
  output logic [2:0]      req_tag,
  input  logic            rsp_valid,
  input  logic [31:0]     rsp_data,
  input  logic [2:0]      rsp_tag
);
  localparam int unsigned NTX  = IMG_W / TS;
  localparam int unsigned NTY  = IMG_H / TT;
  localparam int unsigned WL1  = TS + 3 * KM;
  localparam int unsigned HT1  = TT + 3 * KN;
  localparam int unsigned FD   = 8;

  // tags: 0 source, 1..3 IRR of TPE 1..3
  logic [31:0] irr_base [3];
  assign irr_base[0] = cfg.irr_base1;
  assign irr_base[1] = cfg.irr_base2;
  assign irr_base[2] = cfg.irr_base3;

  // ---------------------------------------------------------------------------
  // Frame size, taken at start: cfg.frame_tx x cfg.frame_ty output tiles, 0 or a
  // value above the build maximum selects the maximum (IMG_W/16 x IMG_H/16)
  // ---------------------------------------------------------------------------
  logic [7:0]  ntx_sel, nty_sel, f_ntx, f_nty;
  logic [12:0] f_sw;                 // source width in pixels, 16*ntx + 3m
  assign ntx_sel = (cfg.frame_tx == 8'd0 || 32'(cfg.frame_tx) > NTX) ? 8'(NTX) : cfg.frame_tx;
  assign nty_sel = (cfg.frame_ty == 8'd0 || 32'(cfg.frame_ty) > NTY) ? 8'(NTY) : cfg.frame_ty;
  assign f_sw    = {1'b0, f_ntx, 4'd0} + 13'(3 * KM);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      f_ntx <= 8'(NTX);
      f_nty <= 8'(NTY);
    end else if (start) begin
      f_ntx <= ntx_sel;
      f_nty <= nty_sel;
    end
  end

  // ---------------------------------------------------------------------------
  // Source address generator
  // ---------------------------------------------------------------------------
  logic        s_act;
  logic [11:0] s_tx, s_ty;
  logic [5:0]  s_c, s_i;
  logic [5:0]  s_nc, s_nr;
  logic [CW-1:0] s_x, s_y;
  logic [31:0] s_addr;
  logic        s_issue;
  pix_meta_t   s_meta;
  logic [3:0]  s_pend;       // words issued and not yet taken by the consumer

  always_comb begin
    s_nc   = (s_tx == 0) ? 6'(WL1) : 6'(TS);
    s_nr   = (s_ty == 0) ? 6'(HT1) : 6'(TT);
    s_x    = (s_tx == 0) ? CW'(s_c) : CW'(32'(WL1) + (32'(s_tx) - 1) * TS + 32'(s_c));
    s_y    = CW'(((s_ty == 0) ? 32'd0 : 32'(HT1) + (32'(s_ty) - 1) * TT)
                 + (s_c[0] ? 32'(s_nr) - 1 - 32'(s_i) : 32'(s_i)));
    s_addr = cfg.src_base + 32'(s_y) * 32'(f_sw) + 32'(s_x);
    s_meta.sof = (s_tx == 0) && (s_ty == 0) && (s_c == 0) && (s_i == 0);
    s_meta.sor = (s_tx == 0) && (s_c == 0) && (s_i == 0);
    s_meta.sot = (s_c == 0) && (s_i == 0);
    s_meta.x   = s_x;
    s_meta.y   = s_y;
  end

  // ---------------------------------------------------------------------------
  // IRR writers and readers, one per TPE
  // ---------------------------------------------------------------------------
  logic [2:0]        w_req;
  logic [2:0][31:0]  w_addr;
  logic [2:0]        r_req;
  logic [2:0][31:0]  r_addr;
  logic [2:0]        r_issue, w_issue;
  logic [2:0][11:0]  w_rows_done;   // tile rows whose IRR is fully stored

  for (genvar j = 0; j < 3; j++) begin : g_irr
    localparam int unsigned WLJ = TS + (3 - j) * KM;       // leftmost tile width
    localparam int unsigned XOJ = j * KM / 2;              // floor origin on the source grid
    logic [31:0] WJ, RW;                                   // floor width, words per tile row
    assign WJ = 32'({f_ntx, 4'd0}) + 32'((3 - j) * KM);
    assign RW = 32'(KN) * WJ;

    // writer
    logic [31:0] w_cnt;
    logic        w_bank;
    always_comb begin
      w_req[j]  = irr_valid[j];
      w_addr[j] = irr_base[j] + (w_bank ? RW : 32'd0) + 32'(irr_k[j]) * WJ
                  + (32'(irr_x[j]) - XOJ);
    end
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        w_cnt          <= '0;
        w_bank         <= 1'b0;
        w_rows_done[j] <= '0;
      end else if (start) begin
        w_cnt          <= '0;
        w_bank         <= 1'b0;
        w_rows_done[j] <= '0;
      end else if (w_issue[j]) begin
        if (w_cnt == RW - 32'd1) begin
          w_cnt          <= '0;
          w_bank         <= !w_bank;
          w_rows_done[j] <= w_rows_done[j] + 1'b1;
        end else begin
          w_cnt <= w_cnt + 1'b1;
        end
      end
    end

    // reader
    logic        r_act;
    logic [11:0] r_ty, r_tx;
    logic [5:0]  r_c;
    logic [2:0]  r_k;
    logic [3:0]  r_pend;
    logic [5:0]  r_nc;
    logic [31:0] r_col;
    logic        r_pop;
    always_comb begin
      r_nc      = (r_tx == 0) ? 6'(WLJ) : 6'(TS);
      r_col     = (r_tx == 0) ? 32'(r_c) : 32'(WLJ) + (32'(r_tx) - 1) * TS + 32'(r_c);
      r_addr[j] = irr_base[j] + (r_ty[0] ? 32'd0 : RW) + 32'(r_k) * WJ + r_col;
      r_req[j]  = r_act && (w_rows_done[j] >= r_ty) && (r_pend < 4'(FD));
    end

    logic [23:0] rf_data;
    logic        rf_valid;
    stream_fifo #(.W(24), .DEPTH(FD)) u_rfifo (
      .clk, .rst_n,
      .in_valid (rsp_valid && rsp_tag == 3'(j + 1)),
      .in_ready (),
      .in_data  (rsp_data[23:0]),
      .out_valid(rf_valid),
      .out_ready(seq_ready[j]),
      .out_data (rf_data),
      .count    ()
    );
    assign seq_valid[j] = rf_valid;
    assign seq_pix[j]   = rf_data;
    assign r_pop        = rf_valid && seq_ready[j];

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        r_act  <= 1'b0;
        r_ty   <= 12'd1;
        r_tx   <= '0;
        r_c    <= '0;
        r_k    <= '0;
        r_pend <= '0;
      end else begin
        r_pend <= r_pend + 4'(r_issue[j]) - 4'(r_pop);
        if (start) begin
          r_act <= (nty_sel > 8'd1);
          r_ty  <= 12'd1;
          r_tx  <= '0;
          r_c   <= '0;
          r_k   <= '0;
        end else if (r_issue[j]) begin
          if (r_k == 3'(KN - 1)) begin
            r_k <= '0;
            if (r_c == r_nc - 6'd1) begin
              r_c <= '0;
              if (r_tx == 12'(f_ntx) - 12'd1) begin
                r_tx <= '0;
                if (r_ty == 12'(f_nty) - 12'd1) r_act <= 1'b0;
                r_ty <= r_ty + 1'b1;
              end else r_tx <= r_tx + 1'b1;
            end else r_c <= r_c + 1'b1;
          end else r_k <= r_k + 1'b1;
        end
      end
    end
  end

  // ---------------------------------------------------------------------------
  // Source return path: tags in a FIFO beside the data
  // ---------------------------------------------------------------------------
  logic      sm_valid, sd_valid;
  pix_meta_t sm_data;
  logic [9:0] sd_data;
  logic      s_pop;

  stream_fifo #(.W($bits(pix_meta_t)), .DEPTH(FD)) u_smeta (
    .clk, .rst_n,
    .in_valid (s_issue), .in_ready(), .in_data(s_meta),
    .out_valid(sm_valid), .out_ready(s_pop), .out_data(sm_data), .count()
  );
  stream_fifo #(.W(10), .DEPTH(FD)) u_sdata (
    .clk, .rst_n,
    .in_valid (rsp_valid && rsp_tag == 3'd0), .in_ready(), .in_data(rsp_data[9:0]),
    .out_valid(sd_valid), .out_ready(s_pop), .out_data(sd_data), .count()
  );
  assign src_valid = sm_valid && sd_valid;
  assign src_pix   = sd_data;
  assign src_meta  = sm_data;
  assign s_pop     = src_valid && src_ready;

  // ---------------------------------------------------------------------------
  // Arbitration
  // ---------------------------------------------------------------------------
  logic [1:0] wsel, rsel;
  always_comb begin
    wsel      = w_req[2] ? 2'd2 : (w_req[1] ? 2'd1 : 2'd0);
    rsel      = r_req[2] ? 2'd2 : (r_req[1] ? 2'd1 : 2'd0);
    w_issue   = '0;
    r_issue   = '0;
    s_issue   = 1'b0;
    req_valid = 1'b0;
    req_we    = 1'b0;
    req_addr  = '0;
    req_wdata = '0;
    req_tag   = '0;
    if (w_req != '0) begin
      req_valid      = 1'b1;
      req_we         = 1'b1;
      req_addr       = w_addr[wsel];
      req_wdata      = {8'd0, irr_pix[wsel]};
      w_issue[wsel]  = req_ready;
    end else if (r_req != '0) begin
      req_valid      = 1'b1;
      req_addr       = r_addr[rsel];
      req_tag        = {1'b0, rsel} + 3'd1;
      r_issue[rsel]  = req_ready;
    end else if (s_act && s_pend < 4'(FD)) begin
      req_valid = 1'b1;
      req_addr  = s_addr;
      req_tag   = 3'd0;
      s_issue   = req_ready;
    end
  end
  assign irr_ready = w_issue;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_act  <= 1'b0;
      s_tx   <= '0;
      s_ty   <= '0;
      s_c    <= '0;
      s_i    <= '0;
      s_pend <= '0;
    end else begin
      s_pend <= s_pend + 4'(s_issue) - 4'(s_pop);
      if (start && !s_act) begin
        s_act <= 1'b1;
        s_tx  <= '0;
        s_ty  <= '0;
        s_c   <= '0;
        s_i   <= '0;
      end else if (s_issue) begin
        if (s_i == s_nr - 6'd1) begin
          s_i <= '0;
          if (s_c == s_nc - 6'd1) begin
            s_c <= '0;
            if (s_tx == 12'(f_ntx) - 12'd1) begin
              s_tx <= '0;
              if (s_ty == 12'(f_nty) - 12'd1) s_act <= 1'b0;
              s_ty <= s_ty + 1'b1;
            end else s_tx <= s_tx + 1'b1;
          end else s_c <= s_c + 1'b1;
        end else s_i <= s_i + 1'b1;
      end
    end
  end

  assign busy = s_act || (s_pend != 0);

endmodule
