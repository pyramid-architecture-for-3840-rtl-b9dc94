// tb_tpe: self-checking testbench of the tile processing element.
//
// Uses the floor-3 element (edge-enhancement core, 24-bit YUV pixels) on a frame
// of 3 x 2 output tiles (48 x 32 output pixels, 54 x 36 input pixels). The bench
// plays the part of the lower floor and of the sequencer: it sends every tile in
// vertical snake order on PIXELI with random gaps, sends the top four rows of the
// second tile row on SEQI, and holds out_ready low at random. It checks
//   * every output pixel against an independent model of the 7x5 unsharp mask,
//   * the order and source-grid position of the outputs (tile by tile, snake),
//   * the IRRO rows (bottom four rows of each loaded column),
//   * that a tile leaves in 256 consecutive cycles once it has started when the
//     output is never stalled (second pass, no random gaps downstream),
// and counts the mechanisms seen: leftmost, topmost and inner tiles, SEQI rows,
// overwrite stalls of PIXELI, pixels sharpened and pixels left alone.
module tb_tpe;
  import ptisp_pkg::*;

  localparam int unsigned NTX = 3, NTY = 2;
  localparam int unsigned W4 = NTX * TS, H4 = NTY * TT;     // output frame
  localparam int unsigned W3 = W4 + KM, H3 = H4 + KN;       // input frame (floor 3)
  localparam int unsigned XO = KM, YO = KN;                 // floor-3 origin on the source grid
  localparam int unsigned WL = TS + KM, HT = TT + KN;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  cfg_t cfg;
  logic in_valid, in_ready, seq_valid, seq_ready, irr_valid, irr_ready;
  logic out_valid, out_ready, out_flag;
  logic [23:0] in_pix, seq_pix, irr_pix, out_pix;
  pix_meta_t in_meta, out_meta;
  logic [CW-1:0] irr_x;
  logic [2:0] irr_k;

  tpe #(.KIND(CORE_EE), .FLOOR(3), .IW(24), .OW(24)) dut (
    .clk, .rst_n, .cfg,
    .in_valid, .in_ready, .in_pix, .in_meta,
    .seq_valid, .seq_ready, .seq_pix,
    .irr_valid, .irr_ready, .irr_pix, .irr_x, .irr_k,
    .out_valid, .out_ready, .out_pix, .out_meta, .out_flag
  );

  int checks = 0, failures = 0;
  logic [23:0] img [H3][W3];

  // stimulus streams
  typedef struct { logic [23:0] p; pix_meta_t m; } item_t;
  item_t px_q[$];
  logic [23:0] sq_q[$];
  int exp_x[$], exp_y[$];

  function automatic logic [7:0] ee_ref(input int cx, input int cy, output logic enh);
    int hk[7] = '{1, 6, 15, 20, 15, 6, 1};
    int vk[5] = '{1, 4, 6, 4, 1};
    int s, blur, z, yc, yn;
    s = 0;
    for (int r = 0; r < 5; r++)
      for (int c = 0; c < 7; c++) s += hk[c] * vk[r] * int'(img[cy - 2 + r][cx - 3 + c][23:16]);
    blur = (s + 512) / 1024;
    yc = int'(img[cy][cx][23:16]);
    z = yc - blur;
    enh = ((z < 0 ? -z : z) > int'(cfg.ee_thr));
    yn = yc + ((z * int'(cfg.ee_alpha) + 8) >>> 4);
    if (yn < 0) yn = 0;
    if (yn > 255) yn = 255;
    return enh ? 8'(yn) : 8'(yc);
  endfunction

  task automatic build_streams();
    for (int ty = 0; ty < NTY; ty++)
      for (int tx = 0; tx < NTX; tx++) begin
        int c0, nc, r0, nr;
        c0 = (tx == 0) ? 0 : WL + (tx - 1) * TS;
        nc = (tx == 0) ? WL : TS;
        r0 = (ty == 0) ? 0 : HT + (ty - 1) * TT;
        nr = (ty == 0) ? HT : TT;
        for (int c = 0; c < nc; c++)
          for (int i = 0; i < nr; i++) begin
            item_t it;
            int row;
            row = (c % 2 == 0) ? r0 + i : r0 + nr - 1 - i;
            it.p = img[row][c0 + c];
            it.m.sof = (tx == 0 && ty == 0 && c == 0 && i == 0);
            it.m.sor = (tx == 0 && c == 0 && i == 0);
            it.m.sot = (c == 0 && i == 0);
            it.m.x = CW'(XO + c0 + c);
            it.m.y = CW'(YO + row);
            px_q.push_back(it);
          end
        if (ty != 0)
          for (int c = 0; c < nc; c++)
            for (int k = 0; k < KN; k++) sq_q.push_back(img[r0 - KN + k][c0 + c]);
        // expected output order
        for (int oc = 0; oc < TS; oc++)
          for (int i = 0; i < TT; i++) begin
            int X, Y;
            X = tx * TS + oc;
            Y = ty * TT + ((oc % 2 == 0) ? i : TT - 1 - i);
            exp_x.push_back(X + 3 * KM / 2);
            exp_y.push_back(Y + 3 * KN / 2);
          end
      end
  endtask

  // drivers
  int gap_pct = 30, stall_pct = 30;
  int n_px_stall = 0, n_seq = 0, n_irr = 0, n_enh = 0, n_keep = 0;
  always @(posedge clk) begin
    if (rst_n) begin
      if (in_valid && !in_ready) n_px_stall++;
      if (!in_valid || in_ready) begin
        if (px_q.size() != 0 && ($urandom_range(99) >= gap_pct)) begin
          item_t it;
          it = px_q.pop_front();
          in_valid <= 1'b1;
          in_pix   <= it.p;
          in_meta  <= it.m;
        end else in_valid <= 1'b0;
      end
      if (seq_valid && seq_ready) n_seq++;
      if (!seq_valid || seq_ready) begin
        if (sq_q.size() != 0 && ($urandom_range(99) >= gap_pct)) begin
          seq_valid <= 1'b1;
          seq_pix   <= sq_q.pop_front();
        end else seq_valid <= 1'b0;
      end
      out_ready <= ($urandom_range(99) >= stall_pct);
      irr_ready <= ($urandom_range(99) >= 10);
    end
  end

  // IRRO check
  always @(posedge clk) begin
    if (rst_n && irr_valid && irr_ready) begin
      int fx, fy;
      n_irr++;
      fx = int'(irr_x) - XO;
      // the row of tiles is known from the order: bottom rows of the current tile row
      checks++;
      begin
        logic hit;
        hit = 0;
        for (int ty = 0; ty < NTY; ty++) begin
          fy = ((ty == 0) ? HT : HT + ty * TT) - KN + int'(irr_k);
          if (fy < H3 && irr_pix == img[fy][fx]) hit = 1;
        end
        if (!hit) begin
          failures++;
          $display("IRR mismatch x=%0d k=%0d", irr_x, irr_k);
        end
      end
    end
  end

  // output check
  int nout = 0;
  int tile_first_cyc = 0, cyc = 0, worst_tile = 0;
  always @(posedge clk) cyc++;
  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      int ex, ey;
      logic enh;
      logic [7:0] yref;
      ex = exp_x.pop_front();
      ey = exp_y.pop_front();
      checks++;
      if (int'(out_meta.x) != ex || int'(out_meta.y) != ey) begin
        failures++;
        if (failures < 10) $display("order mismatch: got (%0d,%0d) exp (%0d,%0d)", out_meta.x, out_meta.y, ex, ey);
      end
      yref = ee_ref(ex - XO, ey - YO, enh);
      checks++;
      if (out_pix != {yref, img[ey - YO][ex - XO][15:0]}) begin
        failures++;
        if (failures < 10) $display("pixel mismatch at (%0d,%0d): got %h exp %h", ex, ey, out_pix, {yref, img[ey - YO][ex - XO][15:0]});
      end
      checks++;
      if (out_meta.sot != (nout % (TS * TT) == 0)) failures++;
      if (enh) n_enh++; else n_keep++;
      if (nout % (TS * TT) == 0) tile_first_cyc = cyc;
      if (nout % (TS * TT) == TS * TT - 1 && cyc - tile_first_cyc > worst_tile) worst_tile = cyc - tile_first_cyc;
      nout++;
    end
  end

  task automatic run_frame();
    build_streams();
    wait (exp_x.size() == 0);
    repeat (20) @(posedge clk);
    checks++;
    if (px_q.size() != 0 || sq_q.size() != 0) begin
      failures++;
      $display("streams not consumed");
    end
  endtask

  initial begin
    in_valid = 0; seq_valid = 0; out_ready = 0; irr_ready = 0;
    in_pix = '0; seq_pix = '0; in_meta = '0;
    cfg = '0;
    cfg.ee_thr = 8'd12;
    cfg.ee_alpha = 8'd24;
    for (int y = 0; y < H3; y++)
      for (int x = 0; x < W3; x++) img[y][x] = 24'($urandom);
    repeat (3) @(posedge clk);
    rst_n = 1;
    // pass 1: random gaps and stalls
    run_frame();
    // pass 2: full rate, no output stalls
    gap_pct = 0;
    stall_pct = 0;
    worst_tile = 0;
    run_frame();
    checks++;
    if (worst_tile != TS * TT - 1) begin
      failures++;
      $display("tile output not continuous: %0d cycles for 256 pixels", worst_tile + 1);
    end
    // mechanisms
    checks += 4;
    if (n_seq == 0)      begin failures++; $display("SEQI never used"); end
    if (n_irr == 0)      begin failures++; $display("IRRO never used"); end
    if (n_enh == 0)      begin failures++; $display("no pixel sharpened"); end
    if (n_keep == 0)     begin failures++; $display("no pixel kept"); end
    $display("tpe: outputs=%0d seq=%0d irr=%0d enh=%0d keep=%0d pixeli_stalls=%0d tile_cycles=%0d",
             nout, n_seq, n_irr, n_enh, n_keep, n_px_stall, worst_tile + 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
