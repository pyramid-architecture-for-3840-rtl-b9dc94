// tb_sequencer: self-checking testbench of the sequencer.
//
// The frame is reduced to 3 x 2 output tiles (source 66 x 44 pixels). A memory
// model on the request port holds the source frame and the IRR stores; it takes
// requests with random back-pressure and returns read data in order after a
// random delay. The bench plays the three TPEs: for every tile row each one
// stores the bottom four rows of its floor (IRRO, in tile order with random
// gaps), and for every tile row after the first it takes the four rows back on
// SEQI (random ready) and checks each word against what it stored one tile row
// earlier, column by column in tile order. A TPE stores tile row r only after it
// has taken the read-back of row r, as the real element does. The source stream
// must arrive in tile raster order, vertical snake inside each tile, with the
// right pixel, position and sof/sor/sot flags. Request counts are checked
// (source read once, IRR written and read once per word), as is busy. A second
// frame with no back-pressure anywhere must take no more cycles than its memory
// transfers plus a small margin, one transfer per cycle.
module tb_sequencer;
  import ptisp_pkg::*;

  localparam int IMG_W = 48, IMG_H = 32;
  localparam int NTX = IMG_W / TS, NTY = IMG_H / TT;
  localparam int SW = IMG_W + 3 * KM, SH = IMG_H + 3 * KN;
  localparam int SRC = 100, IRRB = 10000;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  cfg_t cfg;
  logic start, busy, src_valid, src_ready;
  logic [9:0] src_pix;
  pix_meta_t src_meta;
  logic [2:0] irr_valid, irr_ready, seq_valid, seq_ready;
  logic [2:0][23:0] irr_pix, seq_pix;
  logic [2:0][CW-1:0] irr_x;
  logic [2:0][2:0] irr_k;
  logic req_valid, req_ready, req_we, rsp_valid;
  logic [31:0] req_addr, req_wdata, rsp_data;
  logic [2:0] req_tag, rsp_tag;

  sequencer #(.IMG_W(IMG_W), .IMG_H(IMG_H)) dut (
    .clk, .rst_n, .cfg, .start, .busy,
    .src_valid, .src_ready, .src_pix, .src_meta,
    .irr_valid, .irr_ready, .irr_pix, .irr_x, .irr_k,
    .seq_valid, .seq_ready, .seq_pix,
    .req_valid, .req_ready, .req_we, .req_addr, .req_wdata, .req_tag,
    .rsp_valid, .rsp_data, .rsp_tag
  );

  int checks = 0, failures = 0;
  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  // ---------------------------------------------------------------- memory
  logic [31:0] mem [int];
  logic [31:0] rq_d[$];
  logic [2:0]  rq_t[$];
  int n_src = 0, n_wr = 0, n_rd = 0, bp_pct = 25, lat_pct = 30;
  always @(posedge clk) begin
    if (!rst_n) begin
      rsp_valid <= 0;
      req_ready <= 0;
    end else begin
      if (req_valid && req_ready) begin
        if (req_we) begin
          chk(int'(req_addr) >= IRRB, "write outside the IRR stores");
          mem[int'(req_addr)] = req_wdata;
          n_wr++;
        end else begin
          rq_d.push_back(mem.exists(int'(req_addr)) ? mem[int'(req_addr)] : 32'hbad0_bad0);
          rq_t.push_back(req_tag);
          if (req_tag == 0) n_src++; else n_rd++;
        end
      end
      if (rq_d.size() != 0 && $urandom_range(99) >= lat_pct) begin
        rsp_valid <= 1;
        rsp_data  <= rq_d.pop_front();
        rsp_tag   <= rq_t.pop_front();
      end else rsp_valid <= 0;
      req_ready <= ($urandom_range(99) >= bp_pct);
    end
  end

  // ---------------------------------------------------------------- source check
  int exp_x[$], exp_y[$];
  logic [2:0] exp_f[$];
  int n_srcout = 0;
  always @(posedge clk) begin
    if (rst_n) begin
      if (src_valid && src_ready) begin
        int ex, ey;
        logic [2:0] ef;
        ex = exp_x.pop_front();
        ey = exp_y.pop_front();
        ef = exp_f.pop_front();
        chk(int'(src_meta.x) == ex && int'(src_meta.y) == ey,
            $sformatf("source order: got (%0d,%0d) expected (%0d,%0d)", src_meta.x, src_meta.y, ex, ey));
        chk(src_pix == 10'(mem[SRC + ey * SW + ex]), "source pixel");
        chk({src_meta.sof, src_meta.sor, src_meta.sot} == ef, "source flags");
        n_srcout++;
      end
      src_ready <= ($urandom_range(99) >= bp_pct);
    end
  end

  task automatic build_source_order();
    for (int ty = 0; ty < NTY; ty++)
      for (int tx = 0; tx < NTX; tx++) begin
        int c0, nc, r0, nr;
        c0 = (tx == 0) ? 0 : TS + 3 * KM + (tx - 1) * TS;
        nc = (tx == 0) ? TS + 3 * KM : TS;
        r0 = (ty == 0) ? 0 : TT + 3 * KN + (ty - 1) * TT;
        nr = (ty == 0) ? TT + 3 * KN : TT;
        for (int c = 0; c < nc; c++)
          for (int i = 0; i < nr; i++) begin
            exp_x.push_back(c0 + c);
            exp_y.push_back((c % 2 == 0) ? r0 + i : r0 + nr - 1 - i);
            exp_f.push_back({ty == 0 && tx == 0 && c == 0 && i == 0, tx == 0 && c == 0 && i == 0, c == 0 && i == 0});
          end
      end
  endtask

  // ---------------------------------------------------------------- TPE models
  function automatic logic [23:0] irr_val(input int j, input int ty, input int x, input int k);
    return 24'((j << 20) ^ (ty * 4099 + x * 37 + k * 1031 + 5));
  endfunction

  int n_seq [3] = '{0, 0, 0};
  int n_irr [3] = '{0, 0, 0};
  int gap_pct = 30;

  for (genvar j = 0; j < 3; j++) begin : g_tpe
    localparam int WJ = IMG_W + (3 - j) * KM, WLJ = TS + (3 - j) * KM, XOJ = j * KM / 2;
    int seq_rows_taken = 0;
    // expected SEQI order: per tile row ty >= 1, tiles left to right, columns, k
    int sx[$], sk[$], sty[$];
    initial begin
      irr_valid[j] = 0;
      seq_ready[j] = 0;
      irr_pix[j] = '0;
      irr_x[j] = '0;
      irr_k[j] = '0;
    end
    task automatic build();
      for (int ty = 1; ty < NTY; ty++)
        for (int tx = 0; tx < NTX; tx++) begin
          int c0, nc;
          c0 = (tx == 0) ? 0 : WLJ + (tx - 1) * TS;
          nc = (tx == 0) ? WLJ : TS;
          for (int c = 0; c < nc; c++)
            for (int k = 0; k < KN; k++) begin
              sx.push_back(XOJ + c0 + c);
              sk.push_back(k);
              sty.push_back(ty - 1);
            end
        end
    endtask
    always @(posedge clk) begin
      if (rst_n) begin
        if (seq_valid[j] && seq_ready[j]) begin
          int x, k, ty;
          x = sx.pop_front();
          k = sk.pop_front();
          ty = sty.pop_front();
          chk(seq_pix[j] == irr_val(j, ty, x, k), $sformatf("SEQI %0d: x %0d k %0d", j, x, k));
          n_seq[j]++;
          if (sx.size() == 0 || sty[0] != ty) seq_rows_taken++;
        end
        seq_ready[j] <= ($urandom_range(99) >= gap_pct);
      end
    end
    // IRRO producer: tile row ty after the read-back of row ty
    int ix[$], ik[$], ity[$];
    task automatic build_irr();
      for (int ty = 0; ty < NTY; ty++)
        for (int tx = 0; tx < NTX; tx++) begin
          int c0, nc;
          c0 = (tx == 0) ? 0 : WLJ + (tx - 1) * TS;
          nc = (tx == 0) ? WLJ : TS;
          for (int c = 0; c < nc; c++)
            for (int i = 0; i < KN; i++) begin
              ix.push_back(XOJ + c0 + c);
              ik.push_back((c % 2 == 0) ? i : KN - 1 - i);
              ity.push_back(ty);
            end
        end
    endtask
    always @(posedge clk) begin
      if (rst_n) begin
        if (irr_valid[j] && irr_ready[j]) n_irr[j]++;
        if (!irr_valid[j] || irr_ready[j]) begin
          if (ix.size() != 0 && ity[0] <= seq_rows_taken && $urandom_range(99) >= gap_pct) begin
            irr_valid[j] <= 1;
            irr_pix[j] <= irr_val(j, ity[0], ix[0], ik[0]);
            irr_x[j] <= CW'(ix.pop_front());
            irr_k[j] <= 3'(ik.pop_front());
            void'(ity.pop_front());
          end else irr_valid[j] <= 0;
        end
      end
    end
  end

  task automatic run_frame();
    build_source_order();
    g_tpe[0].build();
    g_tpe[1].build();
    g_tpe[2].build();
    g_tpe[0].seq_rows_taken = 0;
    g_tpe[1].seq_rows_taken = 0;
    g_tpe[2].seq_rows_taken = 0;
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    g_tpe[0].build_irr();
    g_tpe[1].build_irr();
    g_tpe[2].build_irr();
    wait (exp_x.size() == 0);
    wait (g_tpe[0].ix.size() == 0 && g_tpe[1].ix.size() == 0 && g_tpe[2].ix.size() == 0);
    wait (g_tpe[0].sx.size() == 0 && g_tpe[1].sx.size() == 0 && g_tpe[2].sx.size() == 0);
    wait (!busy);
  endtask

  initial begin
    int c0, w0, total;
    cfg = '0;
    cfg.src_base = SRC;
    cfg.irr_base1 = IRRB;
    cfg.irr_base2 = IRRB + 2000;
    cfg.irr_base3 = IRRB + 4000;
    start = 0;
    for (int i = 0; i < SW * SH; i++) mem[SRC + i] = 32'($urandom_range(1023));
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_frame();
    chk(n_src == SW * SH, "source read once");
    total = 0;
    for (int j = 0; j < 3; j++) begin
      int wj;
      wj = IMG_W + (3 - j) * KM;
      chk(n_irr[j] == NTY * KN * wj, "IRR words produced");
      chk(n_seq[j] == (NTY - 1) * KN * wj, "IRR words returned");
      total += (2 * NTY - 1) * KN * wj;
    end
    chk(n_wr + n_rd == total, "IRR memory transfers");
    // second frame, nothing stalls
    bp_pct = 0;
    lat_pct = 0;
    gap_pct = 0;
    n_src = 0;
    n_wr = 0;
    n_rd = 0;
    c0 = $time / 10;
    run_frame();
    w0 = n_src + n_wr + n_rd;
    chk($time / 10 - c0 <= w0 + 64, $sformatf("frame time %0d cycles for %0d transfers", $time / 10 - c0, w0));
    $display("sequencer: 2 frames, %0d source pixels, IRR words %0d; unstalled frame %0d cycles for %0d transfers",
             n_srcout, n_irr[0] + n_irr[1] + n_irr[2], $time / 10 - c0, w0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired: source left %0d, SEQI left %0d %0d %0d, IRR %0d %0d %0d, busy %0d",
             exp_x.size(), g_tpe[0].sx.size(), g_tpe[1].sx.size(), g_tpe[2].sx.size(),
             n_irr[0], n_irr[1], n_irr[2], busy);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
