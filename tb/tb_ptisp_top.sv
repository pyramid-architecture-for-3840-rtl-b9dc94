// tb_ptisp_top: end-to-end test of the pyramid image signal processor.
//
// A host model programs the settings through the AHB slave and starts one
// frame. A memory model on the AHB master port holds the Bayer source frame
// and the three IRR stores and inserts random wait states; the output stream is
// stalled at random. Every output pixel is compared with a frame-based model of
// the whole pipeline written without tiles: black level, lens shading, noise
// reduction (median/bilateral switch), white balance, gamma, bilinear
// demosaic, colour matrix, RGB to YUV and unsharp-mask edge enhancement, each applied to the
// whole floor. Output order (tile raster, vertical snake in a tile) and
// source-grid positions are checked too, as are the register read-back and the
// number of memory transfers. Mechanisms counted and required: leftmost,
// topmost and inner tiles, median and bilateral results, sharpened and kept
// luma, IRR stores and read-backs, bus wait states, output stalls and load
// stalls of a TPE.
// The frame size is reduced by parameters (NTX x NTY output tiles).
module tb_ptisp_top;
  import ptisp_pkg::*;

  localparam int unsigned NTX = 4, NTY = 3;
  localparam int unsigned W = NTX * TS, H = NTY * TT;
  localparam int unsigned SW = W + 3 * KM, SH = H + 3 * KN;
  localparam int unsigned IRR1 = SW * SH;
  localparam int unsigned IRR2 = IRR1 + 2 * KN * (W + 3 * KM);
  localparam int unsigned IRR3 = IRR2 + 2 * KN * (W + 2 * KM);
  localparam int unsigned MEMW = IRR3 + 2 * KN * (W + KM);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        s_hsel, s_hwrite, s_hreadyout, s_hresp;
  logic [31:0] s_haddr, s_hwdata, s_hrdata;
  logic [1:0]  s_htrans;
  logic [31:0] m_haddr, m_hwdata, m_hrdata;
  logic [1:0]  m_htrans;
  logic        m_hwrite, m_hready;
  logic [2:0]  m_hsize, m_hburst;
  logic        out_valid, out_ready, busy, ev_median, ev_enh;
  logic [23:0] out_yuv;
  pix_meta_t   out_meta;

  ptisp_top #(.IMG_W(W), .IMG_H(H)) dut (
    .clk, .rst_n,
    .s_hsel, .s_haddr, .s_htrans, .s_hwrite, .s_hwdata, .s_hready(s_hreadyout),
    .s_hreadyout, .s_hresp, .s_hrdata,
    .m_haddr, .m_htrans, .m_hwrite, .m_hsize, .m_hburst, .m_hwdata, .m_hrdata, .m_hready,
    .out_valid, .out_ready, .out_yuv, .out_meta, .busy, .ev_median, .ev_enh
  );

  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 15) $display("FAIL: %s", what);
    end
  endtask

  // ---------------------------------------------------------------- memory
  logic [31:0] mem [MEMW];
  logic        dp_v, dp_we;
  logic [31:0] dp_a;
  int          n_wait = 0, n_irr_wr = 0, n_irr_rd = 0, n_src_rd = 0;
  int          wait_pct = 20;
  assign m_hrdata = (dp_v && !dp_we && dp_a < MEMW) ? mem[dp_a] : 32'd0;
  always @(posedge clk) begin
    if (!rst_n) begin
      dp_v <= 0;
      m_hready <= 1;
    end else begin
      if (!m_hready) n_wait++;
      if (m_hready) begin
        if (dp_v && dp_we) begin
          mem[dp_a] = m_hwdata;
          n_irr_wr++;
        end
        if (dp_v && !dp_we) begin
          if (dp_a >= IRR1) n_irr_rd++; else n_src_rd++;
        end
        dp_v  <= m_htrans[1];
        dp_we <= m_hwrite;
        dp_a  <= m_haddr >> 2;
        if (m_htrans[1]) begin
          checks++;
          if ((m_haddr >> 2) >= MEMW || m_hsize != 3'b010 || m_hburst != 3'b000) failures++;
          if (m_hwrite && (m_haddr >> 2) < IRR1) begin
            failures++;
            $display("FAIL: write into the source frame");
          end
        end
      end
      m_hready <= ($urandom_range(99) >= wait_pct);
    end
  end

  // ---------------------------------------------------------------- host
  task automatic ahb_write(input logic [7:0] a, input logic [31:0] d);
    @(negedge clk);
    s_hsel = 1; s_htrans = 2'b10; s_hwrite = 1; s_haddr = 32'(a);
    @(negedge clk);
    s_hsel = 0; s_htrans = 2'b00; s_hwrite = 0; s_hwdata = d;
  endtask
  task automatic ahb_read(input logic [7:0] a, output logic [31:0] d);
    @(negedge clk);
    s_hsel = 1; s_htrans = 2'b10; s_hwrite = 0; s_haddr = 32'(a);
    @(negedge clk);
    s_hsel = 0; s_htrans = 2'b00;
    #1 d = s_hrdata;
  endtask

  // ---------------------------------------------------------------- reference
  int blc = 32, cx = SW / 2, cy = SH / 2, lk = 6000;
  int wbr = 300, wbg = 256, wbb = 350;
  int nthr = 64, nrs = 3, nss = 1, ethr = 4, ealpha = 24;
  int ccm [3][3] = '{'{280, -16, -8}, '{-20, 270, 6}, '{-6, -30, 292}};
  int src [SH][SW];
  int fa  [SH][SW];     // after f1, f2
  int fb  [SH][SW];     // after f3, f4, f5 (valid inside the floor-2 area)
  int fc  [SH][SW];     // after f6, colour correction, f7 as {Y,U,V}
  int fd  [SH][SW];     // after f8
  int ref_med [SH][SW];
  int ref_enh [SH][SW];

  function automatic int clip(input int v, input int hi);
    return v < 0 ? 0 : (v > hi ? hi : v);
  endfunction

  function automatic int gamma_ref(input int v);
    int s, f, k0, k1;
    s = v / 32;
    f = v % 32;
    k0 = int'($floor(255.0 * ((real'(s) / 32.0) ** 0.45) + 0.5));
    k1 = int'($floor(255.0 * ((real'(s + 1) / 32.0) ** 0.45) + 0.5));
    return (k0 * 32 + (k1 - k0) * f + 16) / 32;
  endfunction

  task automatic build_reference();
    for (int y = 0; y < SH; y++)
      for (int x = 0; x < SW; x++) begin
        longint r2, g;
        int v;
        v = src[y][x] > blc ? src[y][x] - blc : 0;
        r2 = longint'((x - cx) * (x - cx) + (y - cy) * (y - cy));
        g = 256 + ((r2 * lk) >> 16);
        if (g > 1023) g = 1023;
        fa[y][x] = clip(int'((longint'(v) * g + 128) >> 8), 1023);
      end
    // floor 2: NR, then WB and gamma
    for (int y = 2; y < SH - 2; y++)
      for (int x = 3; x < SW - 3; x++) begin
        int p[9], sum8, avg, dev, med, num, den, res, gain, wbv;
        for (int j = 0; j < 9; j++) p[j] = fa[y - 2 + 2 * (j / 3)][x - 2 + 2 * (j % 3)];
        sum8 = 0;
        for (int j = 0; j < 9; j++) if (j != 4) sum8 += p[j];
        avg = sum8 / 8;
        dev = p[4] > avg ? p[4] - avg : avg - p[4];
        begin
          int srt[9];
          srt = p;
          srt.sort();
          med = srt[4];
        end
        num = 0; den = 0;
        for (int j = 0; j < 9; j++) begin
          int d, kr, wr, ws;
          d = p[j] > p[4] ? p[j] - p[4] : p[4] - p[j];
          kr = d >> nrs;
          wr = kr >= 7 ? 0 : 64 >> kr;
          ws = (j == 4) ? 64 : ((j % 2 == 1) ? 64 >> nss : 64 >> (2 * nss));
          num += wr * ws * p[j];
          den += wr * ws;
        end
        ref_med[y][x] = (dev > nthr);
        res = (dev > nthr) ? med : (num + den / 2) / den;
        gain = (y % 2 == 0 && x % 2 == 0) ? wbr : ((y % 2 == 1 && x % 2 == 1) ? wbb : wbg);
        wbv = clip((res * gain + 128) >> 8, 1023);
        fb[y][x] = gamma_ref(wbv);
      end
    // floor 3: demosaic, colour matrix and RGB to YUV
    for (int y = 4; y < SH - 4; y++)
      for (int x = 6; x < SW - 6; x++) begin
        int c, cr, dg, we, ns, r, g, b, yy, uu, vv;
        c  = fb[y][x];
        cr = (fb[y-1][x] + fb[y+1][x] + fb[y][x-1] + fb[y][x+1] + 2) / 4;
        dg = (fb[y-1][x-1] + fb[y-1][x+1] + fb[y+1][x-1] + fb[y+1][x+1] + 2) / 4;
        we = (fb[y][x-1] + fb[y][x+1] + 1) / 2;
        ns = (fb[y-1][x] + fb[y+1][x] + 1) / 2;
        case (2 * (y % 2) + x % 2)
          0: begin r = c;  g = cr; b = dg; end
          1: begin r = we; g = c;  b = ns; end
          2: begin r = ns; g = c;  b = we; end
          default: begin r = dg; g = cr; b = c; end
        endcase
        begin
          int m[3], o[3];
          m = '{r, g, b};
          for (int i = 0; i < 3; i++)
            o[i] = clip((ccm[i][0] * m[0] + ccm[i][1] * m[1] + ccm[i][2] * m[2] + 128) >>> 8, 255);
          r = o[0];
          g = o[1];
          b = o[2];
        end
        yy = clip((77 * r + 150 * g + 29 * b + 128) >>> 8, 255);
        uu = clip(((-43 * r - 85 * g + 128 * b + 128) >>> 8) + 128, 255);
        vv = clip(((128 * r - 107 * g - 21 * b + 128) >>> 8) + 128, 255);
        fc[y][x] = (yy << 16) | (uu << 8) | vv;
      end
    // floor 4: edge enhancement
    for (int y = 6; y < SH - 6; y++)
      for (int x = 9; x < SW - 9; x++) begin
        int hk[7] = '{1, 6, 15, 20, 15, 6, 1};
        int vk[5] = '{1, 4, 6, 4, 1};
        int s, blur, z, yc, yn;
        s = 0;
        for (int r = 0; r < 5; r++)
          for (int c = 0; c < 7; c++) s += hk[c] * vk[r] * (fc[y - 2 + r][x - 3 + c] >> 16);
        blur = (s + 512) >> 10;
        yc = fc[y][x] >> 16;
        z = yc - blur;
        ref_enh[y][x] = ((z < 0 ? -z : z) > ethr);
        yn = clip(yc + ((z * ealpha + 8) >>> 4), 255);
        fd[y][x] = ref_enh[y][x] ? ((yn << 16) | (fc[y][x] & 'hffff)) : fc[y][x];
      end
  endtask

  // ---------------------------------------------------------------- output
  int exp_x[$], exp_y[$];
  int nout = 0, n_left = 0, n_top = 0, n_inner = 0, n_med = 0, n_enh = 0;
  int n_out_stall = 0, n_load_stall = 0, rmed = 0, renh = 0;
  int stall_pct = 25;
  always @(posedge clk) begin
    if (rst_n) begin
      out_ready <= ($urandom_range(99) >= stall_pct);
      if (out_valid && !out_ready) n_out_stall++;
      if (dut.u_f6.in_valid && !dut.u_f6.in_ready) n_load_stall++;
      if (ev_median) n_med++;
      if (ev_enh) n_enh++;
      if (out_valid && out_ready) begin
        int ex, ey;
        ex = exp_x.pop_front();
        ey = exp_y.pop_front();
        check(int'(out_meta.x) == ex && int'(out_meta.y) == ey,
              $sformatf("order: got (%0d,%0d) expected (%0d,%0d)", out_meta.x, out_meta.y, ex, ey));
        check(int'(out_yuv) == fd[ey][ex],
              $sformatf("pixel (%0d,%0d): got %06h expected %06h", ex, ey, out_yuv, fd[ey][ex]));
        if (out_meta.sot) begin
          if (out_meta.sof) n_top++;
          if (out_meta.sor) n_left++;
          if (!out_meta.sor && int'(out_meta.y) != 3 * KN / 2) n_inner++;
        end
        nout++;
      end
    end
  end

  int cyc = 0;
  always @(posedge clk) cyc++;

  initial begin
    logic [31:0] rd;
    int c0, c1;
    s_hsel = 0; s_htrans = 0; s_hwrite = 0; s_haddr = 0; s_hwdata = 0;
    for (int i = 0; i < MEMW; i++) mem[i] = 32'($urandom);
    for (int y = 0; y < SH; y++)
      for (int x = 0; x < SW; x++) begin
        int v;
        v = 200 + 4 * x + 3 * y + int'($urandom_range(40)) + (((x / 5) % 3 == 0) ? 250 : 0);
        if ($urandom_range(99) < 3) v = ($urandom_range(1) != 0) ? 1023 : 0;
        src[y][x] = clip(v, 1023);
        mem[y * SW + x] = 32'(src[y][x]);
      end
    build_reference();
    for (int y = 6; y < SH - 6; y++)
      for (int x = 9; x < SW - 9; x++) renh += ref_enh[y][x];
    for (int ty = 0; ty < NTY; ty++)
      for (int tx = 0; tx < NTX; tx++)
        for (int c = 0; c < TS; c++)
          for (int i = 0; i < TT; i++) begin
            exp_x.push_back(tx * TS + c + 3 * KM / 2);
            exp_y.push_back(ty * TT + ((c % 2 == 0) ? i : TT - 1 - i) + 3 * KN / 2);
          end
    repeat (3) @(posedge clk);
    rst_n = 1;
    ahb_write(8'h08, 32'd0);
    ahb_write(8'h0C, IRR1);
    ahb_write(8'h10, IRR2);
    ahb_write(8'h14, IRR3);
    ahb_write(8'h18, 32'(blc));
    ahb_write(8'h1C, {4'd0, 12'(cy), 4'd0, 12'(cx)});
    ahb_write(8'h20, 32'(lk));
    ahb_write(8'h24, 32'(wbr));
    ahb_write(8'h28, 32'(wbg));
    ahb_write(8'h2C, 32'(wbb));
    ahb_write(8'h30, {6'd0, 2'(nss), 5'd0, 3'(nrs), 6'd0, 10'(nthr)});
    ahb_write(8'h34, {16'd0, 8'(ealpha), 8'(ethr)});
    for (int i = 0; i < 9; i++)
      ahb_write(8'(8'h3C + 4 * i), 32'(12'(ccm[i / 3][i % 3])));
    ahb_read(8'h0C, rd);
    check(rd == IRR1, "register read-back IRR_BASE1");
    ahb_read(8'h34, rd);
    check(rd == {16'd0, 8'(ealpha), 8'(ethr)}, "register read-back EE");
    c0 = cyc;
    ahb_write(8'h00, 32'd1);
    repeat (4) @(posedge clk);
    ahb_read(8'h04, rd);
    check(rd[0] == 1'b1, "busy after start");
    wait (exp_x.size() == 0);
    c1 = cyc;
    repeat (50) @(posedge clk);
    ahb_read(8'h04, rd);
    check(rd[0] == 1'b0, "idle after the frame");
    check(nout == W * H, "output pixel count");
    check(n_src_rd == (W + 3 * KM) * H + (3 * KN) * (W + 3 * KM), "source words read once each");
    check(n_irr_wr == (NTY) * KN * (3 * W + 6 * KM), "IRR words stored");
    check(n_irr_rd == (NTY - 1) * KN * (3 * W + 6 * KM), "IRR words read back");
    // mechanisms
    check(n_left == NTY, "leftmost tiles");
    check(n_top == 1 && n_inner > 0, "topmost and inner tiles");
    check(n_med > 0, "median selected at least once");
    check(n_med < nout, "bilateral selected at least once");
    check(n_enh > 0 && n_enh < nout, "luma sharpened and kept");
    check(n_enh == renh, "number of sharpened pixels");
    check(n_wait > 0 && n_out_stall > 0 && n_load_stall > 0, "bus waits, output and load stalls");
    $display("ptisp_top: %0d x %0d, %0d outputs in %0d cycles; median %0d, sharpened %0d; IRR wr %0d rd %0d; waits %0d out stalls %0d load stalls %0d",
             W, H, nout, c1 - c0, n_med, n_enh, n_irr_wr, n_irr_rd, n_wait, n_out_stall, n_load_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired, %0d outputs", nout);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
