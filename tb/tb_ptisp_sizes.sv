// tb_ptisp_sizes: the default build of ptisp_top (3840 x 2160 maximum) run at
// the smaller frame sizes of the resolution table, chosen at run time through
// the FRAME register: 640 x 480 (40 x 30 tiles), 1280 x 720 (80 x 45) and
// 1920 x 1088 (120 x 68; 1080 rows padded to whole tiles), one frame each, back
// to back without a reset.
//
// As in the full-size test the source is a flat field, so every output pixel
// has one value worked out from the stage formulas. For each frame the bench
// checks every pixel, the tile raster / vertical snake order of the outputs,
// the number of source and IRR memory transfers for that frame size, that busy
// falls at the end, and that the frame takes no more cycles than its memory
// transfers plus a small margin (one transfer per cycle, no wait states).
module tb_ptisp_sizes;
  import ptisp_pkg::*;

  localparam int unsigned WMAX = 3840, HMAXF = 2160;
  localparam int unsigned IRR1 = (WMAX + 3 * KM) * (HMAXF + 3 * KN);
  localparam int unsigned IRR2 = IRR1 + 2 * KN * (WMAX + 3 * KM);
  localparam int unsigned IRR3 = IRR2 + 2 * KN * (WMAX + 2 * KM);
  localparam int unsigned MEMW = IRR3 + 2 * KN * (WMAX + KM);
  int W = 640, H = 480;
  localparam int SRC = 600, BLC = 64, WBR = 320, WBG = 256, WBB = 400;

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

  ptisp_top dut (
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

  // memory: source frame is a constant, IRR stores are an array
  logic [31:0] irr [MEMW - IRR1];
  logic        dp_v, dp_we;
  logic [31:0] dp_a;
  int          n_irr_wr = 0, n_irr_rd = 0, n_src_rd = 0;
  assign m_hrdata = (dp_v && !dp_we) ? ((dp_a < IRR1) ? 32'(SRC) : irr[dp_a - IRR1]) : 32'd0;
  always @(posedge clk) begin
    if (!rst_n) dp_v <= 0;
    else begin
      if (dp_v && dp_we) begin
        if (dp_a >= IRR1 && dp_a < MEMW) irr[dp_a - IRR1] = m_hwdata;
        else failures++;
        n_irr_wr++;
      end
      if (dp_v && !dp_we) begin
        if (dp_a >= IRR1) n_irr_rd++; else n_src_rd++;
      end
      dp_v  <= m_htrans[1];
      dp_we <= m_hwrite;
      dp_a  <= m_haddr >> 2;
    end
  end
  assign m_hready = 1'b1;

  // expected value from the stage formulas
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

  int expv;
  initial begin
    int r, g, b, yy, uu, vv;
    r = gamma_ref(clip(((SRC - BLC) * WBR + 128) >> 8, 1023));
    g = gamma_ref(clip(((SRC - BLC) * WBG + 128) >> 8, 1023));
    b = gamma_ref(clip(((SRC - BLC) * WBB + 128) >> 8, 1023));
    yy = clip((77 * r + 150 * g + 29 * b + 128) >>> 8, 255);
    uu = clip(((-43 * r - 85 * g + 128 * b + 128) >>> 8) + 128, 255);
    vv = clip(((128 * r - 107 * g - 21 * b + 128) >>> 8) + 128, 255);
    expv = (yy << 16) | (uu << 8) | vv;
  end

  // output: order follows tile raster, snake inside a tile
  int nout = 0, cyc = 0;
  always @(posedge clk) cyc++;
  assign out_ready = 1'b1;
  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      int t, i, tx, ty, c, r, ex, ey;
      t  = nout / (TS * TT);
      i  = nout % (TS * TT);
      tx = t % (W / TS);
      ty = t / (W / TS);
      c  = i / TT;
      r  = (c % 2 == 0) ? i % TT : TT - 1 - i % TT;
      ex = tx * TS + c + 3 * KM / 2;
      ey = ty * TT + r + 3 * KN / 2;
      check(int'(out_meta.x) == ex && int'(out_meta.y) == ey,
            $sformatf("order: got (%0d,%0d) expected (%0d,%0d)", out_meta.x, out_meta.y, ex, ey));
      check(int'(out_yuv) == expv, $sformatf("pixel (%0d,%0d): got %06h expected %06h", ex, ey, out_yuv, expv));
      nout++;
    end
  end

  task automatic ahb_write(input logic [7:0] a, input logic [31:0] d);
    @(negedge clk);
    s_hsel = 1; s_htrans = 2'b10; s_hwrite = 1; s_haddr = 32'(a);
    @(negedge clk);
    s_hsel = 0; s_htrans = 2'b00; s_hwrite = 0; s_hwdata = d;
  endtask

  task automatic run_size(input int tx, input int ty);
    int c0, c1, words, sw, sh;
    W = tx * TS;
    H = ty * TT;
    sw = W + 3 * KM;
    sh = H + 3 * KN;
    nout = 0;
    n_src_rd = 0;
    n_irr_wr = 0;
    n_irr_rd = 0;
    ahb_write(8'h38, {8'd0, 8'(ty), 8'd0, 8'(tx)});
    c0 = cyc;
    ahb_write(8'h00, 32'd1);
    wait (nout == W * H);
    c1 = cyc;
    repeat (50) @(posedge clk);
    words = n_src_rd + n_irr_wr + n_irr_rd;
    check(n_src_rd == sw * sh, "source words read once each");
    check(n_irr_wr == ty * KN * (3 * W + 6 * KM), "IRR words stored");
    check(n_irr_rd == (ty - 1) * KN * (3 * W + 6 * KM), "IRR words read back");
    check(!busy, "idle after the frame");
    check(c1 - c0 <= words + words / 50 + 2000, "frame time bounded by memory transfers");
    $display("ptisp_sizes: %0d x %0d, %0d outputs, %0d cycles, %0d memory words (src %0d, IRR wr %0d rd %0d)",
             W, H, nout, c1 - c0, words, n_src_rd, n_irr_wr, n_irr_rd);
  endtask

  initial begin
    s_hsel = 0; s_htrans = 0; s_hwrite = 0; s_haddr = 0; s_hwdata = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    ahb_write(8'h08, 32'd0);
    ahb_write(8'h0C, IRR1);
    ahb_write(8'h10, IRR2);
    ahb_write(8'h14, IRR3);
    ahb_write(8'h18, 32'(BLC));
    ahb_write(8'h20, 32'd0);
    ahb_write(8'h24, 32'(WBR));
    ahb_write(8'h28, 32'(WBG));
    ahb_write(8'h2C, 32'(WBB));
    run_size(40, 30);
    run_size(80, 45);
    run_size(120, 68);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (12000000) @(posedge clk);
    failures++;
    $display("watchdog expired, %0d outputs", nout);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
