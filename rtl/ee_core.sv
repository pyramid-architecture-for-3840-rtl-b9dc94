// ee_core: filter core of TPE f8, edge enhancement of the luma channel.
//
// Window pixels are 24-bit {Y,U,V}. The luma of the 7x5 window is blurred with a
// separable binomial (Gaussian-like) kernel, horizontal [1 6 15 20 15 6 1] times
// vertical [1 4 6 4 1], total weight 1024. The high-pass value is
// z = Yc - round(blur / 1024). Where |z| > thr the luma is sharpened to
// Yc + (alpha * z) / 16 (alpha 1.0 = 16, result rounded and saturated to 0..255);
// elsewhere it is left unchanged. U and V of the centre pass through.
// Three pipeline stages advancing on en: (1) column sums, (2) weighted row sum
// and high-pass value, (3) threshold, gain and saturation. Latency 3 enabled
// cycles, one window per cycle.
// The unsharp-mask structure of (4a)/(4b) follows the document; the kernel
// coefficients and fixed-point formats are this design's choices. The document's
// rule reads "z > threshold" but speaks of "bright and dark highlights"; this core
// enhances both signs, i.e. tests |z| > thr.
module ee_core
  import ptisp_pkg::*;
#(
  parameter int unsigned IW = 24
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic                           en,
  input  logic [7:0]                     thr,
  input  logic [7:0]                     alpha,
  input  logic                           in_valid,
  input  logic [KH-1:0][KW-1:0][IW-1:0]  win,
  input  pix_meta_t                      in_meta,
  output logic                           out_valid,
  output logic [IW-1:0]                  out_pix,
  output pix_meta_t                      out_meta,
  output logic                           out_enh      // 1 when the luma was sharpened
);
  localparam int unsigned HK [KW] = '{1, 6, 15, 20, 15, 6, 1};
  localparam int unsigned VK [KH] = '{1, 4, 6, 4, 1};

  // ---- stage 1: vertical sums per column ---------------------------------
  logic [11:0] col [KW];
  always_comb begin
    for (int c = 0; c < KW; c++) begin
      col[c] = '0;
      for (int r = 0; r < KH; r++) col[c] += 12'(VK[r]) * 12'(win[r][c][IW-1 -: 8]);
    end
  end

  logic        s1_valid;
  pix_meta_t   s1_meta;
  logic [11:0] s1_col [KW];
  logic [IW-1:0] s1_c;

  // ---- stage 2: horizontal sum and high-pass ----------------------------
  logic [17:0]        blur;
  logic [7:0]         blur_r;
  logic signed [9:0]  z;
  always_comb begin
    blur = '0;
    for (int c = 0; c < KW; c++) blur += 18'(HK[c]) * 18'(s1_col[c]);
    blur_r = 8'((blur + 18'd512) >> 10);
    z      = $signed({2'b00, s1_c[IW-1 -: 8]}) - $signed({2'b00, blur_r});
  end

  logic              s2_valid;
  pix_meta_t         s2_meta;
  logic signed [9:0] s2_z;
  logic [IW-1:0]     s2_c;

  // ---- stage 3: threshold and gain --------------------------------------
  logic [9:0]          absz;
  logic                enh;
  logic signed [19:0]  sharp;
  logic [7:0]          y_new;
  always_comb begin
    absz  = s2_z[9] ? 10'(-s2_z) : 10'(s2_z);
    enh   = absz > 10'(thr);
    sharp = $signed({12'd0, s2_c[IW-1 -: 8]}) + ((s2_z * $signed({2'b00, alpha}) + 20'sd8) >>> 4);
    if (sharp < 0)        y_new = 8'd0;
    else if (sharp > 255) y_new = 8'd255;
    else                  y_new = sharp[7:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid  <= 1'b0;
      s1_meta   <= '0;
      s1_c      <= '0;
      for (int c = 0; c < KW; c++) s1_col[c] <= '0;
      s2_valid  <= 1'b0;
      s2_meta   <= '0;
      s2_z      <= '0;
      s2_c      <= '0;
      out_valid <= 1'b0;
      out_pix   <= '0;
      out_meta  <= '0;
      out_enh   <= 1'b0;
    end else if (en) begin
      s1_valid  <= in_valid;
      s1_meta   <= in_meta;
      s1_c      <= win[2][3];
      s1_col    <= col;
      s2_valid  <= s1_valid;
      s2_meta   <= s1_meta;
      s2_z      <= z;
      s2_c      <= s1_c;
      out_valid <= s2_valid;
      out_pix   <= enh ? {y_new, s2_c[IW-9:0]} : s2_c;
      out_meta  <= s2_meta;
      out_enh   <= enh;
    end
  end
endmodule
