// ppe_lsc: pixel processing element f2, lens shading compensation.
//
// Lens vignetting darkens the image towards its corners. The element multiplies
// each pixel by a radial gain g = 1 + k * r^2 / 2^24, where r^2 is the squared
// distance of the pixel from the programmed lens centre (cx, cy) on the source
// grid. The gain is kept in 1.0 = 256 format and limited to 4.0; the result is
// rounded and saturated to 10 bits. Two pipeline registers (distance, then
// multiply), one pixel per cycle, valid/ready handshake with a stall of the
// whole pipe while out_ready is low.
// The document names the function only (per-pixel operation f2); the quadratic
// radial gain model is this design's choice.
module ppe_lsc
  import ptisp_pkg::*;
#(
  parameter int unsigned PW = 10
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [11:0]   cx,
  input  logic [11:0]   cy,
  input  logic [15:0]   k,
  input  logic          in_valid,
  output logic          in_ready,
  input  logic [PW-1:0] in_pix,
  input  pix_meta_t     in_meta,
  output logic          out_valid,
  input  logic          out_ready,
  output logic [PW-1:0] out_pix,
  output pix_meta_t     out_meta
);
  logic adv;

  // Stage 1: squared radius and gain.
  logic          s1_valid;
  logic [PW-1:0] s1_pix;
  pix_meta_t     s1_meta;
  logic [9:0]    s1_gain;

  logic signed [CW:0] dx, dy;
  logic [2*CW+1:0]    r2;
  logic [2*CW+17:0]   kr2;
  logic [2*CW+17:0]   g_full;

  assign adv      = !out_valid || out_ready;
  assign in_ready = adv;

  always_comb begin
    dx     = $signed({1'b0, in_meta.x}) - $signed({1'b0, cx});
    dy     = $signed({1'b0, in_meta.y}) - $signed({1'b0, cy});
    r2     = (2*CW+2)'(dx * dx) + (2*CW+2)'(dy * dy);
    kr2    = r2 * k;
    g_full = (2*CW+18)'(256) + (kr2 >> 16);
  end

  // Stage 2: multiply.
  logic [PW+9:0] prod;
  logic [PW+1:0] scaled;
  always_comb begin
    prod   = s1_pix * s1_gain + (PW+10)'(128);
    scaled = prod[PW+9:8];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid  <= 1'b0;
      s1_pix    <= '0;
      s1_meta   <= '0;
      s1_gain   <= '0;
      out_valid <= 1'b0;
      out_pix   <= '0;
      out_meta  <= '0;
    end else if (adv) begin
      s1_valid  <= in_valid;
      s1_pix    <= in_pix;
      s1_meta   <= in_meta;
      s1_gain   <= (g_full > (2*CW+18)'(1023)) ? 10'd1023 : g_full[9:0];
      out_valid <= s1_valid;
      out_pix   <= (scaled > {2'b00, {PW{1'b1}}}) ? {PW{1'b1}} : scaled[PW-1:0];
      out_meta  <= s1_meta;
    end
  end
endmodule
