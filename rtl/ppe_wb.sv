// ppe_wb: pixel processing element f4, white balance.
//
// Multiplies each Bayer pixel by the gain of its colour (R, G or B, chosen from
// the pixel's source-grid position in an RGGB mosaic). Gains are unsigned with
// 1.0 = 256; the product is rounded and saturated to 10 bits. One pipeline
// register, one pixel per cycle, valid/ready handshake.
// The document names the function only (per-pixel operation f4); the gain format
// and the RGGB phase are this design's choices.
module ppe_wb
  import ptisp_pkg::*;
#(
  parameter int unsigned PW = 10
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [9:0]    gain_r,
  input  logic [9:0]    gain_g,
  input  logic [9:0]    gain_b,
  input  logic          in_valid,
  output logic          in_ready,
  input  logic [PW-1:0] in_pix,
  input  pix_meta_t     in_meta,
  output logic          out_valid,
  input  logic          out_ready,
  output logic [PW-1:0] out_pix,
  output pix_meta_t     out_meta
);
  logic          adv;
  logic [9:0]    gain;
  logic [PW+9:0] prod;
  logic [PW+1:0] scaled;

  assign adv      = !out_valid || out_ready;
  assign in_ready = adv;

  always_comb begin
    unique case (bayer_phase(in_meta.x, in_meta.y))
      2'b00:   gain = gain_r;
      2'b11:   gain = gain_b;
      default: gain = gain_g;
    endcase
    prod   = in_pix * gain + (PW+10)'(128);
    scaled = prod[PW+9:8];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_pix   <= '0;
      out_meta  <= '0;
    end else if (adv) begin
      out_valid <= in_valid;
      out_pix   <= (scaled > {2'b00, {PW{1'b1}}}) ? {PW{1'b1}} : scaled[PW-1:0];
      out_meta  <= in_meta;
    end
  end
endmodule
