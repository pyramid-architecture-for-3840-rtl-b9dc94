// ci_core: filter core of TPE f6, colour interpolation (demosaicing).
//
// Rebuilds the two missing colours of the centre pixel win[2][3] of an 8-bit
// RGGB Bayer window. The centre's colour comes from its source-grid position
// (in_meta.x, in_meta.y). Missing values are the rounded averages of the nearest
// pixels of that colour:
//   R or B site : green = mean of N,S,W,E; the opposite colour = mean of the 4 diagonals
//   G site      : the colour of the same row = mean of W,E; the other = mean of N,S
// Output is {R,G,B}, 8 bits each, R in the top byte. Three pipeline stages
// advancing on en: (1) neighbour sums, (2) selection by Bayer phase, (3) output
// register. Latency 3 enabled cycles, one window per cycle.
// The document names the function and the 7x5 window; its eight-direction
// adaptive algorithm is not given, so this core uses the simplest demosaic
// (bilinear) over the centre 3x3 of the window. The outer window columns and rows
// are not used by this core.
module ci_core
  import ptisp_pkg::*;
#(
  parameter int unsigned IW = 8
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic                           en,
  input  logic                           in_valid,
  input  logic [KH-1:0][KW-1:0][IW-1:0]  win,
  input  pix_meta_t                      in_meta,
  output logic                           out_valid,
  output logic [3*IW-1:0]                out_pix,
  output pix_meta_t                      out_meta
);
  // ---- stage 1: sums ----------------------------------------------------
  logic [IW+1:0] s_cross, s_diag, s_we, s_ns;
  always_comb begin
    s_cross = (IW+2)'(win[1][3]) + (IW+2)'(win[3][3]) + (IW+2)'(win[2][2]) + (IW+2)'(win[2][4]);
    s_diag  = (IW+2)'(win[1][2]) + (IW+2)'(win[1][4]) + (IW+2)'(win[3][2]) + (IW+2)'(win[3][4]);
    s_we    = (IW+2)'(win[2][2]) + (IW+2)'(win[2][4]);
    s_ns    = (IW+2)'(win[1][3]) + (IW+2)'(win[3][3]);
  end

  logic          s1_valid;
  pix_meta_t     s1_meta;
  logic [IW-1:0] s1_c, s1_cross, s1_diag, s1_we, s1_ns;
  logic [1:0]    s1_ph;

  // ---- stage 2: select by phase -----------------------------------------
  logic [IW-1:0] r_n, g_n, b_n;
  always_comb begin
    unique case (s1_ph)
      2'b00: begin r_n = s1_c;  g_n = s1_cross; b_n = s1_diag; end  // R site
      2'b01: begin r_n = s1_we; g_n = s1_c;     b_n = s1_ns;   end  // G on an R row
      2'b10: begin r_n = s1_ns; g_n = s1_c;     b_n = s1_we;   end  // G on a B row
      default: begin r_n = s1_diag; g_n = s1_cross; b_n = s1_c; end // B site
    endcase
  end

  logic          s2_valid;
  pix_meta_t     s2_meta;
  logic [3*IW-1:0] s2_rgb;

  logic [IW+1:0] cross_r, diag_r, we_r, ns_r;
  assign cross_r = (s_cross + (IW+2)'(2)) >> 2;
  assign diag_r  = (s_diag + (IW+2)'(2)) >> 2;
  assign we_r    = (s_we + (IW+2)'(1)) >> 1;
  assign ns_r    = (s_ns + (IW+2)'(1)) >> 1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid  <= 1'b0;
      s1_meta   <= '0;
      s1_c      <= '0;
      s1_cross  <= '0;
      s1_diag   <= '0;
      s1_we     <= '0;
      s1_ns     <= '0;
      s1_ph     <= '0;
      s2_valid  <= 1'b0;
      s2_meta   <= '0;
      s2_rgb    <= '0;
      out_valid <= 1'b0;
      out_pix   <= '0;
      out_meta  <= '0;
    end else if (en) begin
      s1_valid  <= in_valid;
      s1_meta   <= in_meta;
      s1_c      <= win[2][3];
      s1_cross  <= cross_r[IW-1:0];
      s1_diag   <= diag_r[IW-1:0];
      s1_we     <= we_r[IW-1:0];
      s1_ns     <= ns_r[IW-1:0];
      s1_ph     <= bayer_phase(in_meta.x, in_meta.y);
      s2_valid  <= s1_valid;
      s2_meta   <= s1_meta;
      s2_rgb    <= {r_n, g_n, b_n};
      out_valid <= s2_valid;
      out_pix   <= s2_rgb;
      out_meta  <= s2_meta;
    end
  end
endmodule
