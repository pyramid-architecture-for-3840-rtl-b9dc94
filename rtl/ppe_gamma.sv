// ppe_gamma: pixel processing element f5, gamma correction.
//
// Encodes linear 10-bit Bayer intensities into perceptual 8-bit codes with a
// gamma of 0.45. The curve y = 255 * (x/1023)^0.45 is approximated piecewise
// linearly over 32 equal segments of 32 input codes each; the 33 knot values are
// computed at elaboration time from that formula, so no table file is needed.
// Inside a segment the output is knot[i] + (knot[i+1]-knot[i]) * frac / 32,
// rounded. One pipeline register, one pixel per cycle, valid/ready handshake.
// The 10-bit to 8-bit conversion and the exponent 0.45 follow the document; the
// piecewise-linear evaluation is this design's choice.
module ppe_gamma
  import ptisp_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  output logic       in_ready,
  input  logic [9:0] in_pix,
  input  pix_meta_t  in_meta,
  output logic       out_valid,
  input  logic       out_ready,
  output logic [7:0] out_pix,
  output pix_meta_t  out_meta
);
  localparam int unsigned NSEG = 32;

  function automatic logic [7:0] knot(input int unsigned i);
    real v;
    v = 255.0 * ((real'(i) / real'(NSEG)) ** 0.45) + 0.5;
    return 8'(int'($floor(v)));
  endfunction

  logic [7:0] knots [NSEG+1];
  for (genvar g = 0; g <= NSEG; g++) begin : g_knot
    localparam logic [7:0] KV = knot(g);
    assign knots[g] = KV;
  end

  logic       adv;
  logic [4:0] seg;
  logic [4:0] frac;
  logic [7:0] k0, k1;
  logic [13:0] interp;

  assign adv      = !out_valid || out_ready;
  assign in_ready = adv;

  always_comb begin
    seg    = in_pix[9:5];
    frac   = in_pix[4:0];
    k0     = knots[6'(seg)];
    k1     = knots[6'(seg) + 6'd1];
    interp = 14'(k0) * 14'd32 + 14'(k1 - k0) * 14'(frac) + 14'd16;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_pix   <= '0;
      out_meta  <= '0;
    end else if (adv) begin
      out_valid <= in_valid;
      out_pix   <= interp[12:5];
      out_meta  <= in_meta;
    end
  end
endmodule
