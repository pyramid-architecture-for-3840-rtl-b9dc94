// ppe_ccm: pixel processing element for colour correction (3x3 colour matrix).
//
// Multiplies one 8-bit {R,G,B} pixel by a programmable 3x3 matrix:
//   out[i] = clip((sum_j m[i][j] * in[j] + 128) >> 8), i, j in {R, G, B}
// with signed 12-bit coefficients in which 256 is 1.0 (range -8 .. +7.996), and
// saturates each result to 0..255. Row i of the matrix produces output colour i.
// Pixels are packed {R,G,B} with R in the top byte, in and out. One pipeline
// register, one pixel per cycle, valid/ready handshake; the side band passes
// through unchanged.
//
// The document lists colour correction among the pixel processing elements with
// a throughput of 1 pixel/cycle but does not place it in its table of functions.
// Placing it on floor 3 between colour interpolation (f6) and the RGB to YUV
// conversion (f7), the matrix form, the coefficient format and the identity
// reset value are this design's choices.
module ppe_ccm
  import ptisp_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [2:0][2:0][11:0] ccm,   // ccm[i][j]: output i from input j; 0 R, 1 G, 2 B
  input  logic                  in_valid,
  output logic                  in_ready,
  input  logic [23:0]           in_pix,
  input  pix_meta_t             in_meta,
  output logic                  out_valid,
  input  logic                  out_ready,
  output logic [23:0]           out_pix,
  output pix_meta_t             out_meta
);
  logic adv;
  logic signed [23:0] c [3];
  logic signed [23:0] acc [3];

  function automatic logic [7:0] clip8(input logic signed [23:0] v);
    if (v < 0) return 8'd0;
    if (v > 255) return 8'd255;
    return v[7:0];
  endfunction

  assign adv      = !out_valid || out_ready;
  assign in_ready = adv;

  always_comb begin
    c[0] = 24'(in_pix[23:16]);
    c[1] = 24'(in_pix[15:8]);
    c[2] = 24'(in_pix[7:0]);
    for (int i = 0; i < 3; i++) begin
      acc[i] = 24'sd128;
      for (int j = 0; j < 3; j++)
        acc[i] = acc[i] + 24'(signed'(ccm[i][j])) * c[j];
      acc[i] = acc[i] >>> 8;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_pix   <= '0;
      out_meta  <= '0;
    end else if (adv) begin
      out_valid <= in_valid;
      out_pix   <= {clip8(acc[0]), clip8(acc[1]), clip8(acc[2])};
      out_meta  <= in_meta;
    end
  end
endmodule
