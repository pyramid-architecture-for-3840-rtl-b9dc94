// ppe_csc: pixel processing element f7, colour conversion from RGB to YUV.
//
// Converts one 8-bit R, G, B pixel into 8-bit Y, U, V with the full-range
// ITU-R BT.601 matrix in 8-bit fixed point:
//   Y = ( 77 R + 150 G +  29 B + 128) >> 8
//   U = (-43 R -  85 G + 128 B + 128) >> 8 + 128
//   V = (128 R - 107 G -  21 B + 128) >> 8 + 128
// each saturated to 0..255. Pixels are packed {R,G,B} in and {Y,U,V} out, with R
// and Y in the top byte. One pipeline register, one pixel per cycle, valid/ready
// handshake. The document gives the function (8-bit RGB in, 8-bit YUV out); the
// matrix is this design's choice.
module ppe_csc
  import ptisp_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  output logic        in_ready,
  input  logic [23:0] in_pix,
  input  pix_meta_t   in_meta,
  output logic        out_valid,
  input  logic        out_ready,
  output logic [23:0] out_pix,
  output pix_meta_t   out_meta
);
  logic adv;
  logic signed [18:0] r, g, b, yy, uu, vv;

  function automatic logic [7:0] clip8(input logic signed [18:0] v);
    if (v < 0) return 8'd0;
    if (v > 255) return 8'd255;
    return v[7:0];
  endfunction

  assign adv      = !out_valid || out_ready;
  assign in_ready = adv;

  always_comb begin
    r  = 19'(in_pix[23:16]);
    g  = 19'(in_pix[15:8]);
    b  = 19'(in_pix[7:0]);
    yy = (77 * r + 150 * g + 29 * b + 128) >>> 8;
    uu = ((-43 * r - 85 * g + 128 * b + 128) >>> 8) + 128;
    vv = ((128 * r - 107 * g - 21 * b + 128) >>> 8) + 128;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_pix   <= '0;
      out_meta  <= '0;
    end else if (adv) begin
      out_valid <= in_valid;
      out_pix   <= {clip8(yy), clip8(uu), clip8(vv)};
      out_meta  <= in_meta;
    end
  end
endmodule
