// ppe_blc: pixel processing element f1, black level adjustment.
//
// Subtracts the programmed black level from every 10-bit Bayer pixel and clamps
// at zero, so that a dark scene maps to code 0. One pipeline register, one pixel
// per cycle. The stream uses a valid/ready handshake: a pixel moves when valid
// and ready are both high; the stage holds its output while out_ready is low.
// The document names the function only (per-pixel operation f1); the single
// common offset for all four Bayer colours is this design's choice.
module ppe_blc
  import ptisp_pkg::*;
#(
  parameter int unsigned PW = 10
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [PW-1:0] blc,
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
  assign adv      = !out_valid || out_ready;
  assign in_ready = adv;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_pix   <= '0;
      out_meta  <= '0;
    end else if (adv) begin
      out_valid <= in_valid;
      out_pix   <= (in_pix > blc) ? in_pix - blc : '0;
      out_meta  <= in_meta;
    end
  end
endmodule
