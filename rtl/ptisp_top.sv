// ptisp_top: pyramid tile-based image signal processor (PTISP).
//
// Turns a Bayer raw frame held in external memory into edge-enhanced YUV 4:4:4
// tiles of 16x16 pixels, ready for a block-based video encoder, without any
// frame line buffer. The pipeline, floor by floor:
//   sequencer -> f1 black level -> f2 lens shading -> TPE f3 noise reduction
//   -> f4 white balance -> f5 gamma -> TPE f6 colour interpolation
//   -> colour correction -> f7 RGB to YUV -> TPE f8 edge enhancement -> tiles
// Each TPE keeps its tiles in a 40-column circular tile buffer and exchanges the
// bottom rows of each tile row with external memory through the sequencer. The
// sequencer reaches memory through the AHB-Lite master; the host programs the
// settings and starts a frame through the AHB-Lite slave.
//
// Interface: AHB-Lite slave (registers), AHB-Lite master (frame memory with the
// source frame at SRC_BASE and three IRR stores), and the output tile stream
// (valid/ready, {Y,U,V} with Y in the top byte, side band with sof/sor/sot and
// source-grid position). Output tiles leave in tile raster order, each in
// vertical snake order (even columns downward, odd columns upward). ev_median
// and ev_enh pulse with an output of TPE f3 / f8 whose median was chosen /
// whose luma was sharpened; busy is high while the sequencer fetches.
//
// Timing: every element passes one pixel per cycle; the source frame is
// (IMG_W+18) x (IMG_H+12) pixels. With one pixel per 32-bit memory word the
// memory port carries the source pixels plus the IRR traffic, which sets the
// frame time (see the sequencer).
//
// Follows the document: the order of the eight functions, the four floors, the
// three TPEs and the PPEs (the five of its function table plus the colour
// correction it names among the PPE cores, placed here in front of f7), the
// sequencer with external IRR storage, the AHB master and slave. IMG_W and IMG_H must be multiples of 16; they set the
// largest frame, and the FRAME register selects a smaller one at run time
// (whole tiles), which is how the design scales from VGA up to QFHD.
module ptisp_top
  import ptisp_pkg::*;
#(
  parameter int unsigned IMG_W = 3840,
  parameter int unsigned IMG_H = 2160
) (
  input  logic        clk,
  input  logic        rst_n,
  // AHB-Lite slave: settings
  input  logic        s_hsel,
  input  logic [31:0] s_haddr,
  input  logic [1:0]  s_htrans,
  input  logic        s_hwrite,
  input  logic [31:0] s_hwdata,
  input  logic        s_hready,
  output logic        s_hreadyout,
  output logic        s_hresp,
  output logic [31:0] s_hrdata,
  // AHB-Lite master: frame memory
  output logic [31:0] m_haddr,
  output logic [1:0]  m_htrans,
  output logic        m_hwrite,
  output logic [2:0]  m_hsize,
  output logic [2:0]  m_hburst,
  output logic [31:0] m_hwdata,
  input  logic [31:0] m_hrdata,
  input  logic        m_hready,
  // output tiles to the video encoder
  output logic        out_valid,
  input  logic        out_ready,
  output logic [23:0] out_yuv,
  output pix_meta_t   out_meta,
  // status
  output logic        busy,
  output logic        ev_median,
  output logic        ev_enh
);
  cfg_t cfg;
  logic start;

  ahb_slave_regs u_regs (
    .clk, .rst_n,
    .hsel(s_hsel), .haddr(s_haddr), .htrans(s_htrans), .hwrite(s_hwrite),
    .hwdata(s_hwdata), .hready(s_hready), .hreadyout(s_hreadyout), .hresp(s_hresp),
    .hrdata(s_hrdata), .busy(busy), .cfg(cfg), .start(start)
  );

  // memory request port
  logic        req_valid, req_ready, req_we;
  logic [31:0] req_addr, req_wdata;
  logic [2:0]  req_tag;
  logic        rsp_valid;
  logic [31:0] rsp_data;
  logic [2:0]  rsp_tag;

  ahb_master #(.TAGW(3)) u_mst (
    .clk, .rst_n,
    .req_valid, .req_ready, .req_we, .req_addr, .req_wdata, .req_tag,
    .rsp_valid, .rsp_data, .rsp_tag,
    .haddr(m_haddr), .htrans(m_htrans), .hwrite(m_hwrite), .hsize(m_hsize),
    .hburst(m_hburst), .hwdata(m_hwdata), .hrdata(m_hrdata), .hready(m_hready)
  );

  // IRR exchange with the three TPEs
  logic [2:0]          irr_valid, irr_ready, seq_valid, seq_ready;
  logic [2:0][23:0]    irr_pix, seq_pix;
  logic [2:0][CW-1:0]  irr_x;
  logic [2:0][2:0]     irr_k;

  // floor 1 stream
  logic       s0_v, s0_r;  logic [9:0] s0_p;  pix_meta_t s0_m;

  sequencer #(.IMG_W(IMG_W), .IMG_H(IMG_H)) u_seq (
    .clk, .rst_n, .cfg, .start, .busy,
    .src_valid(s0_v), .src_ready(s0_r), .src_pix(s0_p), .src_meta(s0_m),
    .irr_valid, .irr_ready, .irr_pix, .irr_x, .irr_k,
    .seq_valid, .seq_ready, .seq_pix,
    .req_valid, .req_ready, .req_we, .req_addr, .req_wdata, .req_tag,
    .rsp_valid, .rsp_data, .rsp_tag
  );

  logic       s1_v, s1_r;  logic [9:0] s1_p;  pix_meta_t s1_m;
  ppe_blc #(.PW(10)) u_f1 (
    .clk, .rst_n, .blc(cfg.blc),
    .in_valid(s0_v), .in_ready(s0_r), .in_pix(s0_p), .in_meta(s0_m),
    .out_valid(s1_v), .out_ready(s1_r), .out_pix(s1_p), .out_meta(s1_m)
  );

  logic       s2_v, s2_r;  logic [9:0] s2_p;  pix_meta_t s2_m;
  ppe_lsc #(.PW(10)) u_f2 (
    .clk, .rst_n, .cx(cfg.lsc_cx), .cy(cfg.lsc_cy), .k(cfg.lsc_k),
    .in_valid(s1_v), .in_ready(s1_r), .in_pix(s1_p), .in_meta(s1_m),
    .out_valid(s2_v), .out_ready(s2_r), .out_pix(s2_p), .out_meta(s2_m)
  );

  // floor 1 -> floor 2: noise reduction
  logic       s3_v, s3_r;  logic [9:0] s3_p;  pix_meta_t s3_m;
  logic [9:0] irr1_p;
  tpe #(.KIND(CORE_NR), .FLOOR(1), .IW(10), .OW(10)) u_f3 (
    .clk, .rst_n, .cfg,
    .in_valid(s2_v), .in_ready(s2_r), .in_pix(s2_p), .in_meta(s2_m),
    .seq_valid(seq_valid[0]), .seq_ready(seq_ready[0]), .seq_pix(seq_pix[0][9:0]),
    .irr_valid(irr_valid[0]), .irr_ready(irr_ready[0]), .irr_pix(irr1_p),
    .irr_x(irr_x[0]), .irr_k(irr_k[0]),
    .out_valid(s3_v), .out_ready(s3_r), .out_pix(s3_p), .out_meta(s3_m),
    .out_flag(ev_median)
  );
  assign irr_pix[0] = 24'(irr1_p);

  logic       s4_v, s4_r;  logic [9:0] s4_p;  pix_meta_t s4_m;
  ppe_wb #(.PW(10)) u_f4 (
    .clk, .rst_n, .gain_r(cfg.wb_r), .gain_g(cfg.wb_g), .gain_b(cfg.wb_b),
    .in_valid(s3_v), .in_ready(s3_r), .in_pix(s3_p), .in_meta(s3_m),
    .out_valid(s4_v), .out_ready(s4_r), .out_pix(s4_p), .out_meta(s4_m)
  );

  logic       s5_v, s5_r;  logic [7:0] s5_p;  pix_meta_t s5_m;
  ppe_gamma u_f5 (
    .clk, .rst_n,
    .in_valid(s4_v), .in_ready(s4_r), .in_pix(s4_p), .in_meta(s4_m),
    .out_valid(s5_v), .out_ready(s5_r), .out_pix(s5_p), .out_meta(s5_m)
  );

  // floor 2 -> floor 3: colour interpolation
  logic        s6_v, s6_r;  logic [23:0] s6_p;  pix_meta_t s6_m;
  logic [7:0]  irr2_p;
  tpe #(.KIND(CORE_CI), .FLOOR(2), .IW(8), .OW(24)) u_f6 (
    .clk, .rst_n, .cfg,
    .in_valid(s5_v), .in_ready(s5_r), .in_pix(s5_p), .in_meta(s5_m),
    .seq_valid(seq_valid[1]), .seq_ready(seq_ready[1]), .seq_pix(seq_pix[1][7:0]),
    .irr_valid(irr_valid[1]), .irr_ready(irr_ready[1]), .irr_pix(irr2_p),
    .irr_x(irr_x[1]), .irr_k(irr_k[1]),
    .out_valid(s6_v), .out_ready(s6_r), .out_pix(s6_p), .out_meta(s6_m),
    .out_flag()
  );
  assign irr_pix[1] = 24'(irr2_p);

  logic        s6c_v, s6c_r;  logic [23:0] s6c_p;  pix_meta_t s6c_m;
  ppe_ccm u_f7a (
    .clk, .rst_n, .ccm(cfg.ccm),
    .in_valid(s6_v), .in_ready(s6_r), .in_pix(s6_p), .in_meta(s6_m),
    .out_valid(s6c_v), .out_ready(s6c_r), .out_pix(s6c_p), .out_meta(s6c_m)
  );

  logic        s7_v, s7_r;  logic [23:0] s7_p;  pix_meta_t s7_m;
  ppe_csc u_f7 (
    .clk, .rst_n,
    .in_valid(s6c_v), .in_ready(s6c_r), .in_pix(s6c_p), .in_meta(s6c_m),
    .out_valid(s7_v), .out_ready(s7_r), .out_pix(s7_p), .out_meta(s7_m)
  );

  // floor 3 -> floor 4: edge enhancement
  tpe #(.KIND(CORE_EE), .FLOOR(3), .IW(24), .OW(24)) u_f8 (
    .clk, .rst_n, .cfg,
    .in_valid(s7_v), .in_ready(s7_r), .in_pix(s7_p), .in_meta(s7_m),
    .seq_valid(seq_valid[2]), .seq_ready(seq_ready[2]), .seq_pix(seq_pix[2]),
    .irr_valid(irr_valid[2]), .irr_ready(irr_ready[2]), .irr_pix(irr_pix[2]),
    .irr_x(irr_x[2]), .irr_k(irr_k[2]),
    .out_valid(out_valid), .out_ready(out_ready), .out_pix(out_yuv), .out_meta(out_meta),
    .out_flag(ev_enh)
  );

endmodule
