// ahb_slave_regs: 32-bit AHB-Lite slave holding the memory-mapped settings.
//
// The host writes the settings of every processing element and the external
// memory bases here, then writes CTRL.start to process one frame. Always ready
// (HREADYOUT high, HRESP OKAY); a write takes its data in the data phase after
// the address phase was sampled. Register map (byte offsets):
//   0x00 CTRL        bit 0 start (write 1; reads 0)
//   0x04 STATUS      bit 0 busy (read only)
//   0x08 SRC_BASE    word address of the source frame
//   0x0C IRR_BASE1   word address of the IRR store of TPE 1 (2*n rows of floor 1)
//   0x10 IRR_BASE2
//   0x14 IRR_BASE3
//   0x18 BLC         [9:0] black level
//   0x1C LSC_CENTER  [11:0] x, [27:16] y of the lens centre on the source grid
//   0x20 LSC_K       [15:0] radial gain slope
//   0x24 WB_R, 0x28 WB_G, 0x2C WB_B   [9:0] gains, 256 = 1.0
//   0x30 NR          [9:0] impulse threshold, [18:16] range shift, [25:24] spatial shift
//   0x34 EE          [7:0] threshold, [15:8] gain (16 = 1.0)
//   0x38 FRAME       [7:0] output tiles across, [23:16] tile rows; 0 (reset) or a
//                    value above the build maximum selects the maximum
//   0x3C .. 0x5C CCM [11:0] signed colour-matrix coefficient, 256 = 1.0; the
//                    nine words hold rows R, G, B in turn, each with the
//                    R, G, B input columns (reset: identity)
// The document gives a 32-bit AHB slave for register settings; the map and the
// reset values are this design's choices.
module ahb_slave_regs
  import ptisp_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        hsel,
  input  logic [31:0] haddr,
  input  logic [1:0]  htrans,
  input  logic        hwrite,
  input  logic [31:0] hwdata,
  input  logic        hready,
  output logic        hreadyout,
  output logic        hresp,
  output logic [31:0] hrdata,
  input  logic        busy,
  output cfg_t        cfg,
  output logic        start
);
  logic       wr_q;
  logic [5:0] wa_q, ra_q;

  assign hreadyout = 1'b1;
  assign hresp     = 1'b0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_q <= 1'b0;
      wa_q <= '0;
      ra_q <= '0;
    end else if (hready) begin
      wr_q <= hsel && htrans[1] && hwrite;
      wa_q <= haddr[7:2];
      ra_q <= haddr[7:2];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg          <= '0;
      cfg.blc      <= 10'd64;
      cfg.lsc_cx   <= 12'd1929;
      cfg.lsc_cy   <= 12'd1086;
      cfg.wb_r     <= 10'd256;
      cfg.wb_g     <= 10'd256;
      cfg.wb_b     <= 10'd256;
      cfg.nr_thr   <= 10'd64;
      cfg.nr_rs    <= 3'd3;
      cfg.nr_ss    <= 2'd1;
      cfg.ee_thr   <= 8'd4;
      cfg.ee_alpha <= 8'd16;
      cfg.ccm[0][0] <= 12'd256;
      cfg.ccm[1][1] <= 12'd256;
      cfg.ccm[2][2] <= 12'd256;
      start        <= 1'b0;
    end else begin
      start <= 1'b0;
      if (wr_q) begin
        unique case (wa_q)
          6'h00: start          <= hwdata[0];
          6'h02: cfg.src_base   <= hwdata;
          6'h03: cfg.irr_base1  <= hwdata;
          6'h04: cfg.irr_base2  <= hwdata;
          6'h05: cfg.irr_base3  <= hwdata;
          6'h06: cfg.blc        <= hwdata[9:0];
          6'h07: begin cfg.lsc_cx <= hwdata[11:0]; cfg.lsc_cy <= hwdata[27:16]; end
          6'h08: cfg.lsc_k      <= hwdata[15:0];
          6'h09: cfg.wb_r       <= hwdata[9:0];
          6'h0A: cfg.wb_g       <= hwdata[9:0];
          6'h0B: cfg.wb_b       <= hwdata[9:0];
          6'h0C: begin cfg.nr_thr <= hwdata[9:0]; cfg.nr_rs <= hwdata[18:16]; cfg.nr_ss <= hwdata[25:24]; end
          6'h0D: begin cfg.ee_thr <= hwdata[7:0]; cfg.ee_alpha <= hwdata[15:8]; end
          6'h0E: begin cfg.frame_tx <= hwdata[7:0]; cfg.frame_ty <= hwdata[23:16]; end
          6'h0F: cfg.ccm[0][0] <= hwdata[11:0];
          6'h10: cfg.ccm[0][1] <= hwdata[11:0];
          6'h11: cfg.ccm[0][2] <= hwdata[11:0];
          6'h12: cfg.ccm[1][0] <= hwdata[11:0];
          6'h13: cfg.ccm[1][1] <= hwdata[11:0];
          6'h14: cfg.ccm[1][2] <= hwdata[11:0];
          6'h15: cfg.ccm[2][0] <= hwdata[11:0];
          6'h16: cfg.ccm[2][1] <= hwdata[11:0];
          6'h17: cfg.ccm[2][2] <= hwdata[11:0];
          default: ;
        endcase
      end
    end
  end

  always_comb begin
    unique case (ra_q)
      6'h01:   hrdata = {31'd0, busy};
      6'h02:   hrdata = cfg.src_base;
      6'h03:   hrdata = cfg.irr_base1;
      6'h04:   hrdata = cfg.irr_base2;
      6'h05:   hrdata = cfg.irr_base3;
      6'h06:   hrdata = {22'd0, cfg.blc};
      6'h07:   hrdata = {4'd0, cfg.lsc_cy, 4'd0, cfg.lsc_cx};
      6'h08:   hrdata = {16'd0, cfg.lsc_k};
      6'h09:   hrdata = {22'd0, cfg.wb_r};
      6'h0A:   hrdata = {22'd0, cfg.wb_g};
      6'h0B:   hrdata = {22'd0, cfg.wb_b};
      6'h0C:   hrdata = {6'd0, cfg.nr_ss, 5'd0, cfg.nr_rs, 6'd0, cfg.nr_thr};
      6'h0D:   hrdata = {16'd0, cfg.ee_alpha, cfg.ee_thr};
      6'h0E:   hrdata = {8'd0, cfg.frame_ty, 8'd0, cfg.frame_tx};
      6'h0F:   hrdata = {20'd0, cfg.ccm[0][0]};
      6'h10:   hrdata = {20'd0, cfg.ccm[0][1]};
      6'h11:   hrdata = {20'd0, cfg.ccm[0][2]};
      6'h12:   hrdata = {20'd0, cfg.ccm[1][0]};
      6'h13:   hrdata = {20'd0, cfg.ccm[1][1]};
      6'h14:   hrdata = {20'd0, cfg.ccm[1][2]};
      6'h15:   hrdata = {20'd0, cfg.ccm[2][0]};
      6'h16:   hrdata = {20'd0, cfg.ccm[2][1]};
      6'h17:   hrdata = {20'd0, cfg.ccm[2][2]};
      default: hrdata = '0;
    endcase
  end
endmodule
