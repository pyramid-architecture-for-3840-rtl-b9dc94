// nr_core: filter core of TPE f3, noise reduction in the Bayer domain.
//
// The 7x5 window (win[row][col], row 0 on top, centre win[2][3]) holds nine
// pixels of the centre pixel's own Bayer colour, at rows 0,2,4 and columns 1,3,5.
// Three results are formed from these nine samples, as in the switch of the
// document's noise-reduction data flow:
//   * impulse detector: the centre differs from the mean of its eight same-colour
//     neighbours by more than thr;
//   * median filter: the median of the nine samples;
//   * bilateral filter: sum(w_j x_j) / sum(w_j), w_j = ws_j * wr_j.
// If the detector fires the median is output, otherwise the bilateral result.
// The Gaussian weights of the bilateral filter are realised as powers of two:
// the range weight is wr = 64 >> (|x_j - x_c| >> rs) (0 once the shift reaches 7)
// and the spatial weight is 64 for the centre, 64 >> ss for the four
// horizontal/vertical neighbours and 64 >> 2ss for the four diagonal ones.
// Three pipeline stages advance together when en is high: (1) detector,
// median ranking and weights, (2) weighted sums, (3) rounded division and
// selection. Latency 3 enabled cycles, one window per cycle.
// The structure (detector, median, bilateral, multiplexer) follows the document;
// the power-of-two weight approximation and the mean-of-neighbours detector
// threshold in pixel codes are this design's choices.
module nr_core
  import ptisp_pkg::*;
#(
  parameter int unsigned IW = 10
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic                           en,
  input  logic [9:0]                     thr,
  input  logic [2:0]                     rs,
  input  logic [1:0]                     ss,
  input  logic                           in_valid,
  input  logic [KH-1:0][KW-1:0][IW-1:0]  win,
  input  pix_meta_t                      in_meta,
  output logic                           out_valid,
  output logic [IW-1:0]                  out_pix,
  output pix_meta_t                      out_meta,
  output logic                           out_median   // 1 when the median was selected
);
  localparam int unsigned NS = 9;

  // ---- stage 1 ----------------------------------------------------------
  logic [IW-1:0] p [NS];
  logic [IW+3:0] sum8;
  logic [IW-1:0] avg;
  logic [IW-1:0] dev;
  logic          impulse;
  logic [IW-1:0] med;
  logic [12:0]   w [NS];

  always_comb begin
    for (int j = 0; j < NS; j++) p[j] = win[2 * (j / 3)][1 + 2 * (j % 3)];
    sum8 = '0;
    for (int j = 0; j < NS; j++) if (j != 4) sum8 += (IW+4)'(p[j]);
    avg     = sum8[IW+2:3];
    dev     = (p[4] > avg) ? p[4] - avg : avg - p[4];
    impulse = (IW'(dev) > IW'(thr));

    med = p[4];
    for (int j = NS - 1; j >= 0; j--) begin
      int lt, le;
      lt = 0;
      le = 0;
      for (int k = 0; k < NS; k++) begin
        if (p[k] < p[j]) lt++;
        if (p[k] <= p[j]) le++;
      end
      if (lt <= 4 && le >= 5) med = p[j];
    end

    for (int j = 0; j < NS; j++) begin
      logic [IW-1:0] d;
      logic [IW-1:0] kr;
      logic [6:0]    wr;
      logic [6:0]    ws;
      d  = (p[j] > p[4]) ? p[j] - p[4] : p[4] - p[j];
      kr = d >> rs;
      wr = (kr >= 7) ? 7'd0 : (7'd64 >> kr);
      if (j == 4)                 ws = 7'd64;
      else if (j % 2 == 1)        ws = 7'd64 >> ss;
      else                        ws = 7'd64 >> {ss, 1'b0};
      w[j] = 13'(wr * ws);
    end
  end

  logic          s1_valid, s1_imp;
  pix_meta_t     s1_meta;
  logic [IW-1:0] s1_p [NS];
  logic [12:0]   s1_w [NS];
  logic [IW-1:0] s1_med;

  // ---- stage 2 ----------------------------------------------------------
  logic [IW+16:0] num;
  logic [16:0]    den;
  always_comb begin
    num = '0;
    den = '0;
    for (int j = 0; j < NS; j++) begin
      num += (IW+17)'(s1_w[j]) * (IW+17)'(s1_p[j]);
      den += 17'(s1_w[j]);
    end
  end

  logic           s2_valid, s2_imp;
  pix_meta_t      s2_meta;
  logic [IW-1:0]  s2_med;
  logic [IW+16:0] s2_num;
  logic [16:0]    s2_den;

  // ---- stage 3 ----------------------------------------------------------
  logic [IW+16:0] quo;
  always_comb begin
    quo = (s2_num + (IW+17)'(s2_den >> 1)) / (IW+17)'(s2_den);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid   <= 1'b0;
      s1_imp     <= 1'b0;
      s1_meta    <= '0;
      s1_med     <= '0;
      for (int j = 0; j < NS; j++) begin
        s1_p[j] <= '0;
        s1_w[j] <= '0;
      end
      s2_valid   <= 1'b0;
      s2_imp     <= 1'b0;
      s2_meta    <= '0;
      s2_med     <= '0;
      s2_num     <= '0;
      s2_den     <= 17'd1;
      out_valid  <= 1'b0;
      out_pix    <= '0;
      out_meta   <= '0;
      out_median <= 1'b0;
    end else if (en) begin
      s1_valid   <= in_valid;
      s1_imp     <= impulse;
      s1_meta    <= in_meta;
      s1_med     <= med;
      s1_p       <= p;
      s1_w       <= w;
      s2_valid   <= s1_valid;
      s2_imp     <= s1_imp;
      s2_meta    <= s1_meta;
      s2_med     <= s1_med;
      s2_num     <= num;
      s2_den     <= (den == '0) ? 17'd1 : den;
      out_valid  <= s2_valid;
      out_pix    <= s2_imp ? s2_med : quo[IW-1:0];
      out_meta   <= s2_meta;
      out_median <= s2_imp;
    end
  end
endmodule
