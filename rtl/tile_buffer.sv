// tile_buffer: the tile memory of a tile processing element.
//
// NBANK two-port banks (one write port, one read port each) hold NBANK*NSTRIP
// pixel columns of up to HMAX rows. Columns are numbered physically 0..BUFW-1;
// column c lives in bank c mod NBANK, in strip c / NBANK, so every group of NBANK
// consecutive columns is one strip and a strip spreads one column over each bank.
// The column space is used as a circular buffer by the address generator.
//
// Write: one pixel per cycle at (wcol, wrow).
// Read:  one row of NBANK consecutive columns rcol .. rcol+NBANK-1 (wrapping at
//        BUFW) per cycle. Each bank computes its own address, which is what lets
//        a window start at any column. The bank outputs are registered (one cycle
//        latency, updated only when re is high) and then rotated so that
//        rdata[j] is column rcol+j.
// Bank count, strip organisation and the rotator follow the document's tile
// buffer figure; the circular column numbering is this design's reading of it.
module tile_buffer #(
  parameter int unsigned PW     = 10,
  parameter int unsigned NBANK  = 8,
  parameter int unsigned NSTRIP = 5,
  parameter int unsigned HMAX   = 28
) (
  input  logic                        clk,
  input  logic                        we,
  input  logic [$clog2(NBANK*NSTRIP)-1:0] wcol,
  input  logic [$clog2(HMAX)-1:0]     wrow,
  input  logic [PW-1:0]               wdata,
  input  logic                        re,
  input  logic [$clog2(NBANK*NSTRIP)-1:0] rcol,
  input  logic [$clog2(HMAX)-1:0]     rrow,
  output logic [NBANK-1:0][PW-1:0]    rdata
);
  localparam int unsigned BUFW  = NBANK * NSTRIP;
  localparam int unsigned CB    = $clog2(BUFW);
  localparam int unsigned BB    = $clog2(NBANK);
  localparam int unsigned DEPTH = NSTRIP * HMAX;
  localparam int unsigned AB    = $clog2(DEPTH);

  logic [NBANK-1:0][PW-1:0] q;
  logic [BB-1:0]            rot_q;

  for (genvar b = 0; b < NBANK; b++) begin : g_bank
    logic [PW-1:0] mem [DEPTH];
    logic [AB-1:0] waddr, raddr;
    logic [CB:0]   pc;
    logic [BB-1:0] off;

    always_comb begin
      waddr = AB'(32'(wcol >> BB) * HMAX + 32'(wrow));
      off   = BB'(b) - rcol[BB-1:0];
      pc    = (CB+1)'(rcol) + (CB+1)'(off);
      if (pc >= (CB+1)'(BUFW)) pc = pc - (CB+1)'(BUFW);
      raddr = AB'(32'(pc >> BB) * HMAX + 32'(rrow));
    end

    always_ff @(posedge clk) begin
      if (we && wcol[BB-1:0] == BB'(b)) mem[waddr] <= wdata;
      if (re) q[b] <= mem[raddr];
    end
  end

  always_ff @(posedge clk) begin
    if (re) rot_q <= rcol[BB-1:0];
  end

  always_comb begin
    for (int j = 0; j < NBANK; j++) rdata[j] = q[BB'(rot_q + BB'(j))];
  end
endmodule
