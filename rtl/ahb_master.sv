// ahb_master: 32-bit AHB-Lite master port of the PTISP data path.
//
// Turns word requests of the sequencer (valid/ready, write flag, word address,
// write data and a small tag) into single NONSEQ word transfers (HSIZE word,
// HBURST SINGLE). The bus is pipelined: the address phase of one transfer
// overlaps the data phase of the previous one, so with a zero-wait-state slave
// one transfer completes per cycle. Both phases advance only on HREADY high, which
// also gives req_ready. Read data returns on rsp_* in the cycle its data phase
// completes, with the tag of its request, in request order. HRESP errors are
// not handled.
// The document gives a 32-bit AHB master that generates addresses without the
// host; the request/response interface on the inside is this design's choice.
module ahb_master #(
  parameter int unsigned TAGW = 3
) (
  input  logic            clk,
  input  logic            rst_n,
  // requests
  input  logic            req_valid,
  output logic            req_ready,
  input  logic            req_we,
  input  logic [31:0]     req_addr,   // word address
  input  logic [31:0]     req_wdata,
  input  logic [TAGW-1:0] req_tag,
  // read responses
  output logic            rsp_valid,
  output logic [31:0]     rsp_data,
  output logic [TAGW-1:0] rsp_tag,
  // AHB-Lite
  output logic [31:0]     haddr,
  output logic [1:0]      htrans,
  output logic            hwrite,
  output logic [2:0]      hsize,
  output logic [2:0]      hburst,
  output logic [31:0]     hwdata,
  input  logic [31:0]     hrdata,
  input  logic            hready
);
  typedef struct packed {
    logic            valid;
    logic            we;
    logic [31:0]     addr;
    logic [31:0]     wdata;
    logic [TAGW-1:0] tag;
  } xfer_t;

  xfer_t ap, dp;

  assign req_ready = hready;
  assign haddr     = {ap.addr[29:0], 2'b00};
  assign htrans    = ap.valid ? 2'b10 : 2'b00;
  assign hwrite    = ap.we;
  assign hsize     = 3'b010;
  assign hburst    = 3'b000;
  assign hwdata    = dp.wdata;
  assign rsp_valid = hready && dp.valid && !dp.we;
  assign rsp_data  = hrdata;
  assign rsp_tag   = dp.tag;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ap <= '0;
      dp <= '0;
    end else if (hready) begin
      dp <= ap;
      ap <= req_valid ? xfer_t'{1'b1, req_we, req_addr, req_wdata, req_tag} : '0;
    end
  end
endmodule
