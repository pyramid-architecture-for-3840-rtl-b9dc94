// stream_fifo: small synchronous FIFO with valid/ready on both sides.
//
// DEPTH entries of W bits held in registers. push when in_valid && in_ready,
// pop when out_valid && out_ready; both may happen in the same cycle. The head
// is visible combinationally (first-word fall-through), so a word written on one
// edge can leave on the next. count gives the occupancy. A helper of the
// sequencer; its form is this design's choice.
module stream_fifo #(
  parameter int unsigned W     = 32,
  parameter int unsigned DEPTH = 8
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       in_valid,
  output logic                       in_ready,
  input  logic [W-1:0]               in_data,
  output logic                       out_valid,
  input  logic                       out_ready,
  output logic [W-1:0]               out_data,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned AB = $clog2(DEPTH);
  logic [W-1:0]  mem [DEPTH];
  logic [AB-1:0] wp, rp;
  logic          push, pop;

  assign in_ready  = (count != ($clog2(DEPTH+1))'(DEPTH));
  assign out_valid = (count != '0);
  assign out_data  = mem[rp];
  assign push      = in_valid && in_ready;
  assign pop       = out_valid && out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
    end else begin
      if (push) wp <= (wp == AB'(DEPTH - 1)) ? '0 : wp + 1'b1;
      if (pop)  rp <= (rp == AB'(DEPTH - 1)) ? '0 : rp + 1'b1;
      count <= count + ($clog2(DEPTH+1))'(push) - ($clog2(DEPTH+1))'(pop);
    end
  end

  always_ff @(posedge clk) begin
    if (push) mem[wp] <= in_data;
  end
endmodule
