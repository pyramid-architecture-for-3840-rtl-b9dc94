// tb_tile_buffer: self-checking testbench of the banked tile buffer.
//
// First fills all 40 x 28 locations, then runs random writes and random row
// reads together, one of each per cycle at most. A reference array holds the
// expected contents. Each read must return, one cycle later, the eight
// consecutive columns rcol .. rcol+7 of the row, wrapping at column 40, in order,
// as the contents stood before that cycle's write (a write and a read of the
// same location in one cycle return the old value). While re is low the output
// must hold. Reads that wrap around the end of the buffer and reads that start
// in the middle of a bank group are counted and both must occur.
module tb_tile_buffer;
  localparam int PW = 10, NBANK = 8, NSTRIP = 5, HMAX = 28, BUFW = NBANK * NSTRIP;

  logic clk = 0;
  always #5 clk = ~clk;

  logic we, re;
  logic [5:0] wcol, rcol;
  logic [4:0] wrow, rrow;
  logic [PW-1:0] wdata;
  logic [NBANK-1:0][PW-1:0] rdata;

  tile_buffer #(.PW(PW), .NBANK(NBANK), .NSTRIP(NSTRIP), .HMAX(HMAX)) dut (
    .clk, .we, .wcol, .wrow, .wdata, .re, .rcol, .rrow, .rdata
  );

  int checks = 0, failures = 0, n_wrap = 0, n_unaligned = 0, n_hold = 0;
  logic [PW-1:0] ref_mem [BUFW][HMAX];
  logic [NBANK-1:0][PW-1:0] exp_rd;
  logic exp_v = 0;

  initial begin
    we = 0; re = 0; wcol = 0; wrow = 0; wdata = 0; rcol = 0; rrow = 0;
    // fill
    for (int c = 0; c < BUFW; c++)
      for (int r = 0; r < HMAX; r++) begin
        @(negedge clk);
        we = 1; wcol = 6'(c); wrow = 5'(r); wdata = PW'($urandom);
        ref_mem[c][r] = wdata;
      end
    @(negedge clk);
    we = 0;
    // random traffic
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      // check the read issued in the previous cycle (or the held value)
      if (exp_v) begin
        checks++;
        if (rdata != exp_rd) begin
          failures++;
          if (failures < 10) $display("read mismatch: got %h expected %h", rdata, exp_rd);
        end
      end
      we = ($urandom_range(99) < 60);
      wcol = 6'($urandom_range(BUFW - 1));
      wrow = 5'($urandom_range(HMAX - 1));
      wdata = PW'($urandom);
      re = ($urandom_range(99) < 70);
      rcol = 6'($urandom_range(BUFW - 1));
      rrow = 5'($urandom_range(HMAX - 1));
      if (re) begin
        for (int j = 0; j < NBANK; j++) exp_rd[j] = ref_mem[(int'(rcol) + j) % BUFW][rrow];
        exp_v = 1;
        if (int'(rcol) + NBANK > BUFW) n_wrap++;
        if (rcol % NBANK != 0) n_unaligned++;
      end else if (exp_v) n_hold++;
      if (we) ref_mem[wcol][wrow] = wdata;
    end
    @(negedge clk);
    checks++;
    if (rdata != exp_rd) failures++;
    checks++;
    if (n_wrap == 0 || n_unaligned == 0 || n_hold == 0) begin
      failures++;
      $display("mechanism missing: wrap %0d unaligned %0d hold %0d", n_wrap, n_unaligned, n_hold);
    end
    $display("tile_buffer: %0d checks, wrap %0d unaligned %0d hold %0d", checks, n_wrap, n_unaligned, n_hold);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
