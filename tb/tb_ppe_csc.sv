// tb_ppe_csc: self-checking testbench of ppe_csc, the RGB to YUV colour-space conversion.
//
// Random pixels with random side-band values are sent with random gaps while
// out_ready is dropped at random; every output is compared, in order, with a
// model of the stage written in plain integer arithmetic, and its side band
// must match the input's. The settings are drawn at random for each pass. The
// first pass (600 pixels) stresses the handshake; the second sends the same
// number at full rate with no stalls and checks one output per cycle (the
// stream must leave in 600 consecutive cycles) and the latency of 1 cycles.
// The bench counts outputs where the model clips a component and fails if there are none,
// or if every output was one.
module tb_ppe_csc;
  import ptisp_pkg::*;

  localparam int NP = 600;
  localparam int LAT = 1;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid, in_ready, out_valid, out_ready;
  logic [24-1:0] in_pix;
  logic [24-1:0] out_pix;
  pix_meta_t in_meta, out_meta;


  ppe_csc dut (
    .clk, .rst_n,
    .in_valid, .in_ready, .in_pix, .in_meta,
    .out_valid, .out_ready, .out_pix, .out_meta
  );

  int checks = 0, failures = 0;
  int n_special = 0, n_plain = 0;

  function automatic int clip(input longint v, input int hi);
    return v < 0 ? 0 : (v > hi ? hi : int'(v));
  endfunction

  // model of the stage; sets special when clips a component
  function automatic logic [24-1:0] model(input logic [24-1:0] p, input pix_meta_t m, output logic special);
    int r, g, b, y, u, v;
    r = int'(p[23:16]);
    g = int'(p[15:8]);
    b = int'(p[7:0]);
    y = (77 * r + 150 * g + 29 * b + 128) >>> 8;
    u = ((-43 * r - 85 * g + 128 * b + 128) >>> 8) + 128;
    v = ((128 * r - 107 * g - 21 * b + 128) >>> 8) + 128;
    special = (y > 255 || u > 255 || v > 255 || u < 0 || v < 0);
    return {8'(clip(y, 255)), 8'(clip(u, 255)), 8'(clip(v, 255))};
  endfunction

  function automatic logic [24-1:0] gen_pix();
    case ($urandom_range(3))
      0: return {8'd255, 8'($urandom_range(20)), 8'($urandom_range(20))};
      1: return {8'($urandom_range(20)), 8'($urandom_range(20)), 8'd255};
      default: return 24'($urandom);
    endcase
  endfunction

  logic [24-1:0] exp_q[$];
  pix_meta_t       expm_q[$];
  logic            sp_q[$];
  int gap_pct = 30, stall_pct = 30, nsent = 0, nrecv = 0, n_stall = 0;
  int cyc = 0, first_in = -1, first_out = -1, last_out = -1;
  always @(posedge clk) cyc++;

  always @(posedge clk) begin
    if (rst_n) begin
      if (in_valid && in_ready) begin
        logic sp;
        exp_q.push_back(model(in_pix, in_meta, sp));
        expm_q.push_back(in_meta);
        sp_q.push_back(sp);
        if (first_in < 0) first_in = cyc;
      end
      if (!in_valid || in_ready) begin
        if (nsent < NP && $urandom_range(99) >= gap_pct) begin
          in_valid <= 1'b1;
          in_pix   <= gen_pix();
          in_meta  <= pix_meta_t'($urandom);
          nsent++;
        end else in_valid <= 1'b0;
      end
      if (out_valid && !out_ready) n_stall++;
      if (out_valid && out_ready) begin
        logic [24-1:0] e;
        pix_meta_t em;
        logic sp;
        e  = exp_q.pop_front();
        em = expm_q.pop_front();
        sp = sp_q.pop_front();
        if (sp) n_special++; else n_plain++;
        checks++;
        if (out_pix != e || out_meta != em) begin
          failures++;
          if (failures < 10) $display("mismatch: got %h expected %h", out_pix, e);
        end
        if (first_out < 0) first_out = cyc;
        last_out = cyc;
        nrecv++;
      end
      out_ready <= ($urandom_range(99) >= stall_pct);
    end
  end

  task automatic new_settings();
    ;
  endtask

  task automatic run_pass();
    nsent = 0;
    nrecv = 0;
    first_in = -1;
    first_out = -1;
    new_settings();
    wait (nrecv == NP);
    repeat (5) @(posedge clk);
    checks++;
    if (exp_q.size() != 0 || out_valid) begin
      failures++;
      $display("extra or missing outputs");
    end
  endtask

  initial begin
    in_valid = 0; out_ready = 0; in_pix = '0; in_meta = '0;
    new_settings();
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_pass();
    gap_pct = 0;
    stall_pct = 0;
    @(posedge clk);
    run_pass();
    checks += 2;
    if (last_out - first_out != NP - 1) begin
      failures++;
      $display("not one output per cycle: %0d cycles for %0d outputs", last_out - first_out + 1, NP);
    end
    if (first_out - first_in != LAT) begin
      failures++;
      $display("latency %0d, expected %0d", first_out - first_in, LAT);
    end
    checks++;
    if (n_special == 0 || n_plain == 0 || n_stall == 0) begin
      failures++;
      $display("mechanism missing: special %0d plain %0d stalls %0d", n_special, n_plain, n_stall);
    end
    $display("ppe_csc: %0d outputs, %0d special, %0d output stalls", 2 * NP, n_special, n_stall);
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
