// tb_ee_core: self-checking testbench of ee_core, the luma unsharp-mask edge enhancement.
//
// Random 7x5 windows (mixtures of flat areas, noise, edges and single
// impulses) are offered with random gaps while the pipeline enable is dropped
// at random, as the tile processing element does when its output is stalled.
// Every result is compared in order with an integer model of the filter. A
// second pass holds the enable high and sends a window every cycle: each result
// must appear exactly three cycles after its window (the core's latency) and
// the results must leave one per cycle. The bench requires both outcomes of
// the core's decision (luma sharpened / left alone) to occur.
module tb_ee_core;
  import ptisp_pkg::*;

  localparam int NW = 800;
  localparam int IW = 24;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic en, in_valid, out_valid, out_flag;
  logic [KH-1:0][KW-1:0][IW-1:0] win;
  pix_meta_t in_meta, out_meta;
  logic [24-1:0] out_pix;
  logic [7:0] thr, alpha;

  ee_core #(.IW(IW)) dut (
    .clk, .rst_n, .en, .thr, .alpha,
    .in_valid, .win, .in_meta,
    .out_valid, .out_pix, .out_meta, .out_enh(out_flag)
  );

  int checks = 0, failures = 0, n_special = 0, n_plain = 0;

  function automatic int clip(input int v, input int hi);
    return v < 0 ? 0 : (v > hi ? hi : v);
  endfunction

  function automatic logic [24-1:0] model(input logic [KH-1:0][KW-1:0][IW-1:0] w, input pix_meta_t m,
                                           output logic special);
    int hk[7] = '{1, 6, 15, 20, 15, 6, 1};
    int vk[5] = '{1, 4, 6, 4, 1};
    int s, blur, z, yc, yn;
    s = 0;
    for (int r = 0; r < 5; r++)
      for (int c = 0; c < 7; c++) s += hk[c] * vk[r] * int'(w[r][c][23:16]);
    blur = (s + 512) / 1024;
    yc = int'(w[2][3][23:16]);
    z = yc - blur;
    special = ((z < 0 ? -z : z) > int'(thr));
    yn = clip(yc + ((z * int'(alpha) + 8) >>> 4), 255);
    return special ? {8'(yn), w[2][3][15:0]} : w[2][3];
  endfunction

  function automatic logic [KH-1:0][KW-1:0][IW-1:0] gen_win();
    logic [KH-1:0][KW-1:0][IW-1:0] w;
    int base, noise, mode;
    mode = $urandom_range(3);
    base = $urandom_range(220);
    noise = $urandom_range(1, 12);
    for (int r = 0; r < KH; r++)
      for (int c = 0; c < KW; c++) begin
        int v;
        v = base + $urandom_range(noise);
        if (mode == 1 && c > 3) v = v + 80;
        w[r][c] = {8'(clip(v, 255)), 16'($urandom)};
      end
    if (mode == 2) w[2][3] = 24'($urandom);
    if (mode == 3) w = {KH * KW {24'($urandom)}};
    return w;
  endfunction

  logic [24-1:0] exp_q[$];
  pix_meta_t       expm_q[$];
  logic            sp_q[$];
  int gap_pct = 30, stall_pct = 30, nsent = 0, nrecv = 0;
  int cyc = 0, in_cyc[$], worst_lat = 0, best_lat = 1000, first_out = -1, last_out = -1;
  always @(posedge clk) cyc++;

  always @(posedge clk) begin
    if (rst_n) begin
      if (en && out_valid) begin
        logic [24-1:0] e;
        pix_meta_t em;
        logic sp;
        int lat;
        e  = exp_q.pop_front();
        em = expm_q.pop_front();
        sp = sp_q.pop_front();
        lat = cyc - in_cyc.pop_front();
        if (lat > worst_lat) worst_lat = lat;
        if (lat < best_lat) best_lat = lat;
        if (sp) n_special++; else n_plain++;
        checks++;
        if (out_pix != e || out_meta != em || out_flag != sp) begin
          failures++;
          if (failures < 10) $display("mismatch: got %h expected %h", out_pix, e);
        end
        if (first_out < 0) first_out = cyc;
        last_out = cyc;
        nrecv++;
      end
      if (en && in_valid) begin
        logic sp;
        exp_q.push_back(model(win, in_meta, sp));
        expm_q.push_back(in_meta);
        sp_q.push_back(sp);
        in_cyc.push_back(cyc);
      end
      if (en) begin
        if (nsent < NW && $urandom_range(99) >= gap_pct) begin
          in_valid <= 1'b1;
          win      <= gen_win();
          in_meta  <= pix_meta_t'($urandom);
          nsent++;
        end else in_valid <= 1'b0;
      end
      en <= ($urandom_range(99) >= stall_pct);
    end
  end

  task automatic new_settings();
    thr = 8'($urandom_range(2, 20));
    alpha = 8'($urandom_range(4, 40));
  endtask

  initial begin
    en = 0; in_valid = 0; win = '0; in_meta = '0;
    new_settings();
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (nrecv == NW);
    // second pass: enable always high, a window every cycle
    @(negedge clk);
    gap_pct = 0;
    stall_pct = 0;
    en = 1;
    worst_lat = 0;
    best_lat = 1000;
    first_out = -1;
    nsent = 0;
    nrecv = 0;
    new_settings();
    wait (nrecv == NW);
    checks += 2;
    if (worst_lat != 3 || best_lat != 3) begin
      failures++;
      $display("latency %0d..%0d cycles, expected 3", best_lat, worst_lat);
    end
    if (last_out - first_out != NW - 1) begin
      failures++;
      $display("not one result per cycle");
    end
    checks++;
    if (n_special == 0 || n_plain == 0) begin
      failures++;
      $display("decision not exercised: %0d / %0d", n_special, n_plain);
    end
    $display("ee_core: %0d results, %0d with luma sharpened / left alone", 2 * NW, n_special);
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
