// tb_ci_core: self-checking testbench of ci_core, the bilinear colour interpolation.
//
// Random 7x5 windows (mixtures of flat areas, noise, edges and single
// impulses) are offered with random gaps while the pipeline enable is dropped
// at random, as the tile processing element does when its output is stalled.
// Every result is compared in order with an integer model of the filter. A
// second pass holds the enable high and sends a window every cycle: each result
// must appear exactly three cycles after its window (the core's latency) and
// the results must leave one per cycle. The bench requires both outcomes of
// the core's decision (a red or blue site / a green site) to occur.
module tb_ci_core;
  import ptisp_pkg::*;

  localparam int NW = 800;
  localparam int IW = 8;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic en, in_valid, out_valid, out_flag;
  logic [KH-1:0][KW-1:0][IW-1:0] win;
  pix_meta_t in_meta, out_meta;
  logic [24-1:0] out_pix;


  ci_core #(.IW(IW)) dut (
    .clk, .rst_n, .en,
    .in_valid, .win, .in_meta,
    .out_valid, .out_pix, .out_meta
  );

  int checks = 0, failures = 0, n_special = 0, n_plain = 0;

  function automatic int clip(input int v, input int hi);
    return v < 0 ? 0 : (v > hi ? hi : v);
  endfunction

  function automatic logic [24-1:0] model(input logic [KH-1:0][KW-1:0][IW-1:0] w, input pix_meta_t m,
                                           output logic special);
    int c, cr, dg, we, ns, r, g, b;
    c  = int'(w[2][3]);
    cr = (int'(w[1][3]) + int'(w[3][3]) + int'(w[2][2]) + int'(w[2][4]) + 2) / 4;
    dg = (int'(w[1][2]) + int'(w[1][4]) + int'(w[3][2]) + int'(w[3][4]) + 2) / 4;
    we = (int'(w[2][2]) + int'(w[2][4]) + 1) / 2;
    ns = (int'(w[1][3]) + int'(w[3][3]) + 1) / 2;
    // RGGB phase from the source-grid position
    case ({m.y[0], m.x[0]})
      2'b00:   begin r = c;  g = cr; b = dg; end
      2'b01:   begin r = we; g = c;  b = ns; end
      2'b10:   begin r = ns; g = c;  b = we; end
      default: begin r = dg; g = cr; b = c;  end
    endcase
    special = (m.y[0] == m.x[0]);
    return {8'(r), 8'(g), 8'(b)};
  endfunction

  function automatic logic [KH-1:0][KW-1:0][IW-1:0] gen_win();
    logic [KH-1:0][KW-1:0][IW-1:0] w;
    int base, noise, mode;
    mode = $urandom_range(3);
    base = $urandom_range(200);
    noise = $urandom_range(1, 55);
    for (int r = 0; r < KH; r++)
      for (int c = 0; c < KW; c++) begin
        int v;
        v = base + $urandom_range(noise);
        if (mode == 1 && c > 3) v = v + 60;
        w[r][c] = IW'(clip(v, 255));
      end
    if (mode == 2) w[2][3] = 8'($urandom);
    if (mode == 3) w = {KH * KW {8'($urandom)}};
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
        if (out_pix != e || out_meta != em) begin
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
    ;
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
    $display("ci_core: %0d results, %0d with a red or blue site / a green site", 2 * NW, n_special);
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
