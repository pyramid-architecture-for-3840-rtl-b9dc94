// tb_ahb_slave_regs: self-checking testbench of the AHB-Lite settings slave.
//
// A bus model issues random pipelined AHB-Lite transfers: writes and reads of
// every register of the map, back to back or with idle cycles, and transfers
// to another slave (HSEL low) whose data phases insert random wait states by
// holding HREADY low. A model of the register file, written from the register
// map, is updated when a write's data phase completes. After every cycle the
// whole settings bundle must equal the model, every read must return the
// model's value (STATUS returns the busy input), the reset values must read
// back, and a write of 1 to CTRL must give exactly one start pulse in the
// following cycle. Wait states, back-to-back transfers and start pulses are
// counted and must all occur.
module tb_ahb_slave_regs;
  import ptisp_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        hsel, hwrite, hready, hreadyout, hresp, busy, start;
  logic [31:0] haddr, hwdata, hrdata;
  logic [1:0]  htrans;
  cfg_t        cfg;

  ahb_slave_regs dut (
    .clk, .rst_n, .hsel, .haddr, .htrans, .hwrite, .hwdata, .hready,
    .hreadyout, .hresp, .hrdata, .busy, .cfg, .start
  );

  typedef struct {
    logic       act;   // a transfer (NONSEQ)
    logic       sel;   // to this slave
    logic       wr;
    logic [5:0] a;     // word offset
    logic [31:0] d;
  } xfer_t;

  int checks = 0, failures = 0, n_wait = 0, n_b2b = 0, n_start = 0, n_rd = 0;
  cfg_t mcfg;

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  function automatic logic [31:0] model_read(input logic [5:0] a);
    case (a)
      6'h01: return {31'd0, busy};
      6'h02: return mcfg.src_base;
      6'h03: return mcfg.irr_base1;
      6'h04: return mcfg.irr_base2;
      6'h05: return mcfg.irr_base3;
      6'h06: return 32'(mcfg.blc);
      6'h07: return {4'd0, mcfg.lsc_cy, 4'd0, mcfg.lsc_cx};
      6'h08: return 32'(mcfg.lsc_k);
      6'h09: return 32'(mcfg.wb_r);
      6'h0A: return 32'(mcfg.wb_g);
      6'h0B: return 32'(mcfg.wb_b);
      6'h0C: return {6'd0, mcfg.nr_ss, 5'd0, mcfg.nr_rs, 6'd0, mcfg.nr_thr};
      6'h0D: return {16'd0, mcfg.ee_alpha, mcfg.ee_thr};
      6'h0E: return {8'd0, mcfg.frame_ty, 8'd0, mcfg.frame_tx};
      default: return (a >= 6'h0F && a <= 6'h17) ? 32'(mcfg.ccm[(a - 6'h0F) / 3][(a - 6'h0F) % 3]) : 32'd0;
    endcase
  endfunction

  task automatic model_write(input logic [5:0] a, input logic [31:0] d);
    case (a)
      6'h02: mcfg.src_base = d;
      6'h03: mcfg.irr_base1 = d;
      6'h04: mcfg.irr_base2 = d;
      6'h05: mcfg.irr_base3 = d;
      6'h06: mcfg.blc = d[9:0];
      6'h07: begin mcfg.lsc_cx = d[11:0]; mcfg.lsc_cy = d[27:16]; end
      6'h08: mcfg.lsc_k = d[15:0];
      6'h09: mcfg.wb_r = d[9:0];
      6'h0A: mcfg.wb_g = d[9:0];
      6'h0B: mcfg.wb_b = d[9:0];
      6'h0C: begin mcfg.nr_thr = d[9:0]; mcfg.nr_rs = d[18:16]; mcfg.nr_ss = d[25:24]; end
      6'h0D: begin mcfg.ee_thr = d[7:0]; mcfg.ee_alpha = d[15:8]; end
      6'h0E: begin mcfg.frame_tx = d[7:0]; mcfg.frame_ty = d[23:16]; end
      default: if (a >= 6'h0F && a <= 6'h17) mcfg.ccm[(a - 6'h0F) / 3][(a - 6'h0F) % 3] = d[11:0];
    endcase
  endtask

  function automatic xfer_t rand_xfer();
    xfer_t x;
    x.act = ($urandom_range(99) < 75);
    x.sel = ($urandom_range(99) < 80);
    x.wr  = ($urandom_range(1) != 0);
    x.a   = 6'($urandom_range(25));
    x.d   = $urandom;
    if (x.a == 6'h00) x.d[0] = ($urandom_range(3) == 0);
    return x;
  endfunction

  initial begin
    xfer_t cur, prev;
    logic exp_start;
    int wait_left;
    hsel = 0; hwrite = 0; htrans = 0; haddr = 0; hwdata = 0; hready = 1; busy = 0;
    mcfg = '0;
    mcfg.blc = 10'd64; mcfg.lsc_cx = 12'd1929; mcfg.lsc_cy = 12'd1086;
    mcfg.wb_r = 10'd256; mcfg.wb_g = 10'd256; mcfg.wb_b = 10'd256;
    mcfg.nr_thr = 10'd64; mcfg.nr_rs = 3'd3; mcfg.nr_ss = 2'd1;
    mcfg.ee_thr = 8'd4; mcfg.ee_alpha = 8'd16;
    mcfg.ccm[0][0] = 12'd256; mcfg.ccm[1][1] = 12'd256; mcfg.ccm[2][2] = 12'd256;
    repeat (2) @(posedge clk);
    rst_n = 1;
    prev = '{default: 0};
    cur = rand_xfer();
    exp_start = 0;
    wait_left = 0;
    for (int i = 0; i < 5000; i++) begin
      logic done;
      @(negedge clk);
      // state after the previous edge
      chk(cfg == mcfg, "settings bundle equals the model");
      chk(start == exp_start, "start pulse");
      chk(hreadyout && !hresp, "always ready, OKAY");
      if (start) n_start++;
      exp_start = 0;
      busy = ($urandom_range(1) != 0);
      // data phase of prev
      hwdata = prev.wr ? prev.d : 32'($urandom);
      hready = !(prev.act && !prev.sel && wait_left > 0);
      if (!hready) begin
        n_wait++;
        wait_left--;
      end
      // address phase of cur
      hsel = cur.sel;
      htrans = cur.act ? 2'b10 : 2'b00;
      hwrite = cur.wr;
      haddr = {24'($urandom), cur.a, 2'b00};
      #1;
      done = hready;
      if (done && prev.act && prev.sel && !prev.wr) begin
        chk(hrdata == model_read(prev.a), $sformatf("read of 0x%02h", {prev.a, 2'b00}));
        n_rd++;
      end
      @(posedge clk);
      if (done) begin
        if (prev.act && prev.sel && prev.wr) begin
          model_write(prev.a, prev.d);
          if (prev.a == 6'h00 && prev.d[0]) exp_start = 1;
        end
        if (prev.act && cur.act) n_b2b++;
        prev = cur;
        cur = rand_xfer();
        wait_left = (prev.act && !prev.sel) ? $urandom_range(3) : 0;
      end
    end
    checks++;
    if (n_wait == 0 || n_b2b == 0 || n_start == 0 || n_rd == 0) begin
      failures++;
      $display("mechanism missing: waits %0d back-to-back %0d starts %0d reads %0d", n_wait, n_b2b, n_start, n_rd);
    end
    $display("ahb_slave_regs: reads %0d, waits %0d, back-to-back %0d, starts %0d", n_rd, n_wait, n_b2b, n_start);
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
