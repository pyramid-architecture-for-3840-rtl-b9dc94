// tb_ahb_master: self-checking testbench of the AHB-Lite master port.
//
// Random word requests (reads and writes to a small address range, random
// tags, random gaps) are sent to the master, whose bus drives a memory slave
// model that inserts random wait states. A second copy of the memory, updated in
// request order, predicts every read: read responses must come back in order
// with the predicted data and the request's tag. The bench also checks the bus
// rules the master must keep: HSIZE word, HBURST single, only IDLE or NONSEQ,
// address and control held while HREADY is low, and the write data presented
// in the data phase. A last pass without waits or gaps checks the rate of one
// transfer per cycle.
module tb_ahb_master;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        req_valid, req_ready, req_we, rsp_valid;
  logic [31:0] req_addr, req_wdata, rsp_data;
  logic [2:0]  req_tag, rsp_tag;
  logic [31:0] haddr, hwdata, hrdata;
  logic [1:0]  htrans;
  logic        hwrite, hready;
  logic [2:0]  hsize, hburst;

  ahb_master #(.TAGW(3)) dut (
    .clk, .rst_n, .req_valid, .req_ready, .req_we, .req_addr, .req_wdata, .req_tag,
    .rsp_valid, .rsp_data, .rsp_tag,
    .haddr, .htrans, .hwrite, .hsize, .hburst, .hwdata, .hrdata, .hready
  );

  int checks = 0, failures = 0;
  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  // slave memory on the bus
  logic [31:0] mem [64];
  logic [31:0] pred [64];
  logic        dp_v, dp_we;
  logic [5:0]  dp_a;
  logic [31:0] last_haddr;
  logic [1:0]  last_htrans;
  logic        last_hwrite, last_hready;
  int wait_pct = 30, gap_pct = 30, n_wait = 0, n_xfer = 0, n_rsp = 0;
  assign hrdata = (dp_v && !dp_we) ? mem[dp_a] : 32'hdead_beef;

  always @(posedge clk) begin
    if (!rst_n) begin
      dp_v <= 0;
      hready <= 1;
      last_hready <= 1;
    end else begin
      chk(hsize == 3'b010 && hburst == 3'b000 && (htrans == 2'b00 || htrans == 2'b10), "size, burst and trans");
      if (!last_hready)
        chk(haddr == last_haddr && htrans == last_htrans && hwrite == last_hwrite, "address phase held in a wait state");
      last_haddr <= haddr;
      last_htrans <= htrans;
      last_hwrite <= hwrite;
      last_hready <= hready;
      if (!hready) n_wait++;
      if (hready) begin
        if (dp_v && dp_we) mem[dp_a] <= hwdata;
        if (dp_v) n_xfer++;
        dp_v  <= htrans[1];
        dp_we <= hwrite;
        dp_a  <= haddr[7:2];
        chk(haddr[1:0] == 2'b00, "word aligned");
      end
      hready <= ($urandom_range(99) >= wait_pct);
    end
  end

  // requests and predicted responses
  logic [31:0] exp_d[$];
  logic [2:0]  exp_t[$];
  int nreq = 0, NREQ = 3000;
  always @(posedge clk) begin
    if (rst_n) begin
      if (req_valid && req_ready) begin
        if (req_we) pred[req_addr[5:0]] = req_wdata;
        else begin
          exp_d.push_back(pred[req_addr[5:0]]);
          exp_t.push_back(req_tag);
        end
        nreq++;
      end
      if (rsp_valid) begin
        chk(exp_d.size() != 0, "response without a request");
        if (exp_d.size() != 0) begin
          logic [31:0] d;
          logic [2:0] t;
          d = exp_d.pop_front();
          t = exp_t.pop_front();
          chk(rsp_data == d && rsp_tag == t, $sformatf("read data %h tag %0d, expected %h tag %0d", rsp_data, rsp_tag, d, t));
        end
        n_rsp++;
      end
      if (!req_valid || req_ready) begin
        if (nreq + (req_valid ? 1 : 0) < NREQ && $urandom_range(99) >= gap_pct) begin
          req_valid <= 1;
          req_we    <= ($urandom_range(1) != 0);
          req_addr  <= 32'($urandom_range(63));
          req_wdata <= $urandom;
          req_tag   <= 3'($urandom);
        end else req_valid <= 0;
      end
    end
  end

  initial begin
    int c0, x0;
    req_valid = 0; req_we = 0; req_addr = 0; req_wdata = 0; req_tag = 0;
    for (int i = 0; i < 64; i++) begin
      mem[i] = $urandom;
      pred[i] = mem[i];
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (nreq == NREQ);
    repeat (20) @(posedge clk);
    chk(exp_d.size() == 0, "all reads answered");
    // rate: no waits, no gaps
    wait_pct = 0;
    gap_pct = 0;
    nreq = 0;
    repeat (5) @(posedge clk);
    c0 = 0;
    x0 = n_xfer;
    repeat (1000) begin
      @(posedge clk);
      c0++;
    end
    chk(n_xfer - x0 == c0, $sformatf("rate: %0d transfers in %0d cycles", n_xfer - x0, c0));
    NREQ = 0;
    repeat (20) @(posedge clk);
    chk(exp_d.size() == 0, "all reads answered");
    chk(n_wait > 0 && n_rsp > 0, "wait states and reads seen");
    $display("ahb_master: %0d transfers, %0d reads, %0d wait states", n_xfer, n_rsp, n_wait);
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
