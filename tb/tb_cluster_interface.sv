// tb_cluster_interface: self-checking test of one cluster interface.
//
// The optical output is looped back to the optical input through a
// three-clock delay line (light crossing routers). A small arbiter model
// acknowledges a request one clock after it appears, but only while the
// interface reports dest_ready, and answers tail with tail_ack one clock
// later. Random packets (sizes 0..10) enter from the NoC side; the NoC
// side drains the RX queue with random credit, with long pauses so that
// the RX queue fills. Checked: the requested destination is the header's
// cluster, every packet comes back unchanged and in order, each packet
// keeps the channel lit for exactly 16 clocks per flit, no light is sent
// without ack, tail comes only after the last bit has arrived, dest_ready
// falls when the RX queue is nearly full, and the RX queue never overflows.
module tb_cluster_interface;
  import htm_pkg::*;
  localparam int N = 9, IW = 4, DEPTH = 32, MAXP = 12;
  logic          clk = 0, rst_n = 0;
  link_t         from_noc, to_noc;
  logic          from_noc_credit, to_noc_credit;
  logic          arb_rx, arb_ack, arb_tail, arb_tail_ack, dest_ready, rx_overflow;
  logic [IW-1:0] arb_dest;
  opt_t          opt_tx, opt_rx;
  opt_t          dly [3];
  int checks = 0, failures = 0;
  int sent = 0, recv = 0, not_ready = 0, lit = 0;
  flit_t expq [$];
  int    bitsq [$];
  flit_t txq [$];
  flit_t hdrq [$];
  bit    feed = 0, drain = 1;

  cluster_interface #(.N(N), .CI_DEPTH(DEPTH), .MAX_PKT(MAXP), .DRAIN_CYCLES(4)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // optical loopback
  always @(posedge clk) begin
    if (!rst_n) dly <= '{default: '0};
    else begin
    dly[0] <= opt_tx;
    dly[1] <= dly[0];
    dly[2] <= dly[1];
    end
  end
  assign opt_rx = dly[2];

  // arbiter model
  always @(posedge clk) begin
    if (!rst_n) begin
      arb_ack <= 0; arb_tail_ack <= 0;
    end else begin
      arb_tail_ack <= arb_tail;
      if (arb_rx && !arb_ack && dest_ready) begin
        arb_ack <= 1;
        check(32'(arb_dest) == 32'(hdrq[0][11:8]), "requested cluster");
        void'(hdrq.pop_front());
      end
      if (arb_tail && arb_ack) begin
        arb_ack <= 0;
        check(lit == 0, $sformatf("tail after the whole packet arrived (%0d bits in flight)", lit));
      end
    end
  end

  // light accounting: bits lit between ack and the end of the packet
  always @(posedge clk) if (rst_n) begin
    if (opt_tx.valid) begin
      check(arb_ack, "light only while the path is held");
      lit++;
    end
    if (opt_rx.valid) begin
      lit--;
      bitsq[0]--;
      if (bitsq[0] == 0) void'(bitsq.pop_front());
    end
    if (!dest_ready) not_ready++;
    check(!rx_overflow, "no RX overflow");
  end

  // NoC-side source
  always @(negedge clk) begin
    if (feed && txq.size() == 0 && sent < 200) begin
      int sz;
      flit_t h;
      sz = $urandom % 11;
      h = make_hdr($urandom % N, $urandom % 5, $urandom % 5);
      txq.push_back(h);
      hdrq.push_back(h);
      txq.push_back(flit_t'(sz));
      for (int k = 0; k < sz; k++) txq.push_back(flit_t'($urandom));
      foreach (txq[k]) expq.push_back(txq[k]);
      bitsq.push_back(16 * (sz + 2));
      sent++;
    end
    from_noc.valid = txq.size() > 0 && from_noc_credit && ($urandom % 4 != 0);
    from_noc.data  = txq.size() > 0 ? txq[0] : '0;
    to_noc_credit  = drain && ($urandom % 3 != 0);
  end
  always @(posedge clk) if (from_noc.valid) void'(txq.pop_front());

  // NoC-side sink
  always @(posedge clk) if (rst_n && to_noc.valid && to_noc_credit) begin
    check(expq.size() > 0 && to_noc.data == expq[0], "flit returned in order");
    if (expq.size() > 0) void'(expq.pop_front());
    recv++;
  end

  initial begin
    from_noc = '0; to_noc_credit = 1;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    feed = 1;
    for (int t = 0; t < 60; t++) begin
      drain = 0;
      repeat (400) @(posedge clk);
      drain = 1;
      repeat (600) @(posedge clk);
      if (sent >= 200) break;
    end
    wait (expq.size() == 0);
    repeat (20) @(posedge clk);
    check(sent == 200, "all packets sent");
    check(bitsq.size() == 0, "16 clocks of light per flit");
    check(not_ready > 0, "dest_ready back-pressure seen");
    $display("sent=%0d flits=%0d not_ready_cycles=%0d", sent, recv, not_ready);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
