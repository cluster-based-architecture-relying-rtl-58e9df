// tb_ci_serdes: self-checking test of the cluster-interface serdes.
// The optical output is looped back to the input. Random flits are offered
// with random gaps; every flit must come back unchanged and in order, a
// back-to-back flit must leave exactly FLIT_W clocks after the one before,
// and each flit must appear FLIT_W+1 clocks after it was taken.
module tb_ci_serdes;
  import htm_pkg::*;
  logic  clk = 0, rst_n = 0;
  logic  ser_valid, ser_ready, tx_busy, des_valid;
  flit_t ser_data, des_data;
  opt_t  opt_tx, opt_rx;
  int checks = 0, failures = 0;
  flit_t sent [$];
  longint t_sent [$];
  longint cyc = 0, last_take = -1;
  int b2b = 0;

  ci_serdes dut (.*);
  assign opt_rx = opt_tx;
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at cycle %0d", what, cyc); end
  endtask

  // receiver
  always @(posedge clk) if (rst_n && des_valid) begin
    check(sent.size() > 0, "unexpected flit");
    if (sent.size() > 0) begin
      check(des_data == sent[0], "flit value");
      check(cyc - t_sent[0] == FLIT_W + 1, "flit latency");
      void'(sent.pop_front());
      void'(t_sent.pop_front());
    end
  end

  initial begin
    ser_valid = 0; ser_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 3000; k++) begin
      @(negedge clk);
      ser_valid = ($urandom % 3) != 0;
      ser_data  = flit_t'($urandom);
      @(posedge clk);
      if (ser_valid && ser_ready) begin
        if (last_take >= 0 && cyc - last_take == FLIT_W) b2b++;
        if (last_take >= 0) check(cyc - last_take >= FLIT_W, "flit spacing");
        last_take = cyc;
        sent.push_back(ser_data);
        t_sent.push_back(cyc);
      end
    end
    @(negedge clk) ser_valid = 0;
    repeat (40) @(posedge clk);
    check(sent.size() == 0, "all flits received");
    check(b2b > 10, "back-to-back flits seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
