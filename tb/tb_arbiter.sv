// tb_arbiter: self-checking test of the low-latency arbiter, 3 x 3 torus.
//
// Directed part, modelled on the arbiter waveform: every cluster requests
// the "complement" destination 8-i, except cluster 0, which asks for
// destination 0 like cluster 8. output_conflict must flag destination 0
// only; one clock later cluster 8 (and not 0) holds destination 0; when
// cluster 8 raises tail, tail_ack follows one clock later and cluster 0 is
// acknowledged at the very edge that releases the path.
// Single request on an idle arbiter: ack exactly one clock after rx.
// Random part: nine client models request random destinations, hold the
// path for a random time and end with tail; dest_ready is toggled at
// random. Every cycle the test checks that held paths (from the reference
// path model) never share a router output, that cfg is exactly the union of
// the held paths, that output_conflict counts waiting requesters, that no
// destination with dest_ready low is newly granted, that tail_ack is tail
// delayed, and that every request is served within a bound.
module tb_arbiter;
  import htm_pkg::*;
  import tb_ref_pkg::*;
  localparam int KX = 3, KY = 3, N = 9, IW = 4, NE = N * NOPORT;
  logic          clk = 0, rst_n = 0;
  logic [N-1:0]  rx, dest_ready, tail, ack, tail_ack, output_conflict;
  logic [IW-1:0] dest [N];
  ocfg_t         cfg [NE];
  int checks = 0, failures = 0;
  int grants = 0, conflicts = 0, blocked_ready = 0, path_waits = 0;
  logic [N-1:0] prev_rx, prev_ack, prev_tail, prev_ready;
  logic [IW-1:0] prev_dest [N];
  int wait_cnt [N];
  bit random_phase = 0;

  arbiter #(.KX(KX), .KY(KY)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // Per-cycle invariants, sampled just after each edge.
  always @(posedge clk) if (rst_n) begin
    #1;
    begin
      bit         used [NE];
      logic [2:0] s    [NE];
      hop_t p [$];
      for (int e = 0; e < NE; e++) begin used[e] = 0; s[e] = '0; end
      for (int i = 0; i < N; i++) if (ack[i]) begin
        ref_path(KX, KY, i, int'(dest[i]), p);
        foreach (p[k]) begin
          check(!used[p[k].e], "held paths overlap");
          used[p[k].e] = 1;
          s[p[k].e] = p[k].src;
        end
      end
      for (int e = 0; e < NE; e++) begin
        check(cfg[e].en == used[e], "cfg enable");
        if (used[e]) check(cfg[e].src == s[e], "cfg input select");
      end
      for (int i = 0; i < N; i++) begin
        if (ack[i] && !prev_ack[i]) begin
          grants++;
          check(prev_rx[i], "ack without request");
          check(prev_ready[prev_dest[i]], "grant to a destination not ready");
        end
        check(tail_ack[i] == prev_tail[i], "tail_ack is tail delayed");
        if (prev_ack[i] && prev_tail[i]) check(!ack[i], "path released after tail");
      end
      for (int i = 0; i < N; i++)
        if (prev_rx[i] && !prev_ack[i] && !ack[i]) begin
          if (!prev_ready[prev_dest[i]]) blocked_ready++;
          else path_waits++;
        end
    end
    prev_ack = ack;
  end

  // Combinational conflict flag against the waiting requests.
  always @(negedge clk) if (rst_n) begin
    for (int j = 0; j < N; j++) begin
      int cnt;
      cnt = 0;
      for (int i = 0; i < N; i++) if (rx[i] && !ack[i] && dest[i] == IW'(j)) cnt++;
      check(output_conflict[j] == (cnt > 1), "output_conflict");
      if (cnt > 1) conflicts++;
    end
  end

  always @(posedge clk) begin
    prev_rx    <= rx;
    prev_tail  <= tail;
    prev_ready <= dest_ready;
    prev_dest  <= dest;
  end

  // Random client models.
  for (genvar i = 0; i < N; i++) begin : g_cl
    int st = 0, hold = 0;
    always @(negedge clk) if (random_phase) begin
      case (st)
        0: if (($urandom % 4) == 0) begin
             rx[i] = 1; dest[i] = IW'($urandom % N); st = 1; wait_cnt[i] = 0;
           end
        1: if (ack[i]) begin rx[i] = 0; hold = $urandom % 20; st = 2; end
           else begin
             wait_cnt[i]++;
             if (wait_cnt[i] == 400) check(0, $sformatf("request %0d starved", i));
           end
        2: if (hold == 0) begin tail[i] = 1; st = 3; end else hold--;
        3: if (tail_ack[i]) begin tail[i] = 0; st = 0; end
        default: ;
      endcase
    end
  end

  initial begin
    rx = '0; tail = '0; dest_ready = '1;
    prev_ack = '0;
    for (int i = 0; i < N; i++) begin dest[i] = '0; wait_cnt[i] = 0; end
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;

    // single request on an idle arbiter: ack one clock after rx
    @(negedge clk); rx[2] = 1; dest[2] = 4;
    @(posedge clk); #2; check(ack[2], "one-cycle ack");
    @(negedge clk); rx[2] = 0; tail[2] = 1;
    @(posedge clk); #2; check(!ack[2] && tail_ack[2], "release");
    @(negedge clk); tail[2] = 0;
    repeat (2) @(posedge clk);

    // waveform scenario
    @(negedge clk);
    for (int i = 0; i < N; i++) begin rx[i] = 1; dest[i] = IW'((i == 0) ? 0 : N - 1 - i); end
    #1 check(output_conflict == 9'h001, "conflict on destination 0 only");
    @(posedge clk); #2;
    check(ack[8] && !ack[0], "cluster 8 wins destination 0");
    @(negedge clk);
    for (int i = 1; i < N; i++) if (ack[i]) rx[i] = 0;
    #1 check(output_conflict == '0, "no conflict after first grants");
    // let remaining requests (path overlaps) be served, then end cluster 8
    for (int k = 0; k < 20; k++) begin
      @(negedge clk);
      for (int i = 1; i < N; i++) if (ack[i]) rx[i] = 0;
    end
    check(!ack[0], "cluster 0 still waits");
    tail[8] = 1;
    @(posedge clk); #2;
    check(ack[0] && !ack[8], "conflicted request granted at release");
    @(posedge clk); #2;
    check(tail_ack[8], "tail_ack");
    @(negedge clk);
    tail[8] = 0; rx[0] = 0;
    for (int i = 0; i < N; i++) if (ack[i]) tail[i] = 1;
    @(negedge clk);
    @(negedge clk);
    tail = '0;
    repeat (3) @(posedge clk);
    check(ack == '0, "all released");

    // random phase
    random_phase = 1;
    for (int t = 0; t < 6000; t++) begin
      @(negedge clk);
      if (($urandom % 32) == 0) dest_ready[$urandom % N] = 1'b0;
      if (t % 100 == 99) dest_ready = '1;
    end
    random_phase = 0;
    check(grants > 500, "many grants");
    check(conflicts > 50, "conflicts seen");
    check(blocked_ready > 0, "dest_ready back-pressure seen");
    check(path_waits > 0, "waits for busy paths seen");
    $display("grants=%0d conflicts=%0d blocked_ready=%0d path_waits=%0d",
             grants, conflicts, blocked_ready, path_waits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
