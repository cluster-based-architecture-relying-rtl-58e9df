// tb_crb: self-checking test of the conflict resolution block, 64 ports.
// Part 1 replays the arbiter waveform scenario: every port requests, port k
// (1-based) targets 65-k, except port 1, which targets output 1 like port
// 64. Only output 1 may show a conflict; every other output has one
// candidate; output 1's candidate after reset is port 64. Once the granted
// ports are served, port 1 alone asks for output 1 with no conflict and is
// the candidate. Part 2 checks the round-robin rotation with three
// requesters of one output and the conflict flag with three requesters.
// Part 3 runs random request sets against a reference round-robin model.
module tb_crb;
  localparam int N = 64, IW = 6;
  logic          clk = 0, rst_n = 0;
  logic [N-1:0]  req, elig, taken, conflict, win_vld;
  logic [IW-1:0] dest [N];
  logic [IW-1:0] win_idx [N];
  int checks = 0, failures = 0;
  int last [N];

  crb #(.N(N)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // Independent reference: candidate of column j.
  function automatic int ref_win(int j);
    for (int k = 1; k <= N; k++) begin
      int q;
      q = (last[j] + k) % N;
      if (req[q] && elig[q] && dest[q] == IW'(j)) return q;
    end
    return -1;
  endfunction

  task automatic check_all(string tag);
    for (int j = 0; j < N; j++) begin
      int cnt, w;
      cnt = 0;
      for (int i = 0; i < N; i++) if (req[i] && dest[i] == IW'(j)) cnt++;
      check(conflict[j] == (cnt > 1), {tag, " conflict"});
      w = ref_win(j);
      check(win_vld[j] == (w >= 0), {tag, " win_vld"});
      if (w >= 0) check(win_idx[j] == IW'(w), {tag, " win_idx"});
    end
  endtask

  task automatic tick_taken();
    taken = win_vld;
    @(posedge clk);
    for (int j = 0; j < N; j++) if (taken[j] && win_vld[j]) last[j] = win_idx[j];
    @(negedge clk);
    taken = '0;
  endtask

  initial begin
    req = '0; elig = '0; taken = '0;
    for (int i = 0; i < N; i++) begin dest[i] = '0; last[i] = 0; end
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // Part 1: waveform scenario
    for (int i = 0; i < N; i++) dest[i] = (i == 0) ? '0 : IW'(N - 1 - i);
    req = '1; elig = '1;
    #1;
    check(conflict == 64'h1, "fig: conflict only on output 1");
    check(win_vld[0] && win_idx[0] == IW'(63), "fig: port 64 wins output 1");
    check(win_vld == 64'h7FFF_FFFF_FFFF_FFFF, "fig: all outputs but 64 have a candidate");
    check_all("fig1");
    tick_taken();
    req = 64'h1;
    #1;
    check(conflict == '0, "fig: no conflict afterwards");
    check(win_vld[0] && win_idx[0] == '0, "fig: port 1 granted next");
    check_all("fig2");
    tick_taken();
    // Part 2: three requesters 5, 9, 40 -> output 7, rotation
    req = '0;
    req[5] = 1; req[9] = 1; req[40] = 1;
    dest[5] = 7; dest[9] = 7; dest[40] = 7;
    for (int k = 0; k < 6; k++) begin
      int expw;
      #1;
      expw = (k % 3 == 0) ? 5 : (k % 3 == 1) ? 9 : 40;
      check(conflict[7], "three requesters conflict");
      check(win_idx[7] == IW'(expw), $sformatf("rotation step %0d", k));
      tick_taken();
    end
    // ineligible requester is skipped but still counts as a conflict
    elig[9] = 0;
    #1;
    check(conflict[7] && win_idx[7] != IW'(9), "ineligible skipped");
    // Part 3: random
    for (int t = 0; t < 300; t++) begin
      @(negedge clk);
      for (int i = 0; i < N; i++) begin
        req[i]  = ($urandom % 3) == 0;
        elig[i] = ($urandom % 4) != 0;
        dest[i] = IW'($urandom % 8);
      end
      #1;
      check_all("rand");
      tick_taken();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
