// tb_dsb: self-checking test of the dynamic setup block, 3 x 3 torus.
// All source/destination pairs (each source given a different destination
// per round) and random destination sets: for every source the occupied
// router outputs and the input selected at each must equal the path worked
// out by the reference model.
module tb_dsb;
  import htm_pkg::*;
  import tb_ref_pkg::*;
  localparam int KX = 3, KY = 3, N = 9, IW = 4, NE = N * NOPORT;
  logic [IW-1:0] dest [N];
  logic [NE-1:0] use_map [N];
  logic [2:0]    sel [N][NE];
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  dsb #(.KX(KX), .KY(KY)) dut (.*);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all();
    hop_t p [$];
    for (int i = 0; i < N; i++) begin
      logic [NE-1:0] m;
      m = '0;
      ref_path(KX, KY, i, int'(dest[i]), p);
      foreach (p[k]) begin
        m[p[k].e] = 1'b1;
        checks++;
        if (sel[i][p[k].e] != p[k].src) begin
          failures++; $display("FAIL sel %0d->%0d entry %0d", i, dest[i], p[k].e);
        end
      end
      checks++;
      if (use_map[i] != m) begin
        failures++; $display("FAIL use %0d->%0d %h vs %h", i, dest[i], use_map[i], m);
      end
    end
  endtask

  initial begin
    for (int rnd = 0; rnd < N; rnd++) begin
      for (int i = 0; i < N; i++) dest[i] = IW'((i + rnd) % N);
      @(posedge clk);
      check_all();
    end
    for (int t = 0; t < 200; t++) begin
      for (int i = 0; i < N; i++) dest[i] = IW'($urandom % N);
      @(posedge clk);
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
