// tb_optical_router: self-checking test of the optical router model.
// Random output settings (including dark outputs) and random light on the
// inputs; every output must show, one clock later, the input its setting
// selects, or no light.
module tb_optical_router;
  import htm_pkg::*;
  logic  clk = 0, rst_n = 0;
  opt_t  in_port  [NOPORT];
  ocfg_t cfg      [NOPORT];
  opt_t  out_port [NOPORT];
  int checks = 0, failures = 0;

  optical_router dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    opt_t  exp [NOPORT];
    for (int p = 0; p < NOPORT; p++) begin in_port[p] = '0; cfg[p] = '0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 500; t++) begin
      @(negedge clk);
      for (int p = 0; p < NOPORT; p++) begin
        in_port[p] = opt_t'($urandom);
        cfg[p].en  = ($urandom % 4) != 0;
        cfg[p].src = 3'($urandom % NOPORT);
      end
      for (int o = 0; o < NOPORT; o++)
        exp[o] = cfg[o].en ? in_port[cfg[o].src] : '0;
      @(negedge clk);
      for (int o = 0; o < NOPORT; o++) begin
        checks++;
        if (out_port[o] !== exp[o]) begin
          failures++; $display("FAIL out %0d", o);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
