// tb_circ_fifo: self-checking test of circ_fifo.
// A depth of 5 (not a power of two) makes the pointers wrap at an odd
// place. Random pushes and pops, including pushes while full and pops while
// empty, are compared with a queue model: data order, full, empty, count.
module tb_circ_fifo;
  localparam int W = 8, D = 5;
  logic clk = 0, rst_n = 0;
  logic wr_en, rd_en;
  logic [W-1:0] wr_data, rd_data;
  logic full, empty;
  logic [$clog2(D+1)-1:0] count;
  int checks = 0, failures = 0, wraps = 0;
  logic [W-1:0] model [$];

  circ_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit c, string what);
    checks++;
    if (!c) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    wr_en = 0; rd_en = 0; wr_data = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 4000; t++) begin
      @(negedge clk);
      check(count == ($clog2(D+1))'(model.size()), "count");
      check(full == (model.size() == D), "full");
      check(empty == (model.size() == 0), "empty");
      if (model.size() > 0) check(rd_data == model[0], "data");
      wr_en   = ($urandom % 100) < (t < 2000 ? 60 : 40);
      rd_en   = ($urandom % 100) < 50;
      wr_data = W'($urandom);
      if (full) wraps++;
      if (rd_en && model.size() > 0) void'(model.pop_front());
      if (wr_en && !full) model.push_back(wr_data);
      @(posedge clk);
    end
    check(wraps > 0, "full state reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
