// tb_htm_full: end-to-end test of the HTM with every parameter at its
// default: 3 x 3 clusters of 5 x 5 routers (225 IPs), 16-flit router
// buffers, 128-flit interface queues, packets of up to 66 flits. Each IP
// sends two packets in each of the complement, uniform and local phases
// of htm_traffic, which checks every packet.
module tb_htm_full;
  import htm_pkg::*;
  localparam int KX = 3, KY = 3, NX = 5, NY = 5, N = 9, NR = 25;
  logic         clk = 0, rst_n = 0;
  link_t        ip_in [N][NR];
  logic         ip_in_credit [N][NR];
  link_t        ip_out [N][NR];
  logic         ip_out_credit [N][NR];
  logic [N-1:0] arb_ack, arb_conflict, ci_overflow;
  bit           done;
  int           checks, failures;

  htm_top dut (.*);

  htm_traffic #(.KX(KX), .KY(KY), .NX(NX), .NY(NY), .NPKT(2), .MAXPAY(64)) u_traffic (
    .clk, .rst_n, .ip_in, .ip_in_credit, .ip_out, .ip_out_credit,
    .arb_ack, .arb_conflict, .ci_overflow,
    .dest_ready(dut.dest_ready),
    .done, .checks, .failures
  );

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    wait (done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
