// optical_router: behavioural model of the 5x5 strictly non-blocking
// microring (MR) optical router of the HTM optical layer. Not synthesizable
// as a real part: the device is photonic (16 identical microring resonators
// on six waveguides with two terminators).
//
// The model keeps the router's function as seen by the digital control:
// five optical inputs (injection, north, south, east, west), five outputs
// (ejection and the four directions) and, per output, the setting the
// control unit applies to the rings (cfg[o].en and the input cfg[o].src that
// output is coupled to). Being strictly non-blocking, any set of
// connections with distinct inputs and distinct outputs can be made at once.
// Which rings realise a given connection is not modelled. A dark output
// (en = 0) carries no light. The model adds one clock of latency per router
// so that light crossing a ring of routers in the torus never forms a
// zero-delay loop in simulation; that delay is a modelling choice, not a
// property of the device.
module optical_router
  import htm_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  opt_t  in_port  [NOPORT],
  input  ocfg_t cfg      [NOPORT],
  output opt_t  out_port [NOPORT]
);
  always_ff @(posedge clk) begin
    for (int o = 0; o < NOPORT; o++) begin
      if (!rst_n || !cfg[o].en || 32'(cfg[o].src) >= NOPORT)
        out_port[o] <= '0;
      else
        out_port[o] <= in_port[cfg[o].src];
    end
  end

endmodule
