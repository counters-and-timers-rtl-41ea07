// rising_edge_detect: flags a low-to-high change of a signal that is not a
// clock.
//
// The previous value of sig is kept in one flip-flop (sig0); sig_rising is
// high for the one clock cycle in which sig0 is low and sig is high. The
// structure follows the lab description. sig must already be synchronous to
// clk. The flip-flop has no reset, as described; after power-up its first
// output is valid once one clock edge has passed.
//
// Interface: clk, sig in; sig_rising out (combinational from sig and sig0).
module rising_edge_detect (
  input  logic clk,
  input  logic sig,
  output logic sig_rising
);

  logic sig0;  // sig delayed by one clock

  always_ff @(posedge clk) sig0 <= sig;

  assign sig_rising = sig && !sig0;

endmodule
