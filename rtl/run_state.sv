// run_state: the run/stop flip-flop of the kitchen timer.
//
// run is cleared on a clock edge with reset_n low and inverted on each rising
// edge of run_stop, found by a rising_edge_detect instance. Reset wins over a
// simultaneous press. This behaviour follows the lab description; the reset
// is synchronous.
//
// Interface: run_stop must be synchronous to clk (the debounced pushbutton).
// Timing: run changes on the first clock edge at which run_stop is sampled
// high after having been low.
module run_state (
  input  logic clk,
  input  logic reset_n,   // low: stop on the next edge
  input  logic run_stop,  // debounced run/stop pushbutton level
  output logic run
);

  logic press;

  rising_edge_detect u_edge (
    .clk        (clk),
    .sig        (run_stop),
    .sig_rising (press)
  );

  always_ff @(posedge clk) begin
    if (!reset_n)   run <= 1'b0;
    else if (press) run <= !run;
  end

endmodule
