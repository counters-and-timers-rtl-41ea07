// second_timer: the "count" register of the kitchen timer, a periodic
// down-counter that marks one-second intervals.
//
// The register is loaded with N-1 when reset_n is low or when it has reached
// zero, and otherwise decremented by one, so while running it passes through
// N-1, N-2, ..., 0 and repeats with period N clock cycles (frequency f_clk/N).
// Other logic acts on the cycle where count == 0. With N equal to the clock
// frequency that happens once per second. This reload-at-zero structure and
// the synchronous reset (reset_n only selects the next value; there is no
// asynchronous clear) follow the lab description.
//
// Design choice: the counter only advances while run = 1 and holds its value
// while the timer is stopped, so a paused timer resumes part-way through the
// current second instead of starting a fresh one.
//
// Interface: clk, reset_n (active-low, synchronous), run; count is the
// register output. Timing: with run held high, count == 0 occurs N-1 clock
// edges after reset is released and every N edges after that.
module second_timer #(
  parameter int unsigned N = kt_pkg::CLK_HZ,           // cycles per period
  localparam int unsigned W = (N > 1) ? $clog2(N) : 1  // width of count
) (
  input  logic         clk,
  input  logic         reset_n,  // low: reload N-1 on the next edge
  input  logic         run,      // high: advance the count
  output logic [W-1:0] count     // cycles left in the current period
);

  localparam logic [W-1:0] RELOAD = W'(N - 1);

  logic [W-1:0] count_next;

  always_comb begin
    if (!reset_n)         count_next = RELOAD;
    else if (!run)        count_next = count;       // stopped: hold
    else if (count == '0) count_next = RELOAD;      // period over: restart
    else                  count_next = count - 1'b1;
  end

  always_ff @(posedge clk) count <= count_next;

endmodule
