// sync_debounce: synchronises and debounces a pushbutton.
//
// The lab description supplies this unit ready-made and gives only its job
// and its three connections, in this order: the switch input, the clock and
// the debounced output. Its insides here are this design's own, the simplest
// that does the job: a two-flip-flop synchronizer followed by a counter that
// counts consecutive clock cycles on which the synchronised input differs
// from the output. When that count reaches DEBOUNCE_CYCLES the output takes
// the new level; any cycle on which input and output agree clears the count.
// So contact bounce shorter than DEBOUNCE_CYCLES cycles never reaches the
// output.
//
// There is no reset port (the supplied unit has none). After power-up the
// output is arbitrary until the input has been steady for DEBOUNCE_CYCLES
// cycles. Timing: a clean level change appears at sw_out
// 2 + DEBOUNCE_CYCLES clock edges after it reaches sw_in.
module sync_debounce #(
  parameter int unsigned DEBOUNCE_CYCLES = kt_pkg::DEBOUNCE_CYCLES,
  localparam int unsigned CW = $clog2(DEBOUNCE_CYCLES + 1)
) (
  input  logic sw_in,   // raw pushbutton level, asynchronous
  input  logic clk,
  output logic sw_out   // clean level, synchronous to clk
);

  localparam logic [CW-1:0] LAST = CW'(DEBOUNCE_CYCLES - 1);

  logic          sw_sync;
  logic [CW-1:0] stable;  // cycles the input has disagreed with sw_out

  synchronizer #(.STAGES(2)) u_sync (
    .clk      (clk),
    .async_in (sw_in),
    .sync_out (sw_sync)
  );

  always_ff @(posedge clk) begin
    if (sw_sync == sw_out) begin
      stable <= '0;
    end else if (stable >= LAST) begin
      sw_out <= sw_sync;
      stable <= '0;
    end else begin
      stable <= stable + 1'b1;
    end
  end

endmodule
