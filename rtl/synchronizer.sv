// synchronizer: brings an asynchronous input into the clk domain.
//
// The input passes through STAGES flip-flops in series. The first may go
// metastable; the later ones give it a clock period to settle. The lab
// description draws a single flip-flop and notes that two in series are
// typical; two is the default here. There is no reset: the output is valid
// STAGES clock edges after power-up.
//
// Interface: async_in in, sync_out out, delayed by STAGES clock edges.
module synchronizer #(
  parameter int unsigned STAGES = 2
) (
  input  logic clk,
  input  logic async_in,
  output logic sync_out
);

  logic [STAGES-1:0] stage;

  always_ff @(posedge clk) begin
    stage[0] <= async_in;
    for (int i = 1; i < STAGES; i++) stage[i] <= stage[i-1];
  end

  assign sync_out = stage[STAGES-1];

endmodule
