// synchronizer_tb: self-checking test of the flip-flop synchronizer.
//
// Random levels are applied just after each clock edge to a two-stage
// (default) and a three-stage instance; each output must equal the input of
// STAGES edges earlier, kept in a history shift register in the testbench.
module synchronizer_tb;

  logic clk = 1'b0;
  logic async_in;
  logic out2, out3;
  logic [7:0] hist;   // hist[0] = level sampled at the latest edge

  int checks   = 0;
  int failures = 0;

  synchronizer             dut2 (.clk, .async_in, .sync_out(out2));
  synchronizer #(.STAGES(3)) dut3 (.clk, .async_in, .sync_out(out3));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    async_in = 1'b0;
    hist = '0;
    repeat (2000) begin
      @(posedge clk);
      hist = {hist[6:0], async_in};
      #1;
      if ($time > 100) begin
        checks += 2;
        if (out2 !== hist[1]) begin failures++; $display("FAIL 2-stage delay at %0t", $time); end
        if (out3 !== hist[2]) begin failures++; $display("FAIL 3-stage delay at %0t", $time); end
      end
      async_in = $urandom_range(0, 1) != 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
