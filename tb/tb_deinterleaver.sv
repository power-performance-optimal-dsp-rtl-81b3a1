// tb_deinterleaver: self-checking test of the de-interleaver.
//
// Feeds a random sample every clk cycle and keeps its own copy of the
// stream. After each edge that takes an odd sample X[2m+1], the output pair
// must be (X[2m], X[2m+1]), and it must still be the same one cycle later.
// A watchdog ends the run with a failure if it does not finish.
module tb_deinterleaver;
  localparam int DATA_W = 12;
  localparam int N_SAMP = 400;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic signed [DATA_W-1:0] x_in = '0;
  logic signed [DATA_W-1:0] x_even, x_odd;
  logic signed [DATA_W-1:0] hist [N_SAMP];
  int checks = 0, failures = 0;

  deinterleaver #(.DATA_W(DATA_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int m = 0; m < N_SAMP; m++) hist[m] = DATA_W'($urandom);
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    // x_in for edge m is set up half a cycle before it.
    for (int m = 0; m < N_SAMP; m++) begin
      x_in = hist[m];
      @(posedge clk);
      #1;
      if (m % 2 == 1) begin
        checks++;
        if (x_even !== hist[m-1] || x_odd !== hist[m]) begin
          failures++;
          $display("pair %0d: got %0d,%0d expected %0d,%0d", m/2, x_even,
                   x_odd, hist[m-1], hist[m]);
        end
      end else if (m > 1) begin
        // pair must have held through the even edge
        checks++;
        if (x_even !== hist[m-2] || x_odd !== hist[m-1]) begin
          failures++;
          $display("pair %0d not stable", m/2 - 1);
        end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
