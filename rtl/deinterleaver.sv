// deinterleaver: splits the full-rate sample stream X[n] into the even/odd
// pair X[2n], X[2n+1] that feeds the two lanes of the parallel filter.
//
// One sample arrives on x_in every clk cycle; the first sample after reset
// is X[0]. A phase bit tells even from odd. An even sample is parked in a
// holding register; when the odd sample that follows arrives, both are
// copied into the output pair in the same edge, so x_even/x_odd change
// once every two clk cycles and then stay stable for two cycles. The pair
// (X[2m], X[2m+1]) is visible from the edge that captured X[2m+1] until two
// edges later; the filter's gated clock samples it on the edge in between.
//
// The block and its connections are those of the filter's time-interleaving
// front end; the phase-bit and holding-register insides are this design's
// own choice, the simplest circuit that produces a stable pair.
module deinterleaver #(
  parameter int unsigned DATA_W = fir_pkg::DATA_W_DEF
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic signed [DATA_W-1:0] x_in,
  output logic signed [DATA_W-1:0] x_even,
  output logic signed [DATA_W-1:0] x_odd
);
  logic                     phase;    // 0: x_in is an even sample, 1: odd
  logic signed [DATA_W-1:0] even_hold;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase     <= 1'b0;
      even_hold <= '0;
      x_even    <= '0;
      x_odd     <= '0;
    end else begin
      phase <= ~phase;
      if (!phase) begin
        even_hold <= x_in;
      end else begin
        x_even <= even_hold;
        x_odd  <= x_in;
      end
    end
  end
endmodule
