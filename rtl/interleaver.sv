// interleaver: turns the filter's output pair Y[2n], Y[2n+1] back into one
// stream Y[n] at the full clk rate.
//
// A phase bit, reset together with the de-interleaver's and the clock gate's,
// tracks where the filter is. The filter updates its pair on the edge where
// the phase bit is 0; on the next edge (phase 1) y_out takes Y[2n], and on
// the edge after (phase 0, while the filter loads its next pair) it takes
// Y[2n+1]. y_valid marks each new sample. In half-band mode only Y[2n] is
// sent (one sample every two cycles, y_valid low on the other), and in sleep
// mode nothing is sent. The first pair after reset is filter output of
// reset state and is not marked valid.
//
// From sample X[m] entering the de-interleaver to Y[m] on y_out is three
// clk edges for every m. The block and its ports Y[2n], Y[2n+1], Y[n] are
// the published architecture's; the phase bit, the mode inputs and y_valid are this
// design's own additions so that a reader of y_out can tell the modes apart.
module interleaver #(
  parameter int unsigned OUT_W = fir_pkg::out_width(fir_pkg::DATA_W_DEF,
                                                    fir_pkg::COEF_W_DEF,
                                                    fir_pkg::N_TAPS_DEF)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    fir_half_band_mode,
  input  logic                    fir_sleep_mode,
  input  logic signed [OUT_W-1:0] y_even,
  input  logic signed [OUT_W-1:0] y_odd,
  output logic signed [OUT_W-1:0] y_out,
  output logic                    y_valid
);
  logic phase;
  logic have_pair; // the de-interleaver has produced a real input pair
  logic primed;    // the filter has been clocked with a real input pair
  logic run_even;  // the filter loaded a pair on the last phase-0 edge
  logic run_odd;   // ... and its odd output register as well

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase    <= 1'b0;
      have_pair <= 1'b0;
      primed   <= 1'b0;
      run_even <= 1'b0;
      run_odd  <= 1'b0;
      y_out    <= '0;
      y_valid  <= 1'b0;
    end else begin
      phase <= ~phase;
      if (!phase) begin
        // The filter clocks fire on this edge under the same conditions.
        run_even <= !fir_sleep_mode;
        run_odd  <= !fir_sleep_mode && !fir_half_band_mode;
        if (run_odd) begin
          y_out <= y_odd;
        end
        y_valid <= run_odd && primed;
        primed  <= primed | (have_pair && !fir_sleep_mode);
      end else begin
        have_pair <= 1'b1;
        if (run_even) begin
          y_out <= y_even;
        end
        y_valid <= run_even && primed;
      end
    end
  end
endmodule
