// clock_gating_circuit: derives the two filter clocks CLK_2n and CLK_2n+1
// from the full-rate clock CLK.
//
// The parallel filter handles one input pair per two CLK cycles, so each
// filter clock passes one CLK pulse out of two: the pulse of the edge that
// follows the de-interleaver's update of the pair (phase bit 0 before the
// edge). Each output is a latch-based clock gate: the enable is captured by
// a latch that is open while clk is low and is ANDed with clk, so the gated
// clock has no glitches when the enable changes after a rising edge.
//
//   FIR_sleep_mode      stops both clocks (no filter register toggles).
//   FIR_half_band_mode  stops CLK_2n+1 only: in the decimate-by-two
//                       half-band operation only Y[2n] is produced, and
//                       CLK_2n+1 drives nothing but the Y[2n+1] register.
//
// The block, its three inputs and two outputs are those of the filter's
// clock gating front end; the phase bit and the gating cells are this
// design's own choice. The two latches are intended: they are the
// transparent-low halves of the clock-gating cells, and a library ICG cell
// would replace them in a real flow.
module clock_gating_circuit (
  input  logic clk,
  input  logic rst_n,
  input  logic fir_half_band_mode,
  input  logic fir_sleep_mode,
  output logic clk_2n,
  output logic clk_2n1
);
  logic phase;          // same sequence as the de-interleaver's phase bit
  logic en_2n, en_2n1;  // enables for the next rising edge
  logic en_2n_lat, en_2n1_lat;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) phase <= 1'b0;
    else        phase <= ~phase;
  end

  assign en_2n  = !phase && !fir_sleep_mode;
  assign en_2n1 = en_2n && !fir_half_band_mode;

  always_latch begin
    if (!clk) begin
      en_2n_lat  = en_2n;
      en_2n1_lat = en_2n1;
    end
  end

  assign clk_2n  = clk & en_2n_lat;
  assign clk_2n1 = clk & en_2n1_lat;
endmodule
