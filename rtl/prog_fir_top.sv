// prog_fir_top: parallel, time-multiplexed programmable FIR filter of 8 to
// 48 taps for a multi-standard radio front end.
//
// The input stream X[n] (one sample per clk) is split by the de-interleaver
// into the pair X[2n], X[2n+1]. The parallel real filter computes Y[2n] and
// Y[2n+1] together from that pair, so its arithmetic runs on filter clocks
// that pulse once every two clk cycles; the clock gating circuit makes those
// two clocks from clk and stops them in half-band mode (CLK_2n+1 only) and
// in sleep mode (both). The interleaver turns the output pair back into one
// stream Y[n]. Coefficients and the tap count sit in the tap control block
// on a separate control clock.
//
// Interface: x_in is signed DATA_W bits, one sample per clk from the first
// edge after reset. y_out is the full-precision sum, valid when y_valid is
// 1: every cycle in full-band mode, every second cycle in half-band mode
// (Y[2n] only), never in sleep mode. Y[m] leaves three clk edges after X[m]
// was taken. Configuration is written through the control port on ctrl_clk,
// and only while fir_sleep_mode is 1 (asserted below).
//
// The block diagram (de-interleaver, clock gating circuit, parallel filter,
// interleaver) and the 48-tap maximum follow the published architecture; the word
// lengths follow the requirements of the target standards; the control port and
// the timing are this design's own choices.
module prog_fir_top #(
  parameter int unsigned N_TAPS = fir_pkg::N_TAPS_DEF,
  parameter int unsigned DATA_W = fir_pkg::DATA_W_DEF,
  parameter int unsigned COEF_W = fir_pkg::COEF_W_DEF,
  parameter int unsigned OUT_W  = fir_pkg::out_width(DATA_W, COEF_W, N_TAPS),
  parameter int unsigned CNT_W  = $clog2(N_TAPS + 1)
) (
  input  logic                     clk,
  input  logic                     ctrl_clk,
  input  logic                     rst_n,
  input  logic                     fir_half_band_mode,
  input  logic                     fir_sleep_mode,
  // sample stream
  input  logic signed [DATA_W-1:0] x_in,
  output logic signed [OUT_W-1:0]  y_out,
  output logic                     y_valid,
  // control port (ctrl_clk)
  input  logic                     coef_we,
  input  logic        [CNT_W-1:0]  coef_addr,
  input  logic signed [COEF_W-1:0] coef_wdata,
  input  logic                     ntaps_we,
  input  logic        [CNT_W-1:0]  ntaps_wdata,
  output logic        [CNT_W-1:0]  ntaps
);
  logic signed [DATA_W-1:0] x_even, x_odd;
  logic signed [OUT_W-1:0]  y_even, y_odd;
  logic                     clk_2n, clk_2n1;
  logic signed [COEF_W-1:0] coef [N_TAPS];
  logic        [N_TAPS-1:0] mselect;

  deinterleaver #(.DATA_W(DATA_W)) u_deint (
    .clk, .rst_n, .x_in, .x_even, .x_odd
  );

  clock_gating_circuit u_cg (
    .clk, .rst_n, .fir_half_band_mode, .fir_sleep_mode, .clk_2n, .clk_2n1
  );

  tap_control #(.N_TAPS(N_TAPS), .COEF_W(COEF_W), .CNT_W(CNT_W)) u_ctrl (
    .ctrl_clk, .rst_n, .coef_we, .coef_addr, .coef_wdata,
    .ntaps_we, .ntaps_wdata, .coef, .mselect, .ntaps
  );

  parallel_real_filter #(
    .N_TAPS(N_TAPS), .DATA_W(DATA_W), .COEF_W(COEF_W), .OUT_W(OUT_W)
  ) u_filt (
    .clk_2n, .clk_2n1, .rst_n, .x_even, .x_odd, .coef, .mselect,
    .y_even, .y_odd
  );

  interleaver #(.OUT_W(OUT_W)) u_int (
    .clk, .rst_n, .fir_half_band_mode, .fir_sleep_mode,
    .y_even, .y_odd, .y_out, .y_valid
  );

  // Configuration is quasi-static: it may change only while the filter
  // clocks are stopped.
  a_cfg_in_sleep: assert property (
    @(posedge ctrl_clk) (coef_we || ntaps_we) |-> fir_sleep_mode
  ) else $error("tap control written while the filter is running");
endmodule
