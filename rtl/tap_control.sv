// tap_control: coefficient memory and tap-count register of the
// programmable FIR, on the control clock.
//
// The filter reads its coefficients a_0..a_{N_TAPS-1} and the per-tap
// multiplexer selects mselect_k from here. A write port on ctrl_clk stores
// one coefficient per cycle (coef_we, coef_addr, coef_wdata) or the tap
// count (ntaps_we, ntaps_wdata); a tap count outside MIN_TAPS..N_TAPS is
// clamped into that range. mselect[k] is 1 for k < tap count, so taps from
// the count upward are grounded. Writes to an address at or above N_TAPS
// are ignored. After reset all coefficients are zero and all taps are on.
//
// The outputs cross to the filter clock without synchronisers: they are
// configuration, meant to be written only while the filter is asleep.
// The published architecture calls for "some control and memory" on a clock of its own
// and fixes the 8 to 48 tap range; the register-file organisation, the
// write port and the clamping are this design's own.
module tap_control #(
  parameter int unsigned N_TAPS   = fir_pkg::N_TAPS_DEF,
  parameter int unsigned COEF_W   = fir_pkg::COEF_W_DEF,
  parameter int unsigned MIN_TAPS = fir_pkg::MIN_TAPS,
  parameter int unsigned CNT_W    = $clog2(N_TAPS + 1)
) (
  input  logic                     ctrl_clk,
  input  logic                     rst_n,
  input  logic                     coef_we,
  input  logic        [CNT_W-1:0]  coef_addr,
  input  logic signed [COEF_W-1:0] coef_wdata,
  input  logic                     ntaps_we,
  input  logic        [CNT_W-1:0]  ntaps_wdata,
  output logic signed [COEF_W-1:0] coef [N_TAPS],
  output logic        [N_TAPS-1:0] mselect,
  output logic        [CNT_W-1:0]  ntaps
);
  always_ff @(posedge ctrl_clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < N_TAPS; k++) coef[k] <= '0;
      ntaps <= CNT_W'(N_TAPS);
    end else begin
      if (coef_we && 32'(coef_addr) < N_TAPS) begin
        coef[coef_addr] <= coef_wdata;
      end
      if (ntaps_we) begin
        if (32'(ntaps_wdata) < MIN_TAPS)      ntaps <= CNT_W'(MIN_TAPS);
        else if (32'(ntaps_wdata) > N_TAPS)   ntaps <= CNT_W'(N_TAPS);
        else                                  ntaps <= ntaps_wdata;
      end
    end
  end

  always_comb begin
    for (int k = 0; k < N_TAPS; k++) begin
      mselect[k] = (CNT_W'(k) < ntaps);
    end
  end
endmodule
