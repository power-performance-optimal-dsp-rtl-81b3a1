// parallel_real_filter: two-lane parallel transverse FIR with programmable
// taps, y[n] = sum_{k=0}^{N_TAPS-1} a_k * x[n-k], computing the even output
// Y[2n] and the odd output Y[2n+1] side by side from one input pair.
//
// Each lane keeps a delay line of its own samples: ev[j] holds X[2n-2-2j]
// and od[j] holds X[2n-1-2j] while the pair (X[2n], X[2n+1]) is at the
// inputs. Tap k of the even output then reads
//   k = 0: x_even,   k odd: od[(k-1)/2],   k even > 0: ev[k/2-1]
// and tap k of the odd output reads
//   k = 0: x_odd,    k = 1: x_even,
//   k odd > 1: ev[(k-3)/2],   k even > 0: od[k/2-1]
// so the two lanes cross at every tap. Coefficient a_0 is always used;
// a_1..a_{N_TAPS-1} each pass a multiplexer that chooses a_k when
// mselect[k] is 1 and zero (ground) otherwise, which is how a filter of
// fewer taps is programmed. Products are summed by a plain chain of adders
// (transverse form) into one output register per lane.
//
// Timing: on each rising edge of clk_2n the delay lines shift in the pair
// and y_even takes Y[2n]; on the same edge of clk_2n1 y_odd takes Y[2n+1].
// Results appear one filter-clock edge after their input pair. clk_2n1 is
// stopped in half-band mode without disturbing the delay lines.
//
// Follows the published architecture: the two lanes, the lane crossings, a_0 without a
// multiplexer, the a_k/ground multiplexers under mselect_k and the adder
// chain to Y[2n] and Y[2n+1]. This design's own choices: two's complement
// arithmetic at full precision, which registers each clock drives, and an
// asynchronous active-low reset.
module parallel_real_filter #(
  parameter int unsigned N_TAPS = fir_pkg::N_TAPS_DEF,
  parameter int unsigned DATA_W = fir_pkg::DATA_W_DEF,
  parameter int unsigned COEF_W = fir_pkg::COEF_W_DEF,
  parameter int unsigned OUT_W  = fir_pkg::out_width(DATA_W, COEF_W, N_TAPS)
) (
  input  logic                     clk_2n,
  input  logic                     clk_2n1,
  input  logic                     rst_n,
  input  logic signed [DATA_W-1:0] x_even,
  input  logic signed [DATA_W-1:0] x_odd,
  input  logic signed [COEF_W-1:0] coef [N_TAPS],
  input  logic        [N_TAPS-1:0] mselect,
  output logic signed [OUT_W-1:0]  y_even,
  output logic signed [OUT_W-1:0]  y_odd
);
  // Delay-line lengths needed by the highest tap of either output.
  localparam int unsigned N_EV = (N_TAPS > 2) ? (N_TAPS - 1) / 2 : 1;
  localparam int unsigned N_OD = (N_TAPS > 1) ? N_TAPS / 2 : 1;

  logic signed [DATA_W-1:0] ev [N_EV];
  logic signed [DATA_W-1:0] od [N_OD];

  logic signed [COEF_W-1:0] a_eff  [N_TAPS];  // coefficient after its mux
  logic signed [DATA_W-1:0] tap_e  [N_TAPS];  // sample seen by tap k, Y[2n]
  logic signed [DATA_W-1:0] tap_o  [N_TAPS];  // sample seen by tap k, Y[2n+1]
  logic signed [OUT_W-1:0]  sum_e, sum_o;

  always_comb begin
    for (int k = 0; k < N_TAPS; k++) begin
      a_eff[k] = (k == 0 || mselect[k]) ? coef[k] : '0;
      if (k == 0) begin
        tap_e[k] = x_even;
        tap_o[k] = x_odd;
      end else if (k % 2 == 1) begin
        tap_e[k] = od[(k-1)/2];
        if (k == 1) tap_o[k] = x_even;
        else        tap_o[k] = ev[(k-3)/2];
      end else begin
        tap_e[k] = ev[k/2-1];
        tap_o[k] = od[k/2-1];
      end
    end
  end

  // Products are formed at their full width before they are accumulated.
  always_comb begin
    logic signed [DATA_W+COEF_W-1:0] prod_e, prod_o;
    sum_e = '0;
    sum_o = '0;
    for (int k = 0; k < N_TAPS; k++) begin
      prod_e = tap_e[k] * a_eff[k];
      prod_o = tap_o[k] * a_eff[k];
      sum_e  = sum_e + OUT_W'(prod_e);
      sum_o  = sum_o + OUT_W'(prod_o);
    end
  end

  always_ff @(posedge clk_2n or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j < N_EV; j++) ev[j] <= '0;
      for (int j = 0; j < N_OD; j++) od[j] <= '0;
      y_even <= '0;
    end else begin
      ev[0] <= x_even;
      od[0] <= x_odd;
      for (int j = 1; j < N_EV; j++) ev[j] <= ev[j-1];
      for (int j = 1; j < N_OD; j++) od[j] <= od[j-1];
      y_even <= sum_e;
    end
  end

  always_ff @(posedge clk_2n1 or negedge rst_n) begin
    if (!rst_n) y_odd <= '0;
    else        y_odd <= sum_o;
  end
endmodule
