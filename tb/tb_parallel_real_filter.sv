// tb_parallel_real_filter: self-checking test of the two-lane transverse
// filter at its full 48-tap size.
//
// Each filter-clock cycle one random pair (X[2n], X[2n+1]) is applied;
// after the edge, y_even and y_odd are compared with y[m] = sum a_k x[m-k]
// computed here directly from the whole sample history (samples before the
// first one are zero, as after reset). The run is split into phases with
// different random coefficients and tap counts (all 48 taps, 8 taps, an
// odd count, and a half-band run in which clk_2n1 is stopped and y_odd must
// hold its value while y_even keeps being correct). Coefficient changes
// are made between phases after a reset, so every phase starts from a
// clean history. Results are due one filter-clock edge after their pair.
module tb_parallel_real_filter;
  localparam int N_TAPS = 48;
  localparam int DATA_W = 12;
  localparam int COEF_W = 12;
  localparam int OUT_W  = DATA_W + COEF_W + $clog2(N_TAPS);
  localparam int N_PAIRS = 80;

  logic clk = 1'b0;
  logic en_odd = 1'b1;
  logic clk_2n, clk_2n1;
  logic rst_n = 1'b0;
  logic signed [DATA_W-1:0] x_even = '0, x_odd = '0;
  logic signed [COEF_W-1:0] coef [N_TAPS];
  logic        [N_TAPS-1:0] mselect;
  logic signed [OUT_W-1:0]  y_even, y_odd;

  longint hist [2*N_PAIRS];
  int checks = 0, failures = 0;

  assign clk_2n  = clk;
  assign clk_2n1 = clk & en_odd;

  parallel_real_filter #(.N_TAPS(N_TAPS), .DATA_W(DATA_W), .COEF_W(COEF_W),
                         .OUT_W(OUT_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint ref_y(int m);
    longint acc = 0;
    for (int k = 0; k < N_TAPS; k++) begin
      if (m - k >= 0 && (k == 0 || mselect[k]))
        acc += longint'(coef[k]) * hist[m-k];
    end
    return acc;
  endfunction

  task automatic run_phase(input int ntaps, input bit half_band);
    longint held_odd;
    @(negedge clk);
    rst_n = 1'b0;
    for (int k = 0; k < N_TAPS; k++) begin
      coef[k]    = COEF_W'($urandom);
      mselect[k] = (k < ntaps);
    end
    // an extreme coefficient/sample pair exercises the full output range
    coef[0] = -(1 <<< (COEF_W-1));
    en_odd = !half_band;
    #1 rst_n = 1'b1;
    held_odd = y_odd;
    for (int p = 0; p < N_PAIRS; p++) begin
      hist[2*p]   = (p == 3) ? -(1 <<< (DATA_W-1)) : longint'($signed(DATA_W'($urandom)));
      hist[2*p+1] = longint'($signed(DATA_W'($urandom)));
      x_even = DATA_W'(hist[2*p]);
      x_odd  = DATA_W'(hist[2*p+1]);
      @(posedge clk);
      #1;
      checks++;
      if (longint'(y_even) != ref_y(2*p)) begin
        failures++;
        $display("ntaps %0d pair %0d: Y[2n]=%0d expected %0d", ntaps, p,
                 y_even, ref_y(2*p));
      end
      checks++;
      if (!half_band && longint'(y_odd) != ref_y(2*p+1)) begin
        failures++;
        $display("ntaps %0d pair %0d: Y[2n+1]=%0d expected %0d", ntaps, p,
                 y_odd, ref_y(2*p+1));
      end else if (half_band && longint'(y_odd) != held_odd) begin
        failures++;
        $display("half band: Y[2n+1] register changed");
      end
      @(negedge clk);
    end
  endtask

  initial begin
    for (int k = 0; k < N_TAPS; k++) coef[k] = '0;
    mselect = '0;
    repeat (2) @(posedge clk);
    run_phase(48, 1'b0);
    run_phase(8, 1'b0);
    run_phase(27, 1'b0);
    run_phase(33, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
