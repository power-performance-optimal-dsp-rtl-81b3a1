// tb_fir_standards: runs the programmable FIR, at its full 48-tap size, in
// the configurations of the radio standards it is meant for, with real
// low-pass coefficient sets.
//
// Configurations (taps, sample bits, mode): a WCDMA channel filter (48
// taps, 8-bit samples), WLAN 802.11g/n (48 taps, 12 bits), DVB-T/H and
// ATSC (32 taps, 12 bits) in full-band mode, and a 27-tap half-band WLAN
// filter in half-band (decimate-by-two) mode. Standards that ask for more
// than 48 taps are run at 48.
//
// Coefficients are a Hamming-windowed sinc, h[k] = 2 fc sinc(2 fc (k - M))
// w[k], M = (N-1)/2, quantised to 12 bits with 11 fraction bits; fc = 0.25
// gives the half-band filter, whose every other coefficient is zero. For
// each configuration the filter is reset, programmed in sleep mode, and fed
// a pass-band tone (0.03 fs) and then a stop-band tone (0.45 fs). Every
// output is compared bit for bit with sum a_k x[m-k] computed here, the
// output rate is checked (one per clk in full band, one per two in half
// band), and the steady-state gain must be within 1 dB of unity in the pass
// band and below -30 dB in the stop band.
module tb_fir_standards;
  localparam int N_TAPS = 48;
  localparam int DATA_W = 12;
  localparam int COEF_W = 12;
  localparam int OUT_W  = DATA_W + COEF_W + $clog2(N_TAPS);
  localparam int CNT_W  = 6;
  localparam int TONE_LEN = 400;
  localparam real PI = 3.14159265358979;

  logic clk = 1'b0, ctrl_clk = 1'b0;
  logic rst_n = 1'b1;
  logic fir_half_band_mode = 1'b0, fir_sleep_mode = 1'b1;
  logic signed [DATA_W-1:0] x_in = '0;
  logic signed [OUT_W-1:0]  y_out;
  logic                     y_valid;
  logic                     coef_we = 1'b0, ntaps_we = 1'b0;
  logic [CNT_W-1:0]         coef_addr = '0, ntaps_wdata = '0;
  logic signed [COEF_W-1:0] coef_wdata = '0;
  logic [CNT_W-1:0]         ntaps;

  prog_fir_top dut (.*);

  always #5 clk = ~clk;
  always #8 ctrl_clk = ~ctrl_clk;

  int checks = 0, failures = 0;
  longint a_model [N_TAPS];
  int taps_model;
  longint xs [2*TONE_LEN + 8];
  int n_x;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint model_y(int m);
    longint acc = 0;
    for (int k = 0; k < taps_model; k++)
      if (m - k >= 0) acc += a_model[k] * xs[m-k];
    return acc;
  endfunction

  task automatic load_filter(input int n, input real fc);
    real mid, t, h, w;
    // reset and configure in sleep mode
    @(posedge clk); #1;
    fir_sleep_mode = 1'b1;
    rst_n = 1'b0;
    ec = -1;
    #3 rst_n = 1'b1;
    mid = (n - 1) / 2.0;
    for (int k = 0; k < N_TAPS; k++) begin
      if (k < n) begin
        t = k - mid;
        h = (t == 0.0) ? 2.0 * fc : $sin(2.0 * PI * fc * t) / (PI * t);
        w = 0.54 - 0.46 * $cos(2.0 * PI * k / (n - 1));
        a_model[k] = longint'($rtoi(h * w * 2048.0 + ((h * w >= 0.0) ? 0.5 : -0.5)));
      end else begin
        a_model[k] = 0;
      end
      @(negedge ctrl_clk);
      coef_we = 1'b1; coef_addr = CNT_W'(k); coef_wdata = COEF_W'(a_model[k]);
      @(negedge ctrl_clk);
      coef_we = 1'b0;
    end
    @(negedge ctrl_clk);
    ntaps_we = 1'b1; ntaps_wdata = CNT_W'(n);
    @(negedge ctrl_clk);
    ntaps_we = 1'b0;
    taps_model = n;
  endtask

  // Clock edges since the last reset; the de-interleaver takes an even
  // sample on even-numbered edges.
  int ec = -1;
  always @(posedge clk) if (rst_n) ec++;

  // Feeds one tone (after a clean, all-zero history) and checks every
  // output. The wake-up edge also loads the pair of zeros that precedes the
  // tone, so the first pair of outputs (one output in half band) is zero.
  task automatic tone(input string name, input int bits, input bit hb,
                      input real f, input bit pass);
    int amp, n_out, first_edge, last_edge, n_edges;
    real peak, gain;
    longint expect_y;
    amp = (1 << (bits - 1)) * 7 / 10;
    n_x = 2 * TONE_LEN;
    for (int m = 0; m < n_x; m++)
      xs[m] = longint'($rtoi(amp * $sin(2.0 * PI * f * m)));
    x_in = '0;
    do begin @(posedge clk); #1; end while (ec % 2 != 1);
    fir_half_band_mode = hb;
    fir_sleep_mode = 1'b0;
    n_out = 0; peak = 0.0; first_edge = -1; last_edge = -1;
    n_edges = n_x + 64;                 // tone, then zeros to flush
    for (int e = 0; e < n_edges; e++) begin
      x_in = (e < n_x) ? DATA_W'(xs[e]) : '0;
      @(posedge clk);
      #1;
      if (y_valid) begin
        int m;
        m = hb ? 2 * (n_out - 1) : n_out - 2;
        expect_y = (m < 0) ? 0 : model_y(m);
        checks++;
        if (longint'(y_out) != expect_y) begin
          failures++;
          if (failures < 10)
            $display("%s: y[%0d]=%0d expected %0d", name, m, y_out, expect_y);
        end
        if (first_edge < 0) first_edge = e;
        last_edge = e;
        if (m > taps_model && m < n_x - 8) begin
          real v;
          v = (y_out < 0) ? -real'(y_out) : real'(y_out);
          if (v > peak) peak = v;
        end
        n_out++;
      end
      #3;
    end
    fir_sleep_mode = 1'b1;
    // rate: every edge (full band) or every second edge (half band), and
    // the tone's first output three edges after its first sample
    checks++;
    if (n_out != (hb ? n_edges / 2 : n_edges - 1) ||
        last_edge - first_edge != (hb ? 2 : 1) * (n_out - 1) ||
        first_edge != 1) begin
      failures++;
      $display("%s: %0d outputs over edges %0d..%0d", name, n_out, first_edge,
               last_edge);
    end
    gain = peak / 2048.0 / amp;
    $display("%-18s tone %.2f fs: %0d outputs, gain %.4f", name, f, n_out, gain);
    checks++;
    if (pass ? (gain < 0.891 || gain > 1.122) : (gain > 0.0316)) begin
      failures++;
      $display("%s: gain %.4f out of its %s-band limit", name, gain,
               pass ? "pass" : "stop");
    end
  endtask

  task automatic standard(input string name, input int n, input int bits,
                          input bit hb, input real fc);
    load_filter(n, fc);
    checks++;
    if (int'(ntaps) != n) begin
      failures++;
      $display("%s: tap count %0d", name, ntaps);
    end
    tone(name, bits, hb, 0.03, 1'b1);
    tone(name, bits, hb, 0.45, 1'b0);
  endtask

  initial begin
    #1 rst_n = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    standard("WCDMA-UMTS",        48, 8,  1'b0, 0.20);
    standard("802.11g/n",         48, 12, 1'b0, 0.20);
    standard("DVB-T/H, ATSC",     32, 12, 1'b0, 0.20);
    standard("WLAN half-band 27", 27, 12, 1'b1, 0.25);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
