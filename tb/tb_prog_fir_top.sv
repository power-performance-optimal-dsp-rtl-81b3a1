// tb_prog_fir_top: end-to-end self-checking test of the programmable FIR
// at its full size (48 taps, 12-bit samples and coefficients, top-level
// parameters left at their defaults).
//
// A random sample enters on every clk edge. An independent model in this
// bench keeps the sequence of samples the filter has actually taken in
// (one pair on every second edge unless sleep mode is on), computes each
// output as sum a_k x[m-k] over that sequence with the taps the control
// block enables, and queues the outputs the current mode should deliver:
// both of a pair in full band, only Y[2n] in half band. Every valid output
// is compared with the head of the queue, and its time is checked: Y[m]
// must leave exactly three clk edges after X[m] entered.
//
// The run goes through: programming in sleep mode, full band with 48 taps,
// sleep with reprogramming to 8 taps, full band, half band, a tap count
// below the minimum (clamped to 8), new coefficients with 27 taps, a tap
// count above 48 (clamped), and a final half-band and full-band stretch.
// Each mechanism (full-band output, half-band output, sleep with the
// filter clocks stopped, tap-count change, clamping, coefficient reload)
// is counted, and one that never happened is a failure.
module tb_prog_fir_top;
  localparam int N_TAPS = 48;
  localparam int DATA_W = 12;
  localparam int COEF_W = 12;
  localparam int OUT_W  = DATA_W + COEF_W + $clog2(N_TAPS);
  localparam int CNT_W  = 6;
  localparam int MAXL   = 20000;

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

  // model state
  longint a_model [N_TAPS];
  int     taps_model = N_TAPS;
  longint cap [MAXL];            // sample taken at each clk edge
  longint taken [MAXL];          // samples the filter has loaded, in order
  int     n_taken = 0;
  int     edge_no = -1;
  typedef struct { longint value; int cap_edge; } exp_t;
  exp_t   expq [$];

  // mechanism counters
  int n_full_out = 0, n_half_out = 0, n_sleep_cycles = 0;
  int n_tap_change = 0, n_clamp = 0, n_coef_reload = 0, n_latency_ok = 0;
  int sleep_run = 0;

  function automatic longint model_y(int idx);
    longint acc = 0;
    for (int k = 0; k < taps_model; k++)
      if (idx - k >= 0) acc += a_model[k] * taken[idx-k];
    return acc;
  endfunction

  always @(posedge clk) begin
    if (rst_n) begin
      bit sl, hb;
      sl = fir_sleep_mode;
      hb = fir_half_band_mode;
      edge_no++;
      cap[edge_no] = longint'(x_in);
      if (edge_no % 2 == 0 && edge_no >= 2 && !sl) begin
        taken[n_taken]   = cap[edge_no-2];
        taken[n_taken+1] = cap[edge_no-1];
        n_taken += 2;
        expq.push_back('{model_y(n_taken-2), edge_no-2});
        if (!hb) expq.push_back('{model_y(n_taken-1), edge_no-1});
      end
      if (sl) sleep_run++; else sleep_run = 0;
      if (sleep_run > 3) n_sleep_cycles++;
      #1;
      if (y_valid) begin
        checks++;
        if (expq.size() == 0) begin
          failures++;
          $display("edge %0d: unexpected output %0d", edge_no, y_out);
        end else begin
          exp_t e;
          e = expq.pop_front();
          if (longint'(y_out) != e.value) begin
            failures++;
            $display("edge %0d: y=%0d expected %0d", edge_no, y_out, e.value);
          end
          checks++;
          if (edge_no != e.cap_edge + 3) begin
            failures++;
            $display("edge %0d: latency %0d, expected 3", edge_no,
                     edge_no - e.cap_edge);
          end else n_latency_ok++;
          if (hb) n_half_out++; else n_full_out++;
        end
      end
      // outputs of pairs loaded before sleep drain within three edges
      if (sleep_run > 3 && y_valid) begin
        failures++;
        $display("output while asleep");
      end
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Stimulus: a new random sample after every clk edge.
  always @(posedge clk) begin
    #2 x_in = DATA_W'($urandom);
  end

  task automatic go_sleep();
    @(posedge clk); #1;
    fir_sleep_mode = 1'b1;
    repeat (4) @(posedge clk);   // let the last outputs leave
    #1;
  endtask

  task automatic wake(input bit hb);
    @(posedge clk); #1;
    fir_half_band_mode = hb;
    fir_sleep_mode = 1'b0;
  endtask

  task automatic set_mode(input bit hb);
    @(posedge clk); #1;
    fir_half_band_mode = hb;
  endtask

  task automatic wr_coef(input int a, input longint d);
    @(negedge ctrl_clk);
    coef_we = 1'b1; coef_addr = CNT_W'(a); coef_wdata = COEF_W'(d);
    @(negedge ctrl_clk);
    coef_we = 1'b0;
    a_model[a] = d;
  endtask

  task automatic load_coefs();
    for (int k = 0; k < N_TAPS; k++)
      wr_coef(k, longint'($signed(COEF_W'($urandom))));
    n_coef_reload++;
  endtask

  task automatic wr_taps(input int n);
    int expect_n;
    expect_n = (n < 8) ? 8 : (n > N_TAPS) ? N_TAPS : n;
    @(negedge ctrl_clk);
    ntaps_we = 1'b1; ntaps_wdata = CNT_W'(n);
    @(negedge ctrl_clk);
    ntaps_we = 1'b0;
    checks++;
    if (int'(ntaps) != expect_n) begin
      failures++;
      $display("tap count %0d read back %0d", n, ntaps);
    end
    if (expect_n != n) n_clamp++;
    if (expect_n != taps_model) n_tap_change++;
    taps_model = expect_n;
  endtask

  task automatic run(input int cycles);
    repeat (cycles) @(posedge clk);
  endtask

  initial begin
    for (int k = 0; k < N_TAPS; k++) a_model[k] = 0;
    // A falling edge on rst_n: the filter registers see only their
    // (stopped) gated clocks and the asynchronous reset.
    #1 rst_n = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    load_coefs();
    wr_taps(48);
    wake(1'b0);          run(300);
    go_sleep();          wr_taps(8);
    wake(1'b0);          run(200);
    set_mode(1'b1);      run(200);
    go_sleep();          wr_taps(5);          // clamped to 8
    wake(1'b1);          run(100);
    go_sleep();          load_coefs(); wr_taps(27);
    wake(1'b0);          run(300);
    go_sleep();          wr_taps(63);         // clamped to 48
    wake(1'b1);          run(200);
    set_mode(1'b0);      run(300);
    go_sleep();          run(20);
    checks++;
    if (expq.size() != 0) begin
      failures++;
      $display("%0d expected outputs never appeared", expq.size());
    end
    $display("full-band outputs %0d, half-band outputs %0d, quiet sleep cycles %0d",
             n_full_out, n_half_out, n_sleep_cycles);
    $display("tap-count changes %0d, clamped writes %0d, coefficient loads %0d, on-time outputs %0d",
             n_tap_change, n_clamp, n_coef_reload, n_latency_ok);
    checks += 6;
    if (n_full_out == 0)    begin failures++; $display("no full-band output"); end
    if (n_half_out == 0)    begin failures++; $display("no half-band output"); end
    if (n_sleep_cycles == 0) begin failures++; $display("never asleep"); end
    if (n_tap_change == 0)  begin failures++; $display("tap count never changed"); end
    if (n_clamp == 0)       begin failures++; $display("no clamped tap count"); end
    if (n_coef_reload < 2)  begin failures++; $display("coefficients never reloaded"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
