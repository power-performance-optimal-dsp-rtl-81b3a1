// tb_interleaver: self-checking test of the output interleaver.
//
// A model filter in this bench loads a new random pair (Y[2n], Y[2n+1])
// on every second clk edge (the edges where the phase since reset is even),
// obeying the same mode rules as the real filter clocks: nothing in sleep
// mode, Y[2n] only in half-band mode. The bench predicts every y_out/y_valid
// value from those rules: Y[2n] one edge after the pair is loaded, Y[2n+1]
// one edge later, never a valid output from the first pair after reset.
// It also counts valid outputs per mode: 2 per pair in full band, 1 in
// half band, 0 in sleep.
module tb_interleaver;
  localparam int OUT_W = 30;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic fir_half_band_mode = 1'b0;
  logic fir_sleep_mode = 1'b0;
  logic signed [OUT_W-1:0] y_even = '0, y_odd = '0;
  logic signed [OUT_W-1:0] y_out;
  logic y_valid;
  int checks = 0, failures = 0;
  int edge_no = -1;
  int n_valid = 0;

  // expected output after the current edge
  logic signed [OUT_W-1:0] exp_out = '0;
  logic exp_valid = 1'b0;
  bit run_e = 0, run_o = 0, have_pair = 0, primed = 0;

  interleaver #(.OUT_W(OUT_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Model of the filter registers and of the expected output stream.
  always @(posedge clk) begin
    if (rst_n) begin
      edge_no++;
      if (edge_no % 2 == 0) begin
        // odd output of the previous pair goes out on this edge
        exp_valid = run_o && primed;
        if (run_o) exp_out = y_odd;
        primed = primed || (have_pair && !fir_sleep_mode);
        run_e = !fir_sleep_mode;
        run_o = !fir_sleep_mode && !fir_half_band_mode;
        if (run_e) y_even <= OUT_W'($urandom);
        if (run_o) y_odd  <= OUT_W'($urandom);
      end else begin
        have_pair = 1;
        exp_valid = run_e && primed;
        if (run_e) exp_out = y_even;
      end
      #1;
      checks++;
      if (y_valid !== exp_valid || (exp_valid && y_out !== exp_out)) begin
        failures++;
        $display("edge %0d: got %0d/%0b expected %0d/%0b", edge_no, y_out,
                 y_valid, exp_out, exp_valid);
      end
      if (y_valid) n_valid++;
    end
  end

  task automatic window(input bit hb, input bit sl, input int exp_n);
    // change modes just after an odd edge, ahead of the next pair load
    do @(posedge clk); while (edge_no % 2 != 1);
    #2;
    fir_half_band_mode = hb;
    fir_sleep_mode = sl;
    repeat (2) @(posedge clk);   // outputs of the old mode drain
    #2;
    n_valid = 0;
    repeat (40) @(posedge clk);
    #2;
    checks++;
    if (n_valid != exp_n) begin
      failures++;
      $display("hb=%0b sl=%0b: %0d valid outputs in 40 cycles, expected %0d",
               hb, sl, n_valid, exp_n);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    window(1'b0, 1'b0, 40);
    window(1'b1, 1'b0, 20);
    window(1'b0, 1'b1, 0);
    window(1'b0, 1'b0, 40);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
