// tb_clock_gating_circuit: self-checking test of the filter clock gate.
//
// Counts the edges of clk since reset and, just after every clk
// rising edge, records whether clk_2n and clk_2n1 passed that pulse. In full-band mode
// both filter clocks must pulse on every even-numbered clk edge and never
// on odd ones; in half-band mode clk_2n1 must stay low; in sleep mode both
// must stay low. A gated clock may only be high while clk is high
// (checked at every falling and rising clk edge). Mode changes are made
// just after a rising edge, as a synchronous controller would.
module tb_clock_gating_circuit;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic fir_half_band_mode = 1'b0;
  logic fir_sleep_mode = 1'b0;
  logic clk_2n, clk_2n1;
  int checks = 0, failures = 0;
  int edge_no = -1;         // clk edges since reset release
  int n_2n = 0, n_2n1 = 0;  // filter clock pulses in the current window
  int bad_phase = 0;

  clock_gating_circuit dut (.*);

  always #5 clk = ~clk;

  // Sample the gated clocks just after each clk rising edge.
  always @(posedge clk) begin
    if (rst_n) edge_no++;
    #1;
    if (clk_2n)  n_2n++;
    if (clk_2n1) n_2n1++;
    if (rst_n && edge_no % 2 != 0 && (clk_2n || clk_2n1)) bad_phase++;
  end
  always @(negedge clk) begin
    #1;
    checks++;
    if (clk_2n || clk_2n1) begin
      failures++;
      $display("gated clock high while clk low");
    end
  end

  task automatic window(input bit hb, input bit sl, input int n_exp_2n,
                        input int n_exp_2n1);
    @(posedge clk); #1;
    fir_half_band_mode = hb;
    fir_sleep_mode = sl;
    // skip to an edge count that is even so the window is aligned
    if (edge_no % 2 != 1) begin @(posedge clk); #1; end
    n_2n = 0; n_2n1 = 0;
    repeat (40) @(posedge clk);
    #1;
    checks += 2;
    if (n_2n != n_exp_2n || n_2n1 != n_exp_2n1) begin
      failures++;
      $display("hb=%0b sl=%0b: clk_2n %0d clk_2n1 %0d pulses, expected %0d %0d",
               hb, sl, n_2n, n_2n1, n_exp_2n, n_exp_2n1);
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    window(1'b0, 1'b0, 20, 20);   // full band
    window(1'b1, 1'b0, 20, 0);    // half band
    window(1'b0, 1'b1, 0, 0);     // sleep
    window(1'b1, 1'b1, 0, 0);     // sleep wins over half band
    window(1'b0, 1'b0, 20, 20);   // wake up again
    checks++;
    if (bad_phase != 0) begin
      failures++;
      $display("%0d filter clock pulses on odd clk edges", bad_phase);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
