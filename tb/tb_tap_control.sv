// tb_tap_control: self-checking test of the coefficient memory and tap
// count register.
//
// Writes random coefficients to every tap in random order and reads the
// array back; checks that a write above the last tap is ignored; writes
// tap counts below, inside and above the 8..48 range and checks the
// clamped count and the decoded mselect vector (bit k set for k < count).
// Writes take effect on the ctrl_clk edge that samples them.
module tb_tap_control;
  localparam int N_TAPS = 48;
  localparam int COEF_W = 12;
  localparam int CNT_W  = 6;

  logic ctrl_clk = 1'b0;
  logic rst_n = 1'b0;
  logic coef_we = 1'b0;
  logic [CNT_W-1:0] coef_addr = '0;
  logic signed [COEF_W-1:0] coef_wdata = '0;
  logic ntaps_we = 1'b0;
  logic [CNT_W-1:0] ntaps_wdata = '0;
  logic signed [COEF_W-1:0] coef [N_TAPS];
  logic [N_TAPS-1:0] mselect;
  logic [CNT_W-1:0] ntaps;

  logic signed [COEF_W-1:0] model [N_TAPS];
  int checks = 0, failures = 0;

  tap_control #(.N_TAPS(N_TAPS), .COEF_W(COEF_W)) dut (.*);

  always #7 ctrl_clk = ~ctrl_clk;

  initial begin
    repeat (5000) @(posedge ctrl_clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr_coef(input int a, input logic signed [COEF_W-1:0] d);
    @(negedge ctrl_clk);
    coef_we = 1'b1; coef_addr = CNT_W'(a); coef_wdata = d;
    @(negedge ctrl_clk);
    coef_we = 1'b0;
  endtask

  task automatic set_taps(input int n, input int expect_n);
    @(negedge ctrl_clk);
    ntaps_we = 1'b1; ntaps_wdata = CNT_W'(n);
    @(negedge ctrl_clk);
    ntaps_we = 1'b0;
    checks++;
    if (ntaps != CNT_W'(expect_n)) begin
      failures++;
      $display("tap count %0d read %0d expected %0d", n, ntaps, expect_n);
    end
    for (int k = 0; k < N_TAPS; k++) begin
      checks++;
      if (mselect[k] != (k < expect_n)) begin
        failures++;
        $display("count %0d: mselect[%0d]=%0b", expect_n, k, mselect[k]);
      end
    end
  endtask

  task automatic compare_coefs();
    for (int k = 0; k < N_TAPS; k++) begin
      checks++;
      if (coef[k] !== model[k]) begin
        failures++;
        $display("a_%0d = %0d expected %0d", k, coef[k], model[k]);
      end
    end
  endtask

  initial begin
    int order [N_TAPS];
    for (int k = 0; k < N_TAPS; k++) begin model[k] = '0; order[k] = k; end
    order.shuffle();
    repeat (2) @(posedge ctrl_clk);
    @(negedge ctrl_clk) rst_n = 1'b1;
    // reset state: zero coefficients, all taps on
    compare_coefs();
    checks++;
    if (ntaps != CNT_W'(N_TAPS) || mselect != '1) begin
      failures++;
      $display("reset tap count %0d", ntaps);
    end
    foreach (order[i]) begin
      model[order[i]] = COEF_W'($urandom);
      wr_coef(order[i], model[order[i]]);
    end
    compare_coefs();
    wr_coef(N_TAPS + 5, 12'sh7FF);   // out of range: ignored
    compare_coefs();
    set_taps(8, 8);
    set_taps(3, 8);
    set_taps(0, 8);
    set_taps(27, 27);
    set_taps(48, 48);
    set_taps(60, 48);
    set_taps(17, 17);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
