// tb_fir_cse_top: end-to-end test of the multiplierless CSE FIR filter at
// its default configuration (27 taps, 8-bit input, 18-bit output).
//
// A reference model keeps the history of accepted samples and computes
// y[n] = sum_t COEFS[t] * x[n-t] by direct multiplication, independently of
// the adder network. Phases: impulse (checks the impulse response equals the
// coefficients), positive and negative full-scale step, worst-case
// sign-matched input (largest output magnitude), random samples with random
// stalls (in_valid low), and a reset in mid-stream. Every cycle checks
// out_valid, the one-cycle latency, and y_out. The test also counts how often
// the horizontal and both vertical subexpressions were non-zero, how often
// the filter stalled, and how often the extreme outputs occurred, and fails if
// any of those never happened.
module tb_fir_cse_top;
  import fir_cse_pkg::*;

  localparam int        NTAPS = DEF_NTAPS;
  localparam int        X_W   = DEF_X_W;
  localparam coef_vec_t COEFS = DEF_COEFS;
  localparam int        Y_W   = out_width(COEFS, NTAPS, X_W);

  logic                  clk = 1'b0;
  logic                  rst_n = 1'b0;
  logic                  in_valid = 1'b0;
  logic signed [X_W-1:0] x_in = '0;
  logic                  out_valid;
  logic signed [Y_W-1:0] y_out;

  fir_cse_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_stall = 0, n_hsub = 0, n_vsub_p = 0, n_vsub_m = 0, n_max = 0, n_min = 0, n_reset = 0;
  longint hist [NTAPS];
  longint exp_y;
  logic   exp_valid;
  longint y_max, y_min;

  // watchdog
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint ref_y();
    longint s = 0;
    for (int t = 0; t < NTAPS; t++) s += longint'(COEFS[t]) * hist[t];
    return s;
  endfunction

  task automatic clear_hist();
    for (int t = 0; t < NTAPS; t++) hist[t] = 0;
  endtask

  // one clock: present (v, x) before the edge, then check after it
  task automatic step(input logic v, input logic signed [X_W-1:0] x);
    @(negedge clk);
    in_valid = v;
    x_in     = x;
    @(posedge clk);
    // subexpression activity seen by the filter during this sample
    if (v) begin
      if (dut.u_mcm.node[2] != 0) n_hsub++;
      if (dut.u_mcm.node[4] != 0) n_vsub_p++;
      if (dut.u_mcm.node[3] != 0) n_vsub_m++;
    end else n_stall++;
    if (v) begin
      for (int t = NTAPS - 1; t > 0; t--) hist[t] = hist[t-1];
      hist[0] = longint'(x);
      exp_y = ref_y();
    end
    exp_valid = v;
    #1;
    checks++;
    if (out_valid !== exp_valid) begin
      failures++;
      $display("out_valid=%0b expected %0b at %0t", out_valid, exp_valid, $time);
    end
    if (v) begin
      checks++;
      if (longint'(y_out) != exp_y) begin
        failures++;
        if (failures < 20) $display("y_out=%0d expected %0d at %0t", y_out, exp_y, $time);
      end
      if (exp_y == y_max) n_max++;
      if (exp_y == y_min) n_min++;
    end
  endtask

  initial begin
    y_max = 0;
    y_min = 0;
    for (int t = 0; t < NTAPS; t++) begin
      y_max += (COEFS[t] > 0) ? longint'(COEFS[t]) * 127 : longint'(COEFS[t]) * -128;
      y_min += (COEFS[t] > 0) ? longint'(COEFS[t]) * -128 : longint'(COEFS[t]) * 127;
    end
    clear_hist();
    exp_valid = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // impulse: the output sequence must be the coefficients themselves
    step(1'b1, 8'sd1);
    for (int t = 1; t < NTAPS + 3; t++) step(1'b1, '0);

    // full-scale steps
    for (int t = 0; t < NTAPS + 2; t++) step(1'b1, 8'sd127);
    for (int t = 0; t < NTAPS + 2; t++) step(1'b1, -8'sd128);

    // sign-matched worst case, both polarities (output extremes)
    for (int t = NTAPS - 1; t >= 0; t--) step(1'b1, (COEFS[t] > 0) ? 8'sd127 : -8'sd128);
    for (int t = NTAPS - 1; t >= 0; t--) step(1'b1, (COEFS[t] > 0) ? -8'sd128 : 8'sd127);

    // random samples with random stalls
    for (int k = 0; k < 3000; k++)
      step(($urandom_range(0, 3) != 0), X_W'($urandom));

    // reset in mid-stream clears the history
    @(negedge clk);
    rst_n    = 1'b0;
    in_valid = 1'b0;
    @(negedge clk);
    rst_n = 1'b1;
    n_reset++;
    clear_hist();
    exp_valid = 1'b0;
    for (int k = 0; k < 200; k++) step(1'b1, X_W'($urandom));

    // every mechanism must have been exercised
    checks++; if (n_stall  == 0) begin failures++; $display("no stall seen"); end
    checks++; if (n_hsub   == 0) begin failures++; $display("horizontal subexpression never active"); end
    checks++; if (n_vsub_p == 0) begin failures++; $display("vertical x[n]+x[n-1] never active"); end
    checks++; if (n_vsub_m == 0) begin failures++; $display("vertical x[n]-x[n-1] never active"); end
    checks++; if (n_max    == 0) begin failures++; $display("maximum output never reached"); end
    checks++; if (n_min    == 0) begin failures++; $display("minimum output never reached"); end
    $display("stalls=%0d hsub=%0d vsub+=%0d vsub-=%0d max=%0d min=%0d resets=%0d",
             n_stall, n_hsub, n_vsub_p, n_vsub_m, n_max, n_min, n_reset);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
