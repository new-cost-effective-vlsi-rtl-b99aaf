// fir_cse_checker: drives one fir_cse_top built for a given coefficient set
// and checks it against direct convolution.
//
// After reset it feeds an impulse (the output must reproduce the
// coefficients), then N_RANDOM random samples with about one stall cycle in
// four, then a run of full-scale samples whose signs match the
// coefficients (the largest output). Every accepted sample is checked one
// clock later against y[n] = sum_t COEFS[t] * x[n-t] computed with
// multiplications. checks and failures are counted on the outputs and done
// rises when the sequence is finished. Used by the multi-size testbench.
module fir_cse_checker
  import fir_cse_pkg::*;
#(
  parameter int        NTAPS    = DEF_NTAPS,
  parameter coef_vec_t COEFS    = DEF_COEFS,
  parameter int        X_W      = DEF_X_W,
  parameter int        N_RANDOM = 300
) (
  input  logic clk,
  output int   checks,
  output int   failures,
  output logic done
);

  localparam int Y_W = out_width(COEFS, NTAPS, X_W);

  logic                  rst_n = 1'b0;
  logic                  in_valid = 1'b0;
  logic signed [X_W-1:0] x_in = '0;
  logic                  out_valid;
  logic signed [Y_W-1:0] y_out;

  fir_cse_top #(.NTAPS(NTAPS), .COEFS(COEFS), .X_W(X_W)) dut (.*);

  longint hist [NTAPS];

  task automatic step(input logic v, input logic signed [X_W-1:0] x);
    longint e;
    @(negedge clk);
    in_valid = v;
    x_in     = x;
    @(posedge clk);
    if (v) begin
      for (int t = NTAPS - 1; t > 0; t--) hist[t] = hist[t-1];
      hist[0] = longint'(x);
    end
    e = 0;
    for (int t = 0; t < NTAPS; t++) e += longint'(COEFS[t]) * hist[t];
    #1;
    checks++;
    if (out_valid !== v) failures++;
    if (v) begin
      checks++;
      if (longint'(y_out) != e) begin
        failures++;
        if (failures < 5)
          $display("N=%0d: y_out=%0d expected %0d at %0t", NTAPS, y_out, e, $time);
      end
    end
  endtask

  initial begin
    checks   = 0;
    failures = 0;
    done     = 1'b0;
    for (int t = 0; t < NTAPS; t++) hist[t] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    step(1'b1, X_W'(1));
    for (int t = 1; t < NTAPS + 1; t++) step(1'b1, '0);
    for (int k = 0; k < N_RANDOM; k++) step(($urandom_range(0, 3) != 0), X_W'($urandom));
    for (int t = NTAPS - 1; t >= 0; t--)
      step(1'b1, (COEFS[t] >= 0) ? {1'b0, {(X_W-1){1'b1}}} : {1'b1, {(X_W-1){1'b0}}});
    done = 1'b1;
  end

endmodule
