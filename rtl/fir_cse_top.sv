// fir_cse_top: multiplierless 26th-order lowpass FIR filter using horizontal
// and vertical common subexpression elimination.
//
// The filter is in transposed form: every input sample goes into one
// multiplier block (mcm_block) that forms all tap products with shared
// subexpressions, shifts and carry-save adders, and the transposed section
// (transposed_section) adds each product into a chain of delay registers.
// No multiplier is used. The coefficient set, its CSD form and the adder
// network are held in fir_cse_pkg.
//
// Interface: x_in (X_W-bit two's complement) is accepted on a rising clk
// edge with in_valid high; y_out (Y_W bits, full precision, no rounding) is
// y[n] = sum_t COEFS[t] * x[n-t] for that sample and is valid, with
// out_valid high, from the next clock edge on. in_valid low stalls the
// filter; samples are accepted at one per clock. rst_n is asynchronous,
// active low, and clears the filter state to all-zero history.
//
// The structure (multiplier block with horizontal/vertical subexpressions,
// transposed section, carry-save adders, bit-parallel data) follows the
// source design; the coefficients, the word lengths, the valid handshake
// and the output register are this implementation's choices.
module fir_cse_top
  import fir_cse_pkg::*;
#(
  parameter int        NTAPS = DEF_NTAPS,
  parameter coef_vec_t COEFS = DEF_COEFS,
  parameter int        X_W   = DEF_X_W,
  parameter int        Y_W   = out_width(COEFS, NTAPS, X_W)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  logic signed [X_W-1:0] x_in,
  output logic                  out_valid,
  output logic signed [Y_W-1:0] y_out
);

  logic signed [Y_W-1:0] prod [NTAPS];

  mcm_block #(.NTAPS(NTAPS), .COEFS(COEFS), .X_W(X_W), .W(Y_W)) u_mcm (
    .clk  (clk),
    .rst_n(rst_n),
    .en   (in_valid),
    .x    (x_in),
    .prod (prod)
  );

  transposed_section #(.NTAPS(NTAPS), .COEFS(COEFS), .X_W(X_W), .W(Y_W)) u_tr (
    .clk      (clk),
    .rst_n    (rst_n),
    .en       (in_valid),
    .prod     (prod),
    .y_out    (y_out),
    .out_valid(out_valid)
  );

endmodule
