// transposed_section: delay line and accumulation of the transposed FIR.
//
// Tap t (0..NTAPS-1) takes product prod[t] of the multiplier block. The
// partial sums travel from the last tap towards the output:
//   r[NTAPS-1] <= prod(NTAPS-1)
//   r[t]       <= prod(t) + r[t+1]          for t = 1 .. NTAPS-2
//   y           = prod(0) + r[1]
// so y[n] = sum_t prod_t[n-t]. A tap whose coefficient is zero has no adder
// and its register only delays the partial sum. There are NTAPS-1 delay
// registers; each tap adder is a two-operand carry-save/propagate adder
// (cs_adder), so the carry chain is one adder long per tap.
//
// Interface: on a rising clk edge with en high every delay register loads
// and y is registered into y_out, with out_valid raised for one cycle; with
// en low everything holds (stall). The output therefore appears one clock
// after the sample that completes it is presented. rst_n (asynchronous,
// active low) clears the delay line and the output.
//
// The transposed structure follows the source design; the output register,
// the clock enable and the reset are this implementation's additions.
module transposed_section
  import fir_cse_pkg::*;
#(
  parameter int        NTAPS = DEF_NTAPS,
  parameter coef_vec_t COEFS = DEF_COEFS,
  parameter int        X_W   = DEF_X_W,
  parameter int        W     = out_width(COEFS, NTAPS, X_W)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  logic signed [W-1:0] prod [NTAPS],
  output logic signed [W-1:0] y_out,
  output logic                out_valid
);

  // which taps have a non-zero product (and so an adder)
  localparam net_t NET = build_net(COEFS, NTAPS);

  // r[t] is the register feeding tap t-1; r[NTAPS] is a constant zero
  logic signed [W-1:0] r     [1:NTAPS];
  logic signed [W-1:0] r_nxt [0:NTAPS-1];

  assign r[NTAPS] = '0;

  for (genvar t = 0; t < NTAPS; t++) begin : g_tap
    if (NET.tap_prod[t] != NO_PROD) begin : g_add
      logic signed [W-1:0] ops [2];
      assign ops[0] = prod[t];
      assign ops[1] = r[t+1];
      cs_adder #(.N_OPS(2), .W(W)) u_add (.ops(ops), .sum(r_nxt[t]));
    end else begin : g_zero
      assign r_nxt[t] = r[t+1];
    end
    if (t > 0) begin : g_reg
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n)  r[t] <= '0;
        else if (en) r[t] <= r_nxt[t];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y_out     <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= en;
      if (en) y_out <= r_nxt[0];
    end
  end

endmodule
