// subexpr_gen: shared common subexpressions of the multiplierless filter.
//
// Produces every node of the adder network that fir_cse_pkg::build_net
// derives from the coefficients COEFS at elaboration:
//   node[0] = x[n]                 the current input sample
//   node[1] = x[n-1]               the one register of the vertical step
//   node[i] = +/-(node[a] << sa) +/- (node[b] << sb)   for i >= 2
// The horizontal subexpressions read only x[n] (e.g. "10n": (x << 2) - x =
// 3x); the vertical subexpressions read x[n] and x[n-1] (x[n] + x[n-1] and
// x[n] - x[n-1]). Every node costs one adder or subtracter; shifts are
// wiring. All vertical subexpressions share the single delayed copy of x, so
// the vertical step adds exactly one register, as the cost-function argument
// for the cheaper vertical grouping requires.
//
// Interface: x is sampled into the delay register on a clock edge with en
// high; with en low the register holds, so the filter stalls without losing
// state. rst_n (asynchronous, active low) clears the register. node[] is
// combinational from x and the register, sign-extended to W bits; arithmetic
// is modulo 2^W, so W must hold the filter output range.
//
// The subexpressions and the single shared register follow the source
// design; the clock enable, the reset and the node encoding are this
// implementation's.
module subexpr_gen
  import fir_cse_pkg::*;
#(
  parameter int        NTAPS  = DEF_NTAPS,
  parameter coef_vec_t COEFS  = DEF_COEFS,
  parameter int        X_W    = DEF_X_W,
  parameter int        W      = out_width(COEFS, NTAPS, X_W),
  localparam net_t     NET    = build_net(COEFS, NTAPS),
  localparam int       NODE_N = NET.n_nodes
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  logic signed [X_W-1:0] x,
  output logic signed [W-1:0] node [NODE_N]
);

  logic signed [X_W-1:0] x_d;   // x[n-1]: shared register of the vertical subexpressions

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  x_d <= '0;
    else if (en) x_d <= x;
  end

  always_comb begin
    logic signed [W-1:0] a, b;
    node    = '{default: '0};
    node[0] = W'(x);
    node[1] = W'(x_d);
    for (int i = 2; i < NODE_N; i++) begin
      a = node[int'(NET.nodes[i].a_src)] <<< NET.nodes[i].a_sh;
      b = node[int'(NET.nodes[i].b_src)] <<< NET.nodes[i].b_sh;
      node[i] = (NET.nodes[i].a_neg ? -a : a) + (NET.nodes[i].b_neg ? -b : b);
    end
  end

  initial begin
    assert (NET.ok == 1) else $error("subexpr_gen: coefficient set exceeds the network limits");
    for (int i = 2; i < NODE_N; i++)
      assert (int'(NET.nodes[i].a_src) < i && int'(NET.nodes[i].b_src) < i)
        else $error("subexpr_gen: node %0d reads a later node", i);
  end

endmodule
