// mcm_block: multiplier block of the transposed-form filter.
//
// In a transposed FIR every coefficient multiplies the same input sample, so
// the multiplications form one multiple-constant-multiplication problem.
// This block solves it without multipliers: subexpr_gen builds the shared
// subexpressions (horizontal ones such as 3x, vertical ones x[n] +/- x[n-1]),
// and each distinct tap product is the signed sum of a few shifted
// subexpressions (the left-over CSD digits of the coefficient), formed by a
// carry-save adder. Symmetric taps whose products are identical share one
// product; the taps touched by a vertical subexpression get a product of
// their own (see fir_cse_pkg).
//
// Interface: x and en go to subexpr_gen (en advances its x[n-1] register).
// prod[t] is the product of tap t, combinational, W bits, modulo 2^W; taps
// with the same product are driven by the same adder, and a zero coefficient
// gives a constant zero. For a tap without vertical terms prod[t] =
// COEFS[t] * x[n]; the two taps of a vertical pattern together contribute
// COEFS[t]*x[n-t] + COEFS[t+1]*x[n-t-1] to the output once the transposed
// section has delayed them.
//
// The decomposition follows the source design's horizontal and vertical
// elimination; the network is computed from COEFS by
// fir_cse_pkg::build_net at elaboration.
module mcm_block
  import fir_cse_pkg::*;
#(
  parameter int        NTAPS = DEF_NTAPS,
  parameter coef_vec_t COEFS = DEF_COEFS,
  parameter int        X_W   = DEF_X_W,
  parameter int        W     = out_width(COEFS, NTAPS, X_W)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  en,
  input  logic signed [X_W-1:0] x,
  output logic signed [W-1:0]   prod [NTAPS]
);

  localparam net_t NET    = build_net(COEFS, NTAPS);
  localparam int   NODE_N = NET.n_nodes;
  localparam int   PROD_N = NET.n_prods;

  logic signed [W-1:0] node [NODE_N];
  logic signed [W-1:0] uprod [PROD_N > 0 ? PROD_N : 1];

  subexpr_gen #(.NTAPS(NTAPS), .COEFS(COEFS), .X_W(X_W), .W(W)) u_sub (
    .clk  (clk),
    .rst_n(rst_n),
    .en   (en),
    .x    (x),
    .node (node)
  );

  // subtraction mask of product p: bit i set when its i-th term is negative
  function automatic logic [31:0] neg_mask(int ofs, int cnt);
    logic [31:0] m = '0;
    for (int i = 0; i < cnt; i++) m[i] = NET.terms[ofs + i].neg;
    return m;
  endfunction

  for (genvar p = 0; p < PROD_N; p++) begin : g_prod
    localparam int NT  = int'(NET.prod_cnt[p]);
    localparam int OFS = int'(NET.prod_ofs[p]);
    logic signed [W-1:0] ops [NT];

    for (genvar i = 0; i < NT; i++) begin : g_term
      assign ops[i] = node[int'(NET.terms[OFS+i].node)] <<< NET.terms[OFS+i].sh;
    end

    cs_adder #(.N_OPS(NT), .W(W), .NEG(neg_mask(OFS, NT))) u_add (
      .ops(ops),
      .sum(uprod[p])
    );
  end

  if (PROD_N == 0) begin : g_noprod
    assign uprod[0] = '0;
  end

  for (genvar t = 0; t < NTAPS; t++) begin : g_tap
    if (NET.tap_prod[t] != NO_PROD) begin : g_nz
      assign prod[t] = uprod[int'(NET.tap_prod[t])];
    end else begin : g_zero
      assign prod[t] = '0;
    end
  end

endmodule
