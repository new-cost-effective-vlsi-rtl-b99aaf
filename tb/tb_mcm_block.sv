// tb_mcm_block: self-checking test of the multiplier block.
//
// The block's products are linear in the current sample x[n] and the delayed
// sample x[n-1]: prod_t = A_t * x[n] + B_t * x[n-1] for the product of tap
// t. The test measures A_t and B_t by probing (x[n-1] = 0, x[n] = 1, then
// x[n-1] = 1, x[n] = 0) and requires A_t + B_(t-1) = COEFS[t] for every
// tap t, i.e. the transposed filter built on the block has exactly the
// coefficients of the specification; this holds whichever digits the
// vertical subexpressions moved between neighbouring taps. It then checks
// the linear model against random and full-scale samples, and that a
// product with a vertical term exists at all.
module tb_mcm_block;
  import fir_cse_pkg::*;

  localparam int        NTAPS = DEF_NTAPS;
  localparam int        X_W   = DEF_X_W;
  localparam coef_vec_t COEFS = DEF_COEFS;
  localparam int        Y_W   = out_width(COEFS, NTAPS, X_W);

  localparam int W = Y_W;

  logic                  clk = 1'b0;
  logic                  rst_n = 1'b0;
  logic                  en = 1'b0;
  logic signed [X_W-1:0] x = '0;
  logic signed [W-1:0]   prod [NTAPS];

  mcm_block #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint A [NTAPS];
  longint B [NTAPS];
  longint xd;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint tap_prod(int t);
    return longint'(prod[t]);
  endfunction

  // load x into the delay register, then present xn
  task automatic apply(logic signed [X_W-1:0] xprev, logic signed [X_W-1:0] xn);
    @(negedge clk);
    en = 1'b1;
    x  = xprev;
    @(negedge clk);
    en = 1'b0;
    x  = xn;
    xd = longint'(xprev);
    #1;
  endtask

  initial begin
    int n_vert;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;

    apply(0, 1);
    for (int t = 0; t < NTAPS; t++) A[t] = tap_prod(t);
    apply(1, 0);
    for (int t = 0; t < NTAPS; t++) B[t] = tap_prod(t);

    n_vert = 0;
    for (int t = 0; t < NTAPS; t++) begin
      longint h;
      h = A[t] + ((t > 0) ? B[t-1] : 0);
      checks++;
      if (h != COEFS[t]) begin
        failures++;
        $display("tap %0d: effective coefficient %0d expected %0d", t, h, COEFS[t]);
      end
      if (B[t] != 0) n_vert++;
    end
    checks++;
    if (B[NTAPS-1] != 0) begin failures++; $display("last tap uses x[n-1]"); end
    checks++;
    if (n_vert == 0) begin failures++; $display("no product uses a vertical subexpression"); end

    for (int k = 0; k < 2000; k++) begin
      logic signed [X_W-1:0] a, b;
      a = (k % 7 == 0) ? -8'sd128 : (k % 7 == 1) ? 8'sd127 : X_W'($urandom);
      b = (k % 5 == 0) ? -8'sd128 : (k % 5 == 1) ? 8'sd127 : X_W'($urandom);
      apply(a, b);
      for (int t = 0; t < NTAPS; t++) begin
        checks++;
        if (tap_prod(t) != A[t] * longint'(b) + B[t] * xd) begin
          failures++;
          if (failures < 20)
            $display("tap %0d: prod %0d expected %0d", t, tap_prod(t), A[t] * longint'(b) + B[t] * xd);
        end
      end
    end
    $display("taps with a vertical term: %0d", n_vert);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
