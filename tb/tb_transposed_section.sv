// tb_transposed_section: self-checking test of the transposed delay line.
//
// Random W-bit products are driven with random stalls (en low). A reference
// keeps the history of the product vectors accepted with en high and
// computes y[n] = sum_t prod_t[n-t] modulo 2^W, taps whose coefficient is
// zero contributing nothing. After each clock the test checks out_valid
// (equal to the previous en) and, when valid, y_out; the output is due one
// clock after the sample that completes it. A reset in mid-stream must clear
// the delay line.
module tb_transposed_section;
  import fir_cse_pkg::*;

  localparam int        NTAPS = DEF_NTAPS;
  localparam int        X_W   = DEF_X_W;
  localparam coef_vec_t COEFS = DEF_COEFS;
  localparam int        Y_W   = out_width(COEFS, NTAPS, X_W);

  localparam int W = Y_W;

  logic                clk = 1'b0;
  logic                rst_n = 1'b0;
  logic                en = 1'b0;
  logic signed [W-1:0] prod [NTAPS];
  logic signed [W-1:0] y_out;
  logic                out_valid;

  transposed_section #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_stall = 0;
  longint hist [NTAPS][NTAPS];   // hist[d][t]: product of tap t, d samples ago

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint ref_y();
    longint s = 0;
    for (int t = 0; t < NTAPS; t++)
      if (COEFS[t] != 0) s += hist[t][t];
    return s;
  endfunction

  task automatic clear();
    for (int d = 0; d < NTAPS; d++)
      for (int p = 0; p < NTAPS; p++) hist[d][p] = 0;
  endtask

  initial begin
    longint e;
    logic   v;
    for (int p = 0; p < NTAPS; p++) prod[p] = '0;
    clear();
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 4000; k++) begin
      @(negedge clk);
      if (k == 2000) begin
        rst_n = 1'b0;
        #1 rst_n = 1'b1;
        clear();
      end
      v  = ($urandom_range(0, 3) != 0);
      en = v;
      for (int p = 0; p < NTAPS; p++) prod[p] = W'($urandom);
      @(posedge clk);
      if (v) begin
        for (int d = NTAPS - 1; d > 0; d--) hist[d] = hist[d-1];
        for (int p = 0; p < NTAPS; p++) hist[0][p] = longint'(prod[p]);
      end else n_stall++;
      e = ref_y();
      #1;
      checks++;
      if (out_valid !== v) begin failures++; $display("out_valid %0b expected %0b", out_valid, v); end
      if (v) begin
        checks++;
        if (y_out !== W'(e)) begin
          failures++;
          if (failures < 20) $display("k=%0d y_out=%0d expected %0d", k, y_out, W'(e));
        end
      end
    end
    checks++;
    if (n_stall == 0) begin failures++; $display("no stall applied"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
