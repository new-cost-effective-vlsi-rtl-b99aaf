// tb_subexpr_gen: self-checking test of the shared subexpression generator.
//
// Drives random samples with random clock enables and compares every node
// with its intended value: node 0 is the sample, node 1 the last sample
// accepted with en high (zero after reset), node 2 the horizontal
// subexpression 10n = 3x, node 3 the vertical subexpression x[n] - x[n-1]
// and node 4 the vertical subexpression x[n] + x[n-1]. Also checks that a
// reset clears the delayed sample.
module tb_subexpr_gen;
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
  logic signed [W-1:0]   node [5];

  subexpr_gen #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint xd;          // model of the delayed sample

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_node(int i, longint v);
    checks++;
    if (node[i] !== W'(v)) begin
      failures++;
      if (failures < 20) $display("node[%0d]=%0d expected %0d (x=%0d xd=%0d)", i, node[i], v, x, xd);
    end
  endtask

  task automatic check_all();
    longint xv;
    xv = longint'(x);
    expect_node(0, xv);
    expect_node(1, xd);
    expect_node(2, 3 * xv);
    expect_node(3, xv - xd);
    expect_node(4, xv + xd);
  endtask

  initial begin
    xd = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 4000; k++) begin
      @(negedge clk);
      en = ($urandom_range(0, 2) != 0);
      case ($urandom_range(0, 4))
        0:       x = 8'sd127;
        1:       x = -8'sd128;
        default: x = X_W'($urandom);
      endcase
      #1 check_all();
      @(posedge clk);
      if (en) xd = longint'(x);
      if (k == 2000) begin
        // asynchronous reset clears x[n-1]
        #1 rst_n = 1'b0;
        #1 xd = 0;
        checks++;
        if (node[1] !== '0) begin failures++; $display("reset did not clear x[n-1]"); end
        rst_n = 1'b1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
