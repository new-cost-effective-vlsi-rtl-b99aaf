// tb_cs_adder: self-checking test of the carry-save multi-operand adder.
//
// Four instances cover the tree shapes: 1 operand, 2 operands (no
// compression level), 5 operands with three subtracted (two levels plus the
// negation constant) and 9 operands with a mixed mask. Random operands,
// including the extreme values, are applied and the sum is compared with a
// plain signed sum computed in the testbench, modulo 2^W.
module tb_cs_adder;

  localparam int W = 12;

  logic signed [W-1:0] a1 [1];
  logic signed [W-1:0] a2 [2];
  logic signed [W-1:0] a5 [5];
  logic signed [W-1:0] a9 [9];
  logic signed [W-1:0] s1, s2, s5, s9;

  localparam logic [31:0] M1 = 32'h1;
  localparam logic [31:0] M5 = 32'b10110;
  localparam logic [31:0] M9 = 32'b1_0100_1101;

  cs_adder #(.N_OPS(1), .W(W), .NEG(M1)) u1 (.ops(a1), .sum(s1));
  cs_adder #(.N_OPS(2), .W(W))           u2 (.ops(a2), .sum(s2));
  cs_adder #(.N_OPS(5), .W(W), .NEG(M5)) u5 (.ops(a5), .sum(s5));
  cs_adder #(.N_OPS(9), .W(W), .NEG(M9)) u9 (.ops(a9), .sum(s9));

  int checks = 0, failures = 0;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic signed [W-1:0] pick(int k);
    case ($urandom_range(0, 5))
      0:       return {1'b0, {(W-1){1'b1}}};   // most positive
      1:       return {1'b1, {(W-1){1'b0}}};   // most negative
      default: return W'($urandom);
    endcase
  endfunction

  task automatic check(string name, logic signed [W-1:0] got, longint ref_v);
    checks++;
    if (got !== W'(ref_v)) begin
      failures++;
      if (failures < 20) $display("%s: got %0d expected %0d", name, got, W'(ref_v));
    end
  endtask

  initial begin
    longint r1, r2, r5, r9;
    for (int k = 0; k < 2000; k++) begin
      r1 = 0; r2 = 0; r5 = 0; r9 = 0;
      for (int i = 0; i < 1; i++) begin a1[i] = pick(k); r1 += M1[i] ? -longint'(a1[i]) : longint'(a1[i]); end
      for (int i = 0; i < 2; i++) begin a2[i] = pick(k); r2 += longint'(a2[i]); end
      for (int i = 0; i < 5; i++) begin a5[i] = pick(k); r5 += M5[i] ? -longint'(a5[i]) : longint'(a5[i]); end
      for (int i = 0; i < 9; i++) begin a9[i] = pick(k); r9 += M9[i] ? -longint'(a9[i]) : longint'(a9[i]); end
      #1;
      check("n1", s1, r1);
      check("n2", s2, r2);
      check("n5", s5, r5);
      check("n9", s9, r9);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
