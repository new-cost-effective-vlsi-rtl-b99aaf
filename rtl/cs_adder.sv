// cs_adder: multi-operand signed adder built from carry-save compressors.
//
// The N_OPS operands are reduced level by level with 3:2 carry-save
// compressors (a Wallace tree: every level turns each group of three
// vectors into a sum vector and a carry vector shifted left by one, so the
// operand count shrinks by about 1.5 per level) until two vectors remain;
// a single carry-propagate adder then gives the result. Only that last
// adder has a carry chain, which is why carry-save operators keep the
// multiplier block and the transposed section fast.
//
// Subtraction: operand i is subtracted when bit i of NEG is set. It enters
// the tree bit-inverted, and the popcount of NEG (the "+1" of each two's
// complement negation) enters as one extra constant operand.
//
// Interface: ops[i] are W-bit two's complement numbers; sum is their signed
// sum modulo 2^W. Purely combinational.
//
// The carry-save adders are named in the source design; the tree shape, the
// inverted-operand subtraction and the 32-operand limit are choices of this
// implementation.
module cs_adder #(
  parameter int          N_OPS = 3,
  parameter int          W     = 16,
  parameter logic [31:0] NEG   = '0
) (
  input  logic signed [W-1:0] ops [N_OPS],
  output logic signed [W-1:0] sum
);

  function automatic int popcount(logic [31:0] m);
    int c = 0;
    for (int i = 0; i < 32; i++) if (m[i]) c++;
    return c;
  endfunction

  localparam int N_NEG  = popcount(NEG & ((N_OPS >= 32) ? 32'hFFFF_FFFF : ((32'd1 << N_OPS) - 32'd1)));
  // tree inputs: operands plus the negation correction constant, if any
  localparam int N_IN   = N_OPS + ((N_NEG > 0) ? 1 : 0);

  // number of vectors left after l compression levels
  function automatic int count_at(int l);
    int c = N_IN;
    for (int k = 0; k < l; k++) c = 2 * (c / 3) + (c % 3);
    return c;
  endfunction

  function automatic int n_levels();
    int l = 0;
    while (count_at(l) > 2) l++;
    return l;
  endfunction

  localparam int LEVELS = n_levels();

  initial begin
    assert (N_OPS >= 1 && N_OPS <= 32) else $error("cs_adder: N_OPS must be 1..32");
  end

  logic signed [W-1:0] vec [LEVELS+1][N_IN];

  always_comb begin
    vec = '{default: '0};
    for (int i = 0; i < N_OPS; i++)
      vec[0][i] = NEG[i] ? ~ops[i] : ops[i];
    if (N_NEG > 0)
      vec[0][N_OPS] = W'(N_NEG);
    for (int l = 0; l < LEVELS; l++) begin
      for (int g = 0; g < count_at(l) / 3; g++) begin
        vec[l+1][2*g]   = vec[l][3*g] ^ vec[l][3*g+1] ^ vec[l][3*g+2];
        vec[l+1][2*g+1] = ((vec[l][3*g] & vec[l][3*g+1]) |
                           (vec[l][3*g] & vec[l][3*g+2]) |
                           (vec[l][3*g+1] & vec[l][3*g+2])) <<< 1;
      end
      for (int r = 0; r < count_at(l) % 3; r++)
        vec[l+1][2*(count_at(l)/3) + r] = vec[l][3*(count_at(l)/3) + r];
    end
  end

  // final carry-propagate adder
  if (count_at(LEVELS) >= 2) begin : g_cpa
    assign sum = vec[LEVELS][0] + vec[LEVELS][1];
  end else begin : g_single
    assign sum = vec[LEVELS][0];
  end

endmodule
