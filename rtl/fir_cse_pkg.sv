// fir_cse_pkg: coefficient set, limits and the elaboration-time common
// subexpression elimination (CSE) of the multiplierless FIR filter.
//
// A filter is given by its integer coefficients (COEFS, tap 0 first; a real
// coefficient h is represented as round(h * 2^COEF_B)). build_net() turns
// them into the adder network that the RTL instantiates; nothing is stored
// as a table. It works on the canonic signed digit (CSD) form of the
// coefficients, digits +1, 0, -1 ("n"), in two steps:
//
//   1. Horizontal step. Rows are the distinct coefficients: for a symmetric
//      filter taps 0..ceil(N/2)-1, otherwise all taps. Every pair of
//      non-zero digits in a row is a pattern (first sign, distance, second
//      sign), e.g. "10n" = +1 at bit p+2 and -1 at bit p, i.e. 3x << p.
//      Occurrences are counted per row from the top digit down without
//      sharing a digit. The most frequent pattern (ties: the shorter one,
//      then the one whose signs are positive) becomes a shared adder if it
//      occurs more than once; its occurrences are removed and the count is
//      repeated until no pattern occurs twice.
//   2. Vertical step, on the full tap matrix. A digit left over in tap t and
//      one at the same bit of tap t+1 form a vertical pattern: with signs a
//      and b they contribute a*x[n-t] + b*x[n-t-1] = a*z[n-t] << bit, where
//      z[n] = x[n] + a*b*x[n-1]. The two patterns z = x[n] + x[n-1] and
//      z = x[n] - x[n-1] each become a shared adder if they occur at least
//      twice (more frequent first; ties: the one met first), pairs taken
//      greedily from tap 0 and bit 0 up. All of them read the same delayed
//      sample, so the vertical step costs one register in all.
//
// Then each tap's product is the signed sum of its terms (shifted nodes);
// taps with identical term lists share one product.
//
// Node encoding: node 0 = x[n], node 1 = x[n-1], node i >= 2 is
//   (-1)^a_neg (node[a_src] << a_sh) + (-1)^b_neg (node[b_src] << b_sh).
// Term encoding: (-1)^neg (node[node] << sh).
//
// The default coefficients are a 27-tap (26th-order) lowpass: a Hamming
// window design with cutoff 0.35 of the Nyquist frequency, scaled by 2^8 and
// rounded (8-bit coefficient word length). For it the network needs 3
// subexpression adders, 6 product adders and 20 transposed-section adders
// (29 in all) and 27 registers (26 delays and x[n-1]).
//
// Limits: 64 taps, coefficient magnitude below 2^17, 62 shared
// subexpressions, 12 terms in one tap product, 512 terms over all distinct
// products; build_net clears the ok field when a set exceeds them.
//
// The two-step elimination and its pattern and tie rules follow the source
// method; the default coefficients, the limits and the greedy details are
// this implementation's choices.
package fir_cse_pkg;

  // ---------------- limits ----------------
  localparam int MAX_TAPS  = 64;   // filter length
  localparam int CW        = 18;   // coefficient storage width (|c| < 2^17)
  localparam int MAX_DIG   = 19;   // CSD digits of a CW-bit coefficient
  localparam int MAX_NODES = 64;   // x, x[n-1] and shared subexpressions
  localparam int MAX_TERMS = 512;  // terms of all distinct products
  localparam int MAX_TT    = 12;   // terms of one tap product

  typedef logic signed [CW-1:0]           coef_t;
  typedef coef_t [MAX_TAPS-1:0]           coef_vec_t;

  typedef struct packed {
    logic [7:0] a_src;
    logic [7:0] a_sh;
    logic       a_neg;
    logic [7:0] b_src;
    logic [7:0] b_sh;
    logic       b_neg;
  } node_t;

  typedef struct packed {
    logic [7:0] node;
    logic [7:0] sh;
    logic       neg;
  } term_t;

  typedef struct packed {
    int                                 ok;        // 1: built within the limits
    int                                 n_nodes;
    int                                 n_hsub;
    int                                 n_vsub;
    int                                 n_prods;
    int                                 n_terms;
    node_t [MAX_NODES-1:0]              nodes;
    term_t [MAX_TERMS-1:0]              terms;
    logic  [MAX_TAPS-1:0][15:0]         prod_ofs;  // first term of product p
    logic  [MAX_TAPS-1:0][7:0]          prod_cnt;  // its number of terms
    logic  [MAX_TAPS-1:0][7:0]          tap_prod;  // product of tap t, NO_PROD: zero
  } net_t;

  localparam logic [7:0] NO_PROD = 8'hFF;   // tap_prod of a zero coefficient

  // ---------------- default filter ----------------
  localparam int DEF_NTAPS  = 27;   // 26th-order filter
  localparam int DEF_COEF_B = 8;    // coefficient word length (scale 2^8)
  localparam int DEF_X_W    = 8;    // input sample width

  function automatic coef_vec_t default_coefs();
    int h [27] = '{0, 0, 0, -2, -1, 2, 6, 2, -8, -15, -4, 31, 71, 89,
                   71, 31, -4, -15, -8, 2, 6, 2, -1, -2, 0, 0, 0};
    coef_vec_t c = '0;
    for (int t = 0; t < 27; t++) c[t] = coef_t'(h[t]);
    return c;
  endfunction

  localparam coef_vec_t DEF_COEFS = default_coefs();

  // ---------------- helpers ----------------
  // full-precision output width: X_W + ceil(log2(sum |c|)) + 1
  function automatic int out_width(coef_vec_t c, int ntaps, int xw);
    longint s = 0;
    int     l = 0;
    for (int t = 0; t < ntaps; t++) s += (c[t] < 0) ? -longint'(c[t]) : longint'(c[t]);
    while ((longint'(1) << l) < s) l++;
    return xw + l + 1;
  endfunction

  function automatic int term_key(int node, int sh, int neg);
    return (node * 256 + sh) * 2 + neg;
  endfunction

  // ---------------- the CSE procedure ----------------
  function automatic net_t build_net(coef_vec_t c, int ntaps);
    net_t   net;
    int     dig   [MAX_TAPS*MAX_DIG];   // working digits per row / tap
    int     rest  [MAX_TAPS*MAX_DIG];
    bit     used  [MAX_DIG];
    int     nrows;
    bit     sym;
    // horizontal terms per row: hsub index and shift
    int     h_n   [MAX_TAPS];
    int     h_idx [MAX_TAPS*MAX_TT];
    int     h_sh  [MAX_TAPS*MAX_TT];
    int     hs1   [MAX_NODES], hdist [MAX_NODES], hs2 [MAX_NODES];
    // per-tap term lists, kept sorted by key
    int     t_n   [MAX_TAPS];
    int     t_key [MAX_TAPS*MAX_TT];
    int     vkey  [2];
    int     vcnt  [2], vfirst [2];
    int     vnode [2];
    int     best_cnt, best_s1, best_d, best_s2, cnt, row, v, p, q, k;
    bit     same;

    net = '0;
    net.ok = 1;
    if (ntaps < 1 || ntaps > MAX_TAPS) begin
      net.ok = 0;
      return net;
    end

    // CSD digits
    for (int t = 0; t < MAX_TAPS; t++)
      for (int b = 0; b < MAX_DIG; b++) dig[(t)*MAX_DIG + (b)] = 0;
    for (int t = 0; t < ntaps; t++) begin
      v = int'(c[t]);
      p = 0;
      while (v != 0 && p < MAX_DIG) begin
        if ((v & 1) != 0) begin
          dig[(t)*MAX_DIG + (p)] = 2 - (v & 3);
          v = v - dig[(t)*MAX_DIG + (p)];
        end
        v = v >>> 1;
        p++;
      end
    end

    sym = 1;
    for (int t = 0; t < ntaps; t++) if (c[t] != c[ntaps-1-t]) sym = 0;
    nrows = sym ? (ntaps + 1) / 2 : ntaps;

    // ---- horizontal step ----
    for (int r = 0; r < MAX_TAPS; r++) h_n[r] = 0;
    net.n_hsub = 0;
    forever begin
      best_cnt = 0; best_s1 = 0; best_d = 0; best_s2 = 0;
      for (int d = 1; d < MAX_DIG; d++)
        for (int s1 = 1; s1 >= -1; s1 -= 2)
          for (int s2 = 1; s2 >= -1; s2 -= 2) begin
            cnt = 0;
            for (int r = 0; r < nrows; r++) begin
              for (int b = 0; b < MAX_DIG; b++) used[b] = 0;
              for (int b = MAX_DIG - 1; b >= d; b--)
                if (dig[(r)*MAX_DIG + (b)] == s1 && dig[(r)*MAX_DIG + (b-d)] == s2 && !used[b] && !used[b-d]) begin
                  used[b] = 1; used[b-d] = 1; cnt++;
                end
            end
            if (cnt > best_cnt) begin
              best_cnt = cnt; best_s1 = s1; best_d = d; best_s2 = s2;
            end
          end
      if (best_cnt < 2) break;
      if (net.n_hsub >= MAX_NODES - 4) begin net.ok = 0; break; end
      hs1[net.n_hsub] = best_s1; hdist[net.n_hsub] = best_d; hs2[net.n_hsub] = best_s2;
      for (int r = 0; r < nrows; r++)
        for (int b = MAX_DIG - 1; b >= best_d; b--)
          if (dig[(r)*MAX_DIG + (b)] == best_s1 && dig[(r)*MAX_DIG + (b-best_d)] == best_s2) begin
            dig[(r)*MAX_DIG + (b)] = 0; dig[(r)*MAX_DIG + (b-best_d)] = 0;
            if (h_n[r] >= MAX_TT) net.ok = 0;
            else begin
              h_idx[(r)*MAX_TT + (h_n[r])] = net.n_hsub;
              h_sh[(r)*MAX_TT + (h_n[r])]  = b - best_d;
              h_n[r]++;
            end
          end
      net.n_hsub++;
    end

    // ---- full tap matrix ----
    for (int t = 0; t < MAX_TAPS; t++) begin
      t_n[t] = 0;
      for (int b = 0; b < MAX_DIG; b++) rest[(t)*MAX_DIG + (b)] = 0;
    end
    for (int t = 0; t < ntaps; t++) begin
      row = (sym && t >= nrows) ? ntaps - 1 - t : t;
      for (int b = 0; b < MAX_DIG; b++) rest[(t)*MAX_DIG + (b)] = dig[(row)*MAX_DIG + (b)];
    end

    // ---- vertical step ----
    vkey[0] = 1; vkey[1] = -1;
    for (int i = 0; i < 2; i++) begin vcnt[i] = 0; vfirst[i] = MAX_TAPS * MAX_DIG; vnode[i] = -1; end
    for (int t = 0; t + 1 < ntaps; t++)
      for (int b = 0; b < MAX_DIG; b++)
        if (rest[(t)*MAX_DIG + (b)] != 0 && rest[(t+1)*MAX_DIG + (b)] != 0) begin
          k = (rest[(t)*MAX_DIG + (b)] * rest[(t+1)*MAX_DIG + (b)] > 0) ? 0 : 1;
          vcnt[k]++;
          if (t * MAX_DIG + b < vfirst[k]) vfirst[k] = t * MAX_DIG + b;
        end
    net.n_vsub = 0;
    for (int pass = 0; pass < 2; pass++) begin
      // pick the more frequent (tie: first met) of the patterns left
      if (vcnt[0] >= 2 && vnode[0] < 0 &&
          (vnode[1] >= 0 || vcnt[1] < 2 || vcnt[0] > vcnt[1] ||
           (vcnt[0] == vcnt[1] && vfirst[0] < vfirst[1])))
        k = 0;
      else if (vcnt[1] >= 2 && vnode[1] < 0)
        k = 1;
      else
        k = -1;
      if (k >= 0) begin
        vnode[k] = 2 + net.n_hsub + net.n_vsub;
        net.n_vsub++;
        for (int t = 0; t + 1 < ntaps; t++)
          for (int b = 0; b < MAX_DIG; b++)
            if (rest[(t)*MAX_DIG + (b)] != 0 && rest[(t+1)*MAX_DIG + (b)] != 0 && rest[(t)*MAX_DIG + (b)] * rest[(t+1)*MAX_DIG + (b)] == vkey[k]) begin
              q = term_key(vnode[k], b, int'(rest[(t)*MAX_DIG + (b)] < 0));
              rest[(t)*MAX_DIG + (b)] = 0; rest[(t+1)*MAX_DIG + (b)] = 0;
              if (t_n[t] >= MAX_TT) net.ok = 0;
              else begin t_key[(t)*MAX_TT + (t_n[t])] = q; t_n[t]++; end
            end
      end
    end

    // ---- terms of every tap: left-over digits, horizontal, vertical ----
    for (int t = 0; t < ntaps; t++) begin
      row = (sym && t >= nrows) ? ntaps - 1 - t : t;
      for (int b = 0; b < MAX_DIG; b++)
        if (rest[(t)*MAX_DIG + (b)] != 0) begin
          if (t_n[t] >= MAX_TT) net.ok = 0;
          else begin t_key[(t)*MAX_TT + (t_n[t])] = term_key(0, b, int'(rest[(t)*MAX_DIG + (b)] < 0)); t_n[t]++; end
        end
      for (int i = 0; i < h_n[row]; i++)
        if (t_n[t] >= MAX_TT) net.ok = 0;
        else begin t_key[(t)*MAX_TT + (t_n[t])] = term_key(2 + h_idx[(row)*MAX_TT + (i)], h_sh[(row)*MAX_TT + (i)], 0); t_n[t]++; end
      // insertion sort, so equal lists compare equal
      for (int i = 1; i < t_n[t]; i++)
        for (int j = i; j > 0 && t_key[(t)*MAX_TT + (j-1)] > t_key[(t)*MAX_TT + (j)]; j--) begin
          q = t_key[(t)*MAX_TT + (j)]; t_key[(t)*MAX_TT + (j)] = t_key[(t)*MAX_TT + (j-1)]; t_key[(t)*MAX_TT + (j-1)] = q;
        end
    end

    // ---- nodes ----
    net.n_nodes = 2 + net.n_hsub + net.n_vsub;
    net.nodes[1].a_src = 8'd1;
    net.nodes[1].b_src = 8'd1;
    for (int i = 0; i < net.n_hsub; i++) begin
      net.nodes[2+i].a_src = 8'd0;
      net.nodes[2+i].a_sh  = 8'(hdist[i]);
      net.nodes[2+i].a_neg = (hs1[i] < 0);
      net.nodes[2+i].b_src = 8'd0;
      net.nodes[2+i].b_sh  = 8'd0;
      net.nodes[2+i].b_neg = (hs2[i] < 0);
    end
    for (int i = 0; i < 2; i++)
      if (vnode[i] >= 0) begin
        net.nodes[vnode[i]].a_src = 8'd0;
        net.nodes[vnode[i]].b_src = 8'd1;
        net.nodes[vnode[i]].b_neg = (vkey[i] < 0);
      end

    // ---- distinct products ----
    net.n_prods = 0;
    net.n_terms = 0;
    for (int t = 0; t < ntaps; t++) begin
      net.tap_prod[t] = NO_PROD;
      if (t_n[t] > 0) begin
        for (int pp = 0; pp < net.n_prods && net.tap_prod[t] == NO_PROD; pp++)
          if (int'(net.prod_cnt[pp]) == t_n[t]) begin
            same = 1;
            for (int i = 0; i < t_n[t]; i++) begin
              term_t tm;
              tm = net.terms[int'(net.prod_ofs[pp]) + i];
              if (term_key(int'(tm.node), int'(tm.sh), int'(tm.neg)) != t_key[(t)*MAX_TT + (i)]) same = 0;
            end
            if (same) net.tap_prod[t] = 8'(pp);
          end
        if (net.tap_prod[t] == NO_PROD) begin
          if (net.n_terms + t_n[t] > MAX_TERMS) net.ok = 0;
          else begin
            net.prod_ofs[net.n_prods] = 16'(net.n_terms);
            net.prod_cnt[net.n_prods] = 8'(t_n[t]);
            for (int i = 0; i < t_n[t]; i++) begin
              net.terms[net.n_terms].node = 8'(t_key[(t)*MAX_TT + (i)] / 512);
              net.terms[net.n_terms].sh   = 8'((t_key[(t)*MAX_TT + (i)] / 2) % 256);
              net.terms[net.n_terms].neg  = 1'(t_key[(t)*MAX_TT + (i)] % 2);
              net.n_terms++;
            end
            net.tap_prod[t] = 8'(net.n_prods);
            net.n_prods++;
          end
        end
      end
    end
    return net;
  endfunction

  // ---------------- cost figures of a network ----------------
  function automatic int net_adders(net_t n, int ntaps);
    int a = n.n_nodes - 2;
    for (int p = 0; p < n.n_prods; p++) a += int'(n.prod_cnt[p]) - 1;
    for (int t = 0; t < ntaps; t++)
      if (n.tap_prod[t] != NO_PROD && t < ntaps - 1) begin
        // a tap adds into the chain when some later tap is non-zero
        bit later = 0;
        for (int u = t + 1; u < ntaps; u++) if (n.tap_prod[u] != NO_PROD) later = 1;
        if (later) a++;
      end
    return a;
  endfunction

  function automatic int net_registers(net_t n, int ntaps);
    return ntaps - 1 + ((n.n_vsub > 0) ? 1 : 0);
  endfunction

endpackage
