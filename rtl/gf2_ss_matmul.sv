// gf2_ss_matmul: multiplies an input vector by a constant GF(2) matrix,
// y = M x, with an XOR network in which common terms are computed once and
// shared between outputs (substructure sharing).
//
// How it works: the network is planned at elaboration time by a greedy
// common-pair search. Each output starts as the set of inputs its row of M
// selects. In every iteration the pair of signals that occurs together in the
// most outputs (at least two) becomes a new XOR2 node, and every output that
// held both signals holds the node instead. When no pair is shared any more,
// each output is the XOR of the signals it still holds. For the three-output
// example y0 = x0^x1^x2^x3^x5, y1 = x0^x1^x2^x3^x4, y2 = x2^x3^x4^x5 the plan
// shares x2^x3 first and ends with three shared nodes and seven XOR2 gates in
// all, against eleven without sharing.
//
// Sharing is the structure the low-power LFSR relies on; the greedy pair
// search is this design's choice of algorithm (optimal sharing is NP-complete).
// Ties go to the pair with the smallest indices. Sharing can lengthen the
// critical path, so MAX_DEPTH, when non-zero, constrains it: a shared node is
// accepted only if every output that would use it still settles within
// max(MAX_DEPTH, that output's depth without sharing) XOR2 levels. Depths are
// counted with each output's remaining terms combined two shallowest first,
// the way the reductions below are balanced by synthesis.
// SHARE = 0 builds the plain network with no sharing, for comparison.
//
// Interface: purely combinational. x[NIN-1:0] in, y[NOUT-1:0] out, with
// y[o] = XOR over i of M[o][i] & x[i]. NODES and XOR2_GATES report the size
// of the planned network, PLAIN_XOR2 the size without sharing, and XOR_DEPTH
// its critical path in XOR2 levels, counted with each output's remaining
// terms combined two shallowest first.
module gf2_ss_matmul
  import plfsr_pkg::*;
#(
  parameter int   NIN       = 6,
  parameter int   NOUT      = 3,
  // Default: the three-output sharing example quoted above.
  parameter mat_t M         = ss_example(),
  parameter bit   SHARE     = 1'b1,
  parameter int   MAX_DEPTH = 0
) (
  input  logic [NIN-1:0]  x,
  output logic [NOUT-1:0] y
);

  localparam int MAXN = (NIN * NOUT) / 2 + 1;   // bound on the number of shared nodes
  localparam int S    = NIN + MAXN;             // inputs followed by nodes
  localparam int IW   = $clog2(S);

  typedef struct packed {
    logic [MAXN-1:0][1:0][IW-1:0] ops;   // operands of each shared node
    logic [S-1:0][NOUT-1:0]       cols;  // cols[s][o]: output o still holds signal s
    logic [31:0]                  count; // number of shared nodes
  } plan_t;

  function automatic int ones(input logic [NOUT-1:0] v);
    int c;
    c = 0;
    for (int i = 0; i < NOUT; i++) c += int'(v[i]);
    return c;
  endfunction

  typedef logic [S-1:0][7:0] dlist_t;

  // Depth of an XOR tree over m terms of the given depths, combining the two
  // shallowest terms first.
  function automatic int tree_depth(input dlist_t lst_in, input int m_in);
    dlist_t     lst;
    int         m, ia, ib;
    logic [7:0] da, db;
    lst = lst_in;
    m = m_in;
    while (m > 1) begin
      ia = 0;
      for (int k = 1; k < m; k++) if (lst[k] < lst[ia]) ia = k;
      da = lst[ia];
      lst[ia] = lst[m-1];
      m--;
      ib = 0;
      for (int k = 1; k < m; k++) if (lst[k] < lst[ib]) ib = k;
      db = lst[ib];
      lst[ib] = ((da > db) ? da : db) + 8'd1;
    end
    return (m == 1) ? int'(lst[0]) : 0;
  endfunction

  // Depth an output reaches without sharing: ceil(log2(number of terms)).
  function automatic int plain_depth(input int o);
    int w, d;
    w = 0;
    for (int i = 0; i < NIN; i++) w += int'(M[o][i]);
    d = 0;
    while ((1 << d) < w) d++;
    return d;
  endfunction

  // Would node (a ^ b), of depth dn, keep every output that takes it within
  // its depth limit?
  function automatic bit node_fits(input logic [S-1:0][NOUT-1:0] cols, input dlist_t depth,
                                   input int ns, input int a, input int b, input logic [7:0] dn);
    dlist_t lst;
    int     m, lim;
    bit     ok;
    ok = 1'b1;
    for (int o = 0; o < NOUT; o++)
      if (cols[a][o] && cols[b][o]) begin
        lst = '0;
        m = 0;
        for (int s = 0; s < ns; s++)
          if (cols[s][o] && s != a && s != b) begin
            lst[m] = depth[s];
            m++;
          end
        lst[m] = dn;
        m++;
        lim = plain_depth(o);
        if (MAX_DEPTH > lim) lim = MAX_DEPTH;
        if (tree_depth(lst, m) > lim) ok = 1'b0;
      end
    return ok;
  endfunction

  function automatic plan_t make_plan();
    plan_t                 p;
    dlist_t                depth;
    logic [NOUT-1:0]       common;
    int                    ns, best, ba, bb, it;
    bit                    done;
    p = '0;
    depth = '0;
    for (int o = 0; o < NOUT; o++)
      for (int i = 0; i < NIN; i++) p.cols[i][o] = M[o][i];
    ns = NIN;
    done = !SHARE;
    it = 0;
    while (!done && it < MAXN) begin
      best = 1;
      ba = -1;
      bb = -1;
      for (int a = 0; a < ns; a++)
        if (ones(p.cols[a]) >= 2)
          for (int b = a + 1; b < ns; b++) begin
            int         c;
            logic [7:0] d;
            c = ones(p.cols[a] & p.cols[b]);
            d = ((depth[a] > depth[b]) ? depth[a] : depth[b]) + 8'd1;
            if (c > best && (MAX_DEPTH == 0 || node_fits(p.cols, depth, ns, a, b, d))) begin
              best = c;
              ba = a;
              bb = b;
            end
          end
      if (ba < 0) begin
        done = 1'b1;
      end else begin
        common = p.cols[ba] & p.cols[bb];
        p.cols[ba] = p.cols[ba] & ~common;
        p.cols[bb] = p.cols[bb] & ~common;
        p.cols[ns] = common;
        p.ops[it][0] = IW'(ba);
        p.ops[it][1] = IW'(bb);
        depth[ns] = ((depth[ba] > depth[bb]) ? depth[ba] : depth[bb]) + 8'd1;
        ns++;
        it++;
      end
    end
    p.count = 32'(it);
    return p;
  endfunction

  localparam plan_t PLAN  = make_plan();
  localparam int    NODES = int'(PLAN.count);

  // Row masks over all signals, and the total XOR2 count of the network.
  typedef logic [NOUT-1:0][S-1:0] rows_t;
  function automatic rows_t make_rows();
    rows_t r;
    r = '0;
    for (int o = 0; o < NOUT; o++)
      for (int s = 0; s < S; s++) r[o][s] = PLAN.cols[s][o];
    return r;
  endfunction
  localparam rows_t ROWS = make_rows();

  function automatic int count_xor2();
    int n, w;
    n = NODES;
    for (int o = 0; o < NOUT; o++) begin
      w = 0;
      for (int s = 0; s < S; s++) w += int'(ROWS[o][s]);
      if (w > 1) n += w - 1;
    end
    return n;
  endfunction
  localparam int XOR2_GATES = count_xor2();

  // XOR2 count of the same product without sharing; sharing never adds gates.
  function automatic int count_plain();
    int n, w;
    n = 0;
    for (int o = 0; o < NOUT; o++) begin
      w = 0;
      for (int i = 0; i < NIN; i++) w += int'(M[o][i]);
      if (w > 1) n += w - 1;
    end
    return n;
  endfunction
  localparam int PLAIN_XOR2 = count_plain();

  if (XOR2_GATES > PLAIN_XOR2) begin : g_bad_plan
    $error("shared network is larger than the plain one");
  end

  // Critical path in XOR2 levels: each output's remaining terms are combined
  // two shallowest first, as a balanced reduction tree would.
  function automatic int xor_depth();
    dlist_t dep, lst;
    int     worst, m, d;
    dep = '0;
    for (int n = 0; n < NODES; n++)
      dep[NIN+n] = ((dep[PLAN.ops[n][0]] > dep[PLAN.ops[n][1]]) ?
                    dep[PLAN.ops[n][0]] : dep[PLAN.ops[n][1]]) + 8'd1;
    worst = 0;
    for (int o = 0; o < NOUT; o++) begin
      lst = '0;
      m = 0;
      for (int s = 0; s < S; s++)
        if (ROWS[o][s]) begin
          lst[m] = dep[s];
          m++;
        end
      d = tree_depth(lst, m);
      if (d > worst) worst = d;
    end
    return worst;
  endfunction
  localparam int XOR_DEPTH = xor_depth();

  logic [S-1:0] sig;

  always_comb begin
    sig = '0;
    sig[NIN-1:0] = x;
    for (int n = 0; n < NODES; n++)
      sig[NIN+n] = sig[PLAN.ops[n][0]] ^ sig[PLAN.ops[n][1]];
  end

  always_comb begin
    for (int o = 0; o < NOUT; o++) y[o] = ^(sig & ROWS[o]);
  end

endmodule
