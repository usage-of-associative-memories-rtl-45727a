// hop_ref_pkg: behavioural reference model used by the testbenches.
//
// Everything here is written as plain integer arithmetic, independently of the
// RTL structure: the code word table is recomputed by the greedy lexicographic
// search, Hebb weights are formed as full matrices, recall is an integer loop
// over the synchronous update rule, and energies follow 2E = -sum_i s_i h_i +
// THETA * sum_i s_i with bipolar s_i.
package hop_ref_pkg;

  localparam int MAXN = 32;
  typedef int wmat_t [MAXN][MAXN];

  function automatic int popcount(longint unsigned v);
    int c = 0;
    for (int i = 0; i < 64; i++) c += int'(v[i]);
    return c;
  endfunction

  // Greedy lexicographic code: entry k is the smallest even value whose distance
  // to every earlier entry and to its n-bit complement is at least dmin.
  function automatic void lexicode(int n, int count, int dmin, output longint unsigned cw [64]);
    longint unsigned mask = (64'd1 << n) - 1;
    int found = 0;
    for (longint unsigned c = 0; c <= mask && found < count; c += 2) begin
      bit ok = 1;
      for (int k = 0; k < found && ok; k++) begin
        int d = popcount(c ^ cw[k]);
        if (d < dmin || (n - d) < dmin) ok = 0;
      end
      if (ok) begin cw[found] = c; found++; end
    end
  endfunction

  function automatic int bip(longint unsigned v, int i);
    return v[i] ? 1 : -1;
  endfunction

  // Hebb weights of the patterns pat[0..np-1]; zero diagonal.
  function automatic void hebb(int n, int np, longint unsigned pat [64], output wmat_t w);
    for (int i = 0; i < MAXN; i++) for (int j = 0; j < MAXN; j++) w[i][j] = 0;
    for (int p = 0; p < np; p++)
      for (int i = 0; i < n; i++)
        for (int j = 0; j < n; j++)
          if (i != j) w[i][j] += bip(pat[p], i) * bip(pat[p], j);
  endfunction

  function automatic int field(input int n, const ref wmat_t w, input longint unsigned s, input int i);
    int h = 0;
    for (int j = 0; j < n; j++) if (j != i) h += w[i][j] * bip(s, j);
    return h;
  endfunction

  function automatic int energy2(input int n, const ref wmat_t w, input longint unsigned s, input int theta);
    int e = 0;
    for (int i = 0; i < n; i++) e += -bip(s, i) * field(n, w, s, i) + theta * bip(s, i);
    return e;
  endfunction

  // Synchronous recall: returns final state, 2E, 2*(E(x)-E(final)), updates, stable.
  function automatic void recall(input int n, const ref wmat_t w, input longint unsigned x, input int theta,
                                 input int max_iter, output longint unsigned xf, output int e,
                                 output int de, output int iters, output bit conv);
    longint unsigned s = x, nx;
    int e0 = energy2(n, w, x, theta);
    iters = 0;
    conv = 0;
    forever begin
      nx = 0;
      for (int i = 0; i < n; i++) if (field(n, w, s, i) > theta) nx[i] = 1'b1;
      if (nx == s) begin conv = 1; break; end
      if (iters == max_iter) break;
      s = nx;
      iters++;
    end
    xf = s;
    e  = energy2(n, w, s, theta);
    de = e0 - e;
  endfunction

  typedef wmat_t wset_t [16];

  // Weights of nnet networks when word k of cw goes to network k mod nnet.
  function automatic void learn_all(input int n, input int nnet, input int nwords,
                                    input longint unsigned cw [64], output wset_t ws);
    for (int net = 0; net < nnet; net++) begin
      longint unsigned pats [64];
      int np;
      np = 0;
      for (int k = net; k < nwords; k += nnet) begin pats[np] = cw[k]; np++; end
      hebb(n, np, pats, ws[net]);
    end
  endfunction

  // Parallel recall and selection (lowest energy, then lowest energy
  // difference, then lowest network number). kmax: most updates of any network.
  function automatic void am_recall(input int n, input int nnet, const ref wset_t ws,
                                    input longint unsigned x, input int theta,
                                    input int max_iter, output longint unsigned xw,
                                    output int sel, output int kmax, output int nonconv);
    int be, bde;
    kmax = 0;
    nonconv = 0;
    for (int net = 0; net < nnet; net++) begin
      longint unsigned xf; int e, de, it; bit cv;
      recall(n, ws[net], x, theta, max_iter, xf, e, de, it, cv);
      if (it > kmax) kmax = it;
      if (!cv) nonconv++;
      if (net == 0 || e < be || (e == be && de < bde)) begin
        be = e; bde = de; sel = net; xw = xf;
      end
    end
  endfunction

  // Letter of a recalled word: the index of the word (LSB 0) or of its complement
  // (LSB 1) in cw; found = 0 if neither is a code word.
  function automatic void to_letter(input int n, input int nwords, input longint unsigned cw [64],
                                    input longint unsigned w, output int letter, output bit found,
                                    output bit inverted);
    longint unsigned mask = (64'd1 << n) - 1;
    letter = 0; found = 0; inverted = 0;
    for (int k = 0; k < nwords; k++) begin
      if (w == cw[k])                 begin letter = 2 * k;     found = 1; end
      else if ((w ^ mask) == cw[k])   begin letter = 2 * k + 1; found = 1; inverted = 1; end
    end
  endfunction

endpackage
