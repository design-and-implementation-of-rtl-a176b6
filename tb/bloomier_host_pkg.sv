// bloomier_host_pkg: testbench model of the host-side setup software and a
// reference model of the lookup.
//
// setup() takes a list of strings and builds the two tables the engine reads:
//   * every string gets its K hash locations (computed here bit by bit from
//     the coefficient definition in cp_pkg, independently of the RTL);
//   * peeling: a location touched by exactly one (string, hash) pair is a
//     singleton; its string takes that location as tau(x) and is removed,
//     which may create new singletons. Setup fails if strings remain;
//   * strings are then encoded in the reverse of the peeling order:
//     D[tau(x)] = p(x) XOR (XOR of D at the other K-1 locations),
//     so that the XOR of the K words at x's locations is p(x).
// The pointer p(x) is the string's index in the list (its result-table
// address and its string ID).
package bloomier_host_pkg;

  class bloomier_host #(int unsigned N = 64, int unsigned L = 32,
                        int unsigned K = 4, int unsigned MR = 4,
                        int unsigned SEED = 1);
    localparam int unsigned M  = MR * N;
    localparam int unsigned HW = $clog2(M);
    localparam int unsigned Q  = $clog2(N);
    typedef logic [8*L-1:0] str_t;

    int unsigned lut [];          // M words of Q bits
    str_t        strs [$];        // loaded strings, index = pointer
    int          idx_of [str_t];  // string -> pointer
    int unsigned coef [K][8*L];   // coefficient table, low HW bits

    function new();
      lut = new[M];
      for (int unsigned i = 0; i < K; i++)
        for (int unsigned j = 0; j < 8 * L; j++) begin
          logic [31:0] w;
          w = cp_pkg::h3_coef(i, j, SEED);
          coef[i][j] = w & ((1 << HW) - 1);
          if (coef[i][j] == 0) coef[i][j] = 1;
        end
    endfunction

    function int unsigned hash(str_t x, int unsigned i);
      int unsigned h = 0;
      for (int unsigned j = 0; j < 8 * L; j++)
        if (x[j]) h ^= coef[i][j];
      return h;
    endfunction

    // Pointer the lookup table yields for any window.
    function int unsigned lookup_ptr(str_t x);
      int unsigned p = 0;
      for (int unsigned i = 0; i < K; i++) p ^= lut[hash(x, i)];
      return p;
    endfunction

    // Exact reference: index of x in the loaded set, or -1.
    function int find(str_t x);
      if (idx_of.exists(x)) return idx_of[x];
      return -1;
    endfunction

    function bit setup(str_t s [$]);
      int unsigned h [][K];
      int unsigned cnt [];
      int unsigned idx_x [];   // XOR of (string index) over touching pairs
      int unsigned tau [];
      int unsigned order [$];
      int unsigned single [$];
      bit          removed [];
      int unsigned n;
      n = s.size();
      strs = s;
      idx_of.delete();
      foreach (s[i]) idx_of[s[i]] = i;
      h = new[n];
      cnt = new[M];
      idx_x = new[M];
      tau = new[n];
      removed = new[n];
      foreach (lut[a]) lut[a] = 0;
      for (int unsigned x = 0; x < n; x++)
        for (int unsigned i = 0; i < K; i++) begin
          h[x][i] = hash(s[x], i);
          cnt[h[x][i]]++;
          idx_x[h[x][i]] ^= x;
        end
      for (int unsigned a = 0; a < M; a++) if (cnt[a] == 1) single.push_back(a);
      while (single.size() > 0) begin
        int unsigned a, x;
        a = single.pop_back();
        if (cnt[a] != 1) continue;
        x = idx_x[a];
        if (removed[x]) continue;
        removed[x] = 1;
        tau[x] = a;
        order.push_back(x);
        for (int unsigned i = 0; i < K; i++) begin
          cnt[h[x][i]]--;
          idx_x[h[x][i]] ^= x;
          if (cnt[h[x][i]] == 1) single.push_back(h[x][i]);
        end
      end
      if (order.size() != n) return 0;
      for (int k = int'(n) - 1; k >= 0; k--) begin
        int unsigned x, v;
        x = order[k];
        v = x;
        for (int unsigned i = 0; i < K; i++)
          if (h[x][i] != tau[x]) v ^= lut[h[x][i]];
        lut[tau[x]] = v;
      end
      return 1;
    endfunction
  endclass

endpackage
