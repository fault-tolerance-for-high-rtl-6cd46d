// mr_model_pkg: reference model of one rollback-capable module, used by the
// node and system testbenches. It works at the level of what the design
// promises, not how it is built: architectural register contents with an
// undo log of the last N cycles, the history of the state register, and
// one transaction monitor per link, all kept as plain lists.
package mr_model_pkg;

  class node_model;
    int n, m, tmax, nlink;
    bit full;
    logic [31:0] arch [64];
    bit          known [64];
    // undo log, index 0 = last cycle
    bit          lv [16];
    int          la [16];
    logic [31:0] lo [16];
    bit          lk [16];
    // state register and its history (depth 1 = last cycle)
    logic [31:0] st;
    bit          st_known;
    logic [31:0] hist [17];
    bit          hk [17];
    int          avail;
    // transaction monitors, [link][entry], entry 0 = last cycle
    bit          tm [4][16];

    // bus monitor of a bus-attached module, entry 0 = last bus transaction
    bit          bm [16];
    int          nb = 5;

    function new(int n_, int m_, bit full_, int nlink_, int tmax_ = 4);
      n = n_; m = m_; full = full_; nlink = nlink_; tmax = tmax_;
      foreach (known[i]) known[i] = 0;
      foreach (lv[i]) lv[i] = 0;
      foreach (tm[i, j]) tm[i][j] = 0;
      foreach (bm[i]) bm[i] = 0;
      st = '0; st_known = 1; avail = 0;
    endfunction

    // may the module write its register file this cycle?
    function bit write_ok();
      int c = 0;
      if (full) return 1;
      for (int i = 0; i < n - 1; i++) c += int'(lv[i]);
      return c < m;
    endfunction

    // transactions on a link within the last c cycles (saturated), and error
    function int xacts_in(int link, int c, output bit err);
      int x = 0;
      for (int i = 0; i < c && i < n; i++) x += int'(tm[link][i]);
      err = x > tmax;
      return err ? tmax : x;
    endfunction

    // cycles back to the x-th transaction on a link; n and err if too few
    function int cycles_for(int link, int x, output bit err);
      int c = 0;
      err = 0;
      if (x == 0) return 0;
      for (int i = 0; i < n; i++) begin
        c += int'(tm[link][i]);
        if (c == x) return i + 1;
      end
      err = 1;
      return n;
    endfunction

    function void step(bit we, int a, logic [31:0] d, bit st_load, logic [31:0] st_d, bit xact [4]);
      for (int i = 15; i > 0; i--) begin
        lv[i] = lv[i-1]; la[i] = la[i-1]; lo[i] = lo[i-1]; lk[i] = lk[i-1];
      end
      lv[0] = we; la[0] = a; lo[0] = arch[a]; lk[0] = known[a];
      if (we) begin arch[a] = d; known[a] = 1; end
      for (int k = 16; k > 1; k--) begin hist[k] = hist[k-1]; hk[k] = hk[k-1]; end
      hist[1] = st; hk[1] = st_known;
      if (avail < n) avail++;
      if (st_load) begin st = st_d; st_known = 1; end
      for (int l = 0; l < nlink; l++) begin
        for (int i = 15; i > 0; i--) tm[l][i] = tm[l][i-1];
        tm[l][0] = xact[l];
      end
    endfunction

    function void rollback(int c);
      for (int i = 0; i < c; i++)
        if (lv[i]) begin arch[la[i]] = lo[i]; known[la[i]] = lk[i]; lv[i] = 0; end
      if (c <= avail) begin
        st = hist[c]; st_known = hk[c];
        for (int k = 1; k + c <= 16; k++) begin hist[k] = hist[k + c]; hk[k] = hk[k + c]; end
        avail -= c;
      end else begin
        st_known = 0;   // deeper than the shadow registers still hold
        avail = 0;
      end
      for (int l = 0; l < nlink; l++)
        for (int i = 0; i < c; i++) tm[l][i] = 0;
    endfunction
    // own transactions among the last g bus transactions (saturated)
    function int bus_priv(int g, output bit err);
      int p = 0;
      for (int i = 0; i < g && i < nb; i++) p += int'(bm[i]);
      err = p > tmax;
      return err ? tmax : p;
    endfunction

    // bus transactions back to the p-th own one; nb and err if too few
    function int bus_reach(int p, output bit err);
      int c = 0;
      err = 0;
      if (p == 0) return 0;
      for (int i = 0; i < nb; i++) begin
        c += int'(bm[i]);
        if (c == p) return i + 1;
      end
      err = 1;
      return nb;
    endfunction

    function void bus_shift(bit own);
      for (int i = 15; i > 0; i--) bm[i] = bm[i-1];
      bm[0] = own;
    endfunction

    function void bus_clear(int g);
      for (int i = 0; i < g; i++) bm[i] = 0;
    endfunction

    // What a bus-attached module does in one clock (before the edge).
    function void bus_plan(bit tick, bit lreq, int lcyc, bit in_v, int in_g,
                           output int c, output bit apply, output bit txv,
                           output int txg, output int rbg, output bit err);
      bit e1, e2, e3, e4, lerr;
      int p, crx, lc;
      lc = 0; lerr = 0;
      if (lreq && lcyc != 0) begin
        lerr = lcyc > n;
        lc = lerr ? n : lcyc;
      end
      p = bus_priv(in_v ? in_g : 0, e1);
      crx = cycles_for(0, p, e2);
      c = lc;
      if (in_v && crx > c) c = crx;
      apply = tick && c != 0;
      p = xacts_in(0, lc != 0 ? c : 0, e3);
      txg = bus_reach(p, e4);
      txv = apply && lc != 0 && txg != 0;
      rbg = in_v ? in_g : 0;
      if (lc != 0 && txg > rbg) rbg = txg;
      err = (tick && lerr) || (apply && lc != 0 && (e3 || e4)) || (tick && in_v && (e1 || e2));
    endfunction

  endclass

endpackage
