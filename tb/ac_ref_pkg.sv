// ac_ref_pkg: behavioural reference for the testbenches. It holds a plain
// weighted history model (an occurrence count per symbol and a queue of the
// last M symbols) and a reference encoder. The reference encoder uses one
// 64-bit addition for C and renormalizes by doubling A until it reaches 0.75.
// It does not use the banked array, the guard counter or the leading-one
// logic of the RTL, so it checks them independently.
package ac_ref_pkg;

  class ref_model;
    int unsigned nsym, m, wlog2, totlog2;
    int unsigned occ[];
    int unsigned hist[$];   // hist[0] newest
    int unsigned mps;

    function new(int unsigned nsym_ = 256, int unsigned m_ = 112, int unsigned wlog2_ = 4);
      nsym = nsym_; m = m_; wlog2 = wlog2_;
      totlog2 = $clog2(nsym + (m << wlog2));
      reset();
    endfunction

    function void reset();
      occ = new[nsym];
      foreach (occ[i]) occ[i] = 0;
      hist.delete();
      for (int unsigned i = 0; i < m; i++) begin
        hist.push_back((i * nsym) / m);
        occ[(i * nsym) / m]++;
      end
      mps = 0;
    endfunction

    function int unsigned q(int unsigned x);
      int unsigned c = 0;
      for (int unsigned j = 0; j < x; j++) c += occ[j];
      return (c << wlog2) + x;
    endfunction

    function int unsigned n(int unsigned x);
      return (occ[x] << wlog2) + 1;
    endfunction

    // largest x with q(x) <= t
    function int unsigned search(int unsigned t);
      int unsigned r = 0;
      for (int unsigned x = 0; x < nsym; x++) if (q(x) <= t) r = x;
      return r;
    endfunction

    function void update(int unsigned cur);
      int unsigned prev = hist[m-1];
      void'(hist.pop_back());
      hist.push_front(cur);
      occ[prev]--;
      occ[cur]++;
      if (cur != mps && occ[cur] > occ[mps]) mps = cur;
    endfunction
  endclass

  class ref_encoder;
    ref_model mdl;
    longint unsigned a;
    logic [63:0] c;
    int unsigned skip;
    bit bits[$];

    function new(ref_model mdl_);
      mdl = mdl_;
      a = 'h8000; c = '0; skip = 48;
    endfunction

    function void emit(bit b);
      if (skip > 0) skip--; else bits.push_back(b);
    endfunction

    // Returns the renormalization shift used.
    function int unsigned encode(int unsigned x);
      int unsigned sh, s;
      longint unsigned e, add, anew;
      sh = (a >= 'h8000) ? 15 - mdl.totlog2 : 14 - mdl.totlog2;
      e = a - (longint'(1) << (mdl.totlog2 + sh));
      add  = (longint'(mdl.q(x)) << sh) + ((x > mdl.mps) ? e : 0);
      anew = (longint'(mdl.n(x)) << sh) + ((x == mdl.mps) ? e : 0);
      c = c + add;
      s = 0;
      while (anew < 'h6000) begin
        anew = anew << 1;
        emit(c[63]);
        c = c << 1;
        s++;
      end
      a = anew;
      mdl.update(x);
      return s;
    endfunction

    function void flush();
      for (int i = 0; i < 64; i++) begin
        emit(c[63]);
        c = c << 1;
      end
      while (bits.size() % 16 != 0) bits.push_back(1'b0);
    endfunction
  endclass
endpackage
