// sm_tb_pkg: rule compiler and reference matcher for the string matching
// testbenches.
//
// ac_compiler turns a list of strings into the three memory images that a
// string matching block searches with, independently of the RTL:
//   1. builds the Aho-Corasick trie and its full move function delta(S, c)
//      (the longest suffix of label(S)+c that is a trie node);
//   2. fills the default-pointer lookup table: a depth-1 bit per character,
//      the four most pointed-to depth-2 states and the most pointed-to depth-3
//      state ending in each character;
//   3. for each state keeps only the pointers where the default transition
//      (worked out from the state's own label) would reach another state;
//   4. places the states: default targets at their fixed words (type 15),
//      the others packed by pointer count into types 1..15, large states
//      first, so that smaller states fill the space they leave; fixed words
//      that no table entry can reach are used for these too;
//   5. writes the matching string numbers, two per word, sorted ascending.
// Unused depth-2 / depth-3 table entries repeat the first depth-2 entry's
// character (or 0) and the fixed word they lead to holds a copy of the state
// the lower-depth default would reach, so a spurious hit lands on an
// equivalent state.
// ref_matches() is a brute-force substring search that gives the string
// numbers a packet must report, in order of end position and then number.
package sm_tb_pkg;
  import sm_pkg::*;

  typedef byte unsigned bytes_t[$];
  typedef int unsigned  ids_t[$];

  class ac_compiler;
    // input
    string       pats[$];
    int          id_base = 0;   // string i is reported as id_base + i + 1
    // trie
    int          go[$];        // node*256 + c -> node, -1 none
    int          dep[$];
    bytes_t      lbl[$];
    int          fail[$];
    ids_t        outs[$];
    int          delta[$];     // full move function
    int          nnodes;
    // lookup table (node ids; -1 none; -2 = copy of lower default)
    bit          d1[256];
    byte unsigned d2c[256][ND2];
    int          d2n[256][ND2];  // node whose content sits at the d2 word (-1 root)
    bit          d2real[256][ND2];
    byte unsigned d3c2[256], d3c1[256];
    int          d3n[256];
    bit          d3real[256];
    // placement
    int          home_addr[$];
    int          home_type[$];
    int          nptr[$];
    int          ptr_c[$][$];
    int          ptr_t_node[$][$];
    int          maddr[$];
    // images
    logic [WORD_W-1:0]  sm_img[int];
    logic [LUT_W-1:0]   lut_img[256];
    logic [MWORD_W-1:0] mm_img[$];
    int          sm_words;
    int          n_ptrs_total;
    int          max_ptrs;
    int          too_many;      // states that needed more than MAX_PTRS pointers
    longint      n_orig_total;  // pointers of the plain move function (to non-start states)
    int          n_dflt;        // default pointers in use (depth 1 + 2 + 3)
    int          type_used[16];

    function int new_node(bytes_t l);
      int n;
      n = nnodes++;
      for (int c = 0; c < 256; c++) go.push_back(-1);
      dep.push_back(l.size());
      lbl.push_back(l);
      fail.push_back(0);
      begin
        ids_t none;
        outs.push_back(none);
      end
      return n;
    endfunction

    function void add(string s);
      pats.push_back(s);
    endfunction

    // default transition of the hardware, from the state's label
    function int dflt(int s, int c);
      int d;
      byte unsigned p1, p2;
      d = dep[s];
      if (d >= 1) p1 = lbl[s][d-1];
      if (d >= 2) p2 = lbl[s][d-2];
      if (d >= 2 && d3c2[c] == p2 && d3c1[c] == p1) return d3n[c];
      if (d >= 1)
        for (int k = 0; k < ND2; k++)
          if (d2c[c][k] == p1) return d2n[c][k];
      return d1[c] ? go[c] : 0;
    endfunction

    // next word for the packer: a free fixed word, else the next word above
    int free_w[$];
    function int new_word();
      if (free_w.size() > 0) return free_w.pop_front();
      return sm_words++;
    endfunction

    function void put_state(int addr, int t, int s);
      logic [WORD_W-1:0] w;
      int off;
      w = sm_img.exists(addr) ? sm_img[addr] : '0;
      off = int'(type_offset(t));
      if (s > 0) begin
        if (outs[s].size() > 0) begin
          w[off + 11] = 1'b1;
          w[off +: 11] = 11'(maddr[s]);
        end
        for (int i = 0; i < nptr[s]; i++) begin
          ptr_t p;
          p.ch    = 8'(ptr_c[s][i]);
          p.addr  = 12'(home_addr[ptr_t_node[s][i]]);
          p.stype = 4'(home_type[ptr_t_node[s][i]]);
          w[off + HDR_W + PTR_W * i +: PTR_W] = p;
        end
      end
      sm_img[addr] = w;
    endfunction

    function void build();
      int q[$];
      int cnt[$];
      bytes_t root_lbl;
      nnodes = 0;
      void'(new_node(root_lbl));
      // trie
      foreach (pats[i]) begin
        int s;
        bytes_t l;
        s = 0;
        for (int j = 0; j < pats[i].len(); j++) begin
          int c;
          c = int'(pats[i][j]);
          l.push_back(8'(c));
          if (go[s*256 + c] < 0) begin
            int n;
            n = new_node(l);
            go[s*256 + c] = n;
          end
          s = go[s*256 + c];
        end
        outs[s].push_back(id_base + i + 1);
      end
      // failure links in BFS order, then the move function
      for (int c = 0; c < 256; c++) delta.push_back(0);
      for (int n = 1; n < nnodes; n++) for (int c = 0; c < 256; c++) delta.push_back(0);
      for (int c = 0; c < 256; c++) begin
        if (go[c] >= 0) begin
          delta[c] = go[c];
          fail[go[c]] = 0;
          q.push_back(go[c]);
        end else delta[c] = 0;
      end
      while (q.size() > 0) begin
        int s;
        s = q.pop_front();
        foreach (outs[fail[s]][k]) outs[s].push_back(outs[fail[s]][k]);
        for (int c = 0; c < 256; c++) begin
          if (go[s*256 + c] >= 0) begin
            int n;
            n = go[s*256 + c];
            fail[n] = delta[fail[s]*256 + c];
            delta[s*256 + c] = n;
            q.push_back(n);
          end else delta[s*256 + c] = delta[fail[s]*256 + c];
        end
      end
      foreach (outs[s]) outs[s].sort();
      // how often each state is pointed to
      for (int n = 0; n < nnodes; n++) cnt.push_back(0);
      for (int s = 0; s < nnodes; s++)
        for (int c = 0; c < 256; c++) cnt[delta[s*256 + c]]++;
      // lookup table
      for (int c = 0; c < 256; c++) begin
        int cand[$];
        int best3;
        d1[c] = go[c] >= 0;
        for (int n = 1; n < nnodes; n++)
          if (dep[n] == 2 && int'(lbl[n][1]) == c) cand.push_back(n);
        cand.sort() with (-cnt[item] * 65536 + item);
        for (int k = 0; k < ND2; k++) begin
          if (k < cand.size()) begin
            d2real[c][k] = 1;
            d2n[c][k]    = cand[k];
            d2c[c][k]    = lbl[cand[k]][0];
          end else begin
            d2real[c][k] = 0;
            d2c[c][k]    = (k > 0) ? d2c[c][0] : 8'd0;
            d2n[c][k]    = (k > 0) ? d2n[c][0] : (d1[c] ? go[c] : 0);
          end
        end
        best3 = -1;
        for (int n = 1; n < nnodes; n++)
          if (dep[n] == 3 && int'(lbl[n][2]) == c)
            if (best3 < 0 || cnt[n] > cnt[best3]) best3 = n;
        if (best3 >= 0) begin
          d3real[c] = 1;
          d3n[c]  = best3;
          d3c2[c] = lbl[best3][0];
          d3c1[c] = lbl[best3][1];
        end else begin
          d3real[c] = 0;
          d3c2[c] = 8'd0;
          d3c1[c] = d2c[c][0];
          d3n[c]  = d2n[c][0];
        end
        lut_img[c] = {d3c2[c], d3c1[c], d2c[c][3], d2c[c][2], d2c[c][1], d2c[c][0], d1[c]};
      end
      // stored pointers
      n_ptrs_total = 0;
      max_ptrs = 0;
      too_many = 0;
      n_orig_total = 0;
      n_dflt = 0;
      for (int i = 0; i < nnodes * 256; i++) if (delta[i] != 0) n_orig_total++;
      for (int c = 0; c < 256; c++) begin
        n_dflt += int'(d1[c]) + int'(d3real[c]);
        for (int k = 0; k < ND2; k++) n_dflt += int'(d2real[c][k]);
      end
      for (int s = 0; s < nnodes; s++) begin
        int pc[$], pn[$];
        for (int c = 0; c < 256; c++) begin
          int t, d;
          t = delta[s*256 + c];
          d = dflt(s, c);
          if (t != d) begin
            if (t == 0) $fatal(1, "compiler: pointer to the start state needed");
            pc.push_back(c);
            pn.push_back(t);
          end
        end
        ptr_c.push_back(pc);
        ptr_t_node.push_back(pn);
        nptr.push_back(pc.size());
        n_ptrs_total += pc.size();
        if (pc.size() > max_ptrs) max_ptrs = pc.size();
        if (pc.size() > MAX_PTRS) begin
          too_many++;
          while (pc.size() > MAX_PTRS) begin
            void'(pc.pop_back());
            void'(pn.pop_back());
          end
          nptr[s] = MAX_PTRS;
        end
      end
      // homes
      for (int s = 0; s < nnodes; s++) begin
        home_addr.push_back(-1);
        home_type.push_back(0);
      end
      for (int c = 0; c < 256; c++) begin
        if (d1[c]) begin home_addr[go[c]] = d1_addr(8'(c)); home_type[go[c]] = 15; end
        for (int k = 0; k < ND2; k++)
          if (d2real[c][k]) begin home_addr[d2n[c][k]] = d2_addr(8'(c), k); home_type[d2n[c][k]] = 15; end
        if (d3real[c]) begin home_addr[d3n[c]] = d3_addr(8'(c)); home_type[d3n[c]] = 15; end
      end
      // Pack the other states without gaps: large states first, each in a
      // word of its own; the space they leave (units of 36 bits) takes
      // medium states (a type-13 word has room for a type 12) and small ones;
      // then medium states three to a word, then small states nine to a word.
      // Fixed words that no table entry can reach (depth-1 words of bytes
      // with no depth-1 state, unused depth-2 entries other than entry 0)
      // are free for other states.
      sm_words = N_RESERVED;
      free_w.delete();
      for (int c = 0; c < 256; c++) begin
        if (!d1[c]) free_w.push_back(d1_addr(8'(c)));
        for (int k = 1; k < ND2; k++)
          if (!d2real[c][k]) free_w.push_back(d2_addr(8'(c), k));
      end
      begin
        int med_w[$], med_t[$], sml_w[$], sml_t[$];
        for (int s = 1; s < nnodes; s++) begin
          int w;
          if (home_addr[s] >= 0 || nptr[s] <= 4) continue;
          w = new_word();
          home_addr[s] = w;
          if (nptr[s] <= 7) begin
            home_type[s] = 13;
            sml_w.push_back(w); sml_t.push_back(6);
            med_w.push_back(w); med_t.push_back(12);
          end else if (nptr[s] <= 10) begin
            home_type[s] = 14;
            sml_w.push_back(w); sml_t.push_back(8);
            sml_w.push_back(w); sml_t.push_back(9);
          end else begin
            home_type[s] = 15;
          end
        end
        for (int s = 1; s < nnodes; s++) begin
          if (home_addr[s] >= 0 || nptr[s] <= 1) continue;
          if (med_w.size() == 0) begin
            int w;
            w = new_word();
            for (int t = 10; t <= 12; t++) begin med_w.push_back(w); med_t.push_back(t); end
          end
          home_addr[s] = med_w.pop_front();
          home_type[s] = med_t.pop_front();
        end
        // unused medium slots become three small slots each
        while (med_w.size() > 0) begin
          int w, t;
          w = med_w.pop_front();
          t = med_t.pop_front();
          for (int k = 0; k < 3; k++) begin sml_w.push_back(w); sml_t.push_back(3 * (t - 10) + 1 + k); end
        end
        for (int s = 1; s < nnodes; s++) begin
          if (home_addr[s] >= 0) continue;
          if (sml_w.size() == 0) begin
            int w;
            w = new_word();
            for (int t = 1; t <= 9; t++) begin sml_w.push_back(w); sml_t.push_back(t); end
          end
          home_addr[s] = sml_w.pop_front();
          home_type[s] = sml_t.pop_front();
        end
      end
      // match numbers
      for (int s = 0; s < nnodes; s++) begin
        maddr.push_back(-1);
        if (outs[s].size() > 0) begin
          maddr[s] = mm_img.size();
          for (int i = 0; i < outs[s].size(); i += 2) begin
            mword_t m;
            m.num0 = 13'(outs[s][i]);
            m.num1 = (i + 1 < outs[s].size()) ? 13'(outs[s][i+1]) : 13'd0;
            m.last = (i + 2 >= outs[s].size());
            mm_img.push_back(m);
          end
        end
      end
      // state-machine image
      for (int s = 1; s < nnodes; s++) begin
        put_state(home_addr[s], home_type[s], s);
        type_used[home_type[s]]++;
      end
      for (int c = 0; c < 256; c++) begin
        if (!d2real[c][0]) put_state(d2_addr(8'(c), 0), 15, d2n[c][0] > 0 ? d2n[c][0] : 0);
        if (!d3real[c])    put_state(d3_addr(8'(c)), 15, d3n[c] > 0 ? d3n[c] : 0);
      end
    endfunction
  endclass

  // brute-force reference: string numbers found in a packet, in order
  function automatic ids_t ref_matches(ref string pats[$], input bytes_t pkt);
    ids_t r;
    for (int e = 0; e < pkt.size(); e++)
      foreach (pats[i]) begin
        int L;
        bit ok;
        L = pats[i].len();
        if (L == 0 || L > e + 1) continue;
        ok = 1;
        for (int j = 0; j < L; j++)
          if (pkt[e - L + 1 + j] != byte'(pats[i][j])) ok = 0;
        if (ok) r.push_back(i + 1);
      end
    return r;
  endfunction

  // random pattern over a small alphabet, so that strings overlap a lot
  function automatic string rand_pat(int minlen, int maxlen, int nalpha);
    string s;
    int L;
    L = minlen + int'($urandom_range(maxlen - minlen));
    s = "";
    for (int i = 0; i < L; i++) s = {s, string'(8'(97 + $urandom_range(nalpha - 1)))};
    return s;
  endfunction

  // random packet made of alphabet characters and pieces of the patterns
  function automatic bytes_t rand_pkt(ref string pats[$], input int len, input int nalpha);
    bytes_t p;
    while (p.size() < len) begin
      if ($urandom_range(3) == 0 && pats.size() > 0) begin
        string s;
        s = pats[$urandom_range(pats.size() - 1)];
        for (int j = 0; j < s.len() && p.size() < len; j++) p.push_back(byte'(s[j]));
      end else begin
        p.push_back(8'(97 + $urandom_range(nalpha - 1)));
      end
    end
    return p;
  endfunction

endpackage
