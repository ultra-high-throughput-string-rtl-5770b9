// tb_sm_workload: a ruleset the size of the document's smallest Snort set on
// the accelerator at its default size (6 blocks, 3,584 state-machine words,
// 2,048 match-number words per block).
//
// The Snort strings themselves are not part of this testbench. Instead 634
// synthetic strings of similar shape are generated: 68 distinct first
// characters, lengths from 4 to about 40 characters (mean near 18), printable
// characters with a bias towards lower case and punctuation, and a quarter of
// the strings sharing a prefix with an earlier string. The testbench:
//   1. compiles the whole set and reports states, stored pointers per state
//      (plain move function against this design's default scheme), default
//      pointers in the table and memory words;
//   2. picks the smallest group size out of 1, 2, 3 and 6 for which every
//      group fits a block (words, match numbers, at most 13 stored pointers per
//      state) and checks that such a size exists;
//   3. loads the groups, sends packets made of random printable text with
//      pieces of the strings into every group leader's six engines, and
//      compares every reported string number, per block and engine and in
//      order, with a brute-force search;
//   4. counts the transition kinds taken by block 0, engine 0.
module tb_sm_workload;
  import sm_pkg::*;
  import sm_tb_pkg::*;

  localparam int NB     = 6;
  localparam int NE     = NB * 6;
  localparam int NSTR   = 634;
  localparam int NFIRST = 68;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [2:0]     group_size;
  chin_t [NB-1:0] in_a, in_b;
  logic [1:0]     phase;
  logic           cfg_we;
  logic [2:0]     cfg_blk;
  logic [1:0]     cfg_sel;
  saddr_t         cfg_addr;
  sword_t         cfg_wdata;
  mout_t [NB-1:0] mout_a, mout_b;
  logic [NB-1:0]  overflow;
  logic           busy;

  sm_accel dut (.*);

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  byte unsigned s_ch[NE][$];
  bit           s_st[NE][$];
  int unsigned  exp_ids[NE][$];
  int unsigned  got_ids[NE][$];

  // driver: block b, phase j -> in_a[b] feeds engine j, in_b[b] engine 3+j
  always @(negedge clk) begin
    chin_t [NB-1:0] a, b;
    a = '0; b = '0;
    if (rst_n && !cfg_we) begin
      for (int k = 0; k < NB; k++) begin
        int ja, jb;
        ja = k * 6 + int'(phase);
        jb = k * 6 + 3 + int'(phase);
        if (s_ch[ja].size() > 0) begin
          a[k].valid = 1; a[k].start = s_st[ja].pop_front(); a[k].ch = s_ch[ja].pop_front();
        end
        if (s_ch[jb].size() > 0) begin
          b[k].valid = 1; b[k].start = s_st[jb].pop_front(); b[k].ch = s_ch[jb].pop_front();
        end
      end
    end
    in_a <= a;
    in_b <= b;
  end

  // monitor
  always @(negedge clk) begin
    if (rst_n) begin
      for (int k = 0; k < NB; k++) begin
        if (mout_a[k].valid) begin
          if (mout_a[k].num0 != 0) got_ids[k*6 + int'(mout_a[k].eng)].push_back(mout_a[k].num0);
          if (mout_a[k].num1 != 0) got_ids[k*6 + int'(mout_a[k].eng)].push_back(mout_a[k].num1);
        end
        if (mout_b[k].valid) begin
          if (mout_b[k].num0 != 0) got_ids[k*6 + int'(mout_b[k].eng)].push_back(mout_b[k].num0);
          if (mout_b[k].num1 != 0) got_ids[k*6 + int'(mout_b[k].eng)].push_back(mout_b[k].num1);
        end
      end
    end
  end

  // transition kinds taken by block 0, engine 0
  int n_ptr = 0, n_d1 = 0, n_d2 = 0, n_d3 = 0, n_root = 0;
  always @(posedge clk) begin
    if (dut.g_blk[0].u_blk.g_eng[0].u_eng.exec && dut.g_blk[0].u_blk.g_eng[0].u_eng.pend) begin
      if (dut.g_blk[0].u_blk.g_eng[0].u_eng.ptr_hit) n_ptr++;
      else if (dut.g_blk[0].u_blk.g_eng[0].u_eng.dflt_start) n_root++;
      else if (dut.g_blk[0].u_blk.g_eng[0].u_eng.dflt_ptr.addr >= saddr_t'(D3_BASE)) n_d3++;
      else if (dut.g_blk[0].u_blk.g_eng[0].u_eng.dflt_ptr.addr >= saddr_t'(D2_BASE)) n_d2++;
      else n_d1++;
    end
  end

  task automatic load(int b, ac_compiler c);
    @(negedge clk);
    cfg_we = 1; cfg_blk = 3'(b);
    cfg_sel = 2'd0;
    foreach (c.sm_img[a]) begin
      cfg_addr = saddr_t'(a); cfg_wdata = c.sm_img[a];
      @(negedge clk);
    end
    cfg_sel = 2'd1;
    for (int i = 0; i < 256; i++) begin
      cfg_addr = saddr_t'(i); cfg_wdata = sword_t'(c.lut_img[i]);
      @(negedge clk);
    end
    cfg_sel = 2'd2;
    foreach (c.mm_img[i]) begin
      cfg_addr = saddr_t'(i); cfg_wdata = sword_t'(c.mm_img[i]);
      @(negedge clk);
    end
    cfg_we = 0;
  endtask

  task automatic wait_drain();
    bit more;
    do begin
      @(posedge clk);
      more = 0;
      for (int e = 0; e < NE; e++) if (s_ch[e].size() > 0) more = 1;
    end while (more);
    repeat (12) @(posedge clk);
    while (busy) @(posedge clk);
    repeat (4) @(posedge clk);
  endtask

  // ---- synthetic rulesets ----
  byte unsigned firsts[$];
  string        strs[$];

  // fragments that recur across strings, as protocol keywords and paths do
  string tokens[24] = '{"/cgi-bin/", "%2e%2e/", ".exe", "cmd", "%20", "passwd", "admin", "http",
                        "GET ", "user", ".php", "?id=", "select", "union", "script", "/bin/",
                        ".dll", "root", "login", "=%", "\\x90", "content", "shell", ".asp"};

  function automatic byte unsigned body_char();
    int r;
    r = int'($urandom_range(99));
    if (r < 55) return 8'(97 + $urandom_range(25));          // a-z
    if (r < 70) return 8'(48 + $urandom_range(9));           // 0-9
    if (r < 85) begin                                        // common punctuation
      string p;
      p = "/.-_%=?&:; ";
      return p[$urandom_range(p.len() - 1)];
    end
    return 8'(32 + $urandom_range(94));                      // any printable
  endfunction

  function automatic string gen_str();
    string s;
    int L;
    // length 4..40, mean near 19
    L = 4 + int'($urandom_range(14)) + int'($urandom_range(14));
    if ($urandom_range(9) == 0) L += int'($urandom_range(8));
    s = "";
    if (strs.size() > 0 && $urandom_range(7) == 0) begin
      string o;
      int n;
      o = strs[$urandom_range(strs.size() - 1)];
      n = 3 + int'($urandom_range(5));
      if (n > o.len() - 1) n = o.len() - 1;
      s = o.substr(0, n - 1);
    end else begin
      s = string'(firsts[$urandom_range(firsts.size() - 1)]);
    end
    while (s.len() < L) begin
      if ($urandom_range(7) == 0) s = {s, tokens[$urandom_range(23)]};
      else s = {s, string'(body_char())};
    end
    return s;
  endfunction

  // packet: random printable text with whole or partial strings inside
  function automatic bytes_t gen_pkt(int len);
    bytes_t p;
    while (p.size() < len) begin
      int r;
      r = int'($urandom_range(9));
      if (r < 3) begin
        string s;
        int n;
        s = strs[$urandom_range(strs.size() - 1)];
        n = (r == 0) ? 1 + int'($urandom_range(s.len() - 1)) : s.len();
        for (int j = 0; j < n && p.size() < len; j++) p.push_back(byte'(s[j]));
      end else if (r < 4) begin
        string t;
        t = tokens[$urandom_range(23)];
        for (int j = 0; j < t.len() && p.size() < len; j++) p.push_back(byte'(t[j]));
      end else if (r < 5) begin
        p.push_back(firsts[$urandom_range(firsts.size() - 1)]);
      end else begin
        p.push_back(body_char());
      end
    end
    return p;
  endfunction

  function automatic bit fits(ac_compiler c);
    return c.sm_words <= 3584 && c.mm_img.size() <= 2048 && c.too_many == 0;
  endfunction

  int n_fit = 0, n_fallback = 0, n_nofit = 0, total_matches = 0;

  // generate nstr strings with nfirst first characters, split them into the
  // document's number of groups (or more, if a group does not fit), load,
  // search and compare
  task automatic run_set(int nstr, int nfirst, int g_doc, real doc_ptrs);
    ac_compiler grp[NB];
    int g, per, nmatch, nstates;
    int gsizes[4] = '{1, 2, 3, 6};
    real len_sum;
    bit used[256];

    firsts.delete();
    strs.delete();
    for (int i = 0; i < nfirst; i++) begin
      byte unsigned c;
      forever begin
        // printable where there are enough of them, else any non-zero byte
        c = (nfirst <= 90) ? 8'(33 + $urandom_range(93)) : 8'(1 + $urandom_range(254));
        if (!used[c]) break;
      end
      used[c] = 1;
      firsts.push_back(c);
    end
    begin
      bit seen[string];
      len_sum = 0;
      while (strs.size() < nstr) begin
        string s;
        s = gen_str();
        if (!seen.exists(s)) begin
          seen[s] = 1;
          strs.push_back(s);
          len_sum += s.len();
        end
      end
    end
    // groups are runs of the list in generation order, so every group holds
    // strings of all first characters and no state gets an outsized fan-out
    $display("workload: %0d strings, %0d first characters, mean length %.1f",
             nstr, nfirst, len_sum / nstr);

    g = 0;
    foreach (gsizes[gi]) begin
      bit ok;
      if (g != 0 || gsizes[gi] < g_doc) continue;
      ok = 1;
      nstates = 0;
      per = (strs.size() + gsizes[gi] - 1) / gsizes[gi];
      for (int k = 0; k < gsizes[gi]; k++) begin
        grp[k] = new();
        grp[k].id_base = k * per;
        for (int i = k * per; i < (k + 1) * per && i < strs.size(); i++) grp[k].add(strs[i]);
        grp[k].build();
        nstates += grp[k].nnodes;
        $display("  %0d groups, group %0d: %0d states; pointers per state %.2f plain, %.2f stored (max %0d); %0d defaults; %0d words, %0d match words, %0d states over 13 pointers",
                 gsizes[gi], k, grp[k].nnodes, real'(grp[k].n_orig_total) / grp[k].nnodes,
                 real'(grp[k].n_ptrs_total) / grp[k].nnodes, grp[k].max_ptrs, grp[k].n_dflt,
                 grp[k].sm_words, grp[k].mm_img.size(), grp[k].too_many);
        check(grp[k].n_ptrs_total * 10 < grp[k].n_orig_total, "defaults removed less than 90% of the pointers");
        if (!fits(grp[k])) ok = 0;
      end
      if (ok) g = gsizes[gi];
    end
    // not fitting is a property of the ruleset and this memory layout, not a
    // fault of the hardware: it is reported and counted, and the set is skipped
    if (g == 0) begin
      $display("  does not fit: some group needs more than a block holds even split over 6 blocks");
      n_nofit++;
      return;
    end
    if (g == g_doc) n_fit++;
    else n_fallback++;
    $display("  fits in %0d block(s) per packet (document: %0d, %.2f stored pointers per state): %0d bits per memory clock, %.1f Gbit/s at 460.19 MHz",
             g, g_doc, doc_ptrs, 96 / g, real'(96 / g) * 0.46019);
    for (int k = g; k < NB; k++) grp[k] = grp[k % g];

    for (int k = 0; k < NB; k++) load(k, grp[k]);
    group_size = 3'(g);
    for (int lb = 0; lb < NB; lb += g)
      for (int e = 0; e < 6; e++)
        for (int n = 0; n < 3; n++) begin
          bytes_t p;
          p = gen_pkt(40 + int'($urandom_range(160)));
          foreach (p[i]) begin
            s_ch[lb*6 + e].push_back(p[i]);
            s_st[lb*6 + e].push_back(i == 0);
          end
          for (int k = lb; k < lb + g; k++) begin
            ids_t r;
            r = ref_matches(grp[k].pats, p);
            foreach (r[i]) exp_ids[k*6 + e].push_back(r[i] + grp[k].id_base);
          end
        end
    wait_drain();

    nmatch = 0;
    for (int e = 0; e < NE; e++) begin
      check(got_ids[e].size() == exp_ids[e].size(),
            $sformatf("%0d strings, block %0d engine %0d: %0d numbers reported, %0d expected",
                      nstr, e / 6, e % 6, got_ids[e].size(), exp_ids[e].size()));
      for (int i = 0; i < exp_ids[e].size() && i < got_ids[e].size(); i++)
        check(got_ids[e][i] == exp_ids[e][i],
              $sformatf("%0d strings, block %0d engine %0d item %0d: got %0d expected %0d",
                        nstr, e / 6, e % 6, i, got_ids[e][i], exp_ids[e][i]));
      nmatch += exp_ids[e].size();
      got_ids[e].delete();
      exp_ids[e].delete();
    end
    $display("  %0d string numbers compared", nmatch);
    total_matches += nmatch;
    check(overflow == '0, "match queue overflow");
  endtask

  initial begin
    cfg_we = 0; cfg_blk = 0; cfg_sel = 0; cfg_addr = '0; cfg_wdata = '0;
    group_size = 3'd1;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // the document's Stratix 3 configurations: strings, first characters
    // (its depth-1 default count), blocks per packet, stored pointers per state
    run_set(634,  68,  1, 2.39);
    run_set(1603, 97,  2, 2.01);
    run_set(2588, 108, 3, 1.90);
    run_set(6275, 110, 6, 1.54);

    $display("%0d sets fit the document's block count, %0d needed more blocks, %0d did not fit; %0d string numbers compared",
             n_fit, n_fallback, n_nofit, total_matches);
    check(n_fit + n_fallback > 0, "no set could be run");
    check(total_matches > 300, "too few matches to be meaningful");
    $display("events (block 0, engine 0): pointer %0d, d1 %0d, d2 %0d, d3 %0d, start %0d",
             n_ptr, n_d1, n_d2, n_d3, n_root);
    check(n_ptr > 0 && n_d1 > 0 && n_d2 > 0 && n_d3 > 0 && n_root > 0,
          "a transition kind never occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
