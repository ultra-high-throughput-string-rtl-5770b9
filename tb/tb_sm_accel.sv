// tb_sm_accel: end-to-end testbench of the accelerator at its default size
// (6 blocks, 3,584 state-machine words each, no parameter overridden).
//
// Rulesets are compiled by sm_tb_pkg::ac_compiler and loaded through the
// configuration port; packets go in on the multiplexed streams; every string
// number that comes out is compared, per block and engine and in order, with a
// brute-force search. The run covers the modes the design is used in:
//   1. group size 1: a small ruleset in every block, each block searching its
//      own packets with all 36 engines busy and no idle slots; the time must be
//      3 cycles per character of the longest engine stream (12 characters per
//      cycle for the whole accelerator);
//   2. group sizes 2, 3 and 6: a larger ruleset split into that many groups,
//      one per block of a group; only the first block of each group is driven
//      and every block of the group must report its own share of the strings;
//   3. a ruleset whose states carry long match lists, which overflows the
//      match queue of block 0 (sticky overflow flag), then reset clears it.
// Counted, and each must occur: stored-pointer, depth-1/2/3 default and
// start-state transitions, multi-word match lists, idle input slots, each
// group size and the overflow.
module tb_sm_accel;
  import sm_pkg::*;
  import sm_tb_pkg::*;

  localparam int NB = 6;
  localparam int NE = NB * 6;

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
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  byte unsigned s_ch[NE][$];
  bit           s_st[NE][$];
  int unsigned  exp_ids[NE][$];
  int unsigned  got_ids[NE][$];
  bit           idle_en = 0;
  bit           ignore_out = 0;
  int           n_idle = 0;

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
          if (idle_en && $urandom_range(3) == 0) n_idle++;
          else begin
            a[k].valid = 1; a[k].start = s_st[ja].pop_front(); a[k].ch = s_ch[ja].pop_front(); note_pop(ja);
          end
        end
        if (s_ch[jb].size() > 0) begin
          if (idle_en && $urandom_range(3) == 0) n_idle++;
          else begin
            b[k].valid = 1; b[k].start = s_st[jb].pop_front(); b[k].ch = s_ch[jb].pop_front(); note_pop(jb);
          end
        end
      end
    end
    in_a <= a;
    in_b <= b;
  end

  // first and last cycle each engine stream was served, and how many characters
  int pop_first[NE], pop_last[NE], pop_n[NE];
  function automatic void note_pop(int e);
    if (pop_n[e] == 0) pop_first[e] = cyc;
    pop_last[e] = cyc;
    pop_n[e]++;
  endfunction
  function automatic void clear_pops();
    foreach (pop_n[e]) pop_n[e] = 0;
  endfunction

  // monitor
  always @(negedge clk) begin
    if (rst_n && !ignore_out) begin
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

  // mechanism counters
  int n_ptr = 0, n_d1 = 0, n_d2 = 0, n_d3 = 0, n_root = 0, n_multi = 0, n_ovf = 0;
  int n_grp[7];
  always @(posedge clk) begin
    if (dut.g_blk[0].u_blk.g_eng[0].u_eng.exec && dut.g_blk[0].u_blk.g_eng[0].u_eng.pend) begin
      if (dut.g_blk[0].u_blk.g_eng[0].u_eng.ptr_hit) n_ptr++;
      else if (dut.g_blk[0].u_blk.g_eng[0].u_eng.dflt_start) n_root++;
      else if (dut.g_blk[0].u_blk.g_eng[0].u_eng.dflt_ptr.addr >= saddr_t'(D3_BASE)) n_d3++;
      else if (dut.g_blk[0].u_blk.g_eng[0].u_eng.dflt_ptr.addr >= saddr_t'(D2_BASE)) n_d2++;
      else n_d1++;
    end
    if (dut.g_blk[0].u_blk.u_sched_a.cont) n_multi++;
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

  // feed packet p to engine e of block lb and expect, in every block of the
  // group, the matches of that block's share of the strings
  task automatic add_pkt(int lb, int e, int g, bytes_t p, ac_compiler grp[NB]);
    foreach (p[i]) begin
      s_ch[lb*6 + e].push_back(p[i]);
      s_st[lb*6 + e].push_back(i == 0);
    end
    for (int k = lb; k < lb + g; k++) begin
      ids_t r;
      r = ref_matches(grp[k].pats, p);
      foreach (r[i]) exp_ids[k*6 + e].push_back(r[i] + grp[k].id_base);
    end
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

  task automatic compare(string tag);
    int n;
    n = 0;
    for (int e = 0; e < NE; e++) begin
      check(got_ids[e].size() == exp_ids[e].size(),
            $sformatf("%s block %0d engine %0d: %0d numbers reported, %0d expected", tag,
                      e / 6, e % 6, got_ids[e].size(), exp_ids[e].size()));
      for (int i = 0; i < exp_ids[e].size() && i < got_ids[e].size(); i++)
        check(got_ids[e][i] == exp_ids[e][i],
              $sformatf("%s block %0d engine %0d item %0d: got %0d expected %0d", tag,
                        e / 6, e % 6, i, got_ids[e][i], exp_ids[e][i]));
      n += exp_ids[e].size();
      got_ids[e].delete();
      exp_ids[e].delete();
    end
    $display("%s: %0d string numbers compared", tag, n);
  endtask

  string big[$];

  // split the big ruleset into g groups and load group (k mod g) into block k
  task automatic run_groups(int g, int npkt);
    ac_compiler grp[NB];
    int per;
    per = (big.size() + g - 1) / g;
    for (int k = 0; k < NB; k++) begin
      int gi;
      gi = k % g;
      grp[k] = new();
      grp[k].id_base = gi * per;
      for (int i = gi * per; i < (gi + 1) * per && i < big.size(); i++) grp[k].add(big[i]);
      grp[k].build();
      load(k, grp[k]);
    end
    group_size = 3'(g);
    n_grp[g]++;
    for (int lb = 0; lb < NB; lb += g)
      for (int e = 0; e < 6; e++)
        for (int n = 0; n < npkt; n++)
          add_pkt(lb, e, g, rand_pkt(big, 1 + int'($urandom_range(60)), 9), grp);
    wait_drain();
    compare($sformatf("group size %0d", g));
  endtask

  initial begin
    ac_compiler rs_small;
    ac_compiler same[NB];
    int t0, t1, maxlen;
    cfg_we = 0; cfg_blk = 0; cfg_sel = 0; cfg_addr = '0; cfg_wdata = '0;
    group_size = 3'd1;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // 1. small ruleset in every block, group size 1, full rate
    rs_small = new();
    rs_small.add("he"); rs_small.add("she"); rs_small.add("his"); rs_small.add("hers");
    rs_small.add("hhhh"); rs_small.add("eeeeeeeeeeeeeeee");
    while (rs_small.pats.size() < 80) rs_small.add(rand_pat(2, 8, 8));
    rs_small.build();
    $display("small ruleset: %0d strings, %0d states, %0d words", rs_small.pats.size(), rs_small.nnodes, rs_small.sm_words);
    for (int k = 0; k < NB; k++) begin
      load(k, rs_small);
      same[k] = rs_small;
    end
    n_grp[1]++;
    maxlen = 0;
    clear_pops();
    for (int k = 0; k < NB; k++)
      for (int e = 0; e < 6; e++) begin
        for (int n = 0; n < 5; n++)
          add_pkt(k, e, 1, rand_pkt(rs_small.pats, 10 + int'($urandom_range(50)), 9), same);
        if (s_ch[k*6 + e].size() > maxlen) maxlen = s_ch[k*6 + e].size();
      end
    @(negedge clk);
    t0 = cyc;
    begin
      bit more;
      do begin
        @(posedge clk);
        more = 0;
        for (int e = 0; e < NE; e++) if (s_ch[e].size() > 0) more = 1;
      end while (more);
    end
    t1 = cyc;
    // every engine takes one character every 3 cycles, all 36 at once
    for (int e = 0; e < NE; e++)
      check(pop_last[e] - pop_first[e] == 3 * (pop_n[e] - 1),
            $sformatf("block %0d engine %0d: %0d characters over %0d cycles", e / 6, e % 6,
                      pop_n[e], pop_last[e] - pop_first[e] + 1));
    $display("rate: %0d cycles for the longest stream of %0d characters, 12 characters per cycle in all",
             t1 - t0, maxlen);
    wait_drain();
    compare("group size 1");

    // 2. a larger ruleset split across blocks
    idle_en = 1;
    while (big.size() < 180) big.push_back(rand_pat(2, 9, 10));
    run_groups(2, 3);
    run_groups(3, 3);
    run_groups(6, 3);

    // 3. overflow of block 0's match queue
    begin
      ac_compiler ov;
      bytes_t p;
      string s;
      ov = new();
      s = "";
      for (int i = 0; i < 24; i++) begin s = {s, "a"}; ov.add(s); end
      ov.build();
      load(0, ov);
      group_size = 3'd1;
      ignore_out = 1;
      idle_en = 0;
      for (int i = 0; i < 80; i++) p.push_back(8'd97);
      for (int e = 0; e < 3; e++)
        foreach (p[i]) begin
          s_ch[e].push_back(p[i]);
          s_st[e].push_back(i == 0);
        end
      wait_drain();
      check(overflow[0], "match queue of block 0 did not overflow");
      check(overflow[NB-1:1] == '0, "overflow flagged in an idle block");
      if (overflow[0]) n_ovf++;
      rst_n = 0;
      @(posedge clk); #1;
      rst_n = 1;
      check(overflow == '0, "reset did not clear overflow");
    end

    $display("events: pointer %0d, d1 %0d, d2 %0d, d3 %0d, start %0d, multi-word %0d, idle %0d, overflow %0d, groups 1/2/3/6: %0d/%0d/%0d/%0d",
             n_ptr, n_d1, n_d2, n_d3, n_root, n_multi, n_idle, n_ovf, n_grp[1], n_grp[2], n_grp[3], n_grp[6]);
    check(n_ptr > 0, "no stored pointer taken");
    check(n_d1 > 0, "no depth-1 default taken");
    check(n_d2 > 0, "no depth-2 default taken");
    check(n_d3 > 0, "no depth-3 default taken");
    check(n_root > 0, "no return to the start state");
    check(n_multi > 0, "no multi-word match list");
    check(n_idle > 0, "no idle slot");
    check(n_ovf > 0, "no overflow");
    check(n_grp[1] > 0 && n_grp[2] > 0 && n_grp[3] > 0 && n_grp[6] > 0, "a group size was not used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
