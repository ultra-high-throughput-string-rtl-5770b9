// tb_sm_block: self-checking testbench of one string matching block.
//
// Compiles a ruleset (the classic he/she/his/hers example plus random strings
// over a small alphabet, so that states share many suffixes) with
// sm_tb_pkg::ac_compiler, loads the three memories through the configuration
// port and then feeds six engines with streams of random packets, with random
// idle slots. Every string number reported per engine is compared, in order,
// with a brute-force search of the same packets. It also checks:
//   - the match latency: 8 cycles from the slot carrying a packet's last
//     character to the match scheduler's output, on an idle block;
//   - the rate: with no idle slots, every engine takes one character every
//     3 cycles, i.e. the block takes 2 characters per cycle;
//   - that stored pointers, all three default depths, start-state returns and
//     multi-word match lists all occurred.
module tb_sm_block;
  import sm_pkg::*;
  import sm_tb_pkg::*;

  localparam int NPAT    = 60;
  localparam int NPKT    = 6;     // packets per engine
  localparam int WATCHDOG = 200000;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  chin_t      in_a, in_b;
  logic [1:0] phase;
  logic       cfg_we;
  logic [1:0] cfg_sel;
  saddr_t     cfg_addr;
  sword_t     cfg_wdata;
  mout_t      mout_a, mout_b;
  logic [1:0] overflow;
  logic       busy;

  sm_block dut (.*);

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
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  ac_compiler comp;

  // per-engine input streams and expected / observed string numbers
  byte unsigned s_ch[6][$];
  bit           s_st[6][$];
  int unsigned  exp_ids[6][$];
  int unsigned  got_ids[6][$];
  bit           idle_en = 0;
  int           last_char_cyc[6];
  int           first_out_cyc = -1;

  // driver: in the cycle where phase == j, in_a feeds engine j, in_b engine 3+j
  always @(negedge clk) begin
    chin_t a, b;
    a = '0; b = '0;
    if (rst_n && !cfg_we) begin
      int ja, jb;
      ja = int'(phase);
      jb = 3 + int'(phase);
      if (s_ch[ja].size() > 0 && !(idle_en && $urandom_range(3) == 0)) begin
        a.valid = 1; a.start = s_st[ja].pop_front(); a.ch = s_ch[ja].pop_front(); note_pop(ja);
        if (s_ch[ja].size() == 0) last_char_cyc[ja] = cyc;
      end
      if (s_ch[jb].size() > 0 && !(idle_en && $urandom_range(3) == 0)) begin
        b.valid = 1; b.start = s_st[jb].pop_front(); b.ch = s_ch[jb].pop_front(); note_pop(jb);
        if (s_ch[jb].size() == 0) last_char_cyc[jb] = cyc;
      end
    end
    in_a <= a;
    in_b <= b;
  end

  // first and last cycle each engine stream was served, and how many characters
  int pop_first[6], pop_last[6], pop_n[6];
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
    if (rst_n) begin
      if (mout_a.valid) begin
        if (first_out_cyc < 0) first_out_cyc = cyc;
        if (mout_a.num0 != 0) got_ids[mout_a.eng].push_back(mout_a.num0);
        if (mout_a.num1 != 0) got_ids[mout_a.eng].push_back(mout_a.num1);
        if (mout_a.eng > 2) check(0, "port A reported an engine of port B");
      end
      if (mout_b.valid) begin
        if (mout_b.num0 != 0) got_ids[mout_b.eng].push_back(mout_b.num0);
        if (mout_b.num1 != 0) got_ids[mout_b.eng].push_back(mout_b.num1);
        if (mout_b.eng < 3) check(0, "port B reported an engine of port A");
      end
    end
  end

  // event counters (from the engines' internal decisions)
  int n_ptr = 0, n_d1 = 0, n_d2 = 0, n_d3 = 0, n_root = 0, n_multi = 0;
  always @(posedge clk) begin
    if (dut.g_eng[0].u_eng.exec && dut.g_eng[0].u_eng.pend) begin
      if (dut.g_eng[0].u_eng.ptr_hit) n_ptr++;
      else if (dut.g_eng[0].u_eng.dflt_start) n_root++;
      else if (dut.g_eng[0].u_eng.dflt_ptr.addr >= saddr_t'(D3_BASE)) n_d3++;
      else if (dut.g_eng[0].u_eng.dflt_ptr.addr >= saddr_t'(D2_BASE)) n_d2++;
      else n_d1++;
    end
    if (dut.u_sched_a.cont) n_multi++;
  end

  task automatic load();
    cfg_we = 1;
    cfg_sel = 2'd0;
    foreach (comp.sm_img[a]) begin
      cfg_addr = saddr_t'(a); cfg_wdata = comp.sm_img[a];
      @(posedge clk); #1;
    end
    cfg_sel = 2'd1;
    for (int c = 0; c < 256; c++) begin
      cfg_addr = saddr_t'(c); cfg_wdata = sword_t'(comp.lut_img[c]);
      @(posedge clk); #1;
    end
    cfg_sel = 2'd2;
    foreach (comp.mm_img[i]) begin
      cfg_addr = saddr_t'(i); cfg_wdata = sword_t'(comp.mm_img[i]);
      @(posedge clk); #1;
    end
    cfg_we = 0;
  endtask

  task automatic add_pkt(int e, bytes_t p);
    ids_t r;
    foreach (p[i]) begin
      s_ch[e].push_back(p[i]);
      s_st[e].push_back(i == 0);
    end
    r = ref_matches(comp.pats, p);
    foreach (r[i]) exp_ids[e].push_back(r[i]);
  endtask

  task automatic wait_drain();
    bit more;
    do begin
      @(posedge clk);
      more = 0;
      for (int e = 0; e < 6; e++) if (s_ch[e].size() > 0) more = 1;
    end while (more);
    repeat (12) @(posedge clk);
    while (busy) @(posedge clk);
    repeat (4) @(posedge clk);
  endtask

  task automatic compare(string tag);
    for (int e = 0; e < 6; e++) begin
      check(got_ids[e].size() == exp_ids[e].size(),
            $sformatf("%s engine %0d: %0d numbers reported, %0d expected", tag, e,
                      got_ids[e].size(), exp_ids[e].size()));
      for (int i = 0; i < exp_ids[e].size() && i < got_ids[e].size(); i++)
        check(got_ids[e][i] == exp_ids[e][i],
              $sformatf("%s engine %0d item %0d: got %0d expected %0d", tag, e, i,
                        got_ids[e][i], exp_ids[e][i]));
      got_ids[e] = {};
      exp_ids[e] = {};
    end
  endtask

  initial begin
    int t0, t1, nch, maxlen;
    bytes_t p;
    cfg_we = 0; cfg_sel = 0; cfg_addr = '0; cfg_wdata = '0;
    comp = new();
    comp.add("he"); comp.add("she"); comp.add("his"); comp.add("hers");
    comp.add("hhhhhh"); comp.add("aaaaaaaaaaaa");
    while (comp.pats.size() < NPAT) comp.add(rand_pat(2, 7, 8));
    comp.build();
    $display("ruleset: %0d strings, %0d states, %0d stored pointers (max %0d per state), %0d words",
             comp.pats.size(), comp.nnodes, comp.n_ptrs_total, comp.max_ptrs, comp.sm_words);
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    load();

    // 1. latency: one packet "she" on engine 0 of an idle block
    p = {"s", "h", "e"};
    add_pkt(0, p);
    wait_drain();
    check(first_out_cyc - last_char_cyc[0] == 8,
          $sformatf("match latency %0d cycles, expected 8", first_out_cyc - last_char_cyc[0]));
    compare("latency");

    // 2. rate: every engine busy, no idle slots
    nch = 0;
    maxlen = 0;
    clear_pops();
    for (int e = 0; e < 6; e++) begin
      for (int k = 0; k < NPKT; k++) begin
        p = rand_pkt(comp.pats, 20 + int'($urandom_range(40)), 9);
        nch += p.size();
        add_pkt(e, p);
      end
      if (s_ch[e].size() > maxlen) maxlen = s_ch[e].size();
    end
    @(negedge clk);
    t0 = cyc;
    begin
      bit more;
      do begin
        @(posedge clk);
        more = 0;
        for (int e = 0; e < 6; e++) if (s_ch[e].size() > 0) more = 1;
      end while (more);
    end
    t1 = cyc;
    $display("rate: %0d characters in %0d cycles, longest stream %0d", nch, t1 - t0, maxlen);
    // one character per engine every 3 cycles: the longest stream sets the time
    for (int e = 0; e < 6; e++)
      check(pop_last[e] - pop_first[e] == 3 * (pop_n[e] - 1),
            $sformatf("engine %0d: %0d characters over %0d cycles, expected 3 per character",
                      e, pop_n[e], pop_last[e] - pop_first[e] + 1));
    wait_drain();
    compare("stream");

    // 3. random idle slots, packets of all lengths including 1
    idle_en = 1;
    for (int e = 0; e < 6; e++)
      for (int k = 0; k < NPKT; k++) begin
        p = rand_pkt(comp.pats, 1 + int'($urandom_range(50)), 9);
        add_pkt(e, p);
      end
    wait_drain();
    compare("idle");

    check(overflow == 2'b00, "match queue overflow");
    $display("events (engine 0): pointer %0d, d1 %0d, d2 %0d, d3 %0d, start %0d; multi-word %0d",
             n_ptr, n_d1, n_d2, n_d3, n_root, n_multi);
    check(n_ptr > 0, "no stored pointer taken");
    check(n_d1 > 0, "no depth-1 default taken");
    check(n_d2 > 0, "no depth-2 default taken");
    check(n_d3 > 0, "no depth-3 default taken");
    check(n_root > 0, "no return to the start state");
    check(n_multi > 0, "no multi-word match list");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
