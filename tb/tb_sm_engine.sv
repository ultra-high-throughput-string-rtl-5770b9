// tb_sm_engine: self-checking testbench of one string matching engine.
//
// The engine runs against a state-machine memory and a lookup table
// (sm_tdp_ram) loaded with a ruleset compiled by sm_tb_pkg::ac_compiler. The
// ruleset includes strings whose states need many stored pointers, so that all
// fifteen state types occur. The testbench generates the engine's strobes
// (exec when phase == 0, cap when phase == 1) and feeds random packets with
// random idle slots. For every character it walks the full Aho-Corasick move
// function itself; where the reached state has matching strings, the engine
// must raise mreq with that state's match-number address exactly 5 cycles
// after the slot that carried the character, and at no other time.
module tb_sm_engine;
  import sm_pkg::*;
  import sm_tb_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [1:0] ph;
  logic       exec, cap;
  chin_t      in_ch;
  logic [LUT_W-1:0] lut_rdata;
  sword_t     sm_rdata;
  logic       sm_rd;
  saddr_t     sm_raddr;
  mreq_t      mreq;

  logic       cfg_we;
  logic [1:0] cfg_sel;
  saddr_t     cfg_addr;
  sword_t     cfg_wdata;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) ph <= 2'd0;
    else        ph <= (ph == 2'd2) ? 2'd0 : ph + 2'd1;
  assign exec = (ph == 2'd0);
  assign cap  = (ph == 2'd1);

  sm_engine #(.ENG_ID(2)) dut (
    .clk, .rst_n, .exec, .cap, .in_ch,
    .lut_rdata (lut_t'(lut_rdata)),
    .sm_rdata, .sm_rd, .sm_raddr, .mreq
  );

  sm_tdp_ram #(.W(WORD_W), .D(3584)) u_sm (
    .clk,
    .a_en    (sm_rd || (cfg_we && cfg_sel == 0)),
    .a_we    (cfg_we && cfg_sel == 0),
    .a_addr  (cfg_we ? cfg_addr : sm_raddr),
    .a_wdata (cfg_wdata),
    .a_rdata (sm_rdata),
    .b_en (1'b0), .b_we (1'b0), .b_addr ('0), .b_wdata ('0), .b_rdata ()
  );

  sm_tdp_ram #(.W(LUT_W), .D(256)) u_lut (
    .clk,
    .a_en    (in_ch.valid || (cfg_we && cfg_sel == 1)),
    .a_we    (cfg_we && cfg_sel == 1),
    .a_addr  (cfg_we ? cfg_addr[7:0] : in_ch.ch),
    .a_wdata (cfg_wdata[LUT_W-1:0]),
    .a_rdata (lut_rdata),
    .b_en (1'b0), .b_we (1'b0), .b_addr ('0), .b_wdata ('0), .b_rdata ()
  );

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
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  ac_compiler comp;
  int exp_cyc[$];
  int exp_addr[$];
  int type_seen[16];

  // monitor: every mreq must be the next expected one, at its cycle
  always @(negedge clk) begin
    if (rst_n && mreq.valid) begin
      if (exp_cyc.size() == 0) check(0, $sformatf("unexpected match at cycle %0d", cyc));
      else begin
        int ec, ea;
        ec = exp_cyc.pop_front();
        ea = exp_addr.pop_front();
        check(ec == cyc && ea == int'(mreq.maddr) && mreq.eng == 3'd2,
              $sformatf("match at cycle %0d addr %0d, expected cycle %0d addr %0d",
                        cyc, mreq.maddr, ec, ea));
      end
    end
    if (rst_n && exp_cyc.size() > 0 && exp_cyc[0] < cyc) begin
      check(0, $sformatf("missing match expected at cycle %0d", exp_cyc[0]));
      void'(exp_cyc.pop_front());
      void'(exp_addr.pop_front());
    end
  end

  always @(posedge clk) if (exec && dut.pend) type_seen[dut.state_type]++;

  initial begin
    bytes_t p;
    int st;
    cfg_we = 0; cfg_sel = 0; cfg_addr = '0; cfg_wdata = '0; in_ch = '0;
    comp = new();
    comp.add("he"); comp.add("she"); comp.add("his"); comp.add("hers");
    // a depth-4 state with 12 children (type 15) and one with 9 (type 14)
    for (int c = 0; c < 12; c++) comp.add({"pqrs", string'(8'(97 + c))});
    for (int c = 0; c < 9; c++)  comp.add({"tuvw", string'(8'(97 + c))});
    for (int c = 0; c < 6; c++)  comp.add({"xyzx", string'(8'(97 + c))});
    while (comp.pats.size() < 90) comp.add(rand_pat(2, 8, 8));
    comp.build();
    $display("ruleset: %0d strings, %0d states, max %0d pointers", comp.pats.size(), comp.nnodes, comp.max_ptrs);
    repeat (3) @(posedge clk);
    rst_n = 1;
    // load
    @(negedge clk);
    cfg_we = 1; cfg_sel = 0;
    foreach (comp.sm_img[a]) begin
      cfg_addr = saddr_t'(a); cfg_wdata = comp.sm_img[a];
      @(negedge clk);
    end
    cfg_sel = 1;
    for (int c = 0; c < 256; c++) begin
      cfg_addr = saddr_t'(c); cfg_wdata = sword_t'(comp.lut_img[c]);
      @(negedge clk);
    end
    cfg_we = 0;

    for (int k = 0; k < 150; k++) begin
      if (k % 10 == 0) begin
        string s;
        s = (k % 20 == 0) ? {"pqrs", string'(8'(97 + k % 12))} : {"tuvw", string'(8'(97 + k % 9))};
        p = {};
        for (int j = 0; j < s.len(); j++) p.push_back(byte'(s[j]));
        for (int j = 0; j < 5; j++) p.push_back(8'(97 + $urandom_range(7)));
      end else begin
        p = rand_pkt(comp.pats, 1 + int'($urandom_range(40)), 12);
      end
      st = 0;
      for (int i = 0; i < p.size(); i++) begin
        int idx;
        byte unsigned cb;
        // wait for this engine's slot, with random idle slots
        forever begin
          bit skip;
          @(negedge clk);
          skip = $urandom_range(4) == 0;
          if (ph == 2'd0 && !skip) break;
        end
        cb = p[i];
        in_ch.valid = 1; in_ch.start = (i == 0); in_ch.ch = cb;
        idx = st * 256 + int'(cb);
        st = comp.delta[idx];
        if (comp.outs[st].size() > 0) begin
          exp_cyc.push_back(cyc + 5);
          exp_addr.push_back(comp.maddr[st]);
        end
        @(negedge clk);
        in_ch = '0;
      end
    end
    repeat (20) @(posedge clk);
    check(exp_cyc.size() == 0, "matches never reported");
    for (int t = 1; t <= 15; t++)
      check(type_seen[t] > 0, $sformatf("state type %0d never visited", t));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
