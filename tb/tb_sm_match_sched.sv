// tb_sm_match_sched: self-checking testbench of the match scheduler.
//
// A behavioural match-number memory (registered read, like the block's RAM)
// holds lists of 1..5 words; each list ends with the last bit. Random match
// requests from engines 0..2 point at list heads. Checked:
//   - every list is output in request order, word by word, with the engine
//     number of its request;
//   - on an idle scheduler the first word appears 3 cycles after the request;
//   - back-to-back lists leave no gap: one word per cycle while work is queued;
//   - a burst beyond the queue depth sets the sticky overflow flag, and the
//     flag is clear before it.
module tb_sm_match_sched;
  import sm_pkg::*;

  logic   clk = 1'b0;
  logic   rst_n = 1'b0;
  always #5 clk = ~clk;

  mreq_t  mreq;
  logic   mm_rd;
  maddr_t mm_addr;
  mword_t mm_rdata;
  mout_t  mout;
  logic   overflow, busy;

  sm_match_sched dut (.*);

  mword_t mem [2048];
  always @(posedge clk) if (mm_rd) mm_rdata <= mem[mm_addr];

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
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int heads[$];
  int lens[$];
  mout_t exp_q[$];
  int out_cyc[$];
  int req_cyc;
  bit burst = 0;

  always @(negedge clk) begin
    if (rst_n && mout.valid && !burst) begin
      out_cyc.push_back(cyc);
      if (exp_q.size() == 0) check(0, "unexpected output");
      else begin
        mout_t e;
        e = exp_q.pop_front();
        check(mout.eng == e.eng && mout.num0 == e.num0 && mout.num1 == e.num1,
              $sformatf("output eng %0d nums %0d,%0d expected eng %0d nums %0d,%0d",
                        mout.eng, mout.num0, mout.num1, e.eng, e.num0, e.num1));
      end
    end
  end

  task automatic request(int h, int eng);
    @(negedge clk);
    req_cyc = cyc;
    mreq.valid = 1;
    mreq.eng = 3'(eng);
    mreq.maddr = maddr_t'(heads[h]);
    for (int i = 0; i < lens[h]; i++) begin
      mout_t e;
      e.valid = 1;
      e.eng = 3'(eng);
      e.num0 = mem[heads[h] + i].num0;
      e.num1 = mem[heads[h] + i].num1;
      exp_q.push_back(e);
    end
    @(posedge clk); #1;
    mreq = '0;
  endtask

  initial begin
    int a;
    mreq = '0;
    // build 100 lists
    a = 0;
    for (int h = 0; h < 100; h++) begin
      int L;
      L = 1 + int'($urandom_range(4));
      heads.push_back(a);
      lens.push_back(L);
      for (int i = 0; i < L; i++) begin
        mem[a].num0 = 13'(1 + $urandom_range(8000));
        mem[a].num1 = ($urandom_range(3) == 0) ? 13'd0 : 13'(1 + $urandom_range(8000));
        mem[a].last = (i == L - 1);
        a++;
      end
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;

    // latency on an idle scheduler
    request(0, 1);
    repeat (lens[0] + 6) @(posedge clk);
    check(out_cyc.size() == lens[0], "first list length");
    check(out_cyc[0] - req_cyc == 3, $sformatf("latency %0d, expected 3", out_cyc[0] - req_cyc));
    out_cyc = {};

    // back-to-back lists: no gap between words
    begin
      int total = 0;
      for (int h = 1; h <= 4; h++) begin
        request(h, h % 3);
        total += lens[h];
      end
      repeat (30) @(posedge clk);
      check(out_cyc.size() == total, "back-to-back word count");
      check(out_cyc[total-1] - out_cyc[0] == total - 1,
            $sformatf("%0d words took %0d cycles", total, out_cyc[total-1] - out_cyc[0] + 1));
      out_cyc = {};
    end

    // random sparse traffic
    for (int n = 0; n < 300; n++) begin
      if ($urandom_range(3) == 0) request(int'($urandom_range(99)), int'($urandom_range(2)));
      else @(posedge clk);
      #1;
    end
    repeat (600) @(posedge clk);
    check(exp_q.size() == 0, $sformatf("%0d words never output", exp_q.size()));
    check(!overflow, "overflow without a burst");

    // burst: one request per cycle with 5-word lists fills the queue
    @(negedge clk);
    burst = 1;
    for (int n = 0; n < 40; n++) begin
      mreq.valid = 1; mreq.eng = 3'(n % 3); mreq.maddr = maddr_t'(a - 5);
      @(posedge clk); #1;
    end
    mreq = '0;
    check(overflow, "no overflow after a burst");
    exp_q = {};
    rst_n = 0;
    @(posedge clk); #1;
    check(!overflow, "overflow not cleared by reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
