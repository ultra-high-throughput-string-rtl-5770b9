// tb_sm_tdp_ram: self-checking testbench of the true dual-port RAM.
//
// Runs random reads and writes on both ports of a 324-bit memory against a
// behavioural array and checks every read: the data must appear one cycle
// after the address (read-first on a port that writes the same cycle), and a
// word written on one port must be readable on the other.
module tb_sm_tdp_ram;
  localparam int W = 324;
  localparam int D = 3584;
  localparam int AW = 12;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic          a_en, a_we, b_en, b_we;
  logic [AW-1:0] a_addr, b_addr;
  logic [W-1:0]  a_wdata, b_wdata, a_rdata, b_rdata;

  sm_tdp_ram #(.W(W), .D(D)) dut (.*);

  int checks = 0, failures = 0;
  logic [W-1:0] model [D];
  bit           known [D];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W-1:0] rnd();
    logic [W-1:0] v;
    for (int i = 0; i < W; i += 32) v[i +: 32] = $urandom;
    return v;
  endfunction

  initial begin
    logic [W-1:0] exp_a, exp_b;
    bit chk_a, chk_b;
    a_en = 0; a_we = 0; b_en = 0; b_we = 0;
    a_addr = '0; b_addr = '0; a_wdata = '0; b_wdata = '0;
    chk_a = 0; chk_b = 0;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      // check the reads issued in the previous cycle
      if (chk_a) begin
        checks++;
        if (a_rdata !== exp_a) begin failures++; $display("FAIL: port A read"); end
      end
      if (chk_b) begin
        checks++;
        if (b_rdata !== exp_b) begin failures++; $display("FAIL: port B read"); end
      end
      a_en = $urandom_range(3) != 0;
      b_en = $urandom_range(3) != 0;
      a_addr = AW'($urandom_range(63));          // small range: many hits and collisions
      b_addr = AW'(64 + $urandom_range(63));
      if (i > 1000) b_addr = AW'($urandom_range(63));
      a_we = a_en && $urandom_range(1) == 0;
      b_we = b_en && $urandom_range(1) == 0 && !(a_we && a_addr == b_addr);
      a_wdata = rnd();
      b_wdata = rnd();
      chk_a = a_en && known[a_addr];
      chk_b = b_en && known[b_addr];
      exp_a = model[a_addr];
      exp_b = model[b_addr];
      if (a_we && b_en && !b_we && a_addr == b_addr) chk_b = 0;  // read-during-write of the other port
      if (b_we && a_en && !a_we && a_addr == b_addr) chk_a = 0;
      @(posedge clk);
      if (a_we) begin model[a_addr] = a_wdata; known[a_addr] = 1; end
      if (b_we) begin model[b_addr] = b_wdata; known[b_addr] = 1; end
    end
    // the last address of the memory
    @(negedge clk);
    a_en = 1; a_we = 1; a_addr = AW'(D - 1); a_wdata = rnd(); exp_a = a_wdata;
    b_en = 0; b_we = 0;
    @(negedge clk);
    a_we = 0; b_en = 1; b_addr = AW'(D - 1); a_en = 0;
    @(negedge clk);
    checks++;
    if (b_rdata !== exp_a) begin failures++; $display("FAIL: last word"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
