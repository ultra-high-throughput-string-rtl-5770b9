// tb_sm_default_sel: self-checking testbench of the default transition
// comparator.
//
// Drives random lookup-table words and histories drawn from a small alphabet
// (so that the depth-3 and depth-2 entries match often) and checks the next
// state against a reference written here: depth 3 when both previous
// characters match and are valid, else the first matching depth-2 entry when
// the previous character is valid, else the depth-1 state or the start state.
// The fixed-address map is written out here from its definition
// (depth 1 at c, depth 2 at 256 + 4c + k, depth 3 at 1280 + c).
module tb_sm_default_sel;
  import sm_pkg::*;

  lut_t  lut;
  char_t ch, p1, p2;
  logic  p1_valid, p2_valid, to_start;
  ptr_t  ptr;

  sm_default_sel dut (.*);

  int checks = 0, failures = 0;
  int n3 = 0, n2 = 0, n1 = 0, n0 = 0;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic char_t rc();
    return 8'($urandom_range(3));
  endfunction

  initial begin
    for (int it = 0; it < 5000; it++) begin
      int eaddr;
      bit est;
      ch = 8'($urandom);
      p1 = rc(); p2 = rc();
      p1_valid = $urandom_range(5) != 0;
      p2_valid = $urandom_range(5) != 0;
      lut.d1 = $urandom_range(1);
      lut.d3_p1 = rc(); lut.d3_p2 = rc();
      for (int k = 0; k < 4; k++) lut.d2_p1[k] = rc();
      #1;
      est = 0;
      eaddr = -1;
      if (p1_valid && p2_valid && lut.d3_p1 == p1 && lut.d3_p2 == p2) begin
        eaddr = 1280 + int'(ch); n3++;
      end else begin
        for (int k = 3; k >= 0; k--) if (p1_valid && lut.d2_p1[k] == p1) eaddr = 256 + 4 * int'(ch) + k;
        if (eaddr >= 0) n2++;
        else if (lut.d1) begin eaddr = int'(ch); n1++; end
        else begin est = 1; n0++; end
      end
      checks++;
      if (to_start !== est || (!est && (int'(ptr.addr) != eaddr || ptr.stype != 4'd15))) begin
        failures++;
        if (failures < 10) $display("FAIL: start %0b/%0b addr %0d/%0d", to_start, est, ptr.addr, eaddr);
      end
    end
    checks++;
    if (n3 == 0 || n2 == 0 || n1 == 0 || n0 == 0) begin
      failures++;
      $display("FAIL: not every default depth was exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
