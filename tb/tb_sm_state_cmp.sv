// tb_sm_state_cmp: self-checking testbench of the per-type pointer comparators.
//
// Instantiates the comparator of every state type 1..15 on the same random
// 324-bit word and input character. The word is built from a list of states
// placed by a reference table of positions and slot counts written out here
// (independent of the package functions), with pointers that sometimes carry
// the input character, sometimes twice, and sometimes an empty slot. Each
// comparator's hit flag and pointer are checked against that list.
module tb_sm_state_cmp;
  import sm_pkg::*;

  localparam int OFFS [16] = '{0, 0, 36, 72, 108, 144, 180, 216, 252, 288, 0, 108, 216, 0, 0, 0};
  localparam int NPS  [16] = '{0, 1, 1, 1, 1, 1, 1, 1, 1, 1, 4, 4, 4, 7, 10, 13};

  sword_t word;
  char_t  ch;
  logic   hit [16];
  ptr_t   ptr [16];

  for (genvar t = 1; t <= 15; t++) begin : g_dut
    sm_state_cmp #(.STATE_TYPE(t)) dut (.word(word), .ch(ch), .hit(hit[t]), .ptr(ptr[t]));
  end

  int checks = 0, failures = 0;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 3000; it++) begin
      ch = 8'($urandom_range(7));
      for (int i = 0; i < WORD_W; i += 32) word[i +: 32] = $urandom;
      // make slots empty, or matching, often
      for (int t = 1; t <= 15; t++) begin
        for (int s = 0; s < NPS[t]; s++) begin
          int b;
          b = OFFS[t] + 12 + 24 * s;
          case ($urandom_range(3))
            0: word[b + 20 +: 4] = 4'd0;                          // empty slot
            1: word[b +: 8] = 8'($urandom_range(7));              // small alphabet
            default: ;
          endcase
        end
      end
      #1;
      for (int t = 1; t <= 15; t++) begin
        logic eh;
        logic [23:0] ep;
        eh = 0; ep = '0;
        for (int s = 0; s < NPS[t]; s++) begin
          logic [23:0] p;
          p = word[OFFS[t] + 12 + 24 * s +: 24];
          if (!eh && p[23:20] != 0 && p[7:0] == ch) begin
            eh = 1; ep = p;
          end
        end
        checks++;
        if (hit[t] !== eh || (eh && ptr[t] !== ep)) begin
          failures++;
          if (failures < 10) $display("FAIL: type %0d hit %0b/%0b ptr %h/%h", t, hit[t], eh, ptr[t], ep);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
