// sm_default_sel: default transition comparator of a string matching engine.
//
// When the registered state holds no pointer for the input character, the next
// state comes from the character's lookup-table word. The two previous input
// characters are compared with the depth-3 entry first, then the previous
// character with the four depth-2 entries (lowest index first), and otherwise
// the depth-1 bit selects the depth-1 state for the character or the start
// state. Every default target lives at a fixed word of the state-machine
// memory (sm_pkg::d1_addr/d2_addr/d3_addr) stored as a type-15 state, so the
// lookup table carries no addresses. p1_valid/p2_valid are low at the start of
// a packet so that the first character can only reach depth 1.
// The priority d3 > d2 > d1 follows the published design; the history valid
// flags and the fixed-address map are this design's choices. Combinational.
module sm_default_sel
  import sm_pkg::*;
(
  input  lut_t   lut,
  input  char_t  ch,        // the input character (indexes the table)
  input  char_t  p1,        // previous character
  input  logic   p1_valid,
  input  char_t  p2,        // character before p1
  input  logic   p2_valid,
  output logic   to_start,  // next state is the start state
  output ptr_t   ptr        // next state when to_start is low
);

  logic d2hit;

  always_comb begin
    to_start = 1'b0;
    d2hit    = 1'b0;
    ptr      = '0;
    ptr.ch   = ch;
    ptr.stype = stype_t'(15);
    if (p2_valid && p1_valid && lut.d3_p2 == p2 && lut.d3_p1 == p1) begin
      ptr.addr = d3_addr(ch);
    end else begin
      d2hit = 1'b0;
      for (int k = ND2 - 1; k >= 0; k--) begin
        if (p1_valid && lut.d2_p1[k] == p1) begin
          d2hit    = 1'b1;
          ptr.addr = d2_addr(ch, k);
        end
      end
      if (!d2hit && lut.d1) begin
        ptr.addr = d1_addr(ch);
      end else if (!d2hit) begin
        to_start  = 1'b1;
        ptr.stype = '0;
      end
    end
  end

endmodule
