// sm_state_cmp: pointer comparator for one state type.
//
// A string matching engine holds fifteen of these, one per state type. Each
// takes the 324-bit state-machine word registered by the engine, cuts out the
// state stored at the fixed position of its type (see sm_pkg) and compares the
// input character with the character of every pointer slot of that state. The
// first valid slot (non-zero type field) whose character equals the input wins.
// The engine uses the output of the comparator whose type equals the registered
// state type. Purely combinational.
// One comparator per state type follows the published design; the slot order
// priority and the empty-slot encoding are this design's choices.
module sm_state_cmp
  import sm_pkg::*;
#(
  parameter int unsigned STATE_TYPE = 15
) (
  input  sword_t word,
  input  char_t  ch,
  output logic   hit,
  output ptr_t   ptr
);

  localparam int unsigned OFF  = type_offset(STATE_TYPE);
  localparam int unsigned NPTR = type_nptr(STATE_TYPE);

  ptr_t slot [NPTR];

  always_comb begin
    hit = 1'b0;
    ptr = '0;
    for (int i = NPTR - 1; i >= 0; i--) begin
      slot[i] = ptr_t'(word[OFF + HDR_W + PTR_W * i +: PTR_W]);
      if (slot[i].stype != '0 && slot[i].ch == ch) begin
        hit = 1'b1;
        ptr = slot[i];
      end
    end
  end

endmodule
