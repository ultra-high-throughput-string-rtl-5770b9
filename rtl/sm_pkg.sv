// sm_pkg: types, sizes and layout functions shared by the string matching
// accelerator.
//
// The search structure is an Aho-Corasick move-function automaton whose
// transitions to the most common shallow states are removed from the states and
// replaced by "default transition pointers" held in a 256-entry lookup table
// indexed by the input character. A state keeps only the pointers that the
// defaults would get wrong.
//
// Word formats (widths follow the published design; bit order is this design's
// own choice):
//   pointer  (24 b)  {type[3:0], addr[11:0], ch[7:0]}; type 0 marks an empty slot
//   state header (12 b) {match, match_addr[10:0]}
//   state    = header in bits [11:0], pointer i in bits [12+24*i +: 24]
//   state-machine word (324 b) holds states at fixed positions by type:
//     types 1..9   : 36 b, 0..1 pointer,   at bit 36*(type-1)
//     types 10..12 : 108 b, 2..4 pointers, at bit 108*(type-10)
//     type 13      : 180 b, 5..7 pointers, at bit 0
//     type 14      : 252 b, 8..10 pointers, at bit 0
//     type 15      : 324 b, 11..13 pointers, at bit 0
//   lookup-table word (49 b) {d3_p2, d3_p1, d2_p1[3:0], d1}
//   match-number word (27 b) {last, num1[12:0], num0[12:0]}; number 0 = none
// A default pointer carries no address: the state it leads to sits at a fixed
// word of the state-machine memory (type 15) given by d1_addr/d2_addr/d3_addr.
package sm_pkg;

  localparam int unsigned CHAR_W     = 8;
  localparam int unsigned SADDR_W    = 12;   // state-machine word address
  localparam int unsigned STYPE_W    = 4;    // state type, 1..15 (0 = start state)
  localparam int unsigned PTR_W      = 24;
  localparam int unsigned HDR_W      = 12;
  localparam int unsigned WORD_W     = 324;
  localparam int unsigned MAX_PTRS   = 13;
  localparam int unsigned NTYPES     = 15;
  localparam int unsigned MADDR_W    = 11;   // match-number memory address
  localparam int unsigned SNUM_W     = 13;   // string number
  localparam int unsigned MWORD_W    = 2 * SNUM_W + 1;
  localparam int unsigned LUT_W      = 49;
  localparam int unsigned ND2        = 4;    // depth-2 default pointers per character
  localparam int unsigned ENG_PER_PORT = 3;
  localparam int unsigned ENG_PER_BLK  = 6;

  // Fixed homes of the states reached by default pointers.
  localparam int unsigned D1_BASE = 0;
  localparam int unsigned D2_BASE = 256;
  localparam int unsigned D3_BASE = 256 + 256 * ND2;
  localparam int unsigned N_RESERVED = D3_BASE + 256;   // 1536 words

  typedef logic [CHAR_W-1:0]  char_t;
  typedef logic [SADDR_W-1:0] saddr_t;
  typedef logic [STYPE_W-1:0] stype_t;
  typedef logic [WORD_W-1:0]  sword_t;
  typedef logic [MADDR_W-1:0] maddr_t;
  typedef logic [SNUM_W-1:0]  snum_t;

  typedef struct packed {
    stype_t stype;
    saddr_t addr;
    char_t  ch;
  } ptr_t;

  typedef struct packed {
    logic   match;
    maddr_t maddr;
  } hdr_t;

  typedef struct packed {
    char_t             d3_p2;  // character two before the input character
    char_t             d3_p1;  // character one before the input character
    char_t [ND2-1:0]   d2_p1;  // preceding character of each depth-2 default
    logic              d1;     // a depth-1 state exists for this character
  } lut_t;

  typedef struct packed {
    logic  last;
    snum_t num1;
    snum_t num0;
  } mword_t;

  // One character of a multiplexed input stream.
  typedef struct packed {
    logic  valid;
    logic  start;   // first character of a packet
    char_t ch;
  } chin_t;

  // Match notification from an engine to its match scheduler.
  typedef struct packed {
    logic       valid;
    logic [2:0] eng;
    maddr_t     maddr;
  } mreq_t;

  // One output beat of a match scheduler: two string numbers found by engine eng.
  typedef struct packed {
    logic       valid;
    logic [2:0] eng;
    snum_t      num0;
    snum_t      num1;
  } mout_t;

  // Bit offset of a state of the given type inside a 324-bit word.
  function automatic int unsigned type_offset(input int unsigned t);
    if (t >= 1 && t <= 9)        return 36 * (t - 1);
    else if (t >= 10 && t <= 12) return 108 * (t - 10);
    else                         return 0;
  endfunction

  // Number of pointer slots of a state of the given type.
  function automatic int unsigned type_nptr(input int unsigned t);
    if (t >= 1 && t <= 9)        return 1;
    else if (t >= 10 && t <= 12) return 4;
    else if (t == 13)            return 7;
    else if (t == 14)            return 10;
    else if (t == 15)            return 13;
    else                         return 0;
  endfunction

  function automatic saddr_t d1_addr(input char_t c);
    return saddr_t'(D1_BASE + int'(c));
  endfunction

  function automatic saddr_t d2_addr(input char_t c, input int unsigned k);
    return saddr_t'(D2_BASE + ND2 * int'(c) + k);
  endfunction

  function automatic saddr_t d3_addr(input char_t c);
    return saddr_t'(D3_BASE + int'(c));
  endfunction

endpackage
