// sm_engine: one string matching engine.
//
// The engine walks the reduced Aho-Corasick state machine of its block at one
// input character per engine cycle, whatever the input, so its rate cannot be
// degraded by crafted packets. Its registers hold the input character, the two
// previous characters, the character's lookup-table word and the current state
// (the 324-bit memory word and the state type that says where in the word the
// state sits). Fifteen sm_state_cmp blocks look for a stored pointer on the
// input character; if none hits, sm_default_sel picks the default transition.
//
// Timing. Three engines share one port of the block's memories; each runs at a
// third of the memory clock, 120 degrees apart. Here that is expressed with one
// clock (the memory clock) and two strobes from the block's phase counter:
//   exec : the engine's input slot. in_ch is the next character of its packet
//          (also addressing the lookup table, outside the engine). The engine
//          decides the transition for its registered character and drives
//          sm_rd/sm_raddr to fetch the next state.
//   cap  : the next cycle. The fetched word and the new character's lookup-table
//          word are on the memory outputs and are registered. If the fetched
//          state's match bit is set, mreq is raised for one cycle (the cycle
//          after cap) with the match-number address.
// A character given at an exec slot is therefore compared in the engine's next
// exec slot, and its match (if any) is reported 5 memory cycles after the slot
// in which it was given. A packet's last character is still processed in the
// following exec slot even if no character arrives then; a start character
// restarts at the start state (which needs no memory word) and clears the
// history so that the first character can only reach depth 1.
// The registers, comparators and the one-character-per-cycle walk follow the
// published design; the strobe timing and the start/empty encodings are this
// design's choices.
module sm_engine
  import sm_pkg::*;
#(
  parameter int unsigned ENG_ID = 0
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    exec,
  input  logic    cap,
  input  chin_t   in_ch,
  input  lut_t    lut_rdata,
  input  sword_t  sm_rdata,
  output logic    sm_rd,
  output saddr_t  sm_raddr,
  output mreq_t   mreq
);

  // current state and the character waiting to be processed
  sword_t state_word;
  stype_t state_type;
  char_t  ch_r;
  lut_t   lut_r;
  logic   pend;
  // history
  char_t  p1, p2;
  logic   p1v, p2v;
  // exec -> cap stage
  logic   x_pend, x_valid, x_start;
  char_t  x_ch;
  stype_t x_type;

  // pointer comparators, one per state type
  logic [NTYPES:1] cmp_hit;
  ptr_t            cmp_ptr [NTYPES+1];

  assign cmp_ptr[0] = '0;
  for (genvar t = 1; t <= NTYPES; t++) begin : g_cmp
    sm_state_cmp #(.STATE_TYPE(t)) u_cmp (
      .word (state_word),
      .ch   (ch_r),
      .hit  (cmp_hit[t]),
      .ptr  (cmp_ptr[t])
    );
  end

  logic dflt_start;
  ptr_t dflt_ptr;

  sm_default_sel u_dflt (
    .lut      (lut_r),
    .ch       (ch_r),
    .p1       (p1),
    .p1_valid (p1v),
    .p2       (p2),
    .p2_valid (p2v),
    .to_start (dflt_start),
    .ptr      (dflt_ptr)
  );

  logic ptr_hit;
  ptr_t nxt;

  always_comb begin
    ptr_hit = (state_type != '0) && cmp_hit[state_type];
    nxt     = ptr_hit ? cmp_ptr[state_type] : dflt_ptr;
    if (!ptr_hit && dflt_start) nxt.stype = '0;
  end

  assign sm_rd    = exec && pend && (nxt.stype != '0);
  assign sm_raddr = nxt.addr;

  // state header of the fetched word at the fetched state's position
  function automatic hdr_t hdr_of(input sword_t w, input stype_t t);
    hdr_t h;
    h = '0;
    for (int unsigned i = 1; i <= NTYPES; i++)
      if (t == stype_t'(i)) h = hdr_t'(w[type_offset(i) +: HDR_W]);
    return h;
  endfunction

  sword_t fetched;
  hdr_t   fetched_hdr;
  assign fetched     = (x_type != '0) ? sm_rdata : '0;
  assign fetched_hdr = hdr_of(fetched, x_type);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_word <= '0;
      state_type <= '0;
      ch_r       <= '0;
      lut_r      <= '0;
      pend       <= 1'b0;
      p1         <= '0;
      p2         <= '0;
      p1v        <= 1'b0;
      p2v        <= 1'b0;
      x_pend     <= 1'b0;
      x_valid    <= 1'b0;
      x_start    <= 1'b0;
      x_ch       <= '0;
      x_type     <= '0;
      mreq       <= '0;
    end else begin
      mreq.valid <= 1'b0;
      if (exec) begin
        x_pend  <= pend;
        x_type  <= pend ? nxt.stype : state_type;
        x_valid <= in_ch.valid;
        x_start <= in_ch.valid && in_ch.start;
        x_ch    <= in_ch.ch;
        if (pend) begin
          p1  <= ch_r;
          p1v <= 1'b1;
          p2  <= p1;
          p2v <= p1v;
        end
        if (in_ch.valid && in_ch.start) begin
          p1v <= 1'b0;
          p2v <= 1'b0;
        end
      end
      if (cap) begin
        if (x_pend) begin
          state_word <= fetched;
          state_type <= x_type;
          mreq.valid <= fetched_hdr.match;
          mreq.eng   <= 3'(ENG_ID);
          mreq.maddr <= fetched_hdr.maddr;
        end
        if (x_start) begin
          state_word <= '0;
          state_type <= '0;
        end
        if (x_valid) begin
          ch_r  <= x_ch;
          lut_r <= lut_rdata;
        end
        pend <= x_valid;
      end
    end
  end

endmodule
