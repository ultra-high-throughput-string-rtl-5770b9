// sm_block: string matching block.
//
// A block holds one reduced Aho-Corasick state machine (a whole ruleset, or
// one group of strings of a ruleset split across several blocks) in three true
// dual-port memories: the state-machine memory (SM_DEPTH x 324 b), the
// default-pointer lookup table (256 x 49 b) and the matching string numbers
// (MM_DEPTH x 27 b). Six sm_engine instances search six packets at once.
// Engines 0..2 use port A of every memory and engines 3..5 port B; on each
// port the three engines take turns cycle by cycle, so each engine runs at a
// third of the memory clock and the block as a whole consumes two bytes per
// memory clock (16 bits x f_mem). Each port has its own sm_match_sched.
//
// Interface:
//   in_a / in_b  one character per cycle for the engine whose slot it is:
//                in the cycle where phase == j, in_a feeds engine j and in_b
//                engine 3+j (three packets interleaved per port). start marks
//                the first character of a packet; valid low leaves the engine
//                idle in that slot (its last character is still processed).
//   mout_a/_b    engine number and two string numbers per beat (0 = none).
//   cfg_*        writes one word of the memory chosen by cfg_sel (0 state
//                machine, 1 lookup table, 2 match numbers) through port A.
//                Configuration is done while no packet is being searched.
// The memory organisation, the 3-engines-per-port sharing with multiplexed
// read commands and the per-port match scheduler follow the published design.
// The single clock with a phase counter in place of three 120-degree-shifted
// engine clocks, and the configuration port, are this design's choices.
module sm_block
  import sm_pkg::*;
#(
  parameter int unsigned SM_DEPTH   = 3584,
  parameter int unsigned MM_DEPTH   = 2048,
  parameter int unsigned MBUF_DEPTH = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  // packet input, two multiplexed streams
  input  chin_t        in_a,
  input  chin_t        in_b,
  output logic [1:0]   phase,
  // configuration
  input  logic         cfg_we,
  input  logic [1:0]   cfg_sel,
  input  saddr_t       cfg_addr,
  input  sword_t       cfg_wdata,
  // results
  output mout_t        mout_a,
  output mout_t        mout_b,
  output logic [1:0]   overflow,
  output logic         busy        // a match scheduler still has work queued
);

  localparam int unsigned SAW = (SM_DEPTH > 1) ? $clog2(SM_DEPTH) : 1;
  localparam int unsigned MAW = (MM_DEPTH > 1) ? $clog2(MM_DEPTH) : 1;

  // ---------------------------------------------------------------- phase
  logic [1:0] ph_cap;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) phase <= 2'd0;
    else        phase <= (phase == 2'd2) ? 2'd0 : phase + 2'd1;
  end
  assign ph_cap = (phase == 2'd0) ? 2'd2 : phase - 2'd1;  // engine whose data returns now

  // ---------------------------------------------------------------- memories
  sword_t  sm_rdata_a, sm_rdata_b;
  logic [LUT_W-1:0]   lut_rdata_a, lut_rdata_b;
  logic [MWORD_W-1:0] mm_rdata_a, mm_rdata_b;

  logic    sm_rd   [ENG_PER_BLK];
  saddr_t  sm_raddr[ENG_PER_BLK];
  mreq_t   mreq    [ENG_PER_BLK];

  logic    sm_en_a, sm_en_b;
  saddr_t  sm_addr_a, sm_addr_b;

  always_comb begin
    sm_en_a   = 1'b0;
    sm_en_b   = 1'b0;
    sm_addr_a = '0;
    sm_addr_b = '0;
    for (int j = 0; j < ENG_PER_PORT; j++) begin
      if (phase == 2'(j)) begin
        sm_en_a   = sm_rd[j];
        sm_addr_a = sm_raddr[j];
        sm_en_b   = sm_rd[ENG_PER_PORT + j];
        sm_addr_b = sm_raddr[ENG_PER_PORT + j];
      end
    end
    if (cfg_we && cfg_sel == 2'd0) begin
      sm_en_a   = 1'b1;
      sm_addr_a = cfg_addr;
    end
  end

  sm_tdp_ram #(.W(WORD_W), .D(SM_DEPTH)) u_sm_mem (
    .clk     (clk),
    .a_en    (sm_en_a),
    .a_we    (cfg_we && cfg_sel == 2'd0),
    .a_addr  (SAW'(sm_addr_a)),
    .a_wdata (cfg_wdata),
    .a_rdata (sm_rdata_a),
    .b_en    (sm_en_b),
    .b_we    (1'b0),
    .b_addr  (SAW'(sm_addr_b)),
    .b_wdata ('0),
    .b_rdata (sm_rdata_b)
  );

  logic lut_cfg;
  assign lut_cfg = cfg_we && cfg_sel == 2'd1;

  sm_tdp_ram #(.W(LUT_W), .D(256)) u_lut (
    .clk     (clk),
    .a_en    (in_a.valid || lut_cfg),
    .a_we    (lut_cfg),
    .a_addr  (lut_cfg ? cfg_addr[7:0] : in_a.ch),
    .a_wdata (cfg_wdata[LUT_W-1:0]),
    .a_rdata (lut_rdata_a),
    .b_en    (in_b.valid),
    .b_we    (1'b0),
    .b_addr  (in_b.ch),
    .b_wdata ('0),
    .b_rdata (lut_rdata_b)
  );

  logic    mm_rd_a, mm_rd_b;
  maddr_t  mm_addr_a, mm_addr_b;
  logic    mm_cfg;
  assign mm_cfg = cfg_we && cfg_sel == 2'd2;

  sm_tdp_ram #(.W(MWORD_W), .D(MM_DEPTH)) u_mm_mem (
    .clk     (clk),
    .a_en    (mm_rd_a || mm_cfg),
    .a_we    (mm_cfg),
    .a_addr  (MAW'(mm_cfg ? cfg_addr : saddr_t'(mm_addr_a))),
    .a_wdata (cfg_wdata[MWORD_W-1:0]),
    .a_rdata (mm_rdata_a),
    .b_en    (mm_rd_b),
    .b_we    (1'b0),
    .b_addr  (MAW'(mm_addr_b)),
    .b_wdata ('0),
    .b_rdata (mm_rdata_b)
  );

  // ---------------------------------------------------------------- engines
  for (genvar e = 0; e < ENG_PER_BLK; e++) begin : g_eng
    localparam int unsigned SLOT = e % ENG_PER_PORT;
    localparam bit          PB   = (e >= ENG_PER_PORT);
    sm_engine #(.ENG_ID(e)) u_eng (
      .clk       (clk),
      .rst_n     (rst_n),
      .exec      (phase == 2'(SLOT)),
      .cap       (ph_cap == 2'(SLOT)),
      .in_ch     (PB ? in_b : in_a),
      .lut_rdata (lut_t'(PB ? lut_rdata_b : lut_rdata_a)),
      .sm_rdata  (PB ? sm_rdata_b : sm_rdata_a),
      .sm_rd     (sm_rd[e]),
      .sm_raddr  (sm_raddr[e]),
      .mreq      (mreq[e])
    );
  end

  // ---------------------------------------------------------------- match schedulers
  mreq_t mreq_a, mreq_b;
  always_comb begin
    mreq_a = '0;
    mreq_b = '0;
    for (int j = 0; j < ENG_PER_PORT; j++) begin
      if (mreq[j].valid)                mreq_a = mreq[j];
      if (mreq[ENG_PER_PORT + j].valid) mreq_b = mreq[ENG_PER_PORT + j];
    end
  end

  logic busy_a, busy_b;
  assign busy = busy_a || busy_b;

  sm_match_sched #(.MBUF_DEPTH(MBUF_DEPTH)) u_sched_a (
    .clk      (clk),
    .rst_n    (rst_n),
    .mreq     (mreq_a),
    .mm_rd    (mm_rd_a),
    .mm_addr  (mm_addr_a),
    .mm_rdata (mword_t'(mm_rdata_a)),
    .mout     (mout_a),
    .overflow (overflow[0]),
    .busy     (busy_a)
  );

  sm_match_sched #(.MBUF_DEPTH(MBUF_DEPTH)) u_sched_b (
    .clk      (clk),
    .rst_n    (rst_n),
    .mreq     (mreq_b),
    .mm_rd    (mm_rd_b),
    .mm_addr  (mm_addr_b),
    .mm_rdata (mword_t'(mm_rdata_b)),
    .mout     (mout_b),
    .overflow (overflow[1]),
    .busy     (busy_b)
  );

  // Configuration must not overlap packet traffic on port A.
  assert property (@(posedge clk) disable iff (!rst_n) cfg_we |-> !in_a.valid)
    else $error("sm_block: configuration write during packet input");

endmodule
