// sm_accel: multi-block string matching accelerator (top level).
//
// NBLK string matching blocks (sm_block) run side by side, each with its own
// memories. A small ruleset is loaded whole into every block and each block
// searches its own packets, giving the full throughput of NBLK blocks
// (NBLK x 16 bits per memory clock). A large ruleset is split into groups of
// strings, one group per block; the blocks of a group of size group_size
// then search the same packets and the throughput drops by that factor. The
// group_size input selects this: block b takes its input streams from block
// (b / group_size) * group_size, the first block of its group, so the host
// only drives the first input of each group. Blocks not starting a group
// ignore their own inputs.
//
// Interface:
//   in_a[b], in_b[b]  the two multiplexed character streams of block b; in the
//                     cycle where phase == j they feed engines j and 3+j.
//   cfg_*             writes one word into the memory cfg_sel (0 state machine,
//                     1 lookup table, 2 match numbers) of block cfg_blk.
//   mout_a[b]/mout_b[b]  match results of block b: engine number within the
//                     block and two string numbers (0 = none) per beat.
//   overflow[b]       sticky: a match-scheduler queue of block b overflowed.
//   busy              some match scheduler still has queued work.
// The number of blocks and the memory sizes are the published Stratix 3
// configuration (6 blocks, 3,584 state-machine words each); the input
// distribution by group_size is this design's way of letting the blocks of a
// group search the same packets.
module sm_accel
  import sm_pkg::*;
#(
  parameter int unsigned NBLK       = 6,
  parameter int unsigned SM_DEPTH   = 3584,
  parameter int unsigned MM_DEPTH   = 2048,
  parameter int unsigned MBUF_DEPTH = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [2:0]        group_size,   // 1..NBLK, must divide NBLK
  input  chin_t [NBLK-1:0]  in_a,
  input  chin_t [NBLK-1:0]  in_b,
  output logic [1:0]        phase,
  input  logic              cfg_we,
  input  logic [2:0]        cfg_blk,
  input  logic [1:0]        cfg_sel,
  input  saddr_t            cfg_addr,
  input  sword_t            cfg_wdata,
  output mout_t [NBLK-1:0]  mout_a,
  output mout_t [NBLK-1:0]  mout_b,
  output logic [NBLK-1:0]   overflow,
  output logic              busy
);

  logic [1:0]      blk_phase [NBLK];
  logic [NBLK-1:0] blk_busy;

  assign phase = blk_phase[0];
  assign busy  = |blk_busy;

  for (genvar b = 0; b < NBLK; b++) begin : g_blk
    chin_t      bin_a, bin_b;
    logic [1:0] ovf;

    // input distribution: take the streams of the first block of the group
    always_comb begin
      bin_a = in_a[b];
      bin_b = in_b[b];
      for (int g = 2; g <= NBLK; g++) begin
        if (int'(group_size) == g) begin
          bin_a = in_a[(b / g) * g];
          bin_b = in_b[(b / g) * g];
        end
      end
    end

    sm_block #(
      .SM_DEPTH   (SM_DEPTH),
      .MM_DEPTH   (MM_DEPTH),
      .MBUF_DEPTH (MBUF_DEPTH)
    ) u_blk (
      .clk       (clk),
      .rst_n     (rst_n),
      .in_a      (bin_a),
      .in_b      (bin_b),
      .phase     (blk_phase[b]),
      .cfg_we    (cfg_we && cfg_blk == 3'(b)),
      .cfg_sel   (cfg_sel),
      .cfg_addr  (cfg_addr),
      .cfg_wdata (cfg_wdata),
      .mout_a    (mout_a[b]),
      .mout_b    (mout_b[b]),
      .overflow  (ovf),
      .busy      (blk_busy[b])
    );

    assign overflow[b] = |ovf;
  end

endmodule
