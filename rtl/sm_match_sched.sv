// sm_match_sched: match scheduler of one half of a string matching block.
//
// When an engine reaches a state whose match bit is set, it hands the
// scheduler the engine number and the address of the state's list of matching
// string numbers. The scheduler queues these requests (MBUF_DEPTH entries, fed
// by the three engines of one memory port) and serves them in order: it reads
// the match-number memory at the address, outputs the engine number with the
// two string numbers of the word, and keeps incrementing the address until a
// word with its last bit set has been read. Then it starts on the next queued
// request in the very next cycle, so the memory port delivers one word per
// cycle while there is work.
//
// Timing: a request presented on mreq is issued to memory at the earliest in
// the next cycle; the memory answers one cycle later and mout carries the word
// the cycle after that (3 cycles from request to first output when idle).
// String number 0 means "no string" (a list with an odd count ends with it).
// A request arriving while the queue is full is dropped and the sticky overflow
// flag is set until reset.
// The queue-and-increment behaviour follows the published design; the queue
// depth, the drop-on-overflow policy and the output format are this design's
// choices.
module sm_match_sched
  import sm_pkg::*;
#(
  parameter int unsigned MBUF_DEPTH = 16
) (
  input  logic   clk,
  input  logic   rst_n,
  input  mreq_t  mreq,
  // match-number memory read port
  output logic   mm_rd,
  output maddr_t mm_addr,
  input  mword_t mm_rdata,
  // results
  output mout_t  mout,
  output logic   overflow,
  output logic   busy
);

  localparam int unsigned PW = (MBUF_DEPTH > 1) ? $clog2(MBUF_DEPTH) : 1;

  typedef struct packed {
    logic [2:0] eng;
    maddr_t     maddr;
  } entry_t;

  entry_t             buf_q [MBUF_DEPTH];
  logic [PW-1:0]      rd_ptr, wr_ptr;
  logic [PW:0]        count;

  logic       r_valid;
  maddr_t     r_addr;
  logic [2:0] r_eng;

  logic   cont, pop, push, full;
  entry_t head;

  assign full = (count == (PW+1)'(MBUF_DEPTH));
  assign head = buf_q[rd_ptr];
  assign cont = r_valid && !mm_rdata.last;
  assign pop  = !cont && (count != '0);
  assign push = mreq.valid && (!full || pop);

  assign mm_rd   = cont || pop;
  assign mm_addr = cont ? maddr_t'(r_addr + 1'b1) : head.maddr;
  assign busy    = r_valid || (count != '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr   <= '0;
      wr_ptr   <= '0;
      count    <= '0;
      r_valid  <= 1'b0;
      r_addr   <= '0;
      r_eng    <= '0;
      mout     <= '0;
      overflow <= 1'b0;
    end else begin
      if (push) begin
        buf_q[wr_ptr] <= '{eng: mreq.eng, maddr: mreq.maddr};
        wr_ptr        <= (wr_ptr == PW'(MBUF_DEPTH - 1)) ? '0 : wr_ptr + 1'b1;
      end
      if (pop) rd_ptr <= (rd_ptr == PW'(MBUF_DEPTH - 1)) ? '0 : rd_ptr + 1'b1;
      count <= count + (PW+1)'(push) - (PW+1)'(pop);
      if (mreq.valid && !push) overflow <= 1'b1;

      r_valid <= mm_rd;
      r_addr  <= mm_addr;
      if (pop) r_eng <= head.eng;

      mout.valid <= r_valid;
      mout.eng   <= r_eng;
      mout.num0  <= mm_rdata.num0;
      mout.num1  <= mm_rdata.num1;
    end
  end

endmodule
