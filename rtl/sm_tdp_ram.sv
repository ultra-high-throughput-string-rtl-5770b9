// sm_tdp_ram: true dual-port synchronous RAM.
//
// Each string matching block keeps its state machine (3,584 x 324 b), its
// default-pointer lookup table (256 x 49 b) and its matching string numbers
// (2,048 x 27 b) in true dual-port memory, so that the two halves of the block
// read in parallel. Both ports can read or write; a read returns the word one
// clock after the address is presented (registered output, read-first when the
// same port writes). When both ports write the same address in one cycle,
// port B's data is kept. The port structure follows the published design; the
// one-cycle read latency and collision rule are this design's choices.
module sm_tdp_ram #(
  parameter int unsigned W  = 324,
  parameter int unsigned D  = 3584,
  parameter int unsigned AW = (D > 1) ? $clog2(D) : 1
) (
  input  logic          clk,
  // port A
  input  logic          a_en,
  input  logic          a_we,
  input  logic [AW-1:0] a_addr,
  input  logic [W-1:0]  a_wdata,
  output logic [W-1:0]  a_rdata,
  // port B
  input  logic          b_en,
  input  logic          b_we,
  input  logic [AW-1:0] b_addr,
  input  logic [W-1:0]  b_wdata,
  output logic [W-1:0]  b_rdata
);

  logic [W-1:0] mem [D];

  always_ff @(posedge clk) begin
    if (a_en) begin
      a_rdata <= mem[a_addr];
      if (a_we) mem[a_addr] <= a_wdata;
    end
    if (b_en) begin
      b_rdata <= mem[b_addr];
      if (b_we) mem[b_addr] <= b_wdata;
    end
  end

endmodule
