// la1_sram: storage array of one LA-1 bank.
//
// Holds DEPTH = 2**ADDR_WIDTH words of 36 bits (32 data bits and 4 even
// byte-parity bits, stored as received). It has one read port and one write
// port, both synchronous to the rising edge of K, so a read and a write can
// be served in the same cycle, as the concurrent read/write operation of
// LA-1 requires.
//
// Interface and timing:
//   re/raddr  sampled at K rising; rdata holds mem[raddr] from that edge on
//             and keeps its value while re is low (one cycle read latency).
//   we/waddr/wdata/wbe  sampled at K rising; only lanes whose wbe bit is set
//             are written (byte write control; a lane is 9 bits).
//   Read and write of the same address on the same edge: the read returns
//   the word as it was before the write (read-first).
// The reference design names the memory and its word format; the two-port array,
// the read-first order and the depth are this design's choices.
module la1_sram
  import la1_pkg::*;
#(
  parameter int unsigned ADDR_WIDTH = 16
) (
  input  logic                  clk,     // K
  input  logic                  re,
  input  logic [ADDR_WIDTH-1:0] raddr,
  output word_t                 rdata,
  input  logic                  we,
  input  logic [ADDR_WIDTH-1:0] waddr,
  input  word_t                 wdata,
  input  lane_en_t              wbe
);

  localparam int unsigned DEPTH = 2 ** ADDR_WIDTH;

  word_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (re) rdata <= mem[raddr];
  end

  always_ff @(posedge clk) begin
    if (we) begin
      for (int i = 0; i < LANES; i++) begin
        if (wbe[i]) mem[waddr][i*LANE_WIDTH +: LANE_WIDTH] <= wdata[i*LANE_WIDTH +: LANE_WIDTH];
      end
    end
  end

endmodule
