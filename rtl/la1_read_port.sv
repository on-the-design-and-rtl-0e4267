// la1_read_port: read side of one LA-1 bank.
//
// A read is started by R# low at a rising edge of K, with the read address
// and bank select on the same edge. The port then follows the read sequence
// of the LA-1 design:
//   edge 0 (K rising)     R#, address and bank sampled
//   edge 1 (K rising)     the word is requested from the SRAM
//   edge 2 (K rising)     beat 0 (word[17:0])  driven on Q
//   edge 2 (K# rising)    beat 1 (word[35:18]) driven on Q
// q_oe is high from edge 2 until edge 3, i.e. across both beats, and tells
// the shared bus that this bank drives Q. One read can be accepted every K
// cycle; the port acts only if the bank select equals BANK_ID.
//
// The DDR output uses two registers, one per clock: at K rising
// lo <= beat0 ^ hi, at K# rising hi <= beat1 ^ lo, and Q = lo ^ hi. Q thus
// shows beat 0 after K and beat 1 after K# without a clock in the data path.
// The cycle counts follow the reference read sequence; the DDR register
// structure, the output enable and the reset are this design's choices.
// Registers written at K rising are read at K# rising, a half-cycle path.
module la1_read_port
  import la1_pkg::*;
#(
  parameter int unsigned ADDR_WIDTH = 16,
  parameter int unsigned BANK_WIDTH = 2,
  parameter int unsigned BANK_ID    = 0
) (
  input  logic                  k,
  input  logic                  k_n,
  input  logic                  rst_n,      // asynchronous, active low
  // LA-1 pins
  input  logic                  r_n,        // READ_SEL#
  input  logic [ADDR_WIDTH-1:0] sa,
  input  logic [BANK_WIDTH-1:0] e,          // bank select
  output beat_t                 q,          // DDR data output (0 when idle)
  output logic                  q_oe,       // this bank drives Q
  // to/from the SRAM
  output logic                  mem_re,
  output logic [ADDR_WIDTH-1:0] mem_raddr,
  input  word_t                 mem_rdata
);

  logic                  req_v;      // read accepted at edge 0
  logic [ADDR_WIDTH-1:0] req_addr;
  logic                  dat_v;      // SRAM word valid after edge 1
  logic                  out_v;      // beats on Q after edge 2
  beat_t                 hi_word;    // beat 1 held for the K# edge
  beat_t                 ddr_lo, ddr_hi;

  always_ff @(posedge k or negedge rst_n) begin
    if (!rst_n) begin
      req_v <= 1'b0;
      dat_v <= 1'b0;
      out_v <= 1'b0;
    end else begin
      req_v <= ~r_n & (e == BANK_WIDTH'(BANK_ID));
      dat_v <= req_v;
      out_v <= dat_v;
    end
  end

  always_ff @(posedge k) begin
    req_addr <= sa;
  end

  assign mem_re    = req_v;
  assign mem_raddr = req_addr;

  // Format the SRAM word into two beats.
  always_ff @(posedge k) begin
    ddr_lo  <= mem_rdata[DQ_WIDTH-1:0] ^ ddr_hi;
    hi_word <= mem_rdata[WORD_WIDTH-1:DQ_WIDTH];
  end

  always_ff @(posedge k_n) begin
    ddr_hi <= hi_word ^ ddr_lo;
  end

  assign q_oe = out_v;
  assign q    = out_v ? (ddr_lo ^ ddr_hi) : '0;

endmodule
