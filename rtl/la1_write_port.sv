// la1_write_port: write side of one LA-1 bank.
//
// A write is started by W# low at a rising edge of K. The write address and
// the bank select are taken at the following rising edge of K# (half a cycle
// later). The 36-bit word arrives over the 18-pin DDR input path as two
// beats, with the byte-write controls BW#[1:0] (active low) alongside each:
//   K  rising, same cycle as W#:  D = word[17:0],  BW# = lanes 1:0
//   K# rising, same cycle:        D = word[35:18], BW# = lanes 3:2
// At the next rising edge of K the port presents a complete write (address,
// word, lane enables) to the SRAM, which stores it on that edge; the port
// acts only if the bank select equals BANK_ID. One write can be accepted
// every K cycle.
//
// W# low at K, the address at the following K#, the 18-pin DDR path and
// byte write control follow the LA-1 description. Taking the data beats in
// the same cycle as W#, the bank select travelling with the address, the
// BW# pin count and the reset are this design's choices. Registers written
// at K# rising are read at the next K rising edge, a half-cycle path.
module la1_write_port
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
  input  logic                  w_n,        // WRITE_SEL#
  input  logic [ADDR_WIDTH-1:0] sa,         // shared address bus
  input  logic [BANK_WIDTH-1:0] e,          // bank select
  input  beat_t                 d,          // DDR data input
  input  logic [BW_WIDTH-1:0]   bw_n,       // DDR byte-write controls
  // to the SRAM
  output logic                  mem_we,
  output logic [ADDR_WIDTH-1:0] mem_waddr,
  output word_t                 mem_wdata,
  output lane_en_t              mem_wbe
);

  logic                  w_pend;     // W# seen low at the last K edge
  beat_t                 d_lo, d_hi;
  logic [BW_WIDTH-1:0]   bw_lo_n, bw_hi_n;
  logic [ADDR_WIDTH-1:0] addr_q;
  logic                  sel_q;      // bank select matched at K#

  // K rising: command and first beat.
  always_ff @(posedge k or negedge rst_n) begin
    if (!rst_n) w_pend <= 1'b0;
    else        w_pend <= ~w_n;
  end

  always_ff @(posedge k) begin
    d_lo    <= d;
    bw_lo_n <= bw_n;
  end

  // K# rising: address, bank select and second beat.
  always_ff @(posedge k_n or negedge rst_n) begin
    if (!rst_n) sel_q <= 1'b0;
    else        sel_q <= (e == BANK_WIDTH'(BANK_ID));
  end

  always_ff @(posedge k_n) begin
    addr_q  <= sa;
    d_hi    <= d;
    bw_hi_n <= bw_n;
  end

  // Complete write, stored by the SRAM at the next K rising edge.
  assign mem_we    = w_pend & sel_q;
  assign mem_waddr = addr_q;
  assign mem_wdata = {d_hi, d_lo};
  assign mem_wbe   = ~{bw_hi_n, bw_lo_n};

endmodule
