// la1_bank: one LA-1 bank, made of a write port, a read port and an SRAM.
//
// All banks of an LA-1 device share the K/K# clocks, R#, W#, the address
// bus, the bank select and the DDR data input; each bank answers only to
// commands whose bank select equals its BANK_ID and drives its own q/q_oe
// toward the shared output bus. Reads and writes proceed concurrently: the
// write port stores into the SRAM one cycle after W#, and the read port
// drives the word on Q two cycles after R# (see la1_write_port and
// la1_read_port for the edge-by-edge timing).
// Two assertions state the bank's read-mode and write-mode rules: a read
// addressed to this bank is answered on Q exactly two cycles later (and Q is
// driven only then), and the SRAM is written only on the K edge after W#.
// Building a multi-bank device by instantiating the read, write and memory
// modules once per bank follows the reference design; the bank select is this
// design's choice.
module la1_bank
  import la1_pkg::*;
#(
  parameter int unsigned ADDR_WIDTH = 16,
  parameter int unsigned BANK_WIDTH = 2,
  parameter int unsigned BANK_ID    = 0
) (
  input  logic                  k,
  input  logic                  k_n,
  input  logic                  rst_n,
  input  logic                  r_n,
  input  logic                  w_n,
  input  logic [ADDR_WIDTH-1:0] sa,
  input  logic [BANK_WIDTH-1:0] e,
  input  beat_t                 d,
  input  logic [BW_WIDTH-1:0]   bw_n,
  output beat_t                 q,
  output logic                  q_oe
);

  logic                  mem_we, mem_re;
  logic [ADDR_WIDTH-1:0] mem_waddr, mem_raddr;
  word_t                 mem_wdata, mem_rdata;
  lane_en_t              mem_wbe;

  la1_write_port #(
    .ADDR_WIDTH(ADDR_WIDTH), .BANK_WIDTH(BANK_WIDTH), .BANK_ID(BANK_ID)
  ) u_wport (
    .k, .k_n, .rst_n, .w_n, .sa, .e, .d, .bw_n,
    .mem_we, .mem_waddr, .mem_wdata, .mem_wbe
  );

  la1_read_port #(
    .ADDR_WIDTH(ADDR_WIDTH), .BANK_WIDTH(BANK_WIDTH), .BANK_ID(BANK_ID)
  ) u_rport (
    .k, .k_n, .rst_n, .r_n, .sa, .e, .q, .q_oe,
    .mem_re, .mem_raddr, .mem_rdata
  );

  la1_sram #(.ADDR_WIDTH(ADDR_WIDTH)) u_sram (
    .clk(k),
    .re(mem_re), .raddr(mem_raddr), .rdata(mem_rdata),
    .we(mem_we), .waddr(mem_waddr), .wdata(mem_wdata), .wbe(mem_wbe)
  );

  // Read mode: R# for this bank at edge n puts data on Q after edge n+2,
  // so q_oe is seen high when sampled at edge n+3.
  a_read_mode: assert property (@(posedge k) disable iff (!rst_n)
      (!r_n && e == BANK_WIDTH'(BANK_ID)) |-> ##3 q_oe)
    else $error("bank %0d: read not answered two cycles after R#", BANK_ID);

  // Q is driven only for a read to this bank two cycles earlier.
  a_read_only: assert property (@(posedge k) disable iff (!rst_n)
      q_oe |-> $past(!r_n && e == BANK_WIDTH'(BANK_ID), 3))
    else $error("bank %0d: Q driven without a read", BANK_ID);

  // Write mode: the SRAM is written only on the K edge after W#.
  a_write_mode: assert property (@(posedge k) disable iff (!rst_n)
      mem_we |-> $past(!w_n))
    else $error("bank %0d: SRAM written without W#", BANK_ID);

endmodule
