// la1_interface: LA-1 (Look-Aside 1) slave device with NUM_BANKS banks.
//
// The LA-1 interface links a network processor to look-up tables and
// memory-based coprocessors. It is modelled on a QDR SRAM: separate,
// unidirectional read and write data paths, a single address bus, and a
// master clock pair K/K# (ideally 180 degrees apart) supplied by the host.
// Reads and writes can be issued in the same cycle. Each data path has 18
// pins and is double data rate, so one transfer carries 32 data bits plus 4
// even byte-parity bits; writes have byte-write control.
//
// Pin protocol (all edges are rising edges; "K#" means the rising edge of
// K#, half a K period after K):
//   write  W# low at K (cycle n); D beat 0 and BW# lanes 1:0 at that K;
//          address SA, bank E, D beat 1 and BW# lanes 3:2 at the K# of
//          cycle n; stored at K of cycle n+1.
//   read   R# low with SA and E at K (cycle n); word read from the bank's
//          SRAM at K of n+1; Q = beat 0 after K of n+2, beat 1 after the
//          K# of n+2. Q_OE is high during cycle n+2.
// The device is built as in the reference design: one write port, one read port and
// one SRAM per bank, the bank outputs joined on a shared bus (tristate
// buffers in the reference design, an enable-gated OR here), plus a protocol monitor
// that checks the read-mode rule, bus contention and parity, so the device
// can also serve as a verification unit for other LA-1 devices.
// This design's own choices: the bank select E travelling with the address,
// the address width, the reset, the Q_OE pin and the monitor's outputs.
module la1_interface
  import la1_pkg::*;
#(
  parameter int unsigned NUM_BANKS  = 4,
  parameter int unsigned ADDR_WIDTH = 16,
  parameter int unsigned CNT_WIDTH  = 32,
  localparam int unsigned BANK_WIDTH = bank_bits(NUM_BANKS)
) (
  input  logic                  K,
  input  logic                  K_n,        // K#
  input  logic                  RST_n,
  input  logic                  R_n,        // READ_SEL#
  input  logic                  W_n,        // WRITE_SEL#
  input  logic [ADDR_WIDTH-1:0] SA,
  input  logic [BANK_WIDTH-1:0] E,          // bank select
  input  beat_t                 D,
  input  logic [BW_WIDTH-1:0]   BW_n,
  output beat_t                 Q,
  output logic                  Q_OE,
  // monitor results
  output logic [CNT_WIDTH-1:0]  MON_READS,
  output logic [CNT_WIDTH-1:0]  MON_WRITES,
  output logic [CNT_WIDTH-1:0]  MON_LATENCY_ERRORS,
  output logic [CNT_WIDTH-1:0]  MON_CONFLICT_ERRORS,
  output logic [CNT_WIDTH-1:0]  MON_WPARITY_ERRORS,
  output logic [CNT_WIDTH-1:0]  MON_RPARITY_ERRORS,
  output logic                  MON_VIOLATION
);

  beat_t                q_bank  [NUM_BANKS];
  logic [NUM_BANKS-1:0] oe_bank;
  logic                 conflict;

  for (genvar b = 0; b < NUM_BANKS; b++) begin : g_bank
    la1_bank #(
      .ADDR_WIDTH(ADDR_WIDTH), .BANK_WIDTH(BANK_WIDTH), .BANK_ID(b)
    ) u_bank (
      .k(K), .k_n(K_n), .rst_n(RST_n), .r_n(R_n), .w_n(W_n),
      .sa(SA), .e(E), .d(D), .bw_n(BW_n),
      .q(q_bank[b]), .q_oe(oe_bank[b])
    );
  end

  la1_qbus #(.NUM_BANKS(NUM_BANKS)) u_qbus (
    .q_bank, .oe_bank, .q(Q), .bus_oe(Q_OE), .conflict
  );

  la1_monitor #(
    .NUM_BANKS(NUM_BANKS), .BANK_WIDTH(BANK_WIDTH), .CNT_WIDTH(CNT_WIDTH)
  ) u_mon (
    .k(K), .k_n(K_n), .rst_n(RST_n), .r_n(R_n), .w_n(W_n), .e(E),
    .d(D), .q(Q), .q_oe(Q_OE), .conflict,
    .reads(MON_READS), .writes(MON_WRITES),
    .latency_errors(MON_LATENCY_ERRORS), .conflict_errors(MON_CONFLICT_ERRORS),
    .wparity_errors(MON_WPARITY_ERRORS), .rparity_errors(MON_RPARITY_ERRORS),
    .violation(MON_VIOLATION)
  );

  // Only one bank may drive the shared data output at a time.
  a_one_driver: assert property (@(posedge K) disable iff (!RST_n) !conflict)
    else $error("two banks drive Q at once");

endmodule
