// la1_monitor: protocol monitor for the LA-1 pins.
//
// It lets the device act as a verification unit: it watches the pins of an
// LA-1 interface and checks, cycle by cycle, the rules below, counting the
// operations it sees and every violation.
//   read mode  For every read (R# low at K rising, bank select of an
//              existing bank) at edge n, Q must be driven across edge
//              n+2 .. n+3 (beat 0 after K, beat 1 after K#), and Q must not
//              be driven in any cycle without such a read.
//   contention No two banks drive the shared data output at once.
//   parity     Every beat on D during a write and on Q during a read has even
//              byte parity (each 9-bit lane holds an even number of ones).
// Timing: q_oe and conflict are sampled at K rising, so a read at edge n is
// compared at edge n+3 with the enable launched at edge n+2. Q beat 0 is
// sampled at the following K# edge and beat 1 at the next K edge.
// The read-mode rule follows the reference read sequence, and the
// parity rule its even byte parity; the counters and the exact rule set are
// this design's choice.
module la1_monitor
  import la1_pkg::*;
#(
  parameter int unsigned NUM_BANKS  = 4,
  parameter int unsigned BANK_WIDTH = 2,
  parameter int unsigned CNT_WIDTH  = 32
) (
  input  logic                 k,
  input  logic                 k_n,
  input  logic                 rst_n,
  input  logic                 r_n,
  input  logic                 w_n,
  input  logic [BANK_WIDTH-1:0] e,
  input  beat_t                d,
  input  beat_t                q,
  input  logic                 q_oe,
  input  logic                 conflict,
  output logic [CNT_WIDTH-1:0] reads,
  output logic [CNT_WIDTH-1:0] writes,
  output logic [CNT_WIDTH-1:0] latency_errors,
  output logic [CNT_WIDTH-1:0] conflict_errors,
  output logic [CNT_WIDTH-1:0] wparity_errors,
  output logic [CNT_WIDTH-1:0] rparity_errors,
  output logic                 violation      // any error seen since reset
);

  function automatic logic beat_ok(input beat_t b);
    return ~(^b[LANE_WIDTH-1:0]) & ~(^b[DQ_WIDTH-1:LANE_WIDTH]);
  endfunction

  logic                 rd_now;
  logic [2:0]           rd_hist;       // reads issued 1..3 edges ago
  logic                 wr_cyc;        // W# low at the last K edge
  logic [CNT_WIDTH-1:0] wpar_k, wpar_kn, rpar_k, rpar_kn;

  assign rd_now = ~r_n & (32'(e) < NUM_BANKS);

  always_ff @(posedge k or negedge rst_n) begin
    if (!rst_n) begin
      rd_hist         <= '0;
      wr_cyc          <= 1'b0;
      reads           <= '0;
      writes          <= '0;
      latency_errors  <= '0;
      conflict_errors <= '0;
      wpar_k          <= '0;
      rpar_k          <= '0;
    end else begin
      rd_hist <= {rd_hist[1:0], rd_now};
      wr_cyc  <= ~w_n;
      if (rd_now) reads  <= reads + 1'b1;
      if (!w_n)   writes <= writes + 1'b1;
      if (q_oe != rd_hist[2])        latency_errors  <= latency_errors + 1'b1;
      if (conflict)                  conflict_errors <= conflict_errors + 1'b1;
      if (!w_n && !beat_ok(d))       wpar_k <= wpar_k + 1'b1;   // write beat 0
      if (q_oe && !beat_ok(q))       rpar_k <= rpar_k + 1'b1;   // read beat 1
    end
  end

  always_ff @(posedge k_n or negedge rst_n) begin
    if (!rst_n) begin
      wpar_kn <= '0;
      rpar_kn <= '0;
    end else begin
      if (wr_cyc && !beat_ok(d))     wpar_kn <= wpar_kn + 1'b1; // write beat 1
      if (q_oe && !beat_ok(q))       rpar_kn <= rpar_kn + 1'b1; // read beat 0
    end
  end

  assign wparity_errors = wpar_k + wpar_kn;
  assign rparity_errors = rpar_k + rpar_kn;
  assign violation      = (latency_errors != '0) || (conflict_errors != '0) ||
                          (wparity_errors != '0) || (rparity_errors != '0);

endmodule
