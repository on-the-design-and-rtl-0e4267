// la1_cfg_run: runs random read/write traffic on an LA-1 device built with
// NB banks and reports its own check and failure counts.
//
// Used by tb_la1_bank_configs to exercise the 1-, 2-, 3- and 4-bank
// configurations side by side. Each instance has its own clocks and host
// model: every cycle carries an optional read and an optional write, to
// random banks and addresses of a small pool, with random byte masks. A
// reference model (read-first within a cycle) gives the word each read
// must return on Q two cycles after R#; the monitor inside the device must
// count the same reads and writes and no violation. Every bank must have
// been read at least once.
module la1_cfg_run
  import la1_pkg::*;
#(
  parameter int unsigned NB   = 1,
  parameter int          NCYC = 1000
) (
  output logic done,
  output int   checks,
  output int   failures
);

  localparam int unsigned AW   = 16;
  localparam int unsigned BW   = bank_bits(NB);
  localparam int          POOL = 8;

  logic          K = 1'b0, K_n = 1'b1, RST_n;
  logic          R_n, W_n;
  logic [AW-1:0] SA;
  logic [BW-1:0] E;
  beat_t         D, Q;
  logic [1:0]    BW_n;
  logic          Q_OE;
  logic [31:0]   mon_reads, mon_writes, mon_lat, mon_conf, mon_wpar, mon_rpar;
  logic          mon_viol;

  la1_interface #(.NUM_BANKS(NB)) dut (
    .K, .K_n, .RST_n, .R_n, .W_n, .SA, .E, .D, .BW_n, .Q, .Q_OE,
    .MON_READS(mon_reads), .MON_WRITES(mon_writes),
    .MON_LATENCY_ERRORS(mon_lat), .MON_CONFLICT_ERRORS(mon_conf),
    .MON_WPARITY_ERRORS(mon_wpar), .MON_RPARITY_ERRORS(mon_rpar),
    .MON_VIOLATION(mon_viol)
  );

  always #5 begin K = ~K; K_n = ~K_n; end

  int edge_no = 0;
  always @(posedge K) edge_no++;

  word_t         model [NB][logic [AW-1:0]];
  word_t         exp_word [int];
  logic [AW-1:0] pool [NB][POOL];
  int            n_reads = 0, n_writes = 0, n_rd_bank [NB];

  task automatic drive(input bit rd, input int rb, input logic [AW-1:0] ra,
                       input bit wr, input int wb, input logic [AW-1:0] wa,
                       input word_t wd, input lane_en_t be);
    int e_at = edge_no + 1;
    if (rd) begin
      exp_word[e_at + 2] = model[rb][ra];
      n_reads++;
      n_rd_bank[rb]++;
    end
    if (wr) begin
      word_t w = model[wb].exists(wa) ? model[wb][wa] : '0;
      for (int i = 0; i < LANES; i++)
        if (be[i]) w[i*LANE_WIDTH +: LANE_WIDTH] = wd[i*LANE_WIDTH +: LANE_WIDTH];
      model[wb][wa] = w;
      n_writes++;
    end
    R_n = ~rd; W_n = ~wr; SA = ra; E = BW'(rb); D = wd[DQ_WIDTH-1:0]; BW_n = ~be[1:0];
    #5;
    SA = wa; E = BW'(wb); D = wd[WORD_WIDTH-1:DQ_WIDTH]; BW_n = ~be[3:2];
    #5;
  endtask

  initial begin
    forever begin
      beat_t b0;
      logic  oe;
      int    en;
      @(posedge K);
      #2.5;
      en = edge_no; b0 = Q; oe = Q_OE;
      #5;
      if (RST_n && !done) begin
        checks++;
        if (oe !== exp_word.exists(en)) begin
          failures++;
          $display("ERROR %0d banks, edge %0d: Q_OE=%b", NB, en, oe);
        end
        if (exp_word.exists(en)) begin
          checks++;
          if ({Q, b0} !== exp_word[en]) begin
            failures++;
            $display("ERROR %0d banks, edge %0d: Q=%h expected %h", NB, en, {Q, b0}, exp_word[en]);
          end
          exp_word.delete(en);
        end
      end
    end
  end

  initial begin
    done = 1'b0; checks = 0; failures = 0;
    foreach (n_rd_bank[b]) n_rd_bank[b] = 0;
    for (int b = 0; b < NB; b++)
      for (int i = 0; i < POOL; i++) pool[b][i] = AW'($urandom());
    RST_n = 1'b0; R_n = 1'b1; W_n = 1'b1; SA = '0; E = '0; D = '0; BW_n = '1;
    #2.5;
    repeat (3) drive(0, 0, '0, 0, 0, '0, '0, '0);
    RST_n = 1'b1;
    for (int b = 0; b < NB; b++)
      for (int i = 0; i < POOL; i++) drive(0, 0, '0, 1, b, pool[b][i], make_word($urandom()), '1);
    for (int n = 0; n < NCYC; n++) begin
      automatic int rb = $urandom_range(0, NB - 1);
      automatic int wb = $urandom_range(0, NB - 1);
      drive($urandom_range(0, 2) != 0, rb, pool[rb][$urandom_range(0, POOL - 1)],
            $urandom_range(0, 1) == 1, wb, pool[wb][$urandom_range(0, POOL - 1)],
            make_word($urandom()), ($urandom_range(0, 2) == 0) ? lane_en_t'($urandom()) : '1);
    end
    repeat (4) drive(0, 0, '0, 0, 0, '0, '0, '0);
    checks++;
    if (mon_reads != 32'(n_reads) || mon_writes != 32'(n_writes) || mon_viol !== 1'b0 ||
        exp_word.size() != 0) begin
      failures++;
      $display("ERROR %0d banks: monitor %0d/%0d reads %0d/%0d writes, violation %b, unanswered %0d",
               NB, mon_reads, n_reads, mon_writes, n_writes, mon_viol, exp_word.size());
    end
    for (int b = 0; b < NB; b++) begin
      checks++;
      if (n_rd_bank[b] == 0) begin
        failures++;
        $display("ERROR %0d banks: bank %0d never read", NB, b);
      end
    end
    $display("%0d-bank configuration: %0d reads, %0d writes, %0d checks, %0d failures",
             NB, n_reads, n_writes, checks, failures);
    done = 1'b1;
  end

endmodule
