// tb_la1_interface: end-to-end test of the LA-1 slave at its default size
// (4 banks, 16-bit addresses).
//
// A host model drives the pins cycle by cycle: each cycle may carry a read
// and a write at once, to any bank, with random byte-write masks. Commands
// are set up a quarter period before the K edge that samples them; the
// write address, bank and second beat a quarter period before K#. A
// reference model (one associative array per bank, written in command
// order with this design's read-first rule for a read and a write in the
// same cycle) gives the word each read must return. Q is sampled a quarter
// period after K (beat 0) and after K# (beat 1); Q_OE and the data must
// appear exactly two cycles after R#.
// It counts how often each mechanism happened: full and byte-masked
// writes, reads on every bank, a read and a write in the same cycle, a read
// of the address written in the same cycle, a read the cycle after a write
// to the same address, back-to-back reads from different banks, idle
// cycles and a bad-parity write caught by the monitor. A mechanism that
// never happened counts as a failure. The monitor's counters must match
// the host's.
module tb_la1_interface;
  import la1_pkg::*;

  localparam int unsigned NB = 4;
  localparam int unsigned AW = 16;
  localparam int unsigned BW = bank_bits(NB);
  localparam int          POOL = 12;        // addresses used per bank
  localparam int          NCYC = 3000;

  logic          K = 1'b0, K_n = 1'b1, RST_n;
  logic          R_n, W_n;
  logic [AW-1:0] SA;
  logic [BW-1:0] E;
  beat_t         D, Q;
  logic [1:0]    BW_n;
  logic          Q_OE;
  logic [31:0]   mon_reads, mon_writes, mon_lat, mon_conf, mon_wpar, mon_rpar;
  logic          mon_viol;

  la1_interface dut (
    .K, .K_n, .RST_n, .R_n, .W_n, .SA, .E, .D, .BW_n, .Q, .Q_OE,
    .MON_READS(mon_reads), .MON_WRITES(mon_writes),
    .MON_LATENCY_ERRORS(mon_lat), .MON_CONFLICT_ERRORS(mon_conf),
    .MON_WPARITY_ERRORS(mon_wpar), .MON_RPARITY_ERRORS(mon_rpar),
    .MON_VIOLATION(mon_viol)
  );

  // K rises at 10n+5, K# at 10n+10.
  always #5 begin K = ~K; K_n = ~K_n; end

  int checks = 0, failures = 0;
  int edge_no = 0;
  always @(posedge K) edge_no++;

  // reference model
  word_t model [NB][logic [AW-1:0]];
  // expected read result per K edge at which it is driven
  word_t exp_word [int];
  int    exp_bank [int];

  // mechanism counters
  int n_wr_full, n_wr_masked, n_rd_bank[NB], n_concurrent, n_same_addr_same_cycle;
  int n_raw_next, n_b2b_bank_switch, n_idle, n_reads, n_writes;

  typedef struct {
    bit              rd, wr;
    logic [AW-1:0]   raddr, waddr;
    logic [BW-1:0]   rbank, wbank;
    word_t           wdata;
    lane_en_t        wbe;
  } cmd_t;

  logic [AW-1:0] pool [NB][POOL];
  bit            last_wr_valid;
  logic [AW-1:0] last_waddr;
  logic [BW-1:0] last_wbank;
  int            last_rd_bank;

  function automatic word_t merge(word_t old, word_t nw, lane_en_t be);
    word_t r = old;
    for (int i = 0; i < LANES; i++)
      if (be[i]) r[i*LANE_WIDTH +: LANE_WIDTH] = nw[i*LANE_WIDTH +: LANE_WIDTH];
    return r;
  endfunction

  // Drive one cycle; called a quarter period before the K edge.
  task automatic drive(input cmd_t c);
    int e_at = edge_no + 1;   // K edge that will sample this command
    if (c.rd) begin
      exp_word[e_at + 2] = model[c.rbank][c.raddr];  // read-first: before this cycle's write
      exp_bank[e_at + 2] = int'(c.rbank);
      n_reads++;
      n_rd_bank[c.rbank]++;
      if (last_rd_bank >= 0 && last_rd_bank != int'(c.rbank)) n_b2b_bank_switch++;
      last_rd_bank = int'(c.rbank);
      if (last_wr_valid && last_wbank == c.rbank && last_waddr == c.raddr) n_raw_next++;
      if (c.wr && c.wbank == c.rbank && c.waddr == c.raddr) n_same_addr_same_cycle++;
    end else begin
      last_rd_bank = -1;
    end
    if (c.wr) begin
      model[c.wbank][c.waddr] = merge(model[c.wbank].exists(c.waddr) ? model[c.wbank][c.waddr] : '0,
                                      c.wdata, c.wbe);
      n_writes++;
      if (c.wbe == '1) n_wr_full++; else n_wr_masked++;
    end
    if (c.rd && c.wr) n_concurrent++;
    if (!c.rd && !c.wr) n_idle++;
    last_wr_valid = c.wr;
    last_waddr    = c.waddr;
    last_wbank    = c.wbank;

    R_n  = ~c.rd;
    W_n  = ~c.wr;
    SA   = c.raddr;
    E    = c.rbank;
    D    = c.wdata[DQ_WIDTH-1:0];
    BW_n = ~c.wbe[1:0];
    #5;                        // a quarter period before K#
    SA   = c.waddr;
    E    = c.wbank;
    D    = c.wdata[WORD_WIDTH-1:DQ_WIDTH];
    BW_n = ~c.wbe[3:2];
    #5;
  endtask

  // Check Q around every K edge.
  int n_rd_seen = 0;
  initial begin
    forever begin
      beat_t b0;
      logic  oe;
      int    en;
      @(posedge K);
      #2.5;
      en = edge_no;
      b0 = Q;
      oe = Q_OE;
      #5;
      if (RST_n) begin
        checks++;
        if (oe !== exp_word.exists(en)) begin
          failures++;
          $display("ERROR edge %0d: Q_OE=%0b, read expected=%0b", en, oe, exp_word.exists(en));
        end
        if (exp_word.exists(en)) begin
          checks++;
          n_rd_seen++;
          if ({Q, b0} !== exp_word[en] || Q_OE !== 1'b1) begin
            failures++;
            $display("ERROR edge %0d bank %0d: Q=%h expected %h", en, exp_bank[en], {Q, b0}, exp_word[en]);
          end
          exp_word.delete(en);
        end
      end
    end
  end

  cmd_t idle_c;

  function automatic cmd_t rand_cmd();
    cmd_t c;
    c.rd    = ($urandom_range(0, 99) < 60);
    c.wr    = ($urandom_range(0, 99) < 50);
    c.rbank = BW'($urandom_range(0, NB - 1));
    c.wbank = BW'($urandom_range(0, NB - 1));
    c.raddr = pool[c.rbank][$urandom_range(0, POOL - 1)];
    c.waddr = pool[c.wbank][$urandom_range(0, POOL - 1)];
    // now and then aim at the address just written or read in this cycle
    if (c.rd && last_wr_valid && $urandom_range(0, 9) == 0) begin
      c.rbank = last_wbank; c.raddr = last_waddr;
    end
    if (c.rd && c.wr && $urandom_range(0, 9) == 0) begin
      c.wbank = c.rbank; c.waddr = c.raddr;
    end
    c.wdata = make_word($urandom());
    c.wbe   = ($urandom_range(0, 2) == 0) ? lane_en_t'($urandom_range(1, 14)) : '1;
    return c;
  endfunction

  initial begin
    cmd_t c;
    idle_c = '{rd: 0, wr: 0, raddr: '0, waddr: '0, rbank: '0, wbank: '0, wdata: '0, wbe: '0};
    last_rd_bank = -1;
    last_wr_valid = 0;
    for (int b = 0; b < NB; b++)
      for (int i = 0; i < POOL; i++)
        pool[b][i] = (i == 0) ? AW'(0) : (i == 1) ? {AW{1'b1}} : AW'($urandom());
    RST_n = 1'b0;
    R_n = 1'b1; W_n = 1'b1; SA = '0; E = '0; D = '0; BW_n = '1;
    #2.5;
    repeat (4) drive(idle_c);
    RST_n = 1'b1;
    drive(idle_c);
    // fill every pool address of every bank with a full word
    for (int b = 0; b < NB; b++)
      for (int i = 0; i < POOL; i++) begin
        c = idle_c;
        c.wr = 1; c.wbank = BW'(b); c.waddr = pool[b][i];
        c.wdata = make_word($urandom()); c.wbe = '1;
        drive(c);
      end
    // random concurrent traffic
    for (int n = 0; n < NCYC; n++) begin
      c = rand_cmd();
      drive(c);
    end
    // a write with a parity error in lane 0 (beat 0), then read it back
    c = idle_c;
    c.wr = 1; c.wbank = '0; c.waddr = pool[0][0];
    c.wdata = make_word(32'h1234_5678) ^ word_t'(1 << 8); c.wbe = '1;
    drive(c);
    c = idle_c;
    c.rd = 1; c.rbank = '0; c.raddr = pool[0][0];
    drive(c);
    repeat (5) drive(idle_c);

    // monitor agrees with the host
    checks++;
    if (mon_reads != 32'(n_reads) || mon_writes != 32'(n_writes)) begin
      failures++;
      $display("ERROR monitor counted %0d reads %0d writes, host issued %0d %0d",
               mon_reads, mon_writes, n_reads, n_writes);
    end
    checks++;
    if (mon_lat != 0 || mon_conf != 0) begin
      failures++;
      $display("ERROR monitor latency errors %0d, conflicts %0d", mon_lat, mon_conf);
    end
    checks++;
    if (mon_wpar != 1 || mon_rpar != 1 || mon_viol !== 1'b1) begin
      failures++;
      $display("ERROR monitor parity errors write %0d read %0d (expected 1 and 1)", mon_wpar, mon_rpar);
    end
    checks++;
    if (exp_word.size() != 0 || n_rd_seen != n_reads) begin
      failures++;
      $display("ERROR %0d reads never answered", exp_word.size());
    end

    // every mechanism must have happened
    begin
      int need [string];
      need["full write"]                   = n_wr_full;
      need["byte-masked write"]            = n_wr_masked;
      need["read and write in one cycle"]  = n_concurrent;
      need["read of address written same cycle"] = n_same_addr_same_cycle;
      need["read right after write"]       = n_raw_next;
      need["back-to-back reads, bank switch"] = n_b2b_bank_switch;
      need["idle cycle"]                   = n_idle;
      need["parity error detected"]        = int'(mon_wpar);
      for (int b = 0; b < NB; b++) need[$sformatf("reads of bank %0d", b)] = n_rd_bank[b];
      foreach (need[k]) begin
        checks++;
        $display("mechanism %-38s %0d", k, need[k]);
        if (need[k] == 0) begin
          failures++;
          $display("ERROR mechanism never exercised: %s", k);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge K);
    failures++;
    $display("ERROR watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
