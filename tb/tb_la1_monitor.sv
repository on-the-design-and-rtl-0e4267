// tb_la1_monitor: self-checking test of the LA-1 protocol monitor.
//
// The test plays the host and a device on the monitor's inputs from a
// cycle-by-cycle plan: correct reads and writes first, then one of each
// violation: a read answered a cycle late, a data output driven with no
// read, two banks driving at once, a write beat and a read beat with bad
// parity, and a read to a bank that does not exist (3 banks, bank 3). After
// each phase the counters must equal the values worked out from the plan.
module tb_la1_monitor;
  import la1_pkg::*;

  localparam int unsigned NB = 3;

  logic       k = 1'b0, k_n = 1'b1, rst_n;
  logic       r_n, w_n, q_oe, conflict;
  logic [1:0] e;
  beat_t      d, q;
  logic [31:0] reads, writes, lat_err, conf_err, wpar_err, rpar_err;
  logic        violation;

  la1_monitor #(.NUM_BANKS(NB), .BANK_WIDTH(2), .CNT_WIDTH(32)) dut (
    .k, .k_n, .rst_n, .r_n, .w_n, .e, .d, .q, .q_oe, .conflict,
    .reads, .writes, .latency_errors(lat_err), .conflict_errors(conf_err),
    .wparity_errors(wpar_err), .rparity_errors(rpar_err), .violation
  );

  always #5 begin k = ~k; k_n = ~k_n; end

  int checks = 0, failures = 0;

  // plan, one entry per K cycle
  typedef struct {
    bit rd; logic [1:0] bank; bit wr; word_t wdata;
    bit oe; word_t qdata; bit conf;
  } slot_t;
  slot_t plan [$];

  function automatic slot_t idle();
    slot_t s;
    s = '{rd: 0, bank: '0, wr: 0, wdata: make_word(0), oe: 0, qdata: make_word(0), conf: 0};
    return s;
  endfunction

  // a read at slot i answered at slot i + lat
  function automatic void add_read(int i, int lat, word_t w, logic [1:0] bank = 2'd0);
    while (plan.size() <= ((lat >= 0) ? i + lat : i)) plan.push_back(idle());
    plan[i].rd = 1; plan[i].bank = bank;
    if (lat >= 0) begin plan[i + lat].oe = 1; plan[i + lat].qdata = w; end
  endfunction

  task automatic run_plan();
    foreach (plan[i]) begin
      // a quarter period before K: host side
      r_n = ~plan[i].rd; e = plan[i].bank; w_n = ~plan[i].wr;
      d = plan[i].wdata[DQ_WIDTH-1:0];
      #3.5;                         // just after K: device side, beat 0
      q_oe = plan[i].oe; conflict = plan[i].conf;
      q = plan[i].oe ? plan[i].qdata[DQ_WIDTH-1:0] : '0;
      #1.5;                         // a quarter period before K#
      d = plan[i].wdata[WORD_WIDTH-1:DQ_WIDTH];
      #3.5;                         // just after K#: beat 1
      q = plan[i].oe ? plan[i].qdata[WORD_WIDTH-1:DQ_WIDTH] : '0;
      #1.5;
    end
    // drain: three idle cycles so every pending read is judged
    r_n = 1'b1; w_n = 1'b1; conflict = 1'b0;
    repeat (3) begin #3.5; q_oe = 1'b0; q = '0; #6.5; end
    plan.delete();
  endtask

  task automatic expect_counts(string phase, int rd, int wr, int lat, int cf, int wp, int rp);
    checks++;
    if (reads != 32'(rd) || writes != 32'(wr) || lat_err != 32'(lat) || conf_err != 32'(cf) ||
        wpar_err != 32'(wp) || rpar_err != 32'(rp) || violation !== (lat + cf + wp + rp > 0)) begin
      failures++;
      $display("ERROR %s: reads %0d/%0d writes %0d/%0d lat %0d/%0d conf %0d/%0d wpar %0d/%0d rpar %0d/%0d",
               phase, reads, rd, writes, wr, lat_err, lat, conf_err, cf, wpar_err, wp, rpar_err, rp);
    end
  endtask

  initial begin
    rst_n = 1'b0; r_n = 1'b1; w_n = 1'b1; e = '0; d = '0; q = '0; q_oe = 1'b0; conflict = 1'b0;
    #2.5;
    repeat (3) #10;
    rst_n = 1'b1;

    // phase 1: correct traffic, 40 reads (back to back and spread) and 30 writes
    for (int i = 0; i < 40; i++) add_read((i < 20) ? i : 2 * i, 2, make_word($urandom()), 2'(i % NB));
    for (int i = 0; i < 30; i++) begin plan[i].wr = 1; plan[i].wdata = make_word($urandom()); end
    run_plan();
    expect_counts("correct traffic", 40, 30, 0, 0, 0, 0);

    // phase 2: one read answered a cycle late: missing at +2, spurious at +3
    add_read(1, 3, make_word(32'hcafe_f00d));
    run_plan();
    expect_counts("late read", 41, 30, 2, 0, 0, 0);

    // phase 3: output driven with no read
    plan.push_back(idle()); plan.push_back(idle());
    plan[1].oe = 1; plan[1].qdata = make_word(32'h0);
    run_plan();
    expect_counts("spurious drive", 41, 30, 3, 0, 0, 0);

    // phase 4: two banks driving at once for one cycle
    plan.push_back(idle()); plan.push_back(idle());
    plan[0].conf = 1;
    run_plan();
    expect_counts("contention", 41, 30, 3, 1, 0, 0);

    // phase 5: write with a bad lane in beat 0, another with a bad lane in beat 1
    plan.push_back(idle()); plan.push_back(idle()); plan.push_back(idle());
    plan[0].wr = 1; plan[0].wdata = make_word(32'h1111_1111) ^ word_t'(1 << 3);
    plan[2].wr = 1; plan[2].wdata = make_word(32'h2222_2222) ^ word_t'(36'h1 << 30);
    run_plan();
    expect_counts("write parity", 41, 32, 3, 1, 2, 0);

    // phase 6: reads returning a bad beat 0 and a bad beat 1
    add_read(0, 2, make_word(32'h3333_3333) ^ word_t'(1 << 12));
    add_read(4, 2, make_word(32'h4444_4444) ^ word_t'(36'h1 << 20));
    run_plan();
    expect_counts("read parity", 43, 32, 3, 1, 2, 2);

    // phase 7: a read to bank 3, which does not exist, is not a read
    add_read(0, -1, '0, 2'd3);
    run_plan();
    expect_counts("absent bank", 43, 32, 3, 1, 2, 2);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge k);
    failures++;
    $display("ERROR watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
