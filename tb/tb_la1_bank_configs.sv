// tb_la1_bank_configs: the LA-1 device in its 1-, 2-, 3- and 4-bank
// configurations, run side by side with random concurrent read and write traffic. Each configuration
// is checked by la1_cfg_run: read data and read latency against a reference
// model, and the built-in monitor's counts. The 3-bank device also shows
// that a bank count which is not a power of two works.
module tb_la1_bank_configs;

  logic done [4];
  int   checks [4], failures [4];

  la1_cfg_run #(.NB(1)) u_b1 (.done(done[0]), .checks(checks[0]), .failures(failures[0]));
  la1_cfg_run #(.NB(2)) u_b2 (.done(done[1]), .checks(checks[1]), .failures(failures[1]));
  la1_cfg_run #(.NB(3)) u_b3 (.done(done[2]), .checks(checks[2]), .failures(failures[2]));
  la1_cfg_run #(.NB(4)) u_b4 (.done(done[3]), .checks(checks[3]), .failures(failures[3]));

  function automatic int total(input int v [4]);
    return v[0] + v[1] + v[2] + v[3];
  endfunction

  initial begin
    #1;
    wait (done[0] && done[1] && done[2] && done[3]);
    $display("TB_RESULT checks=%0d failures=%0d", total(checks), total(failures));
    $finish;
  end

  // watchdog: 5000 cycles of 10 time units
  initial begin
    #50000;
    $display("ERROR watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", total(checks), total(failures) + 1);
    $finish;
  end

endmodule
