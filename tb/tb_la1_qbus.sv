// tb_la1_qbus: self-checking test of the shared read-data bus.
//
// Applies every output-enable pattern of four banks, each with random
// beats, and checks that Q carries the single enabled bank's beat (0 when
// none), that bus_oe is set when any bank drives and that conflict is set
// exactly when two or more banks drive.
module tb_la1_qbus;
  import la1_pkg::*;

  localparam int unsigned NB = 4;

  beat_t         q_bank [NB];
  logic [NB-1:0] oe_bank;
  beat_t         q;
  logic          bus_oe, conflict;

  la1_qbus #(.NUM_BANKS(NB)) dut (.q_bank, .oe_bank, .q, .bus_oe, .conflict);

  int checks = 0, failures = 0;

  initial begin
    for (int rep = 0; rep < 50; rep++) begin
      for (int m = 0; m < 2**NB; m++) begin
        beat_t exp_q;
        int    n_on;
        for (int b = 0; b < NB; b++) q_bank[b] = beat_t'($urandom());
        oe_bank = NB'(m);
        #1;
        n_on  = 0;
        exp_q = '0;
        for (int b = 0; b < NB; b++) if (oe_bank[b]) begin n_on++; exp_q = q_bank[b]; end
        checks++;
        if (bus_oe !== (n_on > 0) || conflict !== (n_on > 1)) begin
          failures++;
          $display("ERROR oe=%b bus_oe=%b conflict=%b", oe_bank, bus_oe, conflict);
        end
        if (n_on == 1 || n_on == 0) begin
          checks++;
          if (q !== exp_q) begin
            failures++;
            $display("ERROR oe=%b q=%h expected %h", oe_bank, q, exp_q);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("ERROR watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
