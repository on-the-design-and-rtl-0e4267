// tb_la1_write_port: self-checking test of the write side of one bank.
//
// The port (BANK_ID 2 of 4) sees random writes to all four banks, with
// random byte-write masks and random traffic on the shared address bus in
// the K half of each cycle. W#, D beat 0 and BW# lanes 1:0 are set up a
// quarter period before K; the write address, bank, D beat 1 and BW# lanes
// 3:2 a quarter period before K#. Just before the next K edge the SRAM-side
// outputs must hold exactly the command of the cycle before (address, the
// two beats joined into one word, active-high lane enables), and mem_we
// must be high only for writes to bank 2.
module tb_la1_write_port;
  import la1_pkg::*;

  localparam int unsigned AW = 8;

  logic          k = 1'b0, k_n = 1'b1, rst_n;
  logic          w_n;
  logic [AW-1:0] sa;
  logic [1:0]    e;
  beat_t         d;
  logic [1:0]    bw_n;
  logic          mem_we;
  logic [AW-1:0] mem_waddr;
  word_t         mem_wdata;
  lane_en_t      mem_wbe;

  la1_write_port #(.ADDR_WIDTH(AW), .BANK_WIDTH(2), .BANK_ID(2)) dut (
    .k, .k_n, .rst_n, .w_n, .sa, .e, .d, .bw_n, .mem_we, .mem_waddr, .mem_wdata, .mem_wbe
  );

  always #5 begin k = ~k; k_n = ~k_n; end

  int checks = 0, failures = 0;
  int n_mine = 0, n_other = 0, n_masked = 0, n_idle = 0;

  initial begin
    rst_n = 1'b0; w_n = 1'b1; sa = '0; e = '0; d = '0; bw_n = '1;
    #2.5;
    repeat (3) #10;
    rst_n = 1'b1;
    for (int n = 0; n < 2000; n++) begin
      automatic bit            wr   = $urandom_range(0, 2) != 0;
      automatic logic [1:0]    bank = 2'($urandom());
      automatic logic [AW-1:0] addr = AW'($urandom());
      automatic word_t         data = make_word($urandom());
      automatic lane_en_t      be   = ($urandom_range(0, 1) == 0) ? lane_en_t'($urandom()) : '1;
      // K half: W#, beat 0; the address bus carries unrelated traffic
      w_n = ~wr; d = data[DQ_WIDTH-1:0]; bw_n = ~be[1:0];
      sa = AW'($urandom()); e = 2'($urandom());
      #5;
      // K# half: write address, bank, beat 1
      sa = addr; e = bank; d = data[WORD_WIDTH-1:DQ_WIDTH]; bw_n = ~be[3:2];
      #4;
      // just before the next K edge
      checks++;
      if (mem_we !== (wr && bank == 2'd2)) begin
        failures++;
        $display("ERROR cycle %0d: mem_we=%b wr=%b bank=%0d", n, mem_we, wr, bank);
      end
      if (wr && bank == 2'd2) begin
        n_mine++;
        if (be != '1) n_masked++;
        checks++;
        if (mem_waddr !== addr || mem_wdata !== data || mem_wbe !== be) begin
          failures++;
          $display("ERROR cycle %0d: addr %h/%h data %h/%h be %b/%b", n,
                   mem_waddr, addr, mem_wdata, data, mem_wbe, be);
        end
      end else if (wr) n_other++;
      else n_idle++;
      #1;
    end
    checks++;
    if (n_mine == 0 || n_other == 0 || n_masked == 0 || n_idle == 0) begin
      failures++;
      $display("ERROR a case never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge k);
    failures++;
    $display("ERROR watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
