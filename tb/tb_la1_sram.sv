// tb_la1_sram: self-checking test of the bank storage array.
//
// Random reads and byte-masked writes, often on the same address in the
// same cycle, are applied a quarter period before each clock edge and
// compared with a reference array: a read returns the word as it was before
// a write on the same edge, only enabled 9-bit lanes are written, and rdata
// holds its value while re is low. All addresses are written in full first.
module tb_la1_sram;
  import la1_pkg::*;

  localparam int unsigned AW = 4;

  logic          clk = 1'b0;
  logic          re, we;
  logic [AW-1:0] raddr, waddr;
  word_t         rdata, wdata;
  lane_en_t      wbe;

  la1_sram #(.ADDR_WIDTH(AW)) dut (.clk, .re, .raddr, .rdata, .we, .waddr, .wdata, .wbe);

  always #5 clk = ~clk;

  int    checks = 0, failures = 0;
  word_t ref_mem [2**AW];
  word_t exp_rd;
  bit    exp_valid = 0;
  int    n_collide = 0, n_masked = 0, n_hold = 0;

  task automatic step(input bit r, input logic [AW-1:0] ra, input bit w,
                      input logic [AW-1:0] wa, input word_t wd, input lane_en_t be);
    re = r; raddr = ra; we = w; waddr = wa; wdata = wd; wbe = be;
    @(posedge clk);
    if (r) begin exp_rd = ref_mem[ra]; exp_valid = 1; end
    else if (exp_valid) n_hold++;
    if (r && w && ra == wa) n_collide++;
    if (w && be != '1) n_masked++;
    if (w) for (int i = 0; i < LANES; i++)
      if (be[i]) ref_mem[wa][i*LANE_WIDTH +: LANE_WIDTH] = wd[i*LANE_WIDTH +: LANE_WIDTH];
    #2.5;
    if (exp_valid) begin
      checks++;
      if (rdata !== exp_rd) begin
        failures++;
        $display("ERROR rdata=%h expected %h", rdata, exp_rd);
      end
    end
    #2.5;
  endtask

  initial begin
    #2.5;
    for (int a = 0; a < 2**AW; a++) step(0, '0, 1, AW'(a), make_word($urandom()), '1);
    for (int n = 0; n < 2000; n++) begin
      automatic logic [AW-1:0] ra = AW'($urandom()), wa = AW'($urandom());
      if ($urandom_range(0, 3) == 0) wa = ra;
      step($urandom_range(0, 2) != 0, ra, $urandom_range(0, 1) == 1, wa,
           make_word($urandom()), lane_en_t'($urandom()));
    end
    checks++;
    if (n_collide == 0 || n_masked == 0 || n_hold == 0) begin
      failures++;
      $display("ERROR a case was never exercised: collide=%0d masked=%0d hold=%0d",
               n_collide, n_masked, n_hold);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("ERROR watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
