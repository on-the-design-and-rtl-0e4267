// tb_la1_bank: self-checking test of one complete bank (write port, read
// port and SRAM together).
//
// The bank (BANK_ID 3 of 4) receives random concurrent reads and writes to
// all four banks. A reference array for bank 3, updated in command order
// with reads taking effect before a write of the same cycle, gives the word
// each read must return two cycles after R#, beat 0 after K and beat 1 after
// K#. Commands for other banks must neither change the bank's contents nor
// drive Q. Every address is first written in full.
module tb_la1_bank;
  import la1_pkg::*;

  localparam int unsigned AW = 5;
  localparam logic [1:0]  ME = 2'd3;

  logic          k = 1'b0, k_n = 1'b1, rst_n;
  logic          r_n, w_n;
  logic [AW-1:0] sa;
  logic [1:0]    e;
  beat_t         d, q;
  logic [1:0]    bw_n;
  logic          q_oe;

  la1_bank #(.ADDR_WIDTH(AW), .BANK_WIDTH(2), .BANK_ID(3)) dut (
    .k, .k_n, .rst_n, .r_n, .w_n, .sa, .e, .d, .bw_n, .q, .q_oe
  );

  always #5 begin k = ~k; k_n = ~k_n; end

  int checks = 0, failures = 0;
  int edge_no = 0;
  always @(posedge k) edge_no++;
  word_t ref_mem [2**AW];
  word_t exp_word [int];
  int n_rd = 0, n_wr = 0, n_masked = 0, n_other_wr = 0, n_conc = 0, n_same = 0;

  task automatic drive(input bit rd, input logic [1:0] rb, input logic [AW-1:0] ra,
                       input bit wr, input logic [1:0] wb, input logic [AW-1:0] wa,
                       input word_t wd, input lane_en_t be);
    int e_at = edge_no + 1;
    if (rd && rb == ME) begin
      exp_word[e_at + 2] = ref_mem[ra];
      n_rd++;
    end
    if (wr && wb == ME) begin
      for (int i = 0; i < LANES; i++)
        if (be[i]) ref_mem[wa][i*LANE_WIDTH +: LANE_WIDTH] = wd[i*LANE_WIDTH +: LANE_WIDTH];
      n_wr++;
      if (be != '1) n_masked++;
      if (rd && rb == ME) n_conc++;
      if (rd && rb == ME && ra == wa) n_same++;
    end else if (wr) n_other_wr++;
    r_n = ~rd; w_n = ~wr; sa = ra; e = rb; d = wd[DQ_WIDTH-1:0]; bw_n = ~be[1:0];
    #5;
    sa = wa; e = wb; d = wd[WORD_WIDTH-1:DQ_WIDTH]; bw_n = ~be[3:2];
    #5;
  endtask

  initial begin
    forever begin
      beat_t b0;
      logic  oe;
      int    en;
      @(posedge k);
      #2.5;
      en = edge_no; b0 = q; oe = q_oe;
      #5;
      if (rst_n) begin
        checks++;
        if (oe !== exp_word.exists(en)) begin
          failures++;
          $display("ERROR edge %0d: q_oe=%b", en, oe);
        end
        if (exp_word.exists(en)) begin
          checks++;
          if ({q, b0} !== exp_word[en]) begin
            failures++;
            $display("ERROR edge %0d: Q=%h expected %h", en, {q, b0}, exp_word[en]);
          end
          exp_word.delete(en);
        end
      end
    end
  end

  initial begin
    rst_n = 1'b0; r_n = 1'b1; w_n = 1'b1; sa = '0; e = '0; d = '0; bw_n = '1;
    #2.5;
    repeat (3) drive(0, '0, '0, 0, '0, '0, '0, '0);
    rst_n = 1'b1;
    for (int a = 0; a < 2**AW; a++) drive(0, '0, '0, 1, ME, AW'(a), make_word($urandom()), '1);
    for (int n = 0; n < 3000; n++) begin
      automatic logic [AW-1:0] ra = AW'($urandom());
      automatic logic [AW-1:0] wa = ($urandom_range(0, 4) == 0) ? ra : AW'($urandom());
      automatic logic [1:0]    rb = ($urandom_range(0, 1) == 0) ? ME : 2'($urandom());
      automatic logic [1:0]    wb = ($urandom_range(0, 1) == 0) ? ME : 2'($urandom());
      drive($urandom_range(0, 2) != 0, rb, ra, $urandom_range(0, 1) == 1, wb, wa,
            make_word($urandom()),
            ($urandom_range(0, 2) == 0) ? lane_en_t'($urandom()) : '1);
    end
    repeat (4) drive(0, '0, '0, 0, '0, '0, '0, '0);
    checks++;
    if (n_rd == 0 || n_wr == 0 || n_masked == 0 || n_other_wr == 0 || n_conc == 0 ||
        n_same == 0 || exp_word.size() != 0) begin
      failures++;
      $display("ERROR rd=%0d wr=%0d masked=%0d other=%0d conc=%0d same=%0d left=%0d",
               n_rd, n_wr, n_masked, n_other_wr, n_conc, n_same, exp_word.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge k);
    failures++;
    $display("ERROR watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
