// tb_la1_read_port: self-checking test of the read side of one bank.
//
// The port (BANK_ID 1 of 4) sees random reads to all four banks, often back
// to back. A model SRAM answers mem_re one K edge later with a word that is
// a fixed function of the address. The test checks the read sequence edge
// by edge: the address reaches the SRAM on the edge after R#; beat 0 of the
// word is on Q after the K edge two cycles after R#, beat 1 after the K#
// edge of that cycle; q_oe is high in exactly those cycles and Q is 0
// otherwise. Reads to other banks must produce nothing.
module tb_la1_read_port;
  import la1_pkg::*;

  localparam int unsigned AW = 8;

  logic          k = 1'b0, k_n = 1'b1, rst_n;
  logic          r_n;
  logic [AW-1:0] sa;
  logic [1:0]    e;
  beat_t         q;
  logic          q_oe;
  logic          mem_re;
  logic [AW-1:0] mem_raddr;
  word_t         mem_rdata;

  la1_read_port #(.ADDR_WIDTH(AW), .BANK_WIDTH(2), .BANK_ID(1)) dut (
    .k, .k_n, .rst_n, .r_n, .sa, .e, .q, .q_oe, .mem_re, .mem_raddr, .mem_rdata
  );

  always #5 begin k = ~k; k_n = ~k_n; end

  function automatic word_t content(logic [AW-1:0] a);
    return make_word({a, ~a, a ^ 8'h5a, 8'h3c} * 32'd2654435761);
  endfunction

  // model SRAM: synchronous read
  always @(posedge k) if (mem_re) mem_rdata <= content(mem_raddr);

  int checks = 0, failures = 0;
  int edge_no = 0;
  always @(posedge k) edge_no++;
  word_t         exp_word [int];
  logic [AW-1:0] exp_addr [int];
  int n_mine = 0, n_other = 0, n_b2b = 0;

  // sampler: SRAM request one edge after R#, beats two edges after R#
  initial begin
    forever begin
      beat_t b0;
      logic  oe, re;
      logic [AW-1:0] ra;
      int    en;
      @(posedge k);
      #2.5;
      en = edge_no;
      b0 = q; oe = q_oe; re = mem_re; ra = mem_raddr;
      #5;
      if (rst_n) begin
        checks++;
        if (re !== exp_addr.exists(en + 1) || (re && ra !== exp_addr[en + 1])) begin
          failures++;
          $display("ERROR edge %0d: mem_re=%b addr=%h", en, re, ra);
        end
        checks++;
        if (oe !== exp_word.exists(en) || q_oe !== oe) begin
          failures++;
          $display("ERROR edge %0d: q_oe=%b", en, oe);
        end
        checks++;
        if (exp_word.exists(en)) begin
          if ({q, b0} !== exp_word[en]) begin
            failures++;
            $display("ERROR edge %0d: Q=%h expected %h", en, {q, b0}, exp_word[en]);
          end
          exp_word.delete(en);
        end else if (q !== '0 || b0 !== '0) begin
          failures++;
          $display("ERROR edge %0d: Q=%h while idle", en, {q, b0});
        end
      end
    end
  end

  initial begin
    bit last_mine = 0;
    rst_n = 1'b0; r_n = 1'b1; sa = '0; e = '0;
    #2.5;
    repeat (3) #10;
    rst_n = 1'b1;
    for (int n = 0; n < 2000; n++) begin
      automatic bit            rd   = $urandom_range(0, 3) != 0;
      automatic logic [1:0]    bank = ($urandom_range(0, 1) == 0) ? 2'd1 : 2'($urandom());
      automatic logic [AW-1:0] addr = AW'($urandom());
      automatic int            e_at = edge_no + 1;
      r_n = ~rd; sa = addr; e = bank;
      if (rd && bank == 2'd1) begin
        exp_addr[e_at + 1] = addr;
        exp_word[e_at + 2] = content(addr);
        n_mine++;
        if (last_mine) n_b2b++;
        last_mine = 1;
      end else begin
        if (rd) n_other++;
        last_mine = 0;
      end
      #5;
      sa = AW'($urandom()); e = 2'($urandom());   // write traffic in the K# half
      #5;
    end
    r_n = 1'b1;
    repeat (4) #10;
    checks++;
    if (n_mine == 0 || n_other == 0 || n_b2b == 0 || exp_word.size() != 0) begin
      failures++;
      $display("ERROR mine=%0d other=%0d b2b=%0d unanswered=%0d", n_mine, n_other, n_b2b,
               exp_word.size());
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
