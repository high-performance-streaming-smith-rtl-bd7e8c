// Self-checking test of the Query Loader. Random queries of length 0..255
// (up to the 8-bit length field, so one or two memory words) are offered as
// Q_load packets with random gaps, and the Query Buffer write port applies
// random back-pressure. Every word write must carry the next query word, the
// PE index of its first symbol and the right symbol count, and headers must
// never produce a write.
module tb_sw_query_loader;
  import sw_pkg::*;
  import sw_tb_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid, in_ready, wr_valid, wr_ready;
  ld_pkt_t in_pkt;
  qlen_t wr_base;
  logic [$clog2(SYM_PER_WORD):0] wr_count;
  word_t wr_syms;
  int checks = 0, failures = 0;

  sw_query_loader dut (.*);

  typedef struct { int base; int count; word_t w; } wr_t;
  ld_pkt_t pk[$];
  wr_t     exp_wr[$];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; in_pkt = '0; wr_ready = 0;
    for (int a = 0; a < 300; a++) begin
      automatic int ql = (a % 5 == 0) ? $urandom_range(255) : $urandom_range(140);
      automatic seq_t q = random_seq(ql);
      automatic seq_t t = random_seq(1);
      automatic word_t w[$];
      pack_record(w, q, t);
      pk.push_back('{hdr: 1'b1, data: w[0]});
      for (int k = 1; k <= int'(words_for(ql)); k++) begin
        automatic int cnt = (ql - (k - 1) * SYM_PER_WORD > SYM_PER_WORD) ? SYM_PER_WORD
                                                                        : ql - (k - 1) * SYM_PER_WORD;
        pk.push_back('{hdr: 1'b0, data: w[k]});
        exp_wr.push_back('{base: (k - 1) * SYM_PER_WORD, count: cnt, w: w[k]});
      end
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    while (pk.size() > 0) begin
      bit fi, fw;
      @(negedge clk);
      in_valid = ($urandom_range(3) != 0);
      in_pkt   = pk[0];
      wr_ready = ($urandom_range(2) != 0);
      #1;
      fi = in_valid && in_ready;
      fw = wr_valid && wr_ready;
      if (in_valid && in_pkt.hdr) begin
        checks++;
        if (wr_valid) begin failures++; $display("header caused a write"); end
      end
      if (fw) begin
        checks++;
        if (exp_wr.size() == 0 || int'(wr_base) != exp_wr[0].base ||
            int'(wr_count) != exp_wr[0].count || wr_syms != exp_wr[0].w) begin
          failures++; $display("write base %0d count %0d unexpected", wr_base, wr_count);
        end
      end
      if (fi != (in_valid && (!wr_valid || wr_ready))) begin
        checks++; failures++; $display("packet taken without its write");
      end
      @(posedge clk);
      if (fi) void'(pk.pop_front());
      if (fw && exp_wr.size() > 0) void'(exp_wr.pop_front());
    end
    checks++;
    if (exp_wr.size() != 0) begin failures++; $display("%0d writes missing", exp_wr.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
