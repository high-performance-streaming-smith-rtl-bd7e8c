// Self-checking test of the Input Parser: random records (query lengths 0..255,
// target lengths 0..600, so zero-length and multi-word sequences occur) are
// streamed in with random gaps, while the three output channels apply random
// back-pressure. Checks that T_load receives each header followed by exactly
// the target words, Q_load each header followed by the query words, and the
// Output channel one {number, qlen, tlen} per record, numbered from 0.
module tb_sw_input_parser;
  import sw_pkg::*;
  import sw_tb_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic rd_valid, rd_ready, tld_valid, tld_ready, qld_valid, qld_ready, oinf_valid, oinf_ready;
  word_t rd_data;
  ld_pkt_t tld_pkt, qld_pkt;
  out_info_t oinf;
  int checks = 0, failures = 0;

  sw_input_parser dut (.*);

  word_t   mem[$];
  ld_pkt_t exp_t[$], exp_q[$];
  out_info_t exp_o[$];

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rd_valid = 0; rd_data = '0; tld_ready = 0; qld_ready = 0; oinf_ready = 0;
    for (int a = 0; a < 200; a++) begin
      seq_t q, t;
      word_t w[$];
      int nq;
      w.delete();
      q = random_seq($urandom_range(255));
      t = random_seq($urandom_range(600));
      pack_record(w, q, t);
      nq = words_for(q.size());
      foreach (w[k]) mem.push_back(w[k]);
      exp_t.push_back('{hdr: 1'b1, data: w[0]});
      exp_q.push_back('{hdr: 1'b1, data: w[0]});
      for (int k = 1; k <= nq; k++) exp_q.push_back('{hdr: 1'b0, data: w[k]});
      for (int k = nq + 1; k < w.size(); k++) exp_t.push_back('{hdr: 1'b0, data: w[k]});
      exp_o.push_back('{id: id_t'(a), qlen: qlen_t'(q.size()), tlen: tlen_t'(t.size())});
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    while (exp_t.size() + exp_q.size() + exp_o.size() > 0) begin
      bit fr, ft, fq, fo;
      @(negedge clk);
      rd_valid   = (mem.size() > 0) && ($urandom_range(4) != 0);
      rd_data    = (mem.size() > 0) ? mem[0] : '0;
      tld_ready  = ($urandom_range(3) != 0);
      qld_ready  = ($urandom_range(3) != 0);
      oinf_ready = ($urandom_range(3) != 0);
      #1;
      fr = rd_valid && rd_ready;
      ft = tld_valid && tld_ready;
      fq = qld_valid && qld_ready;
      fo = oinf_valid && oinf_ready;
      if (ft) begin checks++; if (exp_t.size() == 0 || tld_pkt != exp_t[0]) begin failures++; $display("T_load mismatch"); end end
      if (fq) begin checks++; if (exp_q.size() == 0 || qld_pkt != exp_q[0]) begin failures++; $display("Q_load mismatch"); end end
      if (fo) begin checks++; if (exp_o.size() == 0 || oinf != exp_o[0]) begin failures++; $display("O %p %p", oinf, exp_o[0]); end end
      @(posedge clk);
      if (fr) void'(mem.pop_front());
      if (ft && exp_t.size() > 0) void'(exp_t.pop_front());
      if (fq && exp_q.size() > 0) void'(exp_q.pop_front());
      if (fo && exp_o.size() > 0) void'(exp_o.pop_front());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
