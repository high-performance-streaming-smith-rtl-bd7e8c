// Self-checking test of the Target Loader. Packets of random records (target
// lengths 0..50, including exact multiples of 16) are offered; every token is
// compared with the expected symbol or NR token and its query length. Phase 1
// has no back-pressure and the packets always available, and checks that the
// output is gapless: the span from the first to the last token equals the sum
// of tlen+1 over all records. Phase 2 adds random gaps and back-pressure.
module tb_sw_target_loader;
  import sw_pkg::*;
  import sw_tb_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid, in_ready, out_valid, out_ready;
  ld_pkt_t in_pkt;
  sw_tok_t out_tok;
  int checks = 0, failures = 0;

  sw_target_loader dut (.*);

  ld_pkt_t pk[$];
  sw_tok_t exp_tok[$];
  int cycle = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int add(int tl);
    seq_t q, t;
    word_t w[$];
    int nq;
    q = random_seq($urandom_range(20));
    t = random_seq(tl);
    pack_record(w, q, t);
    nq = words_for(q.size());
    pk.push_back('{hdr: 1'b1, data: w[0]});
    for (int k = nq + 1; k < w.size(); k++) pk.push_back('{hdr: 1'b0, data: w[k]});
    foreach (t[j]) exp_tok.push_back('{nr: 1'b0, sym: t[j], qlen: qlen_t'(q.size()), h: '0});
    exp_tok.push_back('{nr: 1'b1, sym: '0, qlen: qlen_t'(q.size()), h: '0});
    return tl + 1;
  endfunction

  task automatic run(bit stress, int expected_span);
    int first = -1, last = -1;
    while (exp_tok.size() > 0) begin
      bit fi, fo;
      @(negedge clk);
      in_valid  = (pk.size() > 0) && (!stress || $urandom_range(3) != 0);
      in_pkt    = (pk.size() > 0) ? pk[0] : '0;
      out_ready = !stress || ($urandom_range(3) != 0);
      #1;
      fi = in_valid && in_ready;
      fo = out_valid && out_ready;
      if (fo) begin
        checks++;
        if (out_tok != exp_tok[0]) begin
          failures++; $display("token mismatch nr=%0d sym=%0d exp nr=%0d sym=%0d",
                               out_tok.nr, out_tok.sym, exp_tok[0].nr, exp_tok[0].sym);
        end
        if (first < 0) first = cycle;
        last = cycle;
      end
      @(posedge clk);
      cycle++;
      if (fi) void'(pk.pop_front());
      if (fo) void'(exp_tok.pop_front());
    end
    if (!stress) begin
      checks++;
      if (last - first + 1 != expected_span) begin
        failures++; $display("output span %0d cycles, expected %0d", last - first + 1, expected_span);
      end
    end
  endtask

  initial begin
    int span = 0;
    in_valid = 0; in_pkt = '0; out_ready = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    span += add(256);
    span += add(1);
    span += add(513);
    for (int a = 0; a < 30; a++) span += add($urandom_range(1, 600));
    run(0, span);
    for (int a = 0; a < 100; a++) void'(add($urandom_range(600)));
    run(1, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
