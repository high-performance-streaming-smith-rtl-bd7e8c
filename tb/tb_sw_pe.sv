// Self-checking test of one Processing Element (position 1 of the array).
//
// Alignment 0 is column 1 of the worked example (query symbol G, target ACGT,
// left column 2,1,0,0), expecting cells 1,1,3,2 and a best score of 3. Then
// random alignments follow with random query lengths (so the PE is active in
// some and idle in others), random left-column values, random gaps on the
// input, random back-pressure on the output and a query queue that is at times
// empty, so the PE must stall for its symbol. Every output token is compared
// with a recurrence evaluated here.
module tb_sw_pe;
  import sw_pkg::*;
  import sw_tb_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic    in_valid, in_ready, out_valid, out_ready, q_valid, q_pop;
  sw_tok_t in_tok, out_tok;
  sym_t    q_sym;
  int checks = 0, failures = 0, stalls = 0, idle_alignments = 0;

  sw_pe #(.PE_IDX(1)) dut (.*);

  sw_tok_t stim[$], expect_q[$];
  sym_t    qq[$];

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic add_alignment(int qlen, sym_t qs, seq_t t, int lefts[$], int nr_in);
    int hu = 0, hd = 0, mx = 0;
    bit act = (qlen > 1);
    if (act) qq.push_back(qs); else idle_alignments++;
    for (int j = 0; j < t.size(); j++) begin
      int v = 0, d;
      d = hd + ((qs == t[j]) ? 2 : -1);
      if (d > v) v = d;
      if (hu - 1 > v) v = hu - 1;
      if (lefts[j] - 1 > v) v = lefts[j] - 1;
      stim.push_back('{nr: 1'b0, sym: t[j], qlen: qlen_t'(qlen), h: score_t'(lefts[j])});
      expect_q.push_back('{nr: 1'b0, sym: t[j], qlen: qlen_t'(qlen), h: act ? score_t'(v) : '0});
      hu = v; hd = lefts[j];
      if (v > mx) mx = v;
    end
    stim.push_back('{nr: 1'b1, sym: '0, qlen: qlen_t'(qlen), h: score_t'(nr_in)});
    expect_q.push_back('{nr: 1'b1, sym: '0, qlen: qlen_t'(qlen),
                          h: score_t'((act && mx > nr_in) ? mx : nr_in)});
  endtask

  initial begin
    int lefts[$];
    seq_t t;
    in_valid = 0; out_ready = 0; in_tok = '0; q_valid = 0; q_sym = '0;
    // worked example, column of query symbol G
    lefts = '{2, 1, 0, 0};
    add_alignment(4, SYM_G, fig_target(), lefts, 2);
    for (int a = 0; a < 300; a++) begin
      int tl = $urandom_range(6);
      t = random_seq(tl);
      lefts.delete();
      for (int j = 0; j < tl; j++) lefts.push_back($urandom_range(15));
      add_alignment($urandom_range(3), sym_t'($urandom_range(3)), t, lefts, $urandom_range(15));
    end

    repeat (3) @(posedge clk);
    rst_n = 1;
    while (expect_q.size() > 0) begin
      bit fire_in, fire_out, pop;
      @(negedge clk);
      in_valid  = (stim.size() > 0) && ($urandom_range(4) != 0);
      in_tok    = (stim.size() > 0) ? stim[0] : '0;
      out_ready = ($urandom_range(3) != 0);
      q_valid   = (qq.size() > 0) && ($urandom_range(2) != 0);
      q_sym     = (qq.size() > 0) ? qq[0] : '0;
      #1;
      if (in_valid && !in_ready && out_ready && !q_valid) stalls++;
      fire_in  = in_valid && in_ready;
      fire_out = out_valid && out_ready;
      pop      = q_pop;
      if (fire_out) begin
        checks++;
        if (out_tok !== expect_q[0]) begin
          failures++;
          $display("token mismatch: got nr=%0d h=%0d exp nr=%0d h=%0d",
                   out_tok.nr, out_tok.h, expect_q[0].nr, expect_q[0].h);
        end
      end
      @(posedge clk);
      if (fire_in)  void'(stim.pop_front());
      if (fire_out) void'(expect_q.pop_front());
      if (pop)      void'(qq.pop_front());
    end
    checks++;
    if (qq.size() != 0) begin failures++; $display("query symbols left unused"); end
    checks++;
    if (stalls == 0 || idle_alignments == 0) begin
      failures++; $display("stall or idle case never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
