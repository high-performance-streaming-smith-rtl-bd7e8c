// Self-checking test of a 12-PE array fed directly with tokens.
//
// The first alignment is the worked example (query AGTC, target ACGT, best
// score 5). It is followed back to back by random alignments with query
// lengths 0..12 and target lengths 0..30, whose best scores are compared with
// a software Smith-Waterman. The test models the per-PE query queues and the
// target channel itself. Phase 1 runs without stalls and checks timing: each
// New Read token leaves the array exactly NUM_PE cycles after it entered, and
// the tokens enter one per cycle, so every alignment after the first costs
// tlen+1 cycles. Phase 2 adds random back-pressure and input gaps.
module tb_sw_pe_array;
  import sw_pkg::*;
  import sw_tb_pkg::*;
  localparam int NP = 12;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic    in_valid, in_ready, out_valid, out_ready;
  sw_tok_t in_tok, out_tok;
  logic [NP-1:0] q_valid, q_pop;
  sym_t q_sym [NP];
  int checks = 0, failures = 0;

  sw_pe_array #(.NUM_PE(NP)) dut (.*);

  sw_tok_t stim[$];
  int      exp_score[$];
  int      nr_in_cycle[$];
  sym_t    qq [NP][$];
  int      cycle = 0;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic add(seq_t q, seq_t t);
    for (int i = 0; i < q.size(); i++) qq[i].push_back(q[i]);
    foreach (t[j]) stim.push_back('{nr: 1'b0, sym: t[j], qlen: qlen_t'(q.size()), h: '0});
    stim.push_back('{nr: 1'b1, sym: '0, qlen: qlen_t'(q.size()), h: '0});
    exp_score.push_back(sw_ref_score(q, t));
  endtask

  task automatic run(bit stress);
    while (exp_score.size() > 0) begin
      bit fi, fo;
      @(negedge clk);
      in_valid  = (stim.size() > 0) && (!stress || $urandom_range(5) != 0);
      in_tok    = (stim.size() > 0) ? stim[0] : '0;
      out_ready = !stress || ($urandom_range(3) != 0);
      for (int i = 0; i < NP; i++) begin
        q_valid[i] = qq[i].size() > 0;
        q_sym[i]   = q_valid[i] ? qq[i][0] : '0;
      end
      #1;
      fi = in_valid && in_ready;
      fo = out_valid && out_ready;
      if (fi && in_tok.nr) nr_in_cycle.push_back(cycle);
      if (fo && out_tok.nr) begin
        checks++;
        if (int'(out_tok.h) != exp_score[0]) begin
          failures++; $display("score %0d expected %0d", out_tok.h, exp_score[0]);
        end
        if (!stress) begin
          checks++;
          if (cycle - nr_in_cycle[0] != NP) begin
            failures++; $display("NR latency %0d expected %0d", cycle - nr_in_cycle[0], NP);
          end
        end
        void'(nr_in_cycle.pop_front());
      end
      if (!stress && stim.size() > 0) begin
        checks++;
        if (!fi) begin failures++; $display("input not taken at cycle %0d", cycle); end
      end
      @(posedge clk);
      cycle++;
      if (fi) void'(stim.pop_front());
      if (fo && out_tok.nr) void'(exp_score.pop_front());
      for (int i = 0; i < NP; i++) if (q_pop[i]) void'(qq[i].pop_front());
    end
  endtask

  initial begin
    in_valid = 0; out_ready = 0; in_tok = '0; q_valid = '0;
    foreach (q_sym[i]) q_sym[i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // phase 1: no stalls; query queues pre-filled
    add(fig_query(), fig_target());
    for (int a = 0; a < 40; a++) add(random_seq($urandom_range(NP)), random_seq($urandom_range(1, 30)));
    run(0);
    // phase 2: random stalls, empty targets included
    for (int a = 0; a < 150; a++) add(random_seq($urandom_range(NP)), random_seq($urandom_range(30)));
    run(1);
    checks++;
    for (int i = 0; i < NP; i++) if (qq[i].size() != 0) begin failures++; break; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
