// End-to-end test of one Smith-Waterman module with a 16-PE array.
//
// Input records are streamed in through the memory read port and results are
// collected from the write port; each score is compared with a software
// Smith-Waterman and each alignment number with its position in the input.
// Phase 1 (no back-pressure): the worked example (score 5) then random
// alignments with query lengths 1..16 and target lengths 20..60. After the
// first two alignments, consecutive results must be exactly tlen+1 cycles
// apart, the streaming rate, whatever the query length. Phase 2: random
// lengths including empty queries and targets and queries longer than the
// array (scored on their first 16 symbols), with random gaps on the input and
// back-pressure on the output.
module tb_sw_module;
  import sw_pkg::*;
  import sw_tb_pkg::*;
  localparam int NP = 16;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic rd_valid, rd_ready, wr_valid, wr_ready;
  word_t rd_data;
  result_t wr_data;
  int checks = 0, failures = 0;

  sw_module #(.NUM_PE(NP)) dut (.*);

  word_t mem[$];
  int exp_score[$], exp_tlen[$];
  int n_added = 0, n_done = 0, cycle = 0;

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic add(seq_t q, seq_t t);
    seq_t qc = q;
    while (qc.size() > NP) void'(qc.pop_back());
    pack_record(mem, q, t);
    exp_score.push_back(sw_ref_score(qc, t));
    exp_tlen.push_back(t.size());
    n_added++;
  endtask

  task automatic run(bit stress);
    int last_cycle = -1, k = 0;
    while (exp_score.size() > 0) begin
      bit fr, fw;
      @(negedge clk);
      rd_valid = (mem.size() > 0) && (!stress || $urandom_range(4) != 0);
      rd_data  = (mem.size() > 0) ? mem[0] : '0;
      wr_ready = !stress || ($urandom_range(3) != 0);
      #1;
      fr = rd_valid && rd_ready;
      fw = wr_valid && wr_ready;
      if (fw) begin
        checks++;
        if (int'(wr_data.score) != exp_score[0] || int'(wr_data.id) != n_done) begin
          failures++;
          $display("result %0d: id %0d score %0d, expected score %0d",
                   n_done, wr_data.id, wr_data.score, exp_score[0]);
        end
        if (!stress && k >= 2) begin
          checks++;
          if (cycle - last_cycle != exp_tlen[0] + 1) begin
            failures++;
            $display("alignment %0d took %0d cycles, expected tlen+1 = %0d",
                     n_done, cycle - last_cycle, exp_tlen[0] + 1);
          end
        end
        last_cycle = cycle;
        k++;
      end
      @(posedge clk);
      cycle++;
      if (fr) void'(mem.pop_front());
      if (fw) begin void'(exp_score.pop_front()); void'(exp_tlen.pop_front()); n_done++; end
    end
  endtask

  initial begin
    rd_valid = 0; rd_data = '0; wr_ready = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    add(fig_query(), fig_target());
    for (int a = 0; a < 40; a++) add(random_seq($urandom_range(1, NP)), random_seq($urandom_range(20, 60)));
    run(0);
    for (int a = 0; a < 120; a++) add(random_seq($urandom_range(NP + 4)), random_seq($urandom_range(40)));
    run(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
