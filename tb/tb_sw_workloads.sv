// Workload test: the data sets of the accelerator's evaluation, run through
// one module at its default size of 131 PEs.
//
//   evaluation set   query 131, target 400 (the evaluation used 100,000 such
//                    pairs; 300 are run here, the rate being steady after the
//                    first)
//   target sweep     100 alignments, query 131, target 1..400
//   query sweep      100 alignments, target 400, query 10..131
//   comparison set   100 alignments, query 128, target 256
//
// Every score is compared with a software Smith-Waterman. For each run the
// cycles from the first record word taken to the last result written are
// compared with the streaming model: the first alignment needs
// tlen + NUM_PE - 1 cycles, each further one max(tlen + 1, W) cycles, where
// W = 1 + ceil(qlen/256) + ceil(tlen/256) is the number of memory words of a
// record (the input port takes one word per cycle), plus a fixed pipeline
// latency of at most 16 cycles. The array utilisation, useful cell updates
// over NUM_PE x cycles, is printed next to that of the streaming model
// without the memory-word limit.
module tb_sw_workloads;
  import sw_pkg::*;
  import sw_tb_pkg::*;
  localparam int NP = 131;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic rd_valid, rd_ready, wr_valid, wr_ready;
  word_t rd_data;
  result_t wr_data;
  int checks = 0, failures = 0;
  int id_base = 0;

  sw_module dut (.*);

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(string name, int n, int qlen, int tlen);
    word_t mem[$];
    int    exp_score[$];
    int    done = 0, cycle = 0, first = -1, last = 0;
    longint model, ideal, w;
    real   util, util_ideal;
    for (int a = 0; a < n; a++) begin
      automatic seq_t q = random_seq(qlen);
      automatic seq_t t = random_seq(tlen);
      pack_record(mem, q, t);
      exp_score.push_back(sw_ref_score(q, t));
    end
    while (done < n) begin
      bit fr, fw;
      @(negedge clk);
      rd_valid = (mem.size() > 0);
      rd_data  = (mem.size() > 0) ? mem[0] : '0;
      wr_ready = 1'b1;
      #1;
      fr = rd_valid && rd_ready;
      fw = wr_valid && wr_ready;
      if (fr && first < 0) first = cycle;
      if (fw) begin
        checks++;
        if (int'(wr_data.score) != exp_score[0] || int'(wr_data.id) != (id_base + done) % 65536) begin
          failures++;
          $display("%s: result %0d score %0d expected %0d", name, done, wr_data.score, exp_score[0]);
        end
        last = cycle;
      end
      @(posedge clk);
      cycle++;
      if (fr) void'(mem.pop_front());
      if (fw) begin void'(exp_score.pop_front()); done++; end
    end
    id_base += n;
    w     = 1 + words_for(qlen) + words_for(tlen);
    model = tlen + NP - 1 + longint'(n - 1) * ((tlen + 1 > w) ? tlen + 1 : w);
    ideal = tlen + NP - 1 + longint'(n - 1) * (tlen + 1);
    util       = real'(longint'(n) * qlen * tlen) / real'(NP * (last - first + 1));
    util_ideal = real'(longint'(n) * qlen * tlen) / real'(NP * ideal);
    $display("%-16s n=%0d qlen=%0d tlen=%0d: %0d cycles (model %0d), utilisation %5.1f%% (streaming model %5.1f%%)",
             name, n, qlen, tlen, last - first + 1, model, 100.0 * util, 100.0 * util_ideal);
    checks++;
    if (last - first + 1 < model || last - first + 1 > model + 16) begin
      failures++; $display("%s: cycle count outside the model", name);
    end
    repeat (5) @(posedge clk);
  endtask

  initial begin
    int tl[] = '{1, 2, 10, 25, 50, 100, 200, 400};
    int ql[] = '{10, 50, 100, 131};
    rd_valid = 0; rd_data = '0; wr_ready = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run("evaluation set", 300, 131, 400);
    foreach (tl[i]) run("target sweep", 100, 131, tl[i]);
    foreach (ql[i]) run("query sweep", 100, ql[i], 400);
    run("comparison set", 100, 128, 256);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
