// Full-size test of the accelerator at its default size: 10 modules of 131
// PEs. Every module receives the worked example and then five alignments of
// the evaluation shape, query length 131 against target length 400 (one of
// them with query length 100, leaving 31 PEs idle). Scores are compared with
// a software Smith-Waterman. With no back-pressure, consecutive results of a
// module after the second must be exactly tlen+1 = 401 cycles apart, and the
// first full-length alignment must complete within tlen + NUM_PE - 1 cycles
// plus a small fixed pipeline overhead of the loaders and channels.
module tb_sw_top_full;
  import sw_pkg::*;
  import sw_tb_pkg::*;
  localparam int NM = 10, NP = 131, NREC = 6;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [NM-1:0] rd_valid, rd_ready, wr_valid, wr_ready;
  word_t   rd_data [NM];
  result_t wr_data [NM];
  int checks = 0, failures = 0;

  sw_top dut (.*);

  word_t mem [NM][$];
  int    exp_score [NM][$];
  int    exp_tlen [NM][$];
  int    n_done [NM], last [NM];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int remaining, cycle = 0;
    rd_valid = '0; wr_ready = '0;
    foreach (rd_data[m]) rd_data[m] = '0;
    for (int m = 0; m < NM; m++) begin
      n_done[m] = 0; last[m] = 0;
      for (int a = 0; a < NREC; a++) begin
        automatic seq_t q = (a == 0) ? fig_query()  : random_seq((a == 3) ? 100 : NP);
        automatic seq_t t = (a == 0) ? fig_target() : random_seq(400);
        pack_record(mem[m], q, t);
        exp_score[m].push_back(sw_ref_score(q, t));
        exp_tlen[m].push_back(t.size());
      end
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    remaining = NM * NREC;
    while (remaining > 0) begin
      logic [NM-1:0] fr, fw;
      @(negedge clk);
      for (int m = 0; m < NM; m++) begin
        rd_valid[m] = (mem[m].size() > 0);
        rd_data[m]  = (mem[m].size() > 0) ? mem[m][0] : '0;
        wr_ready[m] = 1'b1;
      end
      #1;
      fr = rd_valid & rd_ready;
      fw = wr_valid & wr_ready;
      for (int m = 0; m < NM; m++) if (fw[m]) begin
        checks++;
        if (int'(wr_data[m].score) != exp_score[m][0] || int'(wr_data[m].id) != n_done[m]) begin
          failures++;
          $display("module %0d result %0d: id %0d score %0d, expected %0d",
                   m, n_done[m], wr_data[m].id, wr_data[m].score, exp_score[m][0]);
        end
        if (n_done[m] == 1) begin
          // first full-length alignment, right behind the 4-symbol example
          checks++;
          if (cycle > 4 + 1 + 400 + NP - 1 + 20) begin
            failures++; $display("module %0d: first alignment done at cycle %0d", m, cycle);
          end
        end
        if (n_done[m] >= 2) begin
          checks++;
          if (cycle - last[m] != exp_tlen[m][0] + 1) begin
            failures++;
            $display("module %0d alignment %0d took %0d cycles, expected %0d",
                     m, n_done[m], cycle - last[m], exp_tlen[m][0] + 1);
          end
        end
        last[m] = cycle;
      end
      @(posedge clk);
      cycle++;
      for (int m = 0; m < NM; m++) begin
        if (fr[m]) void'(mem[m].pop_front());
        if (fw[m]) begin
          void'(exp_score[m].pop_front()); void'(exp_tlen[m].pop_front());
          n_done[m]++; remaining--;
        end
      end
    end
    $display("all %0d alignments done after %0d cycles", NM * NREC, cycle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
