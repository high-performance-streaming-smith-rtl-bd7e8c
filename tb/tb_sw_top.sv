// End-to-end test of the accelerator with 3 modules of 16 PEs.
//
// Each module gets its own stream of 60 random records (query lengths 0..16,
// target lengths 0..60 with every third one 0..3, the worked example
// first) and its own result stream;
// input gaps and result back-pressure are random and differ per module, and
// the result ports are throttled hard every other 800 cycles.
// Scores are compared with a software Smith-Waterman, alignment numbers with
// the input order. The test also counts how often each mechanism of the
// design occurred and fails if one never did:
//   nr_exit      New Read tokens leaving an array with a score
//   streaming    target symbols entering an array while an earlier
//                alignment is still in_array it
//   idle_pe      alignments that leave part of the array idle (qlen < NUM_PE)
//   queue_ahead  cycles in which PE 0's queue holds query symbols of two or
//                more upcoming alignments
//   array_stall  cycles the array cannot take a target token
//   out_stall    cycles a result waits for the memory write port
//   concurrent   cycles in which every module's array moves a token
module tb_sw_top;
  import sw_pkg::*;
  import sw_tb_pkg::*;
  localparam int NM = 3, NP = 16, NREC = 60;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [NM-1:0] rd_valid, rd_ready, wr_valid, wr_ready;
  word_t   rd_data [NM];
  result_t wr_data [NM];
  int checks = 0, failures = 0;

  sw_top #(.NUM_MODULES(NM), .NUM_PE(NP)) dut (.*);

  word_t mem [NM][$];
  int    exp_score [NM][$];
  int    n_done [NM];

  int nr_exit [NM], streaming [NM], idle_pe [NM], queue_ahead [NM], array_stall [NM], out_stall [NM];
  int in_array [NM];
  int concurrent = 0;
  logic [NM-1:0] moving;

  for (genvar m = 0; m < NM; m++) begin : g_cnt
    always @(posedge clk) if (rst_n) begin
      automatic logic tv = dut.g_mod[m].u_module.tgt_valid;
      automatic logic tr = dut.g_mod[m].u_module.tgt_ready;
      automatic sw_tok_t tt = dut.g_mod[m].u_module.tgt_tok;
      automatic logic pv = dut.g_mod[m].u_module.pa_valid;
      automatic logic pr = dut.g_mod[m].u_module.pa_ready;
      automatic sw_tok_t pt = dut.g_mod[m].u_module.pa_tok;
      if (pv && pr && pt.nr) nr_exit[m]++;
      if (tv && tr && !tt.nr && in_array[m] > 0) streaming[m]++;
      if (tv && tr && tt.nr && int'(tt.qlen) < NP) idle_pe[m]++;
      if (dut.g_mod[m].u_module.u_query_buffer.g_q[0].cnt >= 2) queue_ahead[m]++;
      if (tv && !tr) array_stall[m]++;
      if (wr_valid[m] && !wr_ready[m]) out_stall[m]++;
      in_array[m] <= in_array[m] + int'(tv && tr && tt.nr) - int'(pv && pr && pt.nr);
    end
    assign moving[m] = dut.g_mod[m].u_module.tgt_valid && dut.g_mod[m].u_module.tgt_ready;
  end
  always @(posedge clk) if (rst_n && &moving) concurrent++;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int remaining, cyc = 0;
    rd_valid = '0; wr_ready = '0;
    foreach (rd_data[m]) rd_data[m] = '0;
    for (int m = 0; m < NM; m++) begin
      n_done[m] = 0; in_array[m] = 0;
      nr_exit[m] = 0; streaming[m] = 0; idle_pe[m] = 0; queue_ahead[m] = 0; array_stall[m] = 0; out_stall[m] = 0;
      for (int a = 0; a < NREC; a++) begin
        automatic seq_t q = (a == 0) ? fig_query() : random_seq((a % 4 == 1) ? NP : $urandom_range(NP));
        automatic seq_t t = (a == 0) ? fig_target() : random_seq((a % 3 == 2) ? $urandom_range(3) : $urandom_range(60));
        pack_record(mem[m], q, t);
        exp_score[m].push_back(sw_ref_score(q, t));
      end
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    remaining = NM * NREC;
    while (remaining > 0) begin
      logic [NM-1:0] fr, fw;
      cyc++;
      @(negedge clk);
      for (int m = 0; m < NM; m++) begin
        rd_valid[m] = (mem[m].size() > 0) && ($urandom_range(6) > m);
        rd_data[m]  = (mem[m].size() > 0) ? mem[m][0] : '0;
        // alternate free-flowing and heavily throttled result ports
        wr_ready[m] = ((cyc / 800) % 2 == 0) ? ($urandom_range(4) > m) : ($urandom_range(40) == 0);
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
      end
      @(posedge clk);
      for (int m = 0; m < NM; m++) begin
        if (fr[m]) void'(mem[m].pop_front());
        if (fw[m]) begin void'(exp_score[m].pop_front()); n_done[m]++; remaining--; end
      end
    end
    for (int m = 0; m < NM; m++) begin
      $display("module %0d: nr_exit=%0d streaming=%0d idle_pe=%0d queue_ahead=%0d array_stall=%0d out_stall=%0d",
               m, nr_exit[m], streaming[m], idle_pe[m], queue_ahead[m], array_stall[m], out_stall[m]);
      checks += 6;
      if (nr_exit[m] != NREC) begin failures++; $display("NR token count wrong"); end
      if (streaming[m] == 0)  begin failures++; $display("streaming never happened"); end
      if (idle_pe[m] == 0)    begin failures++; $display("no alignment left PEs idle"); end
      if (queue_ahead[m] == 0) begin failures++; $display("query queue never held two alignments"); end
      if (array_stall[m] == 0) begin failures++; $display("array input never stalled"); end
      if (out_stall[m] == 0)  begin failures++; $display("result port never stalled"); end
    end
    $display("concurrent=%0d", concurrent);
    checks++;
    if (concurrent == 0) begin failures++; $display("modules never ran concurrently"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
