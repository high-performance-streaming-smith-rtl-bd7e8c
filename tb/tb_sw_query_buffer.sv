// Self-checking test of the Query Buffer with 20 queues of depth 4: random
// word-wide writes (random first queue 0..24 and symbol count 0..8, so some
// writes run past the last queue) and random pops, compared with one queue
// model per PE. Checks that a write waits while any addressed queue is full,
// that symbols past the last queue are dropped, that queues are independent
// and that every queue returns its symbols in order.
module tb_sw_query_buffer;
  import sw_pkg::*;
  localparam int NP = 20, D = 4;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic  wr_valid, wr_ready;
  qlen_t wr_base;
  logic [$clog2(SYM_PER_WORD):0] wr_count;
  word_t wr_syms;
  logic [NP-1:0] q_valid, q_pop;
  sym_t q_sym [NP];
  int checks = 0, failures = 0, full_hits = 0;
  sym_t model [NP][$];

  sw_query_buffer #(.NUM_PE(NP), .DEPTH(D)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_valid = 0; wr_base = 0; wr_count = 0; wr_syms = '0; q_pop = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 5000; cyc++) begin
      bit wr, room;
      logic [NP-1:0] rd;
      @(negedge clk);
      wr_valid = $urandom_range(1);
      wr_base  = qlen_t'($urandom_range(24));
      wr_count = ($clog2(SYM_PER_WORD)+1)'($urandom_range(8));
      for (int k = 0; k < SYM_PER_WORD; k++) wr_syms[k*SYM_W +: SYM_W] = sym_t'($urandom_range(3));
      for (int i = 0; i < NP; i++) q_pop[i] = ($urandom_range(3) == 0);
      #1;
      room = 1;
      for (int k = 0; k < int'(wr_count); k++)
        if (int'(wr_base) + k < NP && model[int'(wr_base) + k].size() >= D) room = 0;
      checks++;
      if (wr_ready != room) begin failures++; $display("wr_ready wrong"); end
      if (!room) full_hits++;
      for (int i = 0; i < NP; i++) begin
        checks++;
        if (q_valid[i] != (model[i].size() > 0)) begin failures++; $display("q_valid[%0d] wrong", i); end
        if (q_valid[i]) begin
          checks++;
          if (q_sym[i] != model[i][0]) begin failures++; $display("q_sym[%0d] wrong", i); end
        end
      end
      wr = wr_valid && wr_ready;
      rd = q_pop & q_valid;
      @(posedge clk);
      for (int i = 0; i < NP; i++) if (rd[i]) void'(model[i].pop_front());
      if (wr)
        for (int k = 0; k < int'(wr_count); k++)
          if (int'(wr_base) + k < NP) model[int'(wr_base) + k].push_back(wr_syms[k*SYM_W +: SYM_W]);
    end
    checks++;
    if (full_hits == 0) begin failures++; $display("full queue never reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
