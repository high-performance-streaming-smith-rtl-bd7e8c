// Self-checking test of the Output Parser: the PE_Exit stream of NR tokens
// (scores) and the Output channel stream of alignment packets arrive with
// independent random gaps and the memory write side applies random
// back-pressure. Each result written must pair the k-th score with the k-th
// alignment number, and nothing may be written while either input is missing.
module tb_sw_output_parser;
  import sw_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic exit_valid, exit_ready, oinf_valid, oinf_ready, wr_valid, wr_ready;
  sw_tok_t exit_tok;
  out_info_t oinf;
  result_t wr_data;
  int checks = 0, failures = 0;

  sw_output_parser dut (.*);

  score_t sc[$];
  out_info_t inf[$];
  result_t exp_r[$];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    exit_valid = 0; exit_tok = '0; oinf_valid = 0; oinf = '0; wr_ready = 0;
    for (int a = 0; a < 500; a++) begin
      automatic score_t s = score_t'($urandom_range(300));
      automatic id_t id = id_t'($urandom);
      sc.push_back(s);
      inf.push_back('{id: id, qlen: qlen_t'($urandom), tlen: tlen_t'($urandom)});
      exp_r.push_back('{id: id, score: s});
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    while (exp_r.size() > 0) begin
      bit fe, fo, fw;
      @(negedge clk);
      exit_valid = (sc.size() > 0) && ($urandom_range(2) != 0);
      exit_tok   = '{nr: 1'b1, sym: '0, qlen: '0, h: (sc.size() > 0) ? sc[0] : '0};
      oinf_valid = (inf.size() > 0) && ($urandom_range(2) != 0);
      oinf       = (inf.size() > 0) ? inf[0] : '0;
      wr_ready   = ($urandom_range(3) != 0);
      #1;
      fe = exit_valid && exit_ready;
      fo = oinf_valid && oinf_ready;
      fw = wr_valid && wr_ready;
      checks++;
      if (fe != fw || fo != fw) begin failures++; $display("inputs and output not taken together"); end
      if (wr_valid && !(exit_valid && oinf_valid)) begin failures++; $display("write without both inputs"); end
      if (fw) begin
        checks++;
        if (wr_data != exp_r[0]) begin failures++; $display("result mismatch"); end
      end
      @(posedge clk);
      if (fe) void'(sc.pop_front());
      if (fo) void'(inf.pop_front());
      if (fw) void'(exp_r.pop_front());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
