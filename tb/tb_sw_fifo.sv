// Self-checking test of the channel FIFO: random writes and reads with random
// stalls on both sides, compared with a queue model; checks full and empty
// flags and that an element written to an empty channel is readable on the
// next cycle.
module tb_sw_fifo;
  localparam int DEPTH = 5;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, out_valid, out_ready;
  logic [7:0] in_data, out_data;
  int checks = 0, failures = 0;
  logic [7:0] model[$];

  always #5 clk = ~clk;

  sw_fifo #(.T(logic [7:0]), .DEPTH(DEPTH)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; out_ready = 0; in_data = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      @(negedge clk);
      // bias: fill phase, drain phase, mixed
      in_valid  = (cyc < 1000) ? ($urandom_range(3) != 0) : (cyc < 2000) ? ($urandom_range(3) == 0) : $urandom_range(1);
      out_ready = (cyc < 1000) ? ($urandom_range(3) == 0) : (cyc < 2000) ? ($urandom_range(3) != 0) : $urandom_range(1);
      in_data   = 8'($urandom);
      #1;
      checks++;
      if (in_ready != (model.size() < DEPTH)) begin failures++; $display("in_ready wrong at %0d", cyc); end
      checks++;
      if (out_valid != (model.size() > 0)) begin failures++; $display("out_valid wrong at %0d", cyc); end
      if (out_valid && out_ready) begin
        checks++;
        if (out_data != model[0]) begin failures++; $display("data %h exp %h", out_data, model[0]); end
      end
      begin
        bit rd, wr;
        rd = out_valid && out_ready;
        wr = in_valid && in_ready;
        @(posedge clk);
        if (rd) void'(model.pop_front());
        if (wr) model.push_back(in_data);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
