// Streaming Smith-Waterman accelerator: NUM_MODULES identical modules.
//
// Throughput scales by replicating the whole Smith-Waterman module (input
// parser, loaders, query buffer, PE array, output parser) rather than by
// lengthening the array. Each module has its own memory read stream of input
// records and its own write stream of results, so the modules never wait for
// one another; distributing the records over the modules is left to whoever
// fills memory. Peak rate is NUM_MODULES x NUM_PE cell updates per cycle,
// 1310 for the default of 10 modules of 131 PEs, the largest configuration the
// accelerator was evaluated in.
//
// Interface: per module m, rd_valid[m]/rd_ready[m]/rd_data[m] (records in) and
// wr_valid[m]/wr_ready[m]/wr_data[m] (results out), all valid/ready, as in
// sw_module.
module sw_top
  import sw_pkg::*;
#(
  parameter int unsigned NUM_MODULES = 10,
  parameter int unsigned NUM_PE      = 131
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic [NUM_MODULES-1:0] rd_valid,
  output logic [NUM_MODULES-1:0] rd_ready,
  input  word_t   rd_data [NUM_MODULES],
  output logic [NUM_MODULES-1:0] wr_valid,
  input  logic [NUM_MODULES-1:0] wr_ready,
  output result_t wr_data [NUM_MODULES]
);
  for (genvar m = 0; m < NUM_MODULES; m++) begin : g_mod
    sw_module #(.NUM_PE(NUM_PE)) u_module (
      .clk, .rst_n,
      .rd_valid(rd_valid[m]), .rd_ready(rd_ready[m]), .rd_data(rd_data[m]),
      .wr_valid(wr_valid[m]), .wr_ready(wr_ready[m]), .wr_data(wr_data[m])
    );
  end
endmodule
