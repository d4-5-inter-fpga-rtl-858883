// computing_node -- FPGA design of a RAIDER computing node.
//
// Two cnn_kernel instances sit on intranode ports 0 and 1 of the node's
// routing IP, each behind its own one-channel aggregator and dispatcher, as
// in the node's configuration. Images arriving from the I/O node are
// classified and the results sent back to it (node 0, task 0, channel 0).
// The routing IP is outside this module: each intranode port appears as
// tx_* streams towards it and rx_* streams from it, split into a header/
// footer stream (hdr) and a payload stream (dat). The CNNs are outside too:
// each kernel's image output and score input are brought out as nn_*[k].
// Bits 255:128 of tx_hdr_data and tx_dat_data are constant zero: headers,
// footers and result words use only the low half of a word.
//
// Two kernels per node, each on its own port with one input and one output
// channel, follow the node configuration; a configuration with a single
// kernel per node is obtained by the imagifier's nports argument, not by a
// different node. Timing: a 3-word image packet is taken in 6 cycles, the
// CNN takes as long as it needs, and a result leaves in 4 cycles plus one
// in the aggregator.
module computing_node
  import apenet_pkg::*;
#(
  parameter int unsigned N_CLASS = 4,
  parameter int unsigned SCORE_W = 16
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // routing IP intranode ports 0 and 1
  output logic [1:0]                 tx_hdr_valid,
  input  logic [1:0]                 tx_hdr_ready,
  output word_t                      tx_hdr_data [2],
  output logic [1:0]                 tx_dat_valid,
  input  logic [1:0]                 tx_dat_ready,
  output word_t                      tx_dat_data [2],
  input  logic [1:0]                 rx_hdr_valid,
  output logic [1:0]                 rx_hdr_ready,
  input  word_t                      rx_hdr_data [2],
  input  logic [1:0]                 rx_dat_valid,
  output logic [1:0]                 rx_dat_ready,
  input  word_t                      rx_dat_data [2],
  // CNN of each kernel
  output logic [1:0]                 nn_in_valid,
  input  logic [1:0]                 nn_in_ready,
  output logic [255:0]               nn_in_image [2],
  input  logic [1:0]                 nn_out_valid,
  output logic [1:0]                 nn_out_ready,
  input  logic signed [SCORE_W-1:0]  nn_out_score [2][N_CLASS]
);

  for (genvar p = 0; p < 2; p++) begin : g_port
    logic [0:0] ko_valid, ko_ready;  word_t ko_data [1];
    logic [0:0] ki_valid, ki_ready;  word_t ki_data [1];

    cnn_kernel #(.N_CLASS(N_CLASS), .SCORE_W(SCORE_W)) u_cnn (
      .clk, .rst_n,
      .in_valid(ki_valid[0]), .in_ready(ki_ready[0]), .in_data(ki_data[0]),
      .out_valid(ko_valid[0]), .out_ready(ko_ready[0]), .out_data(ko_data[0]),
      .nn_in_valid(nn_in_valid[p]), .nn_in_ready(nn_in_ready[p]), .nn_in_image(nn_in_image[p]),
      .nn_out_valid(nn_out_valid[p]), .nn_out_ready(nn_out_ready[p]),
      .nn_out_score(nn_out_score[p])
    );

    aggregator #(.NCHAN(1)) u_agg (
      .clk, .rst_n,
      .in_valid(ko_valid), .in_ready(ko_ready), .in_data(ko_data),
      .hdr_valid(tx_hdr_valid[p]), .hdr_ready(tx_hdr_ready[p]), .hdr_data(tx_hdr_data[p]),
      .dat_valid(tx_dat_valid[p]), .dat_ready(tx_dat_ready[p]), .dat_data(tx_dat_data[p])
    );

    dispatcher #(.NCHAN(1)) u_dsp (
      .clk, .rst_n,
      .hdr_valid(rx_hdr_valid[p]), .hdr_ready(rx_hdr_ready[p]), .hdr_data(rx_hdr_data[p]),
      .dat_valid(rx_dat_valid[p]), .dat_ready(rx_dat_ready[p]), .dat_data(rx_dat_data[p]),
      .out_valid(ki_valid), .out_ready(ki_ready), .out_data(ki_data)
    );
  end

endmodule
