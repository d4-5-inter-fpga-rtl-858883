// preprocessing_node -- FPGA design of the RAIDER I/O and preprocessing node.
//
// Three kernels share the two intranode ports of the node's routing IP:
//   port 0: krnl_sender (one output channel) and krnl_receiver (one input
//           channel), behind one aggregator and one dispatcher of one channel;
//   port 1: imagifier (one input and one output channel), behind its own
//           one-channel aggregator and dispatcher.
// The sender streams events from the host buffer to the imagifier on the same
// node (through the routing IP), the imagifier sends images to the computing
// nodes, and the receiver collects the classification results they return.
// The port assignment and channel counts follow the node's configuration; the
// routing IP itself, which switches packets between intranode ports and the
// inter-node links, is outside this module: each intranode port appears as
// four valid/ready streams, tx_* towards the routing IP and rx_* from it,
// each split into a header/footer stream (hdr) and a payload stream (dat).
//
// Host side: start pulses and arguments of the two host-started kernels, the
// bin-table load port and arguments of the free-running imagifier, and
// one-cycle-latency read and write ports into host buffers.
//
// The kernel-to-port assignment and the one-channel adapters follow the node
// configuration; the host memory ports (instead of bus masters) and the node
// coordinate input are this design's own choices. Timing is that of the
// kernels: the imagifier needs 17n + 9 cycles for an event of n hit words,
// the sender about 3 cycles per hit word, and the adapters add one cycle per
// packet on the way out.
module preprocessing_node
  import apenet_pkg::*;
#(
  parameter int unsigned MAX_WORD  = 64,
  parameter int unsigned LUT_DEPTH = 2048
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  coord_t                        local_coord,
  // sender
  input  logic                          snd_start,
  input  logic [31:0]                   snd_npackets,
  output logic                          snd_busy,
  output logic                          snd_done,
  output logic                          mem_rd,
  output logic [31:0]                   mem_raddr,
  input  logic [127:0]                  mem_rdata,
  // receiver
  input  logic                          rcv_start,
  input  logic [31:0]                   rcv_count,
  output logic                          rcv_busy,
  output logic                          rcv_done,
  output logic                          mem_we,
  output logic [31:0]                   mem_waddr,
  output logic [127:0]                  mem_wdata,
  // imagifier
  input  logic [15:0]                   img_nports,
  input  logic [15:0]                   img_nboards,
  input  logic                          lut_we,
  input  logic [$clog2(LUT_DEPTH)-1:0]  lut_addr,
  input  logic signed [5:0]             lut_x,
  input  logic signed [5:0]             lut_y,
  output logic [31:0]                   img_events,
  // routing IP intranode ports 0 and 1
  output logic [1:0]                    tx_hdr_valid,
  input  logic [1:0]                    tx_hdr_ready,
  output word_t                         tx_hdr_data [2],
  output logic [1:0]                    tx_dat_valid,
  input  logic [1:0]                    tx_dat_ready,
  output word_t                         tx_dat_data [2],
  input  logic [1:0]                    rx_hdr_valid,
  output logic [1:0]                    rx_hdr_ready,
  input  word_t                         rx_hdr_data [2],
  input  logic [1:0]                    rx_dat_valid,
  output logic [1:0]                    rx_dat_ready,
  input  word_t                         rx_dat_data [2]
);

  // ---- port 0: sender / receiver ----
  logic [0:0] s_valid, s_ready;  word_t s_data [1];
  logic [0:0] r_valid, r_ready;  word_t r_data [1];

  krnl_sender u_sender (
    .clk, .rst_n,
    .start(snd_start), .npackets(snd_npackets), .dest_coord(local_coord),
    .busy(snd_busy), .done(snd_done),
    .mem_rd, .mem_addr(mem_raddr), .mem_rdata,
    .out_valid(s_valid[0]), .out_ready(s_ready[0]), .out_data(s_data[0])
  );

  krnl_receiver u_receiver (
    .clk, .rst_n,
    .start(rcv_start), .count(rcv_count), .busy(rcv_busy), .done(rcv_done),
    .mem_we, .mem_addr(mem_waddr), .mem_wdata,
    .in_valid(r_valid[0]), .in_ready(r_ready[0]), .in_data(r_data[0])
  );

  aggregator #(.NCHAN(1)) u_agg0 (
    .clk, .rst_n,
    .in_valid(s_valid), .in_ready(s_ready), .in_data(s_data),
    .hdr_valid(tx_hdr_valid[0]), .hdr_ready(tx_hdr_ready[0]), .hdr_data(tx_hdr_data[0]),
    .dat_valid(tx_dat_valid[0]), .dat_ready(tx_dat_ready[0]), .dat_data(tx_dat_data[0])
  );

  dispatcher #(.NCHAN(1)) u_dsp0 (
    .clk, .rst_n,
    .hdr_valid(rx_hdr_valid[0]), .hdr_ready(rx_hdr_ready[0]), .hdr_data(rx_hdr_data[0]),
    .dat_valid(rx_dat_valid[0]), .dat_ready(rx_dat_ready[0]), .dat_data(rx_dat_data[0]),
    .out_valid(r_valid), .out_ready(r_ready), .out_data(r_data)
  );

  // ---- port 1: imagifier ----
  logic [0:0] io_valid, io_ready;  word_t io_data [1];
  logic [0:0] ii_valid, ii_ready;  word_t ii_data [1];

  imagifier #(.N_IN(1), .N_OUT(1), .MAX_WORD(MAX_WORD), .LUT_DEPTH(LUT_DEPTH)) u_imagifier (
    .clk, .rst_n,
    .nports(img_nports), .nboards(img_nboards),
    .lut_we, .lut_addr, .lut_x, .lut_y,
    .in_valid(ii_valid), .in_ready(ii_ready), .in_data(ii_data),
    .out_valid(io_valid), .out_ready(io_ready), .out_data(io_data),
    .events(img_events)
  );

  aggregator #(.NCHAN(1)) u_agg1 (
    .clk, .rst_n,
    .in_valid(io_valid), .in_ready(io_ready), .in_data(io_data),
    .hdr_valid(tx_hdr_valid[1]), .hdr_ready(tx_hdr_ready[1]), .hdr_data(tx_hdr_data[1]),
    .dat_valid(tx_dat_valid[1]), .dat_ready(tx_dat_ready[1]), .dat_data(tx_dat_data[1])
  );

  dispatcher #(.NCHAN(1)) u_dsp1 (
    .clk, .rst_n,
    .hdr_valid(rx_hdr_valid[1]), .hdr_ready(rx_hdr_ready[1]), .hdr_data(rx_hdr_data[1]),
    .dat_valid(rx_dat_valid[1]), .dat_ready(rx_dat_ready[1]), .dat_data(rx_dat_data[1]),
    .out_valid(ii_valid), .out_ready(ii_ready), .out_data(ii_data)
  );

endmodule
