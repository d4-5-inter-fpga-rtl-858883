// raider_system -- the multi-FPGA RAIDER particle-identification pipeline:
// one I/O and preprocessing node (node 0) and N_COMPUTE computing nodes
// (nodes 1..N_COMPUTE), each with two intranode ports.
//
// Data flow: the host starts krnl_sender on node 0, which streams detector
// events to the imagifier on node 0, port 1; the imagifier turns each event
// into a 16x16 hit image and sends it round robin to the CNN kernels on ports
// 0 and 1 of nodes 1..nboards-1; each CNN kernel returns a class result to
// node 0, port 0, where krnl_receiver writes it to the host buffer. With the
// default N_COMPUTE = 3 this is the four-board, six-CNN arrangement.
//
// The routing IPs and the links between the boards are not part of this RTL:
// every intranode port of every node is brought out. Port p of node n has
// index 2n + p in the rt_* arrays; rt_tx_* carry what the node sends into
// its routing IP, rt_rx_* what the routing IP delivers, each split into a
// header/footer stream and a payload stream. A routing IP must deliver a
// packet whose header names node coordinate x = n (dest_x) and task p
// (intra_dest) on rx port 2n + p. The CNNs are brought out as well: CNN k
// (k = 2(n-1) + p) is the one of kernel p on computing node n.
// Bits 255:128 of every rt_tx_hdr_data word are constant zero, because a
// header or footer occupies only the low half of a word; the same holds for
// the payload words of result packets leaving the computing nodes.
//
// The two node kinds, their port use and the round-robin spreading of images
// follow the reference system; the coordinates (node n at x = n, y = z = 0)
// and bringing the network out as ports are this design's own choices.
// Timing: per event, 17n + 9 cycles in the imagifier (n hit words) sets the
// peak rate; the CNNs and the network add their own latency.
module raider_system
  import apenet_pkg::*;
#(
  parameter int unsigned N_COMPUTE = 3,
  parameter int unsigned N_CLASS   = 4,
  parameter int unsigned SCORE_W   = 16,
  parameter int unsigned MAX_WORD  = 64,
  parameter int unsigned LUT_DEPTH = 2048,
  parameter int unsigned NP        = 2 * (N_COMPUTE + 1),
  parameter int unsigned NCNN      = 2 * N_COMPUTE
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // host control of node 0
  input  logic                          snd_start,
  input  logic [31:0]                   snd_npackets,
  output logic                          snd_busy,
  output logic                          snd_done,
  output logic                          mem_rd,
  output logic [31:0]                   mem_raddr,
  input  logic [127:0]                  mem_rdata,
  input  logic                          rcv_start,
  input  logic [31:0]                   rcv_count,
  output logic                          rcv_busy,
  output logic                          rcv_done,
  output logic                          mem_we,
  output logic [31:0]                   mem_waddr,
  output logic [127:0]                  mem_wdata,
  input  logic [15:0]                   img_nports,
  input  logic [15:0]                   img_nboards,
  input  logic                          lut_we,
  input  logic [$clog2(LUT_DEPTH)-1:0]  lut_addr,
  input  logic signed [5:0]             lut_x,
  input  logic signed [5:0]             lut_y,
  output logic [31:0]                   img_events,
  // routing IP intranode ports of all nodes
  output logic [NP-1:0]                 rt_tx_hdr_valid,
  input  logic [NP-1:0]                 rt_tx_hdr_ready,
  output word_t                         rt_tx_hdr_data [NP],
  output logic [NP-1:0]                 rt_tx_dat_valid,
  input  logic [NP-1:0]                 rt_tx_dat_ready,
  output word_t                         rt_tx_dat_data [NP],
  input  logic [NP-1:0]                 rt_rx_hdr_valid,
  output logic [NP-1:0]                 rt_rx_hdr_ready,
  input  word_t                         rt_rx_hdr_data [NP],
  input  logic [NP-1:0]                 rt_rx_dat_valid,
  output logic [NP-1:0]                 rt_rx_dat_ready,
  input  word_t                         rt_rx_dat_data [NP],
  // CNNs of the computing nodes
  output logic [NCNN-1:0]               nn_in_valid,
  input  logic [NCNN-1:0]               nn_in_ready,
  output logic [255:0]                  nn_in_image [NCNN],
  input  logic [NCNN-1:0]               nn_out_valid,
  output logic [NCNN-1:0]               nn_out_ready,
  input  logic signed [SCORE_W-1:0]     nn_out_score [NCNN][N_CLASS]
);

  preprocessing_node #(.MAX_WORD(MAX_WORD), .LUT_DEPTH(LUT_DEPTH)) u_io (
    .clk, .rst_n,
    .local_coord(coord_t'(0)),
    .snd_start, .snd_npackets, .snd_busy, .snd_done, .mem_rd, .mem_raddr, .mem_rdata,
    .rcv_start, .rcv_count, .rcv_busy, .rcv_done, .mem_we, .mem_waddr, .mem_wdata,
    .img_nports, .img_nboards, .lut_we, .lut_addr, .lut_x, .lut_y, .img_events,
    .tx_hdr_valid(rt_tx_hdr_valid[1:0]), .tx_hdr_ready(rt_tx_hdr_ready[1:0]),
    .tx_hdr_data (rt_tx_hdr_data[0:1]),
    .tx_dat_valid(rt_tx_dat_valid[1:0]), .tx_dat_ready(rt_tx_dat_ready[1:0]),
    .tx_dat_data (rt_tx_dat_data[0:1]),
    .rx_hdr_valid(rt_rx_hdr_valid[1:0]), .rx_hdr_ready(rt_rx_hdr_ready[1:0]),
    .rx_hdr_data (rt_rx_hdr_data[0:1]),
    .rx_dat_valid(rt_rx_dat_valid[1:0]), .rx_dat_ready(rt_rx_dat_ready[1:0]),
    .rx_dat_data (rt_rx_dat_data[0:1])
  );

  for (genvar n = 1; n <= N_COMPUTE; n++) begin : g_node
    localparam int unsigned P0 = 2 * n;
    localparam int unsigned C0 = 2 * (n - 1);

    computing_node #(.N_CLASS(N_CLASS), .SCORE_W(SCORE_W)) u_cn (
      .clk, .rst_n,
      .tx_hdr_valid(rt_tx_hdr_valid[P0+1:P0]), .tx_hdr_ready(rt_tx_hdr_ready[P0+1:P0]),
      .tx_hdr_data (rt_tx_hdr_data[P0:P0+1]),
      .tx_dat_valid(rt_tx_dat_valid[P0+1:P0]), .tx_dat_ready(rt_tx_dat_ready[P0+1:P0]),
      .tx_dat_data (rt_tx_dat_data[P0:P0+1]),
      .rx_hdr_valid(rt_rx_hdr_valid[P0+1:P0]), .rx_hdr_ready(rt_rx_hdr_ready[P0+1:P0]),
      .rx_hdr_data (rt_rx_hdr_data[P0:P0+1]),
      .rx_dat_valid(rt_rx_dat_valid[P0+1:P0]), .rx_dat_ready(rt_rx_dat_ready[P0+1:P0]),
      .rx_dat_data (rt_rx_dat_data[P0:P0+1]),
      .nn_in_valid (nn_in_valid[C0+1:C0]), .nn_in_ready(nn_in_ready[C0+1:C0]),
      .nn_in_image (nn_in_image[C0:C0+1]),
      .nn_out_valid(nn_out_valid[C0+1:C0]), .nn_out_ready(nn_out_ready[C0+1:C0]),
      .nn_out_score(nn_out_score[C0:C0+1])
    );
  end

endmodule
