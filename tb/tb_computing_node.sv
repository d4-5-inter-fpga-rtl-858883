// tb_computing_node -- self-checking testbench of one computing node.
//
// The node sits at coordinate 1, on ports 2 and 3 of a behavioural router
// whose ports 0 and 1 stand for the I/O node. Image packets are injected for
// task 0 and task 1 of the node; two behavioural classifiers serve the two
// kernels. Every result must arrive at port 0 of the I/O node exactly once as
// a 32-byte packet carrying {event header bits 127:8, class}, where the class
// is worked out here from the image. Both kernels must have been used.
module tb_computing_node;
  import apenet_pkg::*;

  localparam int NEV = 40;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [1:0] tx_hdr_valid, tx_hdr_ready, tx_dat_valid, tx_dat_ready;
  logic [1:0] rx_hdr_valid, rx_hdr_ready, rx_dat_valid, rx_dat_ready;
  word_t      tx_hdr_data [2], tx_dat_data [2], rx_hdr_data [2], rx_dat_data [2];
  logic [1:0] nn_in_valid, nn_in_ready, nn_out_valid, nn_out_ready;
  logic [255:0] nn_in_image [2];
  logic signed [15:0] nn_out_score [2][4];

  computing_node dut (.*);

  for (genvar k = 0; k < 2; k++) begin : g_cnn
    tb_cnn_model #(.LATENCY(4 + 3 * k)) u_cnn (
      .clk, .rst_n,
      .in_valid(nn_in_valid[k]), .in_ready(nn_in_ready[k]), .image(nn_in_image[k]),
      .out_valid(nn_out_valid[k]), .out_ready(nn_out_ready[k]), .score(nn_out_score[k])
    );
  end

  // Router: ports 0-1 are the I/O node (not simulated), ports 2-3 this node.
  logic [3:0] r_txh_v, r_txh_r, r_txd_v, r_txd_r, r_rxh_v, r_rxh_r, r_rxd_v, r_rxd_r;
  word_t      r_txh_d [4], r_txd_d [4], r_rxh_d [4], r_rxd_d [4];

  assign r_txh_v = {tx_hdr_valid, 2'b00};
  assign r_txd_v = {tx_dat_valid, 2'b00};
  assign r_rxh_r = {rx_hdr_ready, 2'b00};
  assign r_rxd_r = {rx_dat_ready, 2'b00};
  assign tx_hdr_ready = r_txh_r[3:2];
  assign tx_dat_ready = r_txd_r[3:2];
  assign rx_hdr_valid = r_rxh_v[3:2];
  assign rx_dat_valid = r_rxd_v[3:2];
  always_comb begin
    r_txh_d[0] = '0; r_txh_d[1] = '0; r_txd_d[0] = '0; r_txd_d[1] = '0;
    for (int p = 0; p < 2; p++) begin
      r_txh_d[p+2]   = tx_hdr_data[p];
      r_txd_d[p+2]   = tx_dat_data[p];
      rx_hdr_data[p] = r_rxh_d[p+2];
      rx_dat_data[p] = r_rxd_d[p+2];
    end
  end

  tb_router_model #(.NP(4), .STALL(1)) router (
    .clk, .rst_n,
    .tx_hdr_valid(r_txh_v), .tx_hdr_ready(r_txh_r), .tx_hdr_data(r_txh_d),
    .tx_dat_valid(r_txd_v), .tx_dat_ready(r_txd_r), .tx_dat_data(r_txd_d),
    .rx_hdr_valid(r_rxh_v), .rx_hdr_ready(r_rxh_r), .rx_hdr_data(r_rxh_d),
    .rx_dat_valid(r_rxd_v), .rx_dat_ready(r_rxd_r), .rx_dat_data(r_rxd_d)
  );

  int checks = 0, failures = 0;
  logic [127:0] expected [NEV];

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic int ref_class(logic [255:0] img);
    int pc, best, bs;
    pc = $countones(img);
    best = 0; bs = -1000;
    for (int k = 0; k < 4; k++) begin
      int s;
      s = 100 - ((pc > 6 * k) ? pc - 6 * k : 6 * k - pc);
      if (s > bs) begin bs = s; best = k; end
    end
    return best;
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit seen [NEV];
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int e = 0; e < NEV; e++) begin
      word_t pl[$];
      logic [127:0] evh;
      logic [255:0] img;
      evh = {16'hC0DE, 16'(e), $urandom, $urandom, $urandom};
      img = '0;
      for (int b = 0; b < $urandom_range(0, 30); b++) img[$urandom_range(0, 255)] = 1'b1;
      pl = {word_t'(evh), word_t'(img[127:0]), word_t'(img[255:128])};
      router.inject(2 + (e % 2), apenet_2_word(make_header(16'd1, 4'(e % 2), 16'd0, 14'd96)), pl);
      expected[e] = {evh[127:8], 8'(ref_class(img))};
      seen[e] = 0;
      repeat ($urandom_range(0, 20)) @(negedge clk);
    end
    wait (router.delivered[0] == NEV);
    repeat (5) @(negedge clk);
    // The results wait in the router's queues for port 0.
    chk(router.rxh[0].size() == 2 * NEV, "header and footer per result");
    chk(router.rxd[0].size() == NEV, "one payload word per result");
    for (int i = 0; i < NEV; i++) begin
      word_t h, w;
      apenet_header_t hh;
      int e;
      h = router.rxh[0][2 * i];
      hh = word_2_apenet(h);
      chk(hh.packet_size == 14'd32 && hh.dest_x == 0 && hh.intra_dest == 0 && hh.proc_id == 0,
          "result header");
      w = router.rxd[0][i];
      e = int'(w[111:96]);
      if (w[127:112] != 16'hC0DE || e >= NEV) chk(0, "result names no event");
      else begin
        chk(!seen[e], "result returned once");
        seen[e] = 1;
        chk(w[127:0] == expected[e], $sformatf("result of event %0d", e));
      end
    end
    for (int e = 0; e < NEV; e++) chk(seen[e], $sformatf("event %0d returned", e));
    chk(g_cnn[0].u_cnn.n_images == NEV / 2 && g_cnn[1].u_cnn.n_images == NEV / 2, "both kernels used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
