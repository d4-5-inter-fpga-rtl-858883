// tb_preprocessing_node -- self-checking testbench of the I/O and
// preprocessing node.
//
// The node (coordinate 0) sits on ports 0 and 1 of a behavioural router;
// packets for the computing nodes leave the router and are handled by the
// testbench. Events in the host buffer are sent by the sender, must come back
// through the router to the imagifier, and the imagifier's packets must reach
// tasks 0 and 1 of nodes 1 and 2 in turn (nboards = 3), each carrying the
// event header and the image worked out here from the hit list and the bin
// tables. For every image the testbench answers with a result packet to port
// 0; the receiver must write the results to the host buffer in order.
module tb_preprocessing_node;
  import apenet_pkg::*;

  localparam int NEV       = 24;
  localparam int LUT_DEPTH = 2048;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  coord_t       local_coord;
  logic         snd_start, snd_busy, snd_done, mem_rd;
  logic [31:0]  snd_npackets, mem_raddr;
  logic [127:0] mem_rdata;
  logic         rcv_start, rcv_busy, rcv_done, mem_we;
  logic [31:0]  rcv_count, mem_waddr;
  logic [127:0] mem_wdata;
  logic [15:0]  img_nports, img_nboards;
  logic         lut_we;
  logic [10:0]  lut_addr;
  logic signed [5:0] lut_x, lut_y;
  logic [31:0]  img_events;
  logic [1:0]   tx_hdr_valid, tx_hdr_ready, tx_dat_valid, tx_dat_ready;
  logic [1:0]   rx_hdr_valid, rx_hdr_ready, rx_dat_valid, rx_dat_ready;
  word_t        tx_hdr_data [2], tx_dat_data [2], rx_hdr_data [2], rx_dat_data [2];

  preprocessing_node dut (.*);

  tb_router_model #(.NP(2), .STALL(1)) router (
    .clk, .rst_n,
    .tx_hdr_valid, .tx_hdr_ready, .tx_hdr_data, .tx_dat_valid, .tx_dat_ready, .tx_dat_data,
    .rx_hdr_valid, .rx_hdr_ready, .rx_hdr_data, .rx_dat_valid, .rx_dat_ready, .rx_dat_data
  );

  logic [127:0] hostmem [4096];
  logic [127:0] resmem  [NEV];
  always_ff @(posedge clk) begin
    if (mem_rd) mem_rdata <= hostmem[mem_raddr[11:0]];
    if (mem_we && mem_waddr < NEV) resmem[mem_waddr] <= mem_wdata;
  end

  int checks = 0, failures = 0;
  int xm [LUT_DEPTH], ym [LUT_DEPTH];
  logic [127:0] evhs [NEV];
  logic [255:0] imgs [NEV];

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Stand-in for the computing nodes: check each image packet, answer it.
  int handled = 0;
  initial begin
    wait (rst_n);
    forever begin
      @(negedge clk);
      if (router.ext_q.size() >= 5) begin
        word_t h, w0, w1, w2, f;
        apenet_header_t hh;
        h  = router.ext_q.pop_front();
        w0 = router.ext_q.pop_front();
        w1 = router.ext_q.pop_front();
        w2 = router.ext_q.pop_front();
        f  = router.ext_q.pop_front();
        hh = word_2_apenet(h);
        chk(int'(hh.dest_x) == 1 + (handled / 2) % 2 && int'(hh.intra_dest) == handled % 2,
            $sformatf("destination of event %0d: node %0d task %0d", handled, hh.dest_x, hh.intra_dest));
        chk(hh.packet_size == 14'd96, "image packet size");
        chk(w0 == word_t'(evhs[handled]), "event header forwarded");
        chk(w1 == word_t'(imgs[handled][127:0]) && w2 == word_t'(imgs[handled][255:128]),
            $sformatf("image of event %0d", handled));
        router.inject(0, apenet_2_word(make_header(16'd0, 4'd0, 16'd0, 14'd32)),
                      {word_t'({w0[127:8], 8'(handled % 4)})});
        handled++;
      end
    end
  end

  initial begin
    int a;
    local_coord = 16'd0;
    snd_start = 0; rcv_start = 0; snd_npackets = '0; rcv_count = '0;
    img_nports = 16'd2; img_nboards = 16'd3;
    lut_we = 0; lut_addr = '0; lut_x = '0; lut_y = '0; mem_rdata = '0;
    for (int p = 0; p < LUT_DEPTH; p++) begin
      xm[p] = ($urandom_range(0, 9) == 0) ? -1 : $urandom_range(0, 15);
      ym[p] = $urandom_range(0, 15);
    end
    a = 0;
    for (int e = 0; e < NEV; e++) begin
      int n;
      n = $urandom_range(0, 4);
      evhs[e] = {$urandom, $urandom, $urandom, 16'($urandom), 16'(n)};
      hostmem[a++] = evhs[e];
      imgs[e] = '0;
      for (int k = 0; k < n; k++) begin
        logic [255:0] hw;
        for (int j = 0; j < 16; j++) begin
          int p;
          p = ($urandom_range(0, 4) == 0) ? 0 : $urandom_range(1, LUT_DEPTH - 1);
          hw[16*j +: 16] = 16'(p);
          if (p != 0 && xm[p] >= 0) imgs[e][xm[p] + 16 * ym[p]] = 1'b1;
        end
        hostmem[a++] = hw[127:0];
        hostmem[a++] = hw[255:128];
      end
    end
    for (int p = 0; p < LUT_DEPTH; p++) begin
      @(negedge clk);
      lut_we = 1; lut_addr = 11'(p); lut_x = 6'(xm[p]); lut_y = 6'(ym[p]);
    end
    @(negedge clk);
    lut_we = 0;
    rst_n = 1;
    repeat (3) @(negedge clk);
    rcv_start = 1; rcv_count = NEV;
    @(negedge clk);
    rcv_start = 0; snd_start = 1; snd_npackets = NEV;
    @(negedge clk);
    snd_start = 0;
    wait (rcv_done);
    repeat (3) @(negedge clk);
    chk(handled == NEV, "all images sent out");
    for (int e = 0; e < NEV; e++)
      chk(resmem[e] == {evhs[e][127:8], 8'(e % 4)}, $sformatf("result %0d stored", e));
    chk(router.intra_pkts == NEV, "sender to imagifier inside the node");
    chk(img_events == NEV, "imagifier event count");
    chk(!snd_busy && !rcv_busy, "kernels idle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
