// tb_raider_scaling -- runs the default RAIDER top in the six node/CNN
// configurations of the scaling measurement: 2 nodes with 1 or 2 CNN kernels,
// 3 nodes with 2 or 4, 4 nodes with 3 or 6.
//
// The hardware is always the full top (one I/O node, three computing nodes,
// six CNN kernels); a smaller configuration is selected only through the
// imagifier's arguments: nboards = number of nodes, nports = kernels used per
// computing node. Each configuration gets a reset, the same 48 events (two hit
// words each) and a router without back-pressure. The classifiers are
// behavioural stand-ins whose latency is set to 340 cycles, so that a single
// kernel needs about 3.44 us per event at 100 MHz, the single-kernel figure of
// the measurement; the other figures are printed next to the simulated ones
// for comparison, not checked, since they depend on the real network.
//
// Checked per configuration: every result comes back once with the right
// class, exactly the kernels of the configuration received images and each
// the same share, and the time per event shrinks with the kernel count as
// long as the kernels are the bottleneck (within 25 % of 1/k of the
// single-kernel time, or the imagifier's own event time, whichever is larger).
module tb_raider_scaling;
  import apenet_pkg::*;

  localparam int N_COMPUTE = 3;
  localparam int NP        = 2 * (N_COMPUTE + 1);
  localparam int NCNN      = 2 * N_COMPUTE;
  localparam int LUT_DEPTH = 2048;
  localparam int NEV       = 48;
  localparam int NHIT      = 2;
  localparam int CNN_LAT   = 340;
  localparam int NCFG      = 6;
  // nodes, kernels per computing node, reference time per event in ns
  localparam int CFG_NODES [NCFG] = '{2, 2, 3, 3, 4, 4};
  localparam int CFG_PORTS [NCFG] = '{1, 2, 1, 2, 1, 2};
  localparam int CFG_NS    [NCFG] = '{3440, 1720, 1720, 860, 1147, 731};

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

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
  logic [NP-1:0] rt_tx_hdr_valid, rt_tx_hdr_ready, rt_tx_dat_valid, rt_tx_dat_ready;
  logic [NP-1:0] rt_rx_hdr_valid, rt_rx_hdr_ready, rt_rx_dat_valid, rt_rx_dat_ready;
  word_t        rt_tx_hdr_data [NP], rt_tx_dat_data [NP], rt_rx_hdr_data [NP], rt_rx_dat_data [NP];
  logic [NCNN-1:0] nn_in_valid, nn_in_ready, nn_out_valid, nn_out_ready;
  logic [255:0] nn_in_image [NCNN];
  logic signed [15:0] nn_out_score [NCNN][4];

  raider_system dut (.*);

  tb_router_model #(.NP(NP), .STALL(0)) router (
    .clk, .rst_n,
    .tx_hdr_valid(rt_tx_hdr_valid), .tx_hdr_ready(rt_tx_hdr_ready), .tx_hdr_data(rt_tx_hdr_data),
    .tx_dat_valid(rt_tx_dat_valid), .tx_dat_ready(rt_tx_dat_ready), .tx_dat_data(rt_tx_dat_data),
    .rx_hdr_valid(rt_rx_hdr_valid), .rx_hdr_ready(rt_rx_hdr_ready), .rx_hdr_data(rt_rx_hdr_data),
    .rx_dat_valid(rt_rx_dat_valid), .rx_dat_ready(rt_rx_dat_ready), .rx_dat_data(rt_rx_dat_data)
  );

  for (genvar k = 0; k < NCNN; k++) begin : g_cnn
    tb_cnn_model #(.LATENCY(CNN_LAT)) u_cnn (
      .clk, .rst_n,
      .in_valid(nn_in_valid[k]), .in_ready(nn_in_ready[k]), .image(nn_in_image[k]),
      .out_valid(nn_out_valid[k]), .out_ready(nn_out_ready[k]), .score(nn_out_score[k])
    );
  end

  logic [127:0] hostmem [4096];
  logic [127:0] resmem  [NEV];
  always @(posedge clk) begin
    if (mem_rd) mem_rdata <= hostmem[mem_raddr[11:0]];
    if (mem_we && mem_waddr < NEV) resmem[mem_waddr] <= mem_wdata;
  end

  int checks = 0, failures = 0;
  int xm [LUT_DEPTH], ym [LUT_DEPTH];
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

  function automatic int images_of(int k);
    case (k)
      0: return g_cnn[0].u_cnn.n_images;
      1: return g_cnn[1].u_cnn.n_images;
      2: return g_cnn[2].u_cnn.n_images;
      3: return g_cnn[3].u_cnn.n_images;
      4: return g_cnn[4].u_cnn.n_images;
      default: return g_cnn[5].u_cnn.n_images;
    endcase
  endfunction

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int a, t0, t1, per_event [NCFG], n_prev [NCNN], img_time;
    snd_start = 0; rcv_start = 0; snd_npackets = '0; rcv_count = '0;
    img_nports = 16'd1; img_nboards = 16'd2;
    lut_we = 0; lut_addr = '0; lut_x = '0; lut_y = '0; mem_rdata = '0;

    for (int p = 0; p < LUT_DEPTH; p++) begin
      xm[p] = $urandom_range(0, 15);
      ym[p] = ($urandom_range(0, 7) == 0) ? -1 : $urandom_range(0, 15);
    end
    a = 0;
    for (int e = 0; e < NEV; e++) begin
      logic [127:0] evh;
      logic [255:0] img;
      evh = {32'hE0E0_0000 | 32'(e), $urandom, $urandom, 16'($urandom), 16'(NHIT)};
      hostmem[a++] = evh;
      img = '0;
      for (int k = 0; k < NHIT; k++) begin
        logic [255:0] hw;
        for (int j = 0; j < 16; j++) begin
          int p;
          p = ($urandom_range(0, 1) == 0) ? 0 : $urandom_range(1, LUT_DEPTH - 1);
          hw[16*j +: 16] = 16'(p);
          if (p != 0 && ym[p] >= 0) img[xm[p] + 16 * ym[p]] = 1'b1;
        end
        hostmem[a++] = hw[127:0];
        hostmem[a++] = hw[255:128];
      end
      expected[e] = {evh[127:8], 8'(ref_class(img))};
    end
    // Imagifier time for one event of NHIT words: 17 cycles per word plus 9.
    img_time = 17 * NHIT + 9;

    for (int p = 0; p < LUT_DEPTH; p++) begin
      @(negedge clk);
      lut_we = 1; lut_addr = 11'(p); lut_x = 6'(xm[p]); lut_y = 6'(ym[p]);
    end
    @(negedge clk);
    lut_we = 0;

    for (int c = 0; c < NCFG; c++) begin
      int ncnn;
      ncnn = (CFG_NODES[c] - 1) * CFG_PORTS[c];
      rst_n = 0;
      img_nboards = 16'(CFG_NODES[c]);
      img_nports  = 16'(CFG_PORTS[c]);
      for (int e = 0; e < NEV; e++) resmem[e] = '0;
      repeat (3) @(negedge clk);
      rst_n = 1;
      for (int k = 0; k < NCNN; k++) n_prev[k] = images_of(k);
      repeat (3) @(negedge clk);
      rcv_start = 1; rcv_count = NEV;
      @(negedge clk);
      rcv_start = 0;
      snd_start = 1; snd_npackets = NEV;
      t0 = $time / 10;
      @(negedge clk);
      snd_start = 0;
      wait (rcv_done);
      t1 = $time / 10;
      per_event[c] = (t1 - t0) / NEV;
      $display("%0d nodes, %0d CNN kernels: %0d cycles per event (%0d ns at 100 MHz; measured on the original system: %0d ns)",
               CFG_NODES[c], ncnn, per_event[c], 10 * per_event[c], CFG_NS[c]);
      repeat (3) @(negedge clk);

      begin
        bit seen [NEV];
        for (int e = 0; e < NEV; e++) seen[e] = 0;
        for (int i = 0; i < NEV; i++) begin
          int e;
          e = int'(resmem[i][111:96]);
          if (e >= NEV || resmem[i][127:112] != 16'hE0E0) chk(0, $sformatf("config %0d: result %0d names no event", c, i));
          else begin
            chk(!seen[e], $sformatf("config %0d: event %0d returned twice", c, e));
            seen[e] = 1;
            chk(resmem[i] == expected[e], $sformatf("config %0d: result of event %0d", c, e));
          end
        end
        for (int e = 0; e < NEV; e++) chk(seen[e], $sformatf("config %0d: event %0d returned", c, e));
      end
      for (int k = 0; k < NCNN; k++) begin
        bit used;
        used = (k / 2 < CFG_NODES[c] - 1) && (k % 2 < CFG_PORTS[c]);
        chk(images_of(k) - n_prev[k] == (used ? NEV / ncnn : 0),
            $sformatf("config %0d: CNN %0d got %0d images", c, k, images_of(k) - n_prev[k]));
      end
      chk(per_event[c] >= CNN_LAT / ncnn, $sformatf("config %0d faster than its kernels allow", c));
      if (c > 0) begin
        int bound;
        bound = (per_event[0] / ncnn > img_time) ? per_event[0] / ncnn : img_time;
        chk(per_event[c] * 4 <= bound * 5,
            $sformatf("config %0d: %0d cycles per event, expected at most 1.25 x %0d", c, per_event[c], bound));
      end
    end
    chk(router.bad_pkts == 0 && router.ext_pkts == 0, "well-formed, routable packets");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
