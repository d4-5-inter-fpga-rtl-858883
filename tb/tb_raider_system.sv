// tb_raider_system -- end-to-end testbench of the RAIDER pipeline at its
// default size: one I/O node and three computing nodes with two CNN kernels
// each, bin tables of 2048 entries, at most 64 hit words imaged per event.
//
// The routing IPs are replaced by a behavioural router (random back-pressure
// on every stream) and the six CNNs by behavioural classifiers. The host
// side loads the bin tables, fills the event buffer, starts the receiver and
// the sender, and waits for the receiver's done. For every event the
// testbench computes the image and the class itself from the hit list and
// the table contents; every event must come back exactly once with
// {event header bits 127:8, class}. Each mechanism of the design must have
// happened at least once: a packet between two ports of the same node, a
// packet between nodes, images for every one of the six CNNs, a stalled port,
// an event longer than the imaged window, an event without hits, a PMT number
// outside the table and a PMT outside the image.
module tb_raider_system;
  import apenet_pkg::*;

  localparam int N_COMPUTE = 3;
  localparam int NP        = 2 * (N_COMPUTE + 1);
  localparam int NCNN      = 2 * N_COMPUTE;
  localparam int LUT_DEPTH = 2048;
  localparam int MAX_WORD  = 64;
  localparam int NEV       = 72;

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

  tb_router_model #(.NP(NP), .STALL(1)) router (
    .clk, .rst_n,
    .tx_hdr_valid(rt_tx_hdr_valid), .tx_hdr_ready(rt_tx_hdr_ready), .tx_hdr_data(rt_tx_hdr_data),
    .tx_dat_valid(rt_tx_dat_valid), .tx_dat_ready(rt_tx_dat_ready), .tx_dat_data(rt_tx_dat_data),
    .rx_hdr_valid(rt_rx_hdr_valid), .rx_hdr_ready(rt_rx_hdr_ready), .rx_hdr_data(rt_rx_hdr_data),
    .rx_dat_valid(rt_rx_dat_valid), .rx_dat_ready(rt_rx_dat_ready), .rx_dat_data(rt_rx_dat_data)
  );

  for (genvar k = 0; k < NCNN; k++) begin : g_cnn
    tb_cnn_model #(.LATENCY(3 + k)) u_cnn (
      .clk, .rst_n,
      .in_valid(nn_in_valid[k]), .in_ready(nn_in_ready[k]), .image(nn_in_image[k]),
      .out_valid(nn_out_valid[k]), .out_ready(nn_out_ready[k]), .score(nn_out_score[k])
    );
  end

  // Host buffers.
  logic [127:0] hostmem [8192];
  logic [127:0] resmem  [NEV];
  always_ff @(posedge clk) begin
    if (mem_rd) mem_rdata <= hostmem[mem_raddr[12:0]];
    if (mem_we && mem_waddr < NEV) resmem[mem_waddr] <= mem_wdata;
  end

  int checks = 0, failures = 0;
  int xm [LUT_DEPTH], ym [LUT_DEPTH];
  logic [127:0] expected [NEV];
  int  n_long = 0, n_empty = 0, n_outside_table = 0, n_outside_image = 0;

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic mechanism(string name, int count);
    $display("mechanism %-28s %0d", name, count);
    chk(count > 0, $sformatf("mechanism '%s' never happened", name));
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
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int a, t0, t1;
    snd_start = 0; rcv_start = 0; snd_npackets = '0; rcv_count = '0;
    img_nports = 16'd2; img_nboards = 16'(N_COMPUTE + 1);
    lut_we = 0; lut_addr = '0; lut_x = '0; lut_y = '0; mem_rdata = '0;

    // Bin tables: about one PMT in eight is outside the image.
    for (int p = 0; p < LUT_DEPTH; p++) begin
      if ($urandom_range(0, 7) == 0) begin xm[p] = $urandom_range(0, 15); ym[p] = -1; end
      else begin xm[p] = $urandom_range(0, 15); ym[p] = $urandom_range(0, 15); end
    end

    // Events.
    a = 0;
    for (int e = 0; e < NEV; e++) begin
      int n;
      logic [127:0] evh;
      logic [255:0] img;
      n = (e == 5) ? MAX_WORD + 2 : (e == 9) ? 0 : $urandom_range(0, 3);
      evh = {32'hE0E0_0000 | 32'(e), $urandom, $urandom, 16'($urandom), 16'(n)};
      hostmem[a++] = evh;
      img = '0;
      if (n > MAX_WORD) n_long++;
      if (n == 0) n_empty++;
      for (int k = 0; k < n; k++) begin
        logic [255:0] hw;
        for (int j = 0; j < 16; j++) begin
          int p;
          p = ($urandom_range(0, 9) == 0) ? $urandom_range(LUT_DEPTH, 65535)
            : ($urandom_range(0, 3) == 0) ? 0 : $urandom_range(1, LUT_DEPTH - 1);
          hw[16*j +: 16] = 16'(p);
          if (p >= LUT_DEPTH) n_outside_table++;
          else if (p != 0 && ym[p] < 0) n_outside_image++;
          if (k < MAX_WORD && p != 0 && p < LUT_DEPTH && xm[p] >= 0 && ym[p] >= 0)
            img[xm[p] + 16 * ym[p]] = 1'b1;
        end
        hostmem[a++] = hw[127:0];
        hostmem[a++] = hw[255:128];
      end
      expected[e] = {evh[127:8], 8'(ref_class(img))};
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
    rcv_start = 0;
    snd_start = 1; snd_npackets = NEV;
    t0 = $time / 10;
    @(negedge clk);
    snd_start = 0;
    fork
      wait (snd_done);
      wait (rcv_done);
    join
    while (rcv_busy) @(negedge clk);
    t1 = $time / 10;
    $display("%0d events in %0d cycles", NEV, t1 - t0);

    // Every event back exactly once, with the right class.
    begin
      bit seen [NEV];
      for (int e = 0; e < NEV; e++) seen[e] = 0;
      for (int i = 0; i < NEV; i++) begin
        int e;
        e = int'(resmem[i][127:96] & 32'h0000_FFFF);
        if (e >= NEV || resmem[i][127:112] != 16'hE0E0) chk(0, $sformatf("result %0d names no event", i));
        else begin
          chk(!seen[e], $sformatf("event %0d returned twice", e));
          seen[e] = 1;
          chk(resmem[i] == expected[e], $sformatf("result of event %0d: %h expected %h", e, resmem[i], expected[e]));
        end
      end
      for (int e = 0; e < NEV; e++) chk(seen[e], $sformatf("event %0d returned", e));
    end
    chk(img_events == NEV, "imagifier event count");
    chk(router.bad_pkts == 0 && router.ext_pkts == 0, "well-formed, routable packets");

    mechanism("intra-node packet", router.intra_pkts);
    mechanism("inter-node packet", router.inter_pkts);
    for (int k = 0; k < NCNN; k++) begin
      int n;
      case (k)
        0: n = g_cnn[0].u_cnn.n_images;
        1: n = g_cnn[1].u_cnn.n_images;
        2: n = g_cnn[2].u_cnn.n_images;
        3: n = g_cnn[3].u_cnn.n_images;
        4: n = g_cnn[4].u_cnn.n_images;
        default: n = g_cnn[5].u_cnn.n_images;
      endcase
      mechanism($sformatf("images for CNN %0d", k), n);
      chk(n == NEV / NCNN, $sformatf("round robin gives CNN %0d %0d images", k, n));
    end
    mechanism("stalled port", router.stall_cycles);
    mechanism("event beyond imaged window", n_long);
    mechanism("event without hits", n_empty);
    mechanism("PMT outside table", n_outside_table);
    mechanism("PMT outside image", n_outside_image);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
