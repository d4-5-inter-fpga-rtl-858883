// tb_aggregator -- self-checking testbench of the aggregator.
//
// Four channel sources each send a series of packets of random size with
// random gaps; the port side takes words with random back-pressure. The
// checker rebuilds every packet from the header/footer and payload streams
// and compares it with the packet queued by its channel (proc_id names the
// channel): header bits, payload words in order and count, footer bits.
// It also checks that a lone 3-word packet leaves in 3 + 3 cycles.
module tb_aggregator;
  import apenet_pkg::*;

  localparam int NCHAN = 4;
  localparam int NPKT  = 12;   // packets per channel

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [NCHAN-1:0] in_valid, in_ready;
  word_t            in_data [NCHAN];
  logic  hdr_valid, hdr_ready, dat_valid, dat_ready;
  word_t hdr_data, dat_data;

  aggregator dut (.*);

  int checks = 0, failures = 0;
  word_t exp_q [NCHAN][$];      // words each channel has sent, in order
  bit    random_ready = 1;

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  function automatic void build(int ch, int size, output word_t w[$]);
    apenet_header_t h;
    w = {};
    h = make_header(coord_t'(ch + 3), 4'(ch), 16'(ch), 14'(size));
    w.push_back(apenet_2_word(h));
    for (int i = 0; i < int'(size_to_nwords(14'(size))); i++)
      w.push_back({$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, 16'(i), 8'(ch), 8'hd5});
    w.push_back(apenet_2_word(make_footer()));
  endfunction

  // Inputs change at the falling edge; a word moves at the next rising edge
  // when valid and ready are both high half a cycle before it.
  task automatic send_words(int ch, word_t w[$], bit gaps);
    foreach (w[i]) begin
      if (gaps) repeat ($urandom_range(0, 2)) @(negedge clk);
      in_valid[ch] = 1'b1;
      in_data[ch]  = w[i];
      #1;
      while (!in_ready[ch]) begin @(negedge clk); #1; end
      @(negedge clk);
      in_valid[ch] = 1'b0;
    end
  endtask

  // Sink: random readiness on both port streams.
  always @(negedge clk) begin
    hdr_ready = random_ready ? ($urandom_range(0, 3) != 0) : 1'b1;
    dat_ready = random_ready ? ($urandom_range(0, 3) != 0) : 1'b1;
  end

  // Checker: header, payload, footer of one packet at a time.
  int     pkts_seen = 0;
  int     cur_ch = -1, words_left = 0;
  bit     want_ftr = 0;
  always @(negedge clk) if (rst_n) begin
    #2;
    if (hdr_valid && hdr_ready) begin
      if (!want_ftr) begin
        apenet_header_t h;
        h = word_2_apenet(hdr_data);
        cur_ch = int'(h.proc_id);
        if (cur_ch >= NCHAN || exp_q[cur_ch].size() == 0) begin
          chk(0, $sformatf("header for unknown channel %0d t=%0t %h", cur_ch, $time, hdr_data[127:0]));
        end else begin
          chk(hdr_data == exp_q[cur_ch].pop_front(), "header word");
          words_left = int'(size_to_nwords(h.packet_size));
          want_ftr = 1;
          chk(!dat_valid || words_left > 0, "payload before header");
        end
      end else begin
        chk(words_left == 0, "footer before all payload");
        chk(hdr_data == apenet_2_word(make_footer()), "footer word");
        if (cur_ch >= 0 && exp_q[cur_ch].size() > 0) void'(exp_q[cur_ch].pop_front());
        want_ftr = 0;
        pkts_seen++;
      end
    end
    if (dat_valid && dat_ready) begin
      chk(want_ftr && words_left > 0, $sformatf("payload word outside a packet t=%0t wf=%0d wl=%0d", $time, want_ftr, words_left));
      if (cur_ch >= 0 && exp_q[cur_ch].size() > 0)
        begin word_t e; e = exp_q[cur_ch].pop_front(); chk(dat_data == e, $sformatf("payload word %h exp %h", dat_data[31:0], e[31:0])); end
      words_left--;
    end
  end

  // Watchdog
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t w[$];
    int t0, t1;
    in_valid = '0;
    for (int c = 0; c < NCHAN; c++) in_data[c] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);

    // Latency of a single packet, sink always ready.
    random_ready = 0;
    repeat (2) @(negedge clk);
    build(2, 80, w);                       // 3 payload words
    foreach (w[i]) exp_q[2].push_back(w[i]);
    t0 = $time / 10;
    send_words(2, w, 0);
    t1 = $time / 10;
    chk(t1 - t0 == 3 + 3, $sformatf("packet of 3 words took %0d cycles", t1 - t0));
    repeat (3) @(negedge clk);

    // Random traffic on all channels.
    random_ready = 1;
    fork
      for (int c = 0; c < NCHAN; c++) begin
        automatic int cc = c;
        fork
          begin
            word_t ww[$];
            for (int p = 0; p < NPKT; p++) begin
              build(cc, $urandom_range(1, 200), ww);
              foreach (ww[i]) exp_q[cc].push_back(ww[i]);
              send_words(cc, ww, 1);
            end
          end
        join_none
      end
    join_none
    wait (pkts_seen == 1 + NCHAN * NPKT);
    repeat (5) @(posedge clk);
    for (int c = 0; c < NCHAN; c++) chk(exp_q[c].size() == 0, "all words delivered");
    chk(pkts_seen == 1 + NCHAN * NPKT, "packet count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
