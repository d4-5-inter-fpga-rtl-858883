// tb_dispatcher -- self-checking testbench of the dispatcher.
//
// A routing-IP model feeds random packets (random size and destination
// channel, proc_id sometimes above NCHAN-1) as a header/footer stream and a
// payload stream, each with random gaps. Every task channel takes words with
// random back-pressure and compares them, in order, with the header, payload
// and footer words the packet addressed to it must yield (channel
// proc_id mod NCHAN). A lone packet of 3 payload words must pass in 3 + 2
// cycles.
module tb_dispatcher;
  import apenet_pkg::*;

  localparam int NCHAN = 4;
  localparam int NPKT  = 60;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic  hdr_valid, hdr_ready, dat_valid, dat_ready;
  word_t hdr_data, dat_data;
  logic [NCHAN-1:0] out_valid, out_ready;
  word_t            out_data [NCHAN];

  dispatcher dut (.*);

  int checks = 0, failures = 0;
  word_t exp_q [NCHAN][$];
  word_t hq[$], dq[$];
  bit    random_ready = 1;
  int    words_in = 0, words_out = 0;

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // Queue one packet on the routing-IP side and in the expected channel.
  task automatic add_packet(int pid, int size);
    apenet_header_t h;
    int ch;
    ch = pid % NCHAN;
    h = make_header(coord_t'(pid), 4'(pid), 16'(pid), 14'(size));
    hq.push_back(apenet_2_word(h));
    exp_q[ch].push_back(apenet_2_word(h));
    for (int i = 0; i < int'(size_to_nwords(14'(size))); i++) begin
      word_t w;
      w = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, 16'(i), 16'(pid)};
      dq.push_back(w);
      exp_q[ch].push_back(w);
    end
    hq.push_back(apenet_2_word(make_footer()));
    exp_q[ch].push_back(apenet_2_word(make_footer()));
    words_in += 2 + int'(size_to_nwords(14'(size)));
  endtask

  // Routing-IP side sources: inputs change at the falling edge.
  task automatic drive_hdr(bit gaps);
    while (hq.size() > 0) begin
      if (gaps) repeat ($urandom_range(0, 2)) @(negedge clk);
      hdr_valid = 1'b1; hdr_data = hq.pop_front(); #1;
      while (!hdr_ready) begin @(negedge clk); #1; end
      @(negedge clk);
      hdr_valid = 1'b0;
    end
  endtask
  task automatic drive_dat(bit gaps);
    while (dq.size() > 0) begin
      if (gaps) repeat ($urandom_range(0, 2)) @(negedge clk);
      dat_valid = 1'b1; dat_data = dq.pop_front(); #1;
      while (!dat_ready) begin @(negedge clk); #1; end
      @(negedge clk);
      dat_valid = 1'b0;
    end
  endtask

  always @(negedge clk)
    for (int c = 0; c < NCHAN; c++)
      out_ready[c] = random_ready ? ($urandom_range(0, 3) != 0) : 1'b1;

  // Channel checker, sampled mid-cycle.
  always @(negedge clk) if (rst_n) begin
    #2;
    for (int c = 0; c < NCHAN; c++)
      if (out_valid[c] && out_ready[c]) begin
        words_out++;
        if (exp_q[c].size() == 0) chk(0, $sformatf("unexpected word on channel %0d", c));
        else chk(out_data[c] == exp_q[c].pop_front(), $sformatf("word on channel %0d", c));
      end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0, t1;
    hdr_valid = 0; dat_valid = 0; hdr_data = '0; dat_data = '0; out_ready = '1;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);

    // Latency: 3 payload words, nothing stalls.
    random_ready = 0;
    @(negedge clk);
    add_packet(1, 96);
    t0 = $time / 10;
    fork drive_hdr(0); drive_dat(0); join
    t1 = $time / 10;
    chk(t1 - t0 == 3 + 2, $sformatf("packet of 3 words took %0d cycles", t1 - t0));

    random_ready = 1;
    for (int p = 0; p < NPKT; p++) add_packet($urandom_range(0, 9), $urandom_range(1, 300));
    fork drive_hdr(1); drive_dat(1); join
    repeat (20) @(negedge clk);
    for (int c = 0; c < NCHAN; c++) chk(exp_q[c].size() == 0, $sformatf("channel %0d complete", c));
    chk(words_out == words_in, "word count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
