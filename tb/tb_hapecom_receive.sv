// tb_hapecom_receive -- self-checking testbench of the receive() primitive.
//
// Every input channel holds a queue of packets of random size (header word
// with packet_size in bits 61:48, payload, footer) and offers them with random
// gaps. Receives are issued for channels in random order; each must return
// exactly the payload words of the next packet on that channel, flag the last
// one, report the packet size, and leave the other channels untouched. A
// 3-word packet already waiting must complete 3 + 3 cycles after its command.
module tb_hapecom_receive;
  import apenet_pkg::*;

  localparam int NCHAN = 4;
  localparam int NPKT  = 15;   // packets per channel

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        cmd_valid, cmd_ready;
  logic [15:0] cmd_ch;
  logic [NCHAN-1:0] in_valid, in_ready;
  word_t       in_data [NCHAN];
  logic        pl_valid, pl_ready, pl_last, done;
  word_t       pl_data;
  logic [13:0] done_size;

  hapecom_receive dut (.*);

  int checks = 0, failures = 0;
  word_t src_q [NCHAN][$];      // words each channel will offer
  word_t pay_q [NCHAN][$];      // expected payload per channel
  int    size_q [NCHAN][$];
  bit    gaps = 1;

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic add_packet(int ch, int size);
    word_t h;
    h = '0;
    h[61:48] = 14'(size);
    h[20:5]  = 16'(ch);
    src_q[ch].push_back(h);
    for (int i = 0; i < (size + 31) / 32; i++) begin
      word_t w;
      w = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
      src_q[ch].push_back(w);
      pay_q[ch].push_back(w);
    end
    src_q[ch].push_back(~h);
    size_q[ch].push_back(size);
  endtask

  // Channel sources.
  for (genvar c = 0; c < NCHAN; c++) begin : g_src
    initial begin
      in_valid[c] = 0; in_data[c] = '0;
      wait (rst_n);
      @(negedge clk);
      forever begin
        if (src_q[c].size() > 0) begin
          if (gaps) repeat ($urandom_range(0, 1)) @(negedge clk);
          in_valid[c] = 1; in_data[c] = src_q[c][0]; #1;
          while (!in_ready[c]) begin @(negedge clk); #1; end
          void'(src_q[c].pop_front());
          @(negedge clk);
          in_valid[c] = 0;
        end else @(negedge clk);
      end
    end
  end

  always @(negedge clk) pl_ready = gaps ? ($urandom_range(0, 3) != 0) : 1'b1;

  // Payload and completion checker.
  int cur = 0, got = 0, dones = 0;
  always @(negedge clk) if (rst_n) begin
    #2;
    if (pl_valid && pl_ready) begin
      got++;
      if (pay_q[cur].size() == 0) chk(0, "payload beyond packet");
      else begin
        chk(pl_data == pay_q[cur].pop_front(), "payload word");
        chk(pl_last == (got == (size_q[cur][0] + 31) / 32), "last flag");
      end
    end
    if (done) begin
      dones++;
      chk(got == (size_q[cur][0] + 31) / 32, "payload word count");
      chk(int'(done_size) == size_q[cur][0], "returned size");
      void'(size_q[cur].pop_front());
    end
  end

  task automatic do_receive(int ch);
    int d0;
    d0 = dones;
    cur = ch; got = 0;
    cmd_valid = 1; cmd_ch = 16'(ch); #1;
    while (!cmd_ready) begin @(negedge clk); #1; end
    @(negedge clk);
    cmd_valid = 0;
    while (dones == d0) @(negedge clk);
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0, order[$];
    cmd_valid = 0; cmd_ch = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // Latency: a 3-word packet waiting on channel 2, no stalls.
    gaps = 0;
    add_packet(2, 96);
    repeat (3) @(negedge clk);
    t0 = $time / 10;
    do_receive(2);
    chk($time / 10 - t0 == 3 + 3 + 1, $sformatf("3-word receive took %0d cycles plus the done cycle", $time / 10 - t0 - 1));

    gaps = 1;
    for (int c = 0; c < NCHAN; c++)
      for (int p = 0; p < NPKT; p++) begin
        add_packet(c, $urandom_range(0, 250));
        order.push_back(c);
      end
    order.shuffle();
    foreach (order[i]) do_receive(order[i]);
    repeat (5) @(negedge clk);
    for (int c = 0; c < NCHAN; c++)
      chk(src_q[c].size() == 0 && pay_q[c].size() == 0, $sformatf("channel %0d drained", c));
    chk(dones == 1 + NCHAN * NPKT, "receive count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
