// tb_hapecom_send -- self-checking testbench of the send() framer.
//
// Random messages (size 0 to 400 bytes, random coordinate, task and channel)
// are issued with their payload words; the output channels apply random
// back-pressure. The expected header and footer words are assembled here
// field by field at their bit positions (dest_x 26:21, dest_y 31:27, dest_z
// 36:32, intra_dest 40:37, proc_id 20:5, packet_size 61:48, dest_addr 109:62;
// footer dest_addr 0xaaaeabac and edac 127:120 = 0x99), independently of the
// package helpers. A zero-size message must produce nothing. A message of 3
// payload words must complete 3 + 3 cycles after its command.
module tb_hapecom_send;
  import apenet_pkg::*;

  localparam int NCHAN = 4;
  localparam int NMSG  = 80;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        cmd_valid, cmd_ready, pl_valid, pl_ready;
  logic [13:0] cmd_size;
  coord_t      cmd_coord;
  logic [3:0]  cmd_task;
  logic [15:0] cmd_ch;
  word_t       pl_data;
  logic [NCHAN-1:0] out_valid, out_ready;
  word_t            out_data [NCHAN];

  hapecom_send dut (.*);

  int checks = 0, failures = 0;
  word_t exp_q [NCHAN][$];
  bit    random_ready = 1;

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic word_t ref_header(coord_t c, logic [3:0] t, logic [15:0] ch, logic [13:0] sz);
    word_t w = '0;
    w[26:21]  = c[5:0];
    w[31:27]  = c[10:6];
    w[36:32]  = c[15:11];
    w[40:37]  = t;
    w[20:5]   = ch;
    w[61:48]  = sz;
    w[109:62] = 48'hfafbfcfd;
    return w;
  endfunction

  function automatic word_t ref_footer();
    word_t w = '0;
    w[109:62]  = 48'haaaeabac;
    w[127:120] = 8'h99;
    return w;
  endfunction

  task automatic do_send(int size, coord_t c, logic [3:0] t, logic [15:0] ch, bit gaps);
    int n;
    word_t pl[$];
    n = (size + 31) / 32;
    if (size > 0) begin
      exp_q[ch % NCHAN].push_back(ref_header(c, t, ch, 14'(size)));
      for (int i = 0; i < n; i++) begin
        pl.push_back({$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom});
        exp_q[ch % NCHAN].push_back(pl[i]);
      end
      exp_q[ch % NCHAN].push_back(ref_footer());
    end
    cmd_valid = 1; cmd_size = 14'(size); cmd_coord = c; cmd_task = t; cmd_ch = ch; #1;
    while (!cmd_ready) begin @(negedge clk); #1; end
    @(negedge clk);
    cmd_valid = 0;
    foreach (pl[i]) begin
      if (gaps) repeat ($urandom_range(0, 2)) @(negedge clk);
      pl_valid = 1; pl_data = pl[i]; #1;
      while (!pl_ready) begin @(negedge clk); #1; end
      @(negedge clk);
      pl_valid = 0;
    end
  endtask

  always @(negedge clk)
    for (int c = 0; c < NCHAN; c++)
      out_ready[c] = random_ready ? ($urandom_range(0, 3) != 0) : 1'b1;

  int words_out = 0;
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
    int t0;
    cmd_valid = 0; pl_valid = 0; pl_data = '0; cmd_size = '0; cmd_coord = '0;
    cmd_task = '0; cmd_ch = '0; out_ready = '1;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);

    // Latency of a 3-word message with ready outputs.
    random_ready = 0;
    t0 = $time / 10;
    do_send(70, 16'h0843, 4'd2, 16'd1, 0);
    wait (exp_q[1].size() == 0);
    @(negedge clk);
    chk($time / 10 - t0 == 3 + 3, $sformatf("3-word message took %0d cycles", $time / 10 - t0));

    // Zero size: nothing is sent.
    do_send(0, 16'h1, 4'd0, 16'd0, 0);
    repeat (5) @(negedge clk);
    chk(words_out == 5, "zero-size message sends nothing");

    random_ready = 1;
    for (int m = 0; m < NMSG; m++)
      do_send($urandom_range(0, 400), coord_t'($urandom), 4'($urandom), 16'($urandom_range(0, 127)), 1);
    repeat (60) @(negedge clk);
    for (int c = 0; c < NCHAN; c++) chk(exp_q[c].size() == 0, $sformatf("channel %0d complete", c));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
