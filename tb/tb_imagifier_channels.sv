// tb_imagifier_channels -- self-checking testbench of the imagifier with
// two input and two output channels (N_IN = N_OUT = 2) and the default
// imaged window.
//
// With more than one channel the destination sequence has a further
// component: after each event the channel advances modulo N_OUT, the task
// advances whenever the new channel is at or above N_OUT - 1, the node
// coordinate advances when the task reaches nports and wraps from nboards to
// 1. The imagifier reads its next event from the input channel with the same
// number. The testbench follows that rule to decide on which input channel
// to offer each event and on which output channel, for which task and node,
// its image must leave; a packet waiting on the other input channel must stay
// untouched meanwhile. Some events are packets of only 16 bytes (one payload
// word, the event header): they must give an empty image. Both outputs apply
// random back-pressure independently.
module tb_imagifier_channels;
  import apenet_pkg::*;

  localparam int LUT_DEPTH = 2048;
  localparam int NEV       = 48;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [15:0] nports, nboards;
  logic        lut_we;
  logic [10:0] lut_addr;
  logic signed [5:0] lut_x, lut_y;
  logic [1:0]  in_valid, in_ready, out_valid, out_ready;
  word_t       in_data [2];
  word_t       out_data [2];
  logic [31:0] events;

  imagifier #(.N_IN(2), .N_OUT(2)) dut (.*);

  int checks = 0, failures = 0;
  int xm [LUT_DEPTH], ym [LUT_DEPTH];
  word_t src_q [2][$];
  word_t exp_q [2][$];
  int    rr_ch = 0, rr_task = 0, rr_coord = 1;
  int    n_short = 0;

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic word_t hdr_word(int coord, int tsk, int ch, int size);
    word_t w = '0;
    w[26:21] = 6'(coord); w[40:37] = 4'(tsk); w[20:5] = 16'(ch);
    w[61:48] = 14'(size); w[109:62] = 48'hfafbfcfd;
    return w;
  endfunction

  function automatic word_t ftr_word();
    word_t w = '0;
    w[109:62] = 48'haaaeabac; w[127:120] = 8'h99;
    return w;
  endfunction

  // Queue one event on the input channel it will be read from, and its
  // expected result on the output channel it must leave by. nwords < 0 makes
  // a 16-byte packet that holds only the event header.
  task automatic add_event(int nwords);
    word_t evh, hw;
    logic [255:0] img;
    int ch;
    ch  = rr_ch;
    evh = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
    img = '0;
    if (nwords < 0) n_short++;
    src_q[ch].push_back(hdr_word(0, 1, ch, (nwords < 0) ? 16 : 32 * (1 + nwords)));
    src_q[ch].push_back(evh);
    for (int k = 0; k < nwords; k++) begin
      for (int j = 0; j < 16; j++) begin
        int p;
        case ($urandom_range(0, 7))
          0:       p = 0;
          1:       p = $urandom_range(LUT_DEPTH, 65535);
          default: p = $urandom_range(1, LUT_DEPTH - 1);
        endcase
        hw[16*j +: 16] = 16'(p);
        if (p != 0 && p < LUT_DEPTH && xm[p] >= 0 && ym[p] >= 0)
          img[xm[p] + 16 * ym[p]] = 1'b1;
      end
      src_q[ch].push_back(hw);
    end
    src_q[ch].push_back(~evh);                   // footer (content not inspected)
    exp_q[ch].push_back(hdr_word(rr_coord, rr_task, ch, 96));
    exp_q[ch].push_back(evh);
    exp_q[ch].push_back({128'b0, img[127:0]});
    exp_q[ch].push_back({128'b0, img[255:128]});
    exp_q[ch].push_back(ftr_word());
    rr_ch = (rr_ch + 1) % 2;
    if (rr_ch >= 1) rr_task++;
    if (rr_task >= int'(nports)) begin
      rr_task = 0;
      rr_coord++;
      if (rr_coord >= int'(nboards)) rr_coord = 1;
    end
  endtask

  // Sources of the two input channels.
  for (genvar c = 0; c < 2; c++) begin : g_src
    initial begin
      in_valid[c] = 0; in_data[c] = '0;
      wait (rst_n);
      @(negedge clk);
      forever begin
        if (src_q[c].size() > 0) begin
          repeat ($urandom_range(0, 1)) @(negedge clk);
          in_valid[c] = 1; in_data[c] = src_q[c][0]; #1;
          while (!in_ready[c]) begin @(negedge clk); #1; end
          void'(src_q[c].pop_front());
          @(negedge clk);
          in_valid[c] = 0;
        end else @(negedge clk);
      end
    end
  end

  always @(negedge clk)
    for (int c = 0; c < 2; c++) out_ready[c] = 1'($urandom_range(0, 3) != 0);

  int words_out = 0, ch_used [2] = '{0, 0};
  always @(negedge clk) if (rst_n) begin
    #2;
    for (int c = 0; c < 2; c++)
      if (out_valid[c] && out_ready[c]) begin
        words_out++;
        ch_used[c]++;
        if (exp_q[c].size() == 0) chk(0, $sformatf("unexpected output word on channel %0d", c));
        else begin
          word_t e;
          e = exp_q[c].pop_front();
          chk(out_data[c] == e, $sformatf("output word %0d on channel %0d", words_out, c));
        end
      end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    nports = 3; nboards = 3; lut_we = 0; lut_addr = '0; lut_x = '0; lut_y = '0;
    for (int p = 0; p < LUT_DEPTH; p++) begin
      if ($urandom_range(0, 5) == 0) begin xm[p] = -1; ym[p] = $urandom_range(0, 15); end
      else begin xm[p] = $urandom_range(0, 15); ym[p] = $urandom_range(0, 15); end
    end
    for (int p = 0; p < LUT_DEPTH; p++) begin
      @(negedge clk);
      lut_we = 1; lut_addr = 11'(p); lut_x = 6'(xm[p]); lut_y = 6'(ym[p]);
    end
    @(negedge clk);
    lut_we = 0;
    rst_n = 1;
    repeat (2) @(negedge clk);

    for (int e = 0; e < NEV; e++)
      add_event(($urandom_range(0, 5) == 0) ? -1 : $urandom_range(0, 4));
    wait (exp_q[0].size() == 0 && exp_q[1].size() == 0);
    repeat (5) @(negedge clk);
    chk(src_q[0].size() == 0 && src_q[1].size() == 0, "inputs drained");
    chk(events == 32'(NEV), "event counter");
    chk(ch_used[0] > 0 && ch_used[1] > 0, "both output channels used");
    chk(n_short > 0, "header-only packets sent");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
