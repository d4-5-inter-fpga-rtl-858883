// tb_imagifier -- self-checking testbench of the imagifier.
//
// The bin tables are loaded with a pseudo-random map (about one PMT in six
// outside the image). Events with random hit lists (including empty slots,
// PMT numbers beyond the table and events longer than MAX_WORD words) are sent
// as HAPECOM packets; for each one the testbench builds the expected output
// packet itself: destination from the round-robin rule (tasks 0..nports-1 of
// nodes 1..nboards-1), size 96, event header, image bits 127:0 and 255:128,
// footer. The output channel applies random back-pressure. An event of two
// hit words must take 17*2 + 9 cycles from its header to the output footer.
module tb_imagifier;
  import apenet_pkg::*;

  localparam int LUT_DEPTH = 2048;
  localparam int MAX_WORD  = 4;
  localparam int NEV       = 40;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [15:0] nports, nboards;
  logic        lut_we;
  logic [10:0] lut_addr;
  logic signed [5:0] lut_x, lut_y;
  logic [0:0]  in_valid, in_ready, out_valid, out_ready;
  word_t       in_data [1];
  word_t       out_data [1];
  logic [31:0] events;

  imagifier #(.MAX_WORD(MAX_WORD), .LUT_DEPTH(LUT_DEPTH)) dut (.*);

  int checks = 0, failures = 0;
  int xm [LUT_DEPTH], ym [LUT_DEPTH];
  word_t src_q[$], exp_q[$];
  bit    gaps = 1;
  int    rr_task = 0, rr_coord = 1;

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

  // Queue one event and its expected result.
  task automatic add_event(int nwords);
    word_t evh, hw;
    logic [255:0] img;
    evh = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
    img = '0;
    src_q.push_back(hdr_word(0, 1, 0, 32 * (1 + nwords)));
    src_q.push_back(evh);
    for (int k = 0; k < nwords; k++) begin
      for (int j = 0; j < 16; j++) begin
        int p;
        case ($urandom_range(0, 7))
          0:       p = 0;
          1:       p = $urandom_range(LUT_DEPTH, 65535);
          default: p = $urandom_range(1, LUT_DEPTH - 1);
        endcase
        hw[16*j +: 16] = 16'(p);
        if (k < MAX_WORD && p != 0 && p < LUT_DEPTH && xm[p] >= 0 && ym[p] >= 0)
          img[xm[p] + 16 * ym[p]] = 1'b1;
      end
      src_q.push_back(hw);
    end
    src_q.push_back(~evh);                       // footer (content not inspected)
    exp_q.push_back(hdr_word(rr_coord, rr_task, 0, 96));
    exp_q.push_back(evh);
    exp_q.push_back({128'b0, img[127:0]});
    exp_q.push_back({128'b0, img[255:128]});
    exp_q.push_back(ftr_word());
    rr_task++;
    if (rr_task >= int'(nports)) begin
      rr_task = 0;
      rr_coord++;
      if (rr_coord >= int'(nboards)) rr_coord = 1;
    end
  endtask

  // Source of the input channel.
  initial begin
    in_valid = 0; in_data[0] = '0;
    wait (rst_n);
    @(negedge clk);
    forever begin
      if (src_q.size() > 0) begin
        if (gaps) repeat ($urandom_range(0, 1)) @(negedge clk);
        in_valid = 1; in_data[0] = src_q[0]; #1;
        while (!in_ready[0]) begin @(negedge clk); #1; end
        void'(src_q.pop_front());
        @(negedge clk);
        in_valid = 0;
      end else @(negedge clk);
    end
  end

  always @(negedge clk) out_ready = gaps ? 1'($urandom_range(0, 3) != 0) : 1'b1;

  int words_out = 0;
  always @(negedge clk) if (rst_n) begin
    #2;
    if (out_valid[0] && out_ready[0]) begin
      words_out++;
      if (exp_q.size() == 0) chk(0, "unexpected output word");
      else begin
        word_t e;
        e = exp_q.pop_front();
        chk(out_data[0] == e, $sformatf("output word %0d", words_out));
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
    int t0;
    nports = 2; nboards = 4; lut_we = 0; lut_addr = '0; lut_x = '0; lut_y = '0;
    // Load the bin tables.
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

    // Timing of a 2-word event without stalls.
    gaps = 0;
    t0 = $time / 10;
    add_event(2);
    wait (exp_q.size() == 0);
    @(negedge clk);
    chk($time / 10 - t0 == 17 * 2 + 9, $sformatf("2-word event took %0d cycles", $time / 10 - t0));

    gaps = 1;
    for (int e = 0; e < NEV; e++) add_event($urandom_range(0, MAX_WORD + 3));
    wait (exp_q.size() == 0);
    repeat (5) @(negedge clk);
    chk(src_q.size() == 0, "input drained");
    chk(events == 32'(NEV + 1), "event counter");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
