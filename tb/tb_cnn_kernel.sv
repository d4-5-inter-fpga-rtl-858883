// tb_cnn_kernel -- self-checking testbench of the CNN kernel wrapper.
//
// Image packets (header, event header, image low half, image high half,
// footer) are fed with random gaps. A stand-in CNN takes images with random
// back-pressure, checks each against the image carried by the packet, and
// answers after a random delay with random class scores (ties included). For
// each answer the testbench expects a result packet to node 0, task 0,
// channel 0 of 32 bytes whose payload is the event header with bits 7:0
// replaced by the index of the highest score (lowest index on a tie). It also
// checks that the queue of event headers lets the input run ahead of a
// stalled CNN by TS_DEPTH images and no more.
module tb_cnn_kernel;
  import apenet_pkg::*;

  localparam int NEV = 50;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic  in_valid, in_ready, out_valid, out_ready;
  word_t in_data, out_data;
  logic  nn_in_valid, nn_in_ready, nn_out_valid, nn_out_ready;
  logic [255:0] nn_in_image;
  logic signed [15:0] nn_out_score [4];

  cnn_kernel dut (.*);

  int checks = 0, failures = 0;
  word_t src_q[$], exp_q[$];
  logic [255:0] img_q[$];
  logic [127:0] evh_q[$];
  int    pending = 0;      // images taken by the CNN, not yet answered
  bit    gaps = 1, cnn_stall = 0;
  int    images_taken = 0;

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

  task automatic add_event();
    word_t evh;
    logic [255:0] img;
    evh = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
    img = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
    src_q.push_back(hdr_word(1, 0, 0, 96));
    src_q.push_back(evh);
    src_q.push_back({~img[127:0], img[127:0]});      // upper half is ignored
    src_q.push_back({128'b0, img[255:128]});
    src_q.push_back('1);                             // footer
    img_q.push_back(img);
    evh_q.push_back(evh[127:0]);
  endtask

  initial begin
    in_valid = 0; in_data = '0;
    wait (rst_n);
    @(negedge clk);
    forever begin
      if (src_q.size() > 0) begin
        if (gaps) repeat ($urandom_range(0, 1)) @(negedge clk);
        in_valid = 1; in_data = src_q[0]; #1;
        while (!in_ready) begin @(negedge clk); #1; end
        void'(src_q.pop_front());
        @(negedge clk);
        in_valid = 0;
      end else @(negedge clk);
    end
  end

  // Stand-in CNN: image side.
  always @(negedge clk) nn_in_ready = (!gaps || $urandom_range(0, 2) != 0);
  always @(negedge clk) if (rst_n) begin
    #2;
    if (nn_in_valid && nn_in_ready) begin
      images_taken++;
      if (img_q.size() == 0) chk(0, "image without packet");
      else chk(nn_in_image == img_q.pop_front(), "image to CNN");
      pending++;
    end
  end

  // Stand-in CNN: score side.
  initial begin
    nn_out_valid = 0;
    for (int k = 0; k < 4; k++) nn_out_score[k] = '0;
    wait (rst_n);
    forever begin
      @(negedge clk);
      if (pending > 0 && !cnn_stall) begin
        int best;
        logic [127:0] e;
        if (gaps) repeat ($urandom_range(0, 4)) @(negedge clk);
        for (int k = 0; k < 4; k++)
          nn_out_score[k] = ($urandom_range(0, 3) == 0) ? 16'sd100 : 16'($urandom);
        best = 0;
        for (int k = 1; k < 4; k++) if (nn_out_score[k] > nn_out_score[best]) best = k;
        e = evh_q.pop_front();
        exp_q.push_back(hdr_word(0, 0, 0, 32));
        exp_q.push_back({128'b0, e[127:8], 8'(best)});
        begin
          word_t f = '0;
          f[109:62] = 48'haaaeabac; f[127:120] = 8'h99;
          exp_q.push_back(f);
        end
        nn_out_valid = 1; #1;
        while (!nn_out_ready) begin @(negedge clk); #1; end
        @(negedge clk);
        nn_out_valid = 0;
        pending--;
      end
    end
  end

  always @(negedge clk) out_ready = gaps ? 1'($urandom_range(0, 3) != 0) : 1'b1;

  int results = 0;
  always @(negedge clk) if (rst_n) begin
    #2;
    if (out_valid && out_ready) begin
      if (exp_q.size() == 0) chk(0, "unexpected output word");
      else chk(out_data == exp_q.pop_front(), "result packet word");
      if (exp_q.size() == 0) results++;
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
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);

    // Queue depth: with scores withheld, exactly 4 images are taken.
    cnn_stall = 1;
    for (int e = 0; e < 6; e++) add_event();
    repeat (100) @(negedge clk);
    chk(images_taken == 4, $sformatf("%0d images taken while the CNN held its results", images_taken));
    cnn_stall = 0;

    for (int e = 0; e < NEV; e++) add_event();
    wait (images_taken == NEV + 6 && pending == 0 && exp_q.size() == 0);
    repeat (10) @(negedge clk);
    chk(exp_q.size() == 0 && src_q.size() == 0, "all events processed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
