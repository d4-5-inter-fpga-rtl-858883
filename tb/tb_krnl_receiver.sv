// tb_krnl_receiver -- self-checking testbench of the result receiver kernel.
//
// Result packets of one to three payload words arrive with random gaps on the
// input channel. After start with the expected count, the low 128 bits of the
// first payload word of packet i must be written to buffer item i and nothing
// else written; done must pulse once after the last packet and busy fall.
// Packets arriving after the count is reached must stay in the channel.
module tb_krnl_receiver;
  import apenet_pkg::*;

  localparam int NRES = 40;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic         start, busy, done, mem_we, in_valid, in_ready;
  logic [31:0]  count, mem_addr;
  logic [127:0] mem_wdata;
  word_t        in_data;

  krnl_receiver dut (.*);

  int checks = 0, failures = 0;
  word_t src_q[$];
  logic [127:0] exp_mem [NRES];
  int    writes = 0, dones = 0;

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    in_valid = 0; in_data = '0;
    wait (rst_n);
    @(negedge clk);
    forever begin
      if (src_q.size() > 0) begin
        repeat ($urandom_range(0, 2)) @(negedge clk);
        in_valid = 1; in_data = src_q[0]; #1;
        while (!in_ready) begin @(negedge clk); #1; end
        void'(src_q.pop_front());
        @(negedge clk);
        in_valid = 0;
      end else @(negedge clk);
    end
  end

  always @(negedge clk) if (rst_n) begin
    #2;
    if (done) dones++;
    if (mem_we) begin
      writes++;
      if (mem_addr >= NRES) chk(0, "write outside the result buffer");
      else chk(mem_wdata == exp_mem[mem_addr], $sformatf("result item %0d", mem_addr));
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
    start = 0; count = '0;
    for (int r = 0; r < NRES + 1; r++) begin
      int n;
      word_t h, w;
      n = $urandom_range(1, 3);
      h = '0; h[61:48] = 14'(32 * n - $urandom_range(0, 31));
      src_q.push_back(h);
      for (int k = 0; k < n; k++) begin
        w = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
        if (k == 0 && r < NRES) exp_mem[r] = w[127:0];
        src_q.push_back(w);
      end
      src_q.push_back(~h);
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    start = 1; count = NRES;
    @(negedge clk);
    start = 0;
    wait (dones == 1);
    @(negedge clk);
    chk(!busy, "idle after done");
    repeat (30) @(negedge clk);
    chk(writes == NRES, $sformatf("%0d items written", writes));
    chk(dones == 1, "single done pulse");
    chk(src_q.size() > 0 && src_q.size() <= 5, "packet beyond the count left in the channel");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
