// tb_krnl_sender -- self-checking testbench of the event sender kernel.
//
// A host buffer model (128-bit items, one-cycle read latency) is filled with
// events of 0 to 6 hit words. After start, every event must leave as one
// packet to the local node, task 1, channel 0 with size (1 + n) * 32, the
// event header zero-extended, the hit words assembled from item pairs (low
// item in the low half) and the footer; done must pulse once, after the last
// packet, and busy must fall. The output channel applies random
// back-pressure. A second run with npackets = 0 must only pulse done.
module tb_krnl_sender;
  import apenet_pkg::*;

  localparam int NEV = 30;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic         start, busy, done, mem_rd, out_valid, out_ready;
  logic [31:0]  npackets, mem_addr;
  coord_t       dest_coord;
  logic [127:0] mem_rdata;
  word_t        out_data;

  krnl_sender dut (.*);

  int checks = 0, failures = 0;
  logic [127:0] hostmem [1024];
  word_t exp_q[$];
  int    dones = 0;

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  always_ff @(posedge clk) if (mem_rd) mem_rdata <= hostmem[mem_addr[9:0]];

  always @(negedge clk) out_ready = 1'($urandom_range(0, 3) != 0);

  always @(negedge clk) if (rst_n) begin
    #2;
    if (done) dones++;
    if (out_valid && out_ready) begin
      if (exp_q.size() == 0) chk(0, "unexpected output word");
      else chk(out_data == exp_q.pop_front(), "packet word");
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
    int a;
    start = 0; npackets = '0; dest_coord = 16'h0000; mem_rdata = '0;
    a = 0;
    for (int e = 0; e < NEV; e++) begin
      int n;
      logic [127:0] evh;
      word_t h;
      n = $urandom_range(0, 6);
      evh = {$urandom, $urandom, $urandom, 16'($urandom), 16'(n)};
      hostmem[a++] = evh;
      h = '0;
      h[26:21] = 6'(dest_coord); h[40:37] = 4'd1; h[61:48] = 14'(32 * (1 + n));
      h[109:62] = 48'hfafbfcfd;
      exp_q.push_back(h);
      exp_q.push_back({128'b0, evh});
      for (int k = 0; k < n; k++) begin
        logic [127:0] lo, hi;
        lo = {$urandom, $urandom, $urandom, $urandom};
        hi = {$urandom, $urandom, $urandom, $urandom};
        hostmem[a++] = lo;
        hostmem[a++] = hi;
        exp_q.push_back({hi, lo});
      end
      h = '0;
      h[109:62] = 48'haaaeabac; h[127:120] = 8'h99;
      exp_q.push_back(h);
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    start = 1; npackets = NEV;
    @(negedge clk);
    start = 0;
    #2;
    chk(busy, "busy after start");
    wait (dones == 1);
    @(negedge clk);
    chk(exp_q.size() == 0, "all packets sent before done");
    chk(!busy, "idle after done");
    repeat (10) @(negedge clk);
    chk(dones == 1, "single done pulse");

    start = 1; npackets = 0;
    @(negedge clk);
    start = 0;
    repeat (10) @(negedge clk);
    chk(dones == 2 && exp_q.size() == 0, "empty run only signals done");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
