// tb_cnn_model -- behavioural stand-in for the image classifier, for
// testbenches only. The real network is generated by a separate flow and is
// not part of this RTL.
//
// Takes one 256-bit image at a time and, LATENCY cycles later, offers four
// scores: score[k] = 100 - |popcount(image) - 6k|, so the class is the
// multiple of 6 nearest to the number of lit pixels (0, 1, 2 or 3 "rings").
// Same edge convention as the other models: change at the falling edge,
// sample 2 time units later. Counts the images it classified in n_images.
module tb_cnn_model #(
  parameter int LATENCY = 5
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  output logic               in_ready,
  input  logic [255:0]       image,
  output logic               out_valid,
  input  logic               out_ready,
  output logic signed [15:0] score [4]
);

  int n_images = 0;

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

  logic [255:0] held;
  int           wait_cnt = 0;
  bit           busy = 0;

  initial begin
    in_ready = 0; out_valid = 0;
    for (int k = 0; k < 4; k++) score[k] = '0;
  end

  always @(negedge clk) if (rst_n) begin
    in_ready  = !busy;
    out_valid = busy && (wait_cnt == 0);
    if (busy)
      for (int k = 0; k < 4; k++) begin
        int pc;
        pc = $countones(held);
        score[k] = 16'(100 - ((pc > 6 * k) ? pc - 6 * k : 6 * k - pc));
      end
    #2;
    if (in_valid && in_ready) begin
      held = image; busy = 1; wait_cnt = LATENCY;
    end else if (out_valid && out_ready) begin
      busy = 0; n_images++;
    end else if (busy && wait_cnt > 0) wait_cnt--;
  end

endmodule
