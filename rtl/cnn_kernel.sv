// cnn_kernel -- free-running classification kernel of a RAIDER computing node.
//
// The kernel is a three-stage dataflow: read_from, the CNN itself, get_class.
// read_from takes each incoming packet (HAPECOM header, event header word,
// image bits 127:0 in the low half of the second word, image bits 255:128 in
// the low half of the third word, footer), sends the 256-bit image to the CNN
// and stores the low 128 bits of the event header (timestamp and event label)
// in a small queue. The CNN sits outside this module (nn_in_* / nn_out_*
// ports): its structure and weights are generated elsewhere. get_class takes
// the N_CLASS scores the CNN returns for an image, picks the class with the
// highest score (the lowest index on a tie), pops the matching event header
// and sends one 32-byte result word back to the I/O node: bits 7:0 hold the
// class, bits 127:8 the event header bits 127:8, the rest zero. Because the
// stages are decoupled by the queue, a new image can be read while the CNN
// and get_class work on earlier ones.
//
// Own choices: the result word layout, the default result destination (node
// 0, task 0, channel 0), the 16-bit signed scores and the queue depth
// TS_DEPTH. Words beyond the third of a longer packet are dropped.
//
// Interface: valid/ready streams, one input and one output channel.
// Timing: read_from needs n + 2 cycles for a packet of n payload words plus
// one cycle to hand over; get_class issues a 4-cycle send per result.
// Bits 255:128 of out_data are always zero: header, footer and the result
// word all use only the low half of a word.
module cnn_kernel
  import apenet_pkg::*;
#(
  parameter int unsigned N_CLASS      = 4,
  parameter int unsigned SCORE_W      = 16,
  parameter int unsigned TS_DEPTH     = 4,
  parameter logic [15:0] RESULT_COORD = 16'd0,
  parameter logic [3:0]  RESULT_TASK  = 4'd0,
  parameter logic [15:0] RESULT_CH    = 16'd0
) (
  input  logic                             clk,
  input  logic                             rst_n,
  // input channel (from the dispatcher)
  input  logic                             in_valid,
  output logic                             in_ready,
  input  word_t                            in_data,
  // output channel (to the aggregator)
  output logic                             out_valid,
  input  logic                             out_ready,
  output word_t                            out_data,
  // CNN input: one 16x16 image
  output logic                             nn_in_valid,
  input  logic                             nn_in_ready,
  output logic [255:0]                     nn_in_image,
  // CNN output: one score per class
  input  logic                             nn_out_valid,
  output logic                             nn_out_ready,
  input  logic signed [SCORE_W-1:0]        nn_out_score [N_CLASS]
);

  // ---------------- read_from ----------------
  typedef enum logic [1:0] {R_HDR, R_DATA, R_FTR, R_PUSH} rstate_t;

  rstate_t        rstate;
  logic [13:0]    cnt;
  logic [1:0]     widx;
  logic [127:0]   evh_q, img_lo, img_hi;
  apenet_header_t hin;

  localparam int unsigned QW = (TS_DEPTH > 1) ? $clog2(TS_DEPTH) : 1;
  logic [127:0]  ts_mem [TS_DEPTH];
  logic [QW-1:0] ts_wp, ts_rp;
  logic [QW:0]   ts_cnt;
  logic          ts_push, ts_pop, ts_full;

  assign hin         = word_2_apenet(in_data);
  assign ts_full     = (32'(ts_cnt) == TS_DEPTH);
  assign in_ready    = (rstate != R_PUSH);
  assign nn_in_valid = (rstate == R_PUSH) && !ts_full;
  assign nn_in_image = {img_hi, img_lo};
  assign ts_push     = nn_in_valid && nn_in_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rstate <= R_HDR;
      cnt    <= '0;
      widx   <= '0;
      evh_q  <= '0;
      img_lo <= '0;
      img_hi <= '0;
    end else begin
      unique case (rstate)
        R_HDR: if (in_valid) begin
          cnt    <= size_to_nwords(hin.packet_size);
          widx   <= '0;
          rstate <= (size_to_nwords(hin.packet_size) == '0) ? R_FTR : R_DATA;
        end
        R_DATA: if (in_valid) begin
          unique case (widx)
            2'd0:    evh_q  <= in_data[127:0];
            2'd1:    img_lo <= in_data[127:0];
            2'd2:    img_hi <= in_data[127:0];
            default: ;
          endcase
          if (widx != 2'd3) widx <= widx + 2'd1;
          cnt <= cnt - 14'd1;
          if (cnt == 14'd1) rstate <= R_FTR;
        end
        R_FTR:  if (in_valid) rstate <= R_PUSH;
        R_PUSH: if (ts_push) rstate <= R_HDR;
        default: rstate <= R_HDR;
      endcase
    end
  end

  // ---------------- event header queue ----------------
  always_ff @(posedge clk) begin
    if (ts_push) ts_mem[ts_wp] <= evh_q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ts_wp  <= '0;
      ts_rp  <= '0;
      ts_cnt <= '0;
    end else begin
      if (ts_push) ts_wp <= (32'(ts_wp) == TS_DEPTH - 1) ? '0 : ts_wp + QW'(1);
      if (ts_pop)  ts_rp <= (32'(ts_rp) == TS_DEPTH - 1) ? '0 : ts_rp + QW'(1);
      ts_cnt <= ts_cnt + (QW+1)'(ts_push) - (QW+1)'(ts_pop);
    end
  end

  // ---------------- get_class ----------------
  logic [7:0] best;
  always_comb begin
    logic signed [SCORE_W-1:0] bv;
    best = '0;
    bv   = nn_out_score[0];
    for (int unsigned k = 1; k < N_CLASS; k++) begin
      if (nn_out_score[k] > bv) begin
        bv   = nn_out_score[k];
        best = 8'(k);
      end
    end
  end

  typedef enum logic [1:0] {G_WAIT, G_CMD, G_PL} gstate_t;
  gstate_t      gstate;
  word_t        result;
  logic         cmd_ready, pl_ready;
  logic [0:0]   s_valid, s_ready;
  word_t        s_data [1];

  // A result is taken when the CNN offers one and its event header is queued.
  assign nn_out_ready = (gstate == G_WAIT) && (ts_cnt != '0);
  assign ts_pop       = nn_out_valid && nn_out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      gstate <= G_WAIT;
      result <= '0;
    end else begin
      unique case (gstate)
        G_WAIT: if (ts_pop) begin
          result <= word_t'({ts_mem[ts_rp][127:8], best});
          gstate <= G_CMD;
        end
        G_CMD: if (cmd_ready) gstate <= G_PL;
        G_PL:  if (pl_ready)  gstate <= G_WAIT;
        default: gstate <= G_WAIT;
      endcase
    end
  end

  hapecom_send #(.NCHAN(1)) u_send (
    .clk, .rst_n,
    .cmd_valid(gstate == G_CMD), .cmd_ready,
    .cmd_size (14'(WORD_BYTES)),
    .cmd_coord(RESULT_COORD),
    .cmd_task (RESULT_TASK),
    .cmd_ch   (RESULT_CH),
    .pl_valid (gstate == G_PL), .pl_ready, .pl_data(result),
    .out_valid(s_valid), .out_ready(s_ready), .out_data(s_data)
  );

  assign out_valid  = s_valid[0];
  assign s_ready[0] = out_ready;
  assign out_data   = s_data[0];

endmodule
