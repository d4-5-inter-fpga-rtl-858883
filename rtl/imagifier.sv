// imagifier -- free-running preprocessing kernel of the RAIDER pipeline.
//
// Each incoming packet is one detector event: after the HAPECOM header comes
// an event header word (word count and timestamp of the event), then hit
// words, each holding 16 photomultiplier (PMT) numbers of 16 bits; number 0
// means "no hit". Every PMT number is looked up in two bin tables, x_bin and
// y_bin; when both entries are non-negative the bit x + 16*y of a 16x16 binary
// image is set. At most MAX_WORD hit words are imaged; any further words are
// read and dropped. The footer is consumed. The kernel then sends a 96-byte
// message (3 words): the event header, image bits 127:0 and image bits 255:128
// (each zero-extended to 256 bits).
//
// Destinations rotate so that every task of every computing node gets events
// in turn: after each event the channel advances modulo N_OUT; whenever it is
// at or above N_OUT-1 the task number advances; when the task number reaches
// nports it wraps to 0 and the node coordinate advances, wrapping from nboards
// back to 1 (node 0 is the I/O node). The channel number also selects the
// input channel that is read. This sequencing follows the reference kernel.
//
// Own choices: the word count is the header size divided by 32 (truncated,
// as in the reference), and an event whose header gives fewer than one word is
// treated as a header-only event; hits are imaged one per cycle, which is the
// schedule a pipelined 16-hit loop gives; the bin tables are not part of the
// published material, so they are RAMs loaded through the lut_* port
// (entries with a negative value mark PMTs outside the image; a PMT number at
// or above LUT_DEPTH is ignored). MAX_WORD is not given and set to 64.
//
// Interface: valid/ready streams; nports/nboards are static kernel arguments.
// Timing: for an event of n hit words, 2 cycles for the two headers, 17
// cycles per hit word, 1 for the footer, then 1 + 5 cycles to send.
module imagifier
  import apenet_pkg::*;
#(
  parameter int unsigned N_IN      = 1,
  parameter int unsigned N_OUT     = 1,
  parameter int unsigned MAX_WORD  = 64,
  parameter int unsigned LUT_DEPTH = 2048,
  parameter int unsigned IMG       = 16
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // kernel arguments
  input  logic [15:0]                   nports,
  input  logic [15:0]                   nboards,
  // bin table loading
  input  logic                          lut_we,
  input  logic [$clog2(LUT_DEPTH)-1:0]  lut_addr,
  input  logic signed [5:0]             lut_x,
  input  logic signed [5:0]             lut_y,
  // input channels (from the dispatcher)
  input  logic [N_IN-1:0]               in_valid,
  output logic [N_IN-1:0]               in_ready,
  input  word_t                         in_data [N_IN],
  // output channels (to the aggregator)
  output logic [N_OUT-1:0]              out_valid,
  input  logic [N_OUT-1:0]              out_ready,
  output word_t                         out_data [N_OUT],
  // number of events imaged, for monitoring
  output logic [31:0]                   events
);

  localparam int unsigned HITS = WORD_W / 16;   // PMT numbers per hit word
  localparam int unsigned AW   = $clog2(LUT_DEPTH);
  localparam int unsigned ICW  = (N_IN > 1) ? $clog2(N_IN) : 1;
  localparam int unsigned HW   = $clog2(HITS);

  typedef enum logic [3:0] {
    S_HDR, S_EVH, S_WORD, S_HIT, S_FLUSH, S_FTR, S_CMD, S_PL0, S_PL1, S_PL2
  } state_t;

  logic signed [5:0] x_bin [LUT_DEPTH];
  logic signed [5:0] y_bin [LUT_DEPTH];

  always_ff @(posedge clk) begin
    if (lut_we) begin
      x_bin[lut_addr] <= lut_x;
      y_bin[lut_addr] <= lut_y;
    end
  end

  state_t                 state;
  logic [15:0]            ch_id;
  logic [15:0]            task_id;
  logic [15:0]            dest_coord;
  logic [8:0]             size;        // hit words still to read
  logic [$clog2(MAX_WORD+1)-1:0] iter;
  logic [HW-1:0]          j;
  word_t                  evh;
  word_t                  word_q;
  logic [IMG*IMG-1:0]     image;

  // input channel currently read
  logic [ICW-1:0]         ich;
  logic                   cur_valid;
  word_t                  cur_word;
  apenet_header_t         cur_hdr;

  assign ich       = ICW'(32'(ch_id) % N_IN);
  assign cur_valid = in_valid[ich];
  assign cur_word  = in_data[ich];
  assign cur_hdr   = word_2_apenet(cur_word);

  always_comb begin
    in_ready = '0;
    unique case (state)
      S_HDR, S_EVH, S_WORD, S_FLUSH, S_FTR: in_ready[ich] = 1'b1;
      default: ;
    endcase
    // S_WORD with nothing left to read does not consume
    if (state == S_WORD && size == '0) in_ready = '0;
  end

  // hit currently imaged
  logic [15:0]       pmt;
  logic signed [5:0] hx, hy;
  logic              hit_ok;

  assign pmt    = word_q[16*j +: 16];
  assign hx     = x_bin[AW'(pmt)];
  assign hy     = y_bin[AW'(pmt)];
  assign hit_ok = (pmt != 16'd0) && (32'(pmt) < LUT_DEPTH) && (hx >= 0) && (hy >= 0)
                  && (hx < 6'(IMG)) && (hy < 6'(IMG));

  // send() of the result
  logic  cmd_valid, cmd_ready, pl_valid, pl_ready;
  word_t pl_data;

  assign cmd_valid = (state == S_CMD);
  assign pl_valid  = (state == S_PL0) || (state == S_PL1) || (state == S_PL2);
  always_comb begin
    unique case (state)
      S_PL1:   pl_data = word_t'(image[127:0]);
      S_PL2:   pl_data = word_t'(image[255:128]);
      default: pl_data = evh;
    endcase
  end

  hapecom_send #(.NCHAN(N_OUT)) u_send (
    .clk, .rst_n,
    .cmd_valid, .cmd_ready,
    .cmd_size (14'(3 * WORD_BYTES)),
    .cmd_coord(coord_t'(dest_coord)),
    .cmd_task (task_id[3:0]),
    .cmd_ch   (ch_id),
    .pl_valid, .pl_ready, .pl_data,
    .out_valid, .out_ready, .out_data
  );

  // next destination after an event
  logic [15:0] nxt_ch, nxt_task, nxt_coord;
  always_comb begin
    nxt_ch    = 16'((32'(ch_id) + 1) % N_OUT);
    nxt_task  = task_id;
    nxt_coord = dest_coord;
    if (32'(nxt_ch) >= N_OUT - 1) nxt_task = task_id + 16'd1;
    if (nxt_task >= nports) begin
      nxt_task  = '0;
      nxt_coord = dest_coord + 16'd1;
      if (nxt_coord >= nboards) nxt_coord = 16'd1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_HDR;
      ch_id      <= '0;
      task_id    <= '0;
      dest_coord <= 16'd1;
      size       <= '0;
      iter       <= '0;
      j          <= '0;
      evh        <= '0;
      word_q     <= '0;
      image      <= '0;
      events     <= '0;
    end else begin
      unique case (state)
        S_HDR: if (cur_valid) begin
          size  <= 9'(cur_hdr.packet_size >> 5);
          state <= S_EVH;
        end
        S_EVH: if (cur_valid) begin
          evh   <= cur_word;
          if (size != '0) size <= size - 9'd1;
          image <= '0;
          iter  <= '0;
          state <= S_WORD;
        end
        S_WORD: begin
          if (size == '0) state <= S_FTR;
          else if (cur_valid) begin
            word_q <= cur_word;
            j      <= '0;
            state  <= S_HIT;
          end
        end
        S_HIT: begin
          if (hit_ok) image[32'(hx) + IMG * 32'(hy)] <= 1'b1;
          j <= j + HW'(1);
          if (j == HW'(HITS - 1)) begin
            size <= size - 9'd1;
            iter <= iter + 1'b1;
            if (size == 9'd1)                      state <= S_FTR;
            else if (32'(iter) + 1 >= MAX_WORD)    state <= S_FLUSH;
            else                                   state <= S_WORD;
          end
        end
        S_FLUSH: if (cur_valid) begin
          size <= size - 9'd1;
          if (size == 9'd1) state <= S_FTR;
        end
        S_FTR: if (cur_valid) state <= S_CMD;
        S_CMD: if (cmd_ready) state <= S_PL0;
        S_PL0: if (pl_ready) state <= S_PL1;
        S_PL1: if (pl_ready) state <= S_PL2;
        S_PL2: if (pl_ready) begin
          ch_id      <= nxt_ch;
          task_id    <= nxt_task;
          dest_coord <= nxt_coord;
          events     <= events + 32'd1;
          state      <= S_HDR;
        end
        default: state <= S_HDR;
      endcase
    end
  end

endmodule
