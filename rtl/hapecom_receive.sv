// hapecom_receive -- hardware form of the blocking HAPECOM receive() primitive.
//
// A command names one of the NCHAN input channels. The block then waits for
// a packet on that channel (this is the blocking part), reads the header word,
// takes the size in bytes from its packet_size field (bits 61:48), hands the
// ceil(size/32) payload words to the payload output, reads and drops the
// footer word and reports the size with a one-cycle done pulse. Words on other
// channels are left where they are.
//
// Interface: valid/ready streams for the command, the channels and the
// payload output (pl_last marks the final payload word); done/done_size is a
// pulse. The command handshake and the done pulse are this design's own.
// Timing: one cycle to take the command, then one word per cycle: a packet of
// n payload words completes n + 3 cycles after the command when nothing stalls.
module hapecom_receive
  import apenet_pkg::*;
#(
  parameter int unsigned NCHAN = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  // receive command
  input  logic              cmd_valid,
  output logic              cmd_ready,
  input  logic [15:0]       cmd_ch,
  // input channels
  input  logic [NCHAN-1:0]  in_valid,
  output logic [NCHAN-1:0]  in_ready,
  input  word_t             in_data [NCHAN],
  // received payload
  output logic              pl_valid,
  input  logic              pl_ready,
  output word_t             pl_data,
  output logic              pl_last,
  // completion
  output logic              done,
  output logic [13:0]       done_size
);

  localparam int unsigned CW = (NCHAN > 1) ? $clog2(NCHAN) : 1;

  typedef enum logic [1:0] {S_IDLE, S_HDR, S_DATA, S_FTR} state_t;

  state_t          state;
  logic [CW-1:0]   sel;
  logic [13:0]     cnt;
  logic [13:0]     size_q;

  word_t           cur_word;
  logic            cur_valid;
  apenet_header_t  cur_hdr;

  assign cur_word  = in_data[sel];
  assign cur_valid = in_valid[sel];
  assign cur_hdr   = word_2_apenet(cur_word);
  assign cmd_ready = (state == S_IDLE);
  assign pl_data   = cur_word;
  assign pl_valid  = (state == S_DATA) && cur_valid;
  assign pl_last   = (cnt == 14'd1);

  always_comb begin
    in_ready = '0;
    unique case (state)
      S_HDR, S_FTR: in_ready[sel] = 1'b1;
      S_DATA:       in_ready[sel] = pl_ready;
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      sel       <= '0;
      cnt       <= '0;
      size_q    <= '0;
      done      <= 1'b0;
      done_size <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (cmd_valid) begin
          sel   <= CW'(32'(cmd_ch) % NCHAN);
          state <= S_HDR;
        end
        S_HDR: if (cur_valid) begin
          size_q <= cur_hdr.packet_size;
          cnt    <= size_to_nwords(cur_hdr.packet_size);
          state  <= (size_to_nwords(cur_hdr.packet_size) == '0) ? S_FTR : S_DATA;
        end
        S_DATA: if (cur_valid && pl_ready) begin
          cnt <= cnt - 14'd1;
          if (cnt == 14'd1) state <= S_FTR;
        end
        S_FTR: if (cur_valid) begin
          done      <= 1'b1;
          done_size <= size_q;
          state     <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
