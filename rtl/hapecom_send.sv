// hapecom_send -- hardware form of the non-blocking HAPECOM send() primitive.
//
// A command carries the message size in bytes, the destination node
// coordinate (x in bits 5:0, y in 10:6, z in 15:11), the destination task
// (intranode port of the destination routing IP, 0-3) and the destination
// channel (0-127). The block forges the APEnet header from them
// (dest_addr marker 0xfafbfcfd, everything else zero), writes it on output
// channel ch_id, forwards ceil(size/32) payload words from the payload input
// to the same channel and closes the packet with the footer (dest_addr marker
// 0xaaaeabac, edac 0x99). A command of size 0 sends nothing, as in the
// reference primitive. The caller never waits for the receiver: the only
// back-pressure is the ready of the output channel.
//
// The output channel is ch_id modulo NCHAN (the reference writes channel
// ch_id directly); the command handshake is this design's own.
//
// Interface: valid/ready streams for command, payload and the NCHAN outputs.
// Timing: one cycle to take the command, then header, n payload words and
// footer at one word per cycle: n + 3 cycles per packet when nothing stalls.
module hapecom_send
  import apenet_pkg::*;
#(
  parameter int unsigned NCHAN = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  // send command
  input  logic              cmd_valid,
  output logic              cmd_ready,
  input  logic [13:0]       cmd_size,
  input  coord_t            cmd_coord,
  input  logic [3:0]        cmd_task,
  input  logic [15:0]       cmd_ch,
  // payload words of the message
  input  logic              pl_valid,
  output logic              pl_ready,
  input  word_t             pl_data,
  // output channels
  output logic [NCHAN-1:0]  out_valid,
  input  logic [NCHAN-1:0]  out_ready,
  output word_t             out_data [NCHAN]
);

  localparam int unsigned CW = (NCHAN > 1) ? $clog2(NCHAN) : 1;

  typedef enum logic [1:0] {S_IDLE, S_HDR, S_DATA, S_FTR} state_t;

  state_t          state;
  apenet_header_t  hdr;
  logic [CW-1:0]   sel;
  logic [13:0]     cnt;

  logic            cur_valid;
  word_t           cur_word;

  assign cmd_ready = (state == S_IDLE);

  always_comb begin
    cur_valid = 1'b0;
    cur_word  = pl_data;
    pl_ready  = 1'b0;
    unique case (state)
      S_HDR:  begin cur_valid = 1'b1;     cur_word = apenet_2_word(hdr);           end
      S_DATA: begin cur_valid = pl_valid; cur_word = pl_data; pl_ready = out_ready[sel]; end
      S_FTR:  begin cur_valid = 1'b1;     cur_word = apenet_2_word(make_footer()); end
      default: ;
    endcase
    out_valid = '0;
    out_valid[sel] = cur_valid;
    for (int unsigned c = 0; c < NCHAN; c++) out_data[c] = cur_word;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      hdr   <= '0;
      sel   <= '0;
      cnt   <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (cmd_valid && cmd_size != '0) begin
          hdr   <= make_header(cmd_coord, cmd_task, cmd_ch, cmd_size);
          sel   <= CW'(32'(cmd_ch) % NCHAN);
          cnt   <= size_to_nwords(cmd_size);
          state <= S_HDR;
        end
        S_HDR: if (out_ready[sel]) state <= S_DATA;
        S_DATA: if (pl_valid && out_ready[sel]) begin
          cnt <= cnt - 14'd1;
          if (cnt == 14'd1) state <= S_FTR;
        end
        S_FTR: if (out_ready[sel]) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
