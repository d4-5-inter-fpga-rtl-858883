// dispatcher -- spreads the packets arriving on one intranode port of the
// routing IP over the input channels of the attached task.
//
// The routing IP delivers each packet as a header word and a footer word on
// its header/footer stream and the payload words on a separate payload stream.
// The dispatcher reads the header, takes the destination channel from its
// proc_id field and the payload length, ceil(packet_size/32) words, from its
// packet_size field, and writes header, payload and footer in that order to
// the chosen channel, so the task sees one self-contained packet per channel.
//
// A proc_id at or above NCHAN is reduced modulo NCHAN; that rule is this
// design's own, the reference behaviour assumes a valid channel number.
//
// Interface: valid/ready streams. Timing: the header word passes in the cycle
// it arrives, then one payload word per cycle, then the footer, with no idle
// cycle between packets: n + 2 cycles per packet of n payload words.
module dispatcher
  import apenet_pkg::*;
#(
  parameter int unsigned NCHAN = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  // routing IP intranode port: header/footer stream
  input  logic              hdr_valid,
  output logic              hdr_ready,
  input  word_t             hdr_data,
  // routing IP intranode port: payload stream
  input  logic              dat_valid,
  output logic              dat_ready,
  input  word_t             dat_data,
  // task input channels
  output logic [NCHAN-1:0]  out_valid,
  input  logic [NCHAN-1:0]  out_ready,
  output word_t             out_data [NCHAN]
);

  localparam int unsigned CW = (NCHAN > 1) ? $clog2(NCHAN) : 1;

  typedef enum logic [1:0] {S_HDR, S_DATA, S_FTR} state_t;

  state_t          state;
  logic [CW-1:0]   sel;
  logic [13:0]     cnt;

  apenet_header_t  hin;
  logic [CW-1:0]   hdr_ch;
  logic [CW-1:0]   cur_ch;
  word_t           cur_word;
  logic            cur_valid;

  assign hin    = word_2_apenet(hdr_data);
  assign hdr_ch = CW'(32'(hin.proc_id) % NCHAN);
  assign cur_ch = (state == S_HDR) ? hdr_ch : sel;

  always_comb begin
    hdr_ready = 1'b0;
    dat_ready = 1'b0;
    cur_valid = 1'b0;
    cur_word  = hdr_data;
    unique case (state)
      S_HDR, S_FTR: begin
        cur_valid = hdr_valid;
        cur_word  = hdr_data;
        hdr_ready = out_ready[cur_ch];
      end
      S_DATA: begin
        cur_valid = dat_valid;
        cur_word  = dat_data;
        dat_ready = out_ready[cur_ch];
      end
      default: ;
    endcase
    out_valid = '0;
    out_valid[cur_ch] = cur_valid;
    for (int unsigned c = 0; c < NCHAN; c++) out_data[c] = cur_word;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_HDR;
      sel   <= '0;
      cnt   <= '0;
    end else begin
      unique case (state)
        S_HDR: if (hdr_valid && hdr_ready) begin
          sel   <= hdr_ch;
          cnt   <= size_to_nwords(hin.packet_size);
          state <= (size_to_nwords(hin.packet_size) == '0) ? S_FTR : S_DATA;
        end
        S_DATA: if (dat_valid && dat_ready) begin
          cnt <= cnt - 14'd1;
          if (cnt == 14'd1) state <= S_FTR;
        end
        S_FTR: if (hdr_valid && hdr_ready) state <= S_HDR;
        default: state <= S_HDR;
      endcase
    end
  end

  a_one_hot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(out_valid));

endmodule
