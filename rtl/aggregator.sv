// aggregator -- joins the output channels of one task onto one intranode
// port of the routing IP.
//
// A task writes complete packets (header word, payload words, footer word) on
// any of its NCHAN output channels. The aggregator picks a channel that has a
// word waiting, then moves that channel's whole packet before it looks at any
// other: the header word goes to the port's header/footer stream, the
// ceil(packet_size/32) payload words to the payload stream, and the footer
// word again to the header/footer stream. Header and footer words are passed
// bit for bit (the header structure and the 256-bit word share one layout).
//
// Channel choice is round robin, starting after the channel served last; the
// reference loop scans channels in ascending order once per invocation, which
// gives the same order under steady load. The round-robin pointer and the
// one idle cycle per packet spent choosing are this design's own choices.
//
// Interface: valid/ready streams (a word moves when both are high; a sender
// holds valid and data until ready). Timing: one cycle to choose a channel,
// then one word per cycle on the header and payload streams, so a packet of
// n payload words takes n + 3 cycles when nothing stalls.
module aggregator
  import apenet_pkg::*;
#(
  parameter int unsigned NCHAN = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  // task output channels
  input  logic [NCHAN-1:0]  in_valid,
  output logic [NCHAN-1:0]  in_ready,
  input  word_t             in_data [NCHAN],
  // routing IP intranode port: header/footer stream
  output logic              hdr_valid,
  input  logic              hdr_ready,
  output word_t             hdr_data,
  // routing IP intranode port: payload stream
  output logic              dat_valid,
  input  logic              dat_ready,
  output word_t             dat_data
);

  localparam int unsigned CW = (NCHAN > 1) ? $clog2(NCHAN) : 1;

  typedef enum logic [1:0] {S_IDLE, S_HDR, S_DATA, S_FTR} state_t;

  state_t         state;
  logic [CW-1:0]  sel;      // channel being served
  logic [CW-1:0]  rr;       // first channel to look at next time
  logic [13:0]    cnt;      // payload words still to move

  logic           found;
  logic [CW-1:0]  pick;

  // Round-robin choice of the first valid channel at or after rr.
  always_comb begin
    found = 1'b0;
    pick  = '0;
    for (int unsigned k = 0; k < NCHAN; k++) begin
      int unsigned c;
      c = (int'(rr) + k) % NCHAN;
      if (!found && in_valid[c]) begin
        found = 1'b1;
        pick  = CW'(c);
      end
    end
  end

  word_t          cur_word;
  logic           cur_valid;
  apenet_header_t cur_hdr;

  assign cur_word  = in_data[sel];
  assign cur_valid = in_valid[sel];
  assign cur_hdr   = word_2_apenet(cur_word);

  always_comb begin
    in_ready  = '0;
    hdr_valid = 1'b0;
    dat_valid = 1'b0;
    hdr_data  = cur_word;
    dat_data  = cur_word;
    unique case (state)
      S_HDR, S_FTR: begin
        hdr_valid     = cur_valid;
        in_ready[sel] = hdr_ready;
      end
      S_DATA: begin
        dat_valid     = cur_valid;
        in_ready[sel] = dat_ready;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      sel   <= '0;
      rr    <= '0;
      cnt   <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (found) begin
          sel   <= pick;
          state <= S_HDR;
        end
        S_HDR: if (hdr_valid && hdr_ready) begin
          cnt   <= size_to_nwords(cur_hdr.packet_size);
          state <= (size_to_nwords(cur_hdr.packet_size) == '0) ? S_FTR : S_DATA;
        end
        S_DATA: if (dat_valid && dat_ready) begin
          cnt <= cnt - 14'd1;
          if (cnt == 14'd1) state <= S_FTR;
        end
        S_FTR: if (hdr_valid && hdr_ready) begin
          rr    <= (int'(sel) == NCHAN - 1) ? '0 : sel + CW'(1);
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // Output streams keep their word until it is taken.
  a_hdr_hold: assert property (@(posedge clk) disable iff (!rst_n)
    hdr_valid && !hdr_ready |=> hdr_valid && $stable(hdr_data));
  a_dat_hold: assert property (@(posedge clk) disable iff (!rst_n)
    dat_valid && !dat_ready |=> dat_valid && $stable(dat_data));

endmodule
