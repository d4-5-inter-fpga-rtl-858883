// krnl_sender -- host-started kernel that injects detector events into the
// network on the I/O node.
//
// The host fills a buffer of 128-bit items and starts the kernel with the
// number of events to send. Each event in the buffer is an event header item
// whose bits 15:0 give the number n of 256-bit hit words that follow, then
// 2n items: hit word k is {item 2k+1, item 2k} (low item in the low half).
// For each event the kernel sends one HAPECOM packet of (1 + n) * 32 bytes:
// the event header zero-extended to 256 bits, then the n hit words. The
// destination is the local node (dest_coord), task DEST_TASK, channel
// DEST_CH: by default the imagifier on intranode port 1. done pulses once the
// footer of the last packet has been taken by the output channel.
//
// Only the kernel's role (read events from host memory, send them over the
// network) is given; the buffer layout, the memory port and the default
// destination are this design's own choices.
//
// Interface: start pulse with npackets; a host-memory read port with a fixed
// latency of one cycle (mem_rdata is valid the cycle after mem_rd); one output
// channel as a valid/ready stream. Timing: about 3 cycles per hit word plus
// 6 per event, limited by the 128-bit memory port.
module krnl_sender
  import apenet_pkg::*;
#(
  parameter logic [3:0]  DEST_TASK = 4'd1,
  parameter logic [15:0] DEST_CH   = 16'd0
) (
  input  logic          clk,
  input  logic          rst_n,
  // control
  input  logic          start,
  input  logic [31:0]   npackets,
  input  coord_t        dest_coord,
  output logic          busy,
  output logic          done,
  // host buffer read port
  output logic          mem_rd,
  output logic [31:0]   mem_addr,
  input  logic [127:0]  mem_rdata,
  // output channel
  output logic          out_valid,
  input  logic          out_ready,
  output word_t         out_data
);

  typedef enum logic [3:0] {
    S_IDLE, S_RD_EVH, S_W_EVH, S_CMD, S_PL_EVH, S_RD_LO, S_W_LO, S_W_HI, S_PL_HIT, S_DRAIN
  } state_t;

  state_t        state;
  logic [31:0]   ev_left;
  logic [31:0]   addr;
  logic [15:0]   nhit;
  logic [127:0]  evh, lo;
  word_t         hitw;

  logic          cmd_ready, pl_ready, pl_valid;
  word_t         pl_data;
  logic [0:0]    s_valid, s_ready;
  word_t         s_data [1];

  assign busy     = (state != S_IDLE);
  assign mem_addr = addr;
  assign mem_rd   = (state == S_RD_EVH) || (state == S_RD_LO) || (state == S_W_LO);
  assign pl_valid = (state == S_PL_EVH) || (state == S_PL_HIT);
  assign pl_data  = (state == S_PL_EVH) ? word_t'(evh) : hitw;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      ev_left <= '0;
      addr    <= '0;
      nhit    <= '0;
      evh     <= '0;
      lo      <= '0;
      hitw    <= '0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          ev_left <= npackets;
          addr    <= '0;
          if (npackets == '0) done  <= 1'b1;
          else                state <= S_RD_EVH;
        end
        S_RD_EVH: begin
          addr  <= addr + 32'd1;
          state <= S_W_EVH;
        end
        S_W_EVH: begin
          evh   <= mem_rdata;
          nhit  <= mem_rdata[15:0];
          state <= S_CMD;
        end
        S_CMD: if (cmd_ready) state <= S_PL_EVH;
        S_PL_EVH: if (pl_ready) state <= (nhit == '0) ? S_IDLE : S_RD_LO;
        S_RD_LO: begin                      // low item requested
          addr  <= addr + 32'd1;
          state <= S_W_LO;
        end
        S_W_LO: begin                       // low item arrives, high requested
          lo    <= mem_rdata;
          addr  <= addr + 32'd1;
          state <= S_W_HI;
        end
        S_W_HI: begin
          hitw  <= {mem_rdata, lo};
          nhit  <= nhit - 16'd1;
          state <= S_PL_HIT;
        end
        S_PL_HIT: if (pl_ready) state <= (nhit == '0) ? S_IDLE : S_RD_LO;
        S_DRAIN: if (cmd_ready) begin       // last footer has left
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
      // end of an event
      if ((state == S_PL_EVH || state == S_PL_HIT) && pl_ready && nhit == '0) begin
        ev_left <= ev_left - 32'd1;
        state   <= (ev_left == 32'd1) ? S_DRAIN : S_RD_EVH;
      end
    end
  end

  hapecom_send #(.NCHAN(1)) u_send (
    .clk, .rst_n,
    .cmd_valid(state == S_CMD), .cmd_ready,
    .cmd_size (14'((32'(nhit) + 1) * WORD_BYTES)),
    .cmd_coord(dest_coord),
    .cmd_task (DEST_TASK),
    .cmd_ch   (DEST_CH),
    .pl_valid, .pl_ready, .pl_data,
    .out_valid(s_valid), .out_ready(s_ready), .out_data(s_data)
  );

  assign out_valid  = s_valid[0];
  assign s_ready[0] = out_ready;
  assign out_data   = s_data[0];

endmodule
