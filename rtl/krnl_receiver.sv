// krnl_receiver -- host-started kernel that collects classification results
// on the I/O node and writes them to a host buffer.
//
// Started with the number of results to expect, the kernel issues one
// blocking receive on its input channel per result. The low 128 bits of the
// first payload word of each packet are written to buffer item i (i = 0, 1,
// ...); further payload words are dropped. After the last packet done pulses
// and the host can read the buffer: bits 7:0 of an item hold the class the
// CNN found, bits 127:8 the event header the result belongs to.
//
// Only the kernel's role is given; the memory port and the one-item-per-
// result layout (which matches the 16-byte result items the host reads) are
// this design's own choices.
//
// Interface: start pulse with count; a host-memory write port; one input
// channel as a valid/ready stream. Timing: a one-word result packet is
// stored 4 cycles after the receive is issued when nothing stalls.
// mem_wdata is wired straight from the input channel's data (it is only
// meaningful while mem_we is high), so it adds no register.
module krnl_receiver
  import apenet_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  // control
  input  logic          start,
  input  logic [31:0]   count,
  output logic          busy,
  output logic          done,
  // host buffer write port
  output logic          mem_we,
  output logic [31:0]   mem_addr,
  output logic [127:0]  mem_wdata,
  // input channel
  input  logic          in_valid,
  output logic          in_ready,
  input  word_t         in_data
);

  typedef enum logic [1:0] {S_IDLE, S_CMD, S_WAIT} state_t;

  state_t       state;
  logic [31:0]  left;
  logic [31:0]  idx;
  logic         first;

  logic         cmd_ready, pl_valid, pl_last, rdone;
  word_t        pl_data;
  logic [13:0]  rsize;
  logic [0:0]   c_valid, c_ready;
  word_t        c_data [1];

  assign c_valid[0] = in_valid;
  assign in_ready   = c_ready[0];
  assign c_data[0]  = in_data;
  assign busy       = (state != S_IDLE);

  hapecom_receive #(.NCHAN(1)) u_recv (
    .clk, .rst_n,
    .cmd_valid(state == S_CMD), .cmd_ready, .cmd_ch(16'd0),
    .in_valid(c_valid), .in_ready(c_ready), .in_data(c_data),
    .pl_valid, .pl_ready(1'b1), .pl_data, .pl_last,
    .done(rdone), .done_size(rsize)
  );

  assign mem_we    = pl_valid && first;
  assign mem_addr  = idx;
  assign mem_wdata = pl_data[127:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      left  <= '0;
      idx   <= '0;
      first <= 1'b0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          left <= count;
          idx  <= '0;
          if (count == '0) done  <= 1'b1;
          else             state <= S_CMD;
        end
        S_CMD: if (cmd_ready) begin
          first <= 1'b1;
          state <= S_WAIT;
        end
        S_WAIT: begin
          if (pl_valid) first <= 1'b0;
          if (rdone) begin
            idx  <= idx + 32'd1;
            left <= left - 32'd1;
            if (left == 32'd1) begin
              done  <= 1'b1;
              state <= S_IDLE;
            end else state <= S_CMD;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
