// tb_router_model -- behavioural stand-in for the routing IPs and links of a
// set of nodes, for testbenches only.
//
// NP intranode ports are modelled (port 2n + p is port p of node n). On the
// tx side it accepts header/footer and payload words (with random stalls when
// STALL is set), reassembles each packet and sends it to the rx side of port
// 2 * dest_x + intra_dest, keeping packet order per destination. A packet for
// a port beyond NP is kept in ext_q (header, payload, footer words) and
// counted in ext_pkts. inject() puts a packet on an rx port from outside.
// Counters: packets between ports of the same node (intra_pkts), between
// nodes (inter_pkts) and cycles in which a tx word waited (stall_cycles).
// Outputs change at the falling clock edge and handshakes are sampled 2 time
// units later, so the design sees stable inputs at every rising edge.
module tb_router_model
  import apenet_pkg::*;
#(
  parameter int NP    = 2,
  parameter bit STALL = 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [NP-1:0] tx_hdr_valid,
  output logic [NP-1:0] tx_hdr_ready,
  input  word_t         tx_hdr_data [NP],
  input  logic [NP-1:0] tx_dat_valid,
  output logic [NP-1:0] tx_dat_ready,
  input  word_t         tx_dat_data [NP],
  output logic [NP-1:0] rx_hdr_valid,
  input  logic [NP-1:0] rx_hdr_ready,
  output word_t         rx_hdr_data [NP],
  output logic [NP-1:0] rx_dat_valid,
  input  logic [NP-1:0] rx_dat_ready,
  output word_t         rx_dat_data [NP]
);

  word_t hbuf [NP][$];
  word_t dbuf [NP][$];
  word_t rxh  [NP][$];
  word_t rxd  [NP][$];
  word_t ext_q[$];
  int    ext_pkts = 0, intra_pkts = 0, inter_pkts = 0, stall_cycles = 0, bad_pkts = 0;
  int    delivered [NP];

  function automatic int nwords(word_t h);
    apenet_header_t hh;
    hh = word_2_apenet(h);
    return (int'(hh.packet_size) + 31) / 32;
  endfunction

  task automatic inject(int port, word_t h, word_t pl[$]);
    rxh[port].push_back(h);
    foreach (pl[i]) rxd[port].push_back(pl[i]);
    rxh[port].push_back(apenet_2_word(make_footer()));
  endtask

  initial begin
    tx_hdr_ready = '0; tx_dat_ready = '0; rx_hdr_valid = '0; rx_dat_valid = '0;
    for (int p = 0; p < NP; p++) begin
      rx_hdr_data[p] = '0; rx_dat_data[p] = '0; delivered[p] = 0;
    end
  end

  always @(negedge clk) if (rst_n) begin
    // drive
    for (int p = 0; p < NP; p++) begin
      tx_hdr_ready[p] = STALL ? ($urandom_range(0, 4) != 0) : 1'b1;
      tx_dat_ready[p] = STALL ? ($urandom_range(0, 4) != 0) : 1'b1;
      rx_hdr_valid[p] = (rxh[p].size() > 0) && (!STALL || $urandom_range(0, 5) != 0);
      rx_dat_valid[p] = (rxd[p].size() > 0) && (!STALL || $urandom_range(0, 5) != 0);
      rx_hdr_data[p]  = (rxh[p].size() > 0) ? rxh[p][0] : '0;
      rx_dat_data[p]  = (rxd[p].size() > 0) ? rxd[p][0] : '0;
    end
    #2;
    // sample
    for (int p = 0; p < NP; p++) begin
      if ((tx_hdr_valid[p] && !tx_hdr_ready[p]) || (tx_dat_valid[p] && !tx_dat_ready[p]))
        stall_cycles++;
      if (tx_hdr_valid[p] && tx_hdr_ready[p]) hbuf[p].push_back(tx_hdr_data[p]);
      if (tx_dat_valid[p] && tx_dat_ready[p]) dbuf[p].push_back(tx_dat_data[p]);
      if (rx_hdr_valid[p] && rx_hdr_ready[p]) void'(rxh[p].pop_front());
      if (rx_dat_valid[p] && rx_dat_ready[p]) void'(rxd[p].pop_front());
      // a complete packet?
      if (hbuf[p].size() >= 2 && dbuf[p].size() >= nwords(hbuf[p][0])) begin
        word_t h, f, pl[$];
        apenet_header_t hh;
        int dst;
        h  = hbuf[p].pop_front();
        f  = hbuf[p].pop_front();
        hh = word_2_apenet(h);
        pl = {};
        for (int i = 0; i < nwords(h); i++) pl.push_back(dbuf[p].pop_front());
        dst = 2 * int'(hh.dest_x) + int'(hh.intra_dest);
        if (f != apenet_2_word(make_footer())) bad_pkts++;
        if (dst < NP) begin
          rxh[dst].push_back(h);
          foreach (pl[i]) rxd[dst].push_back(pl[i]);
          rxh[dst].push_back(f);
          delivered[dst]++;
          if (dst / 2 == p / 2) intra_pkts++;
          else                  inter_pkts++;
        end else begin
          ext_q.push_back(h);
          foreach (pl[i]) ext_q.push_back(pl[i]);
          ext_q.push_back(f);
          ext_pkts++;
        end
      end
    end
  end

endmodule
