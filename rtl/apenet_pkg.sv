// apenet_pkg -- shared types and helpers of the APEnet/HAPECOM packet protocol.
//
// Every stream between HLS-style tasks, aggregators, dispatchers and the
// routing IP carries 256-bit words. A packet is a header word, ceil(size/32)
// payload words and a footer word. The header layout follows the packed
// C bit-field structure of the protocol: fields are allocated from bit 0
// upwards, 128 bits in all, and the upper 128 bits of the 256-bit header word
// are zero. The footer uses the same layout; only dest_addr and edac are set.
//
// The constants HDR_DEST_ADDR, FTR_DEST_ADDR and FTR_EDAC are the marker
// values the send() primitive writes. The helpers convert between the header
// structure and a plain 256-bit word (a pure re-interpretation of bits) and
// compute the payload word count of a packet.
//
// The field list, widths and marker values follow the protocol definition;
// the bit order (first field at bit 0) is the usual little-endian layout of a
// packed C bit-field, which the protocol does not spell out. The helpers are
// functions without state, so they add no timing of their own.
package apenet_pkg;

  localparam int unsigned WORD_W     = 256;
  localparam int unsigned WORD_BYTES = WORD_W / 8;

  typedef logic [WORD_W-1:0] word_t;

  // Header fields, most significant field first (edac ends at bit 127,
  // virt_chan starts at bit 0).
  typedef struct packed {
    logic [7:0]  edac;           // [127:120]
    logic [9:0]  num_of_hops;    // [119:110]
    logic [47:0] dest_addr;      // [109:62]
    logic [13:0] packet_size;    // [61:48]  payload size in bytes
    logic [4:0]  packet_type;    // [47:43]
    logic        out_of_lattice; // [42]
    logic        reserved;       // [41]
    logic [3:0]  intra_dest;     // [40:37]  destination task = intranode port
    logic [4:0]  dest_z;         // [36:32]
    logic [4:0]  dest_y;         // [31:27]
    logic [5:0]  dest_x;         // [26:21]
    logic [15:0] proc_id;        // [20:5]   destination channel
    logic [4:0]  virt_chan;      // [4:0]
  } apenet_header_t;

  localparam int unsigned SIZE_START_BITPOS = 48;
  localparam int unsigned SIZE_END_BITPOS   = 61;

  localparam logic [47:0] HDR_DEST_ADDR = 48'h0000_fafb_fcfd;
  localparam logic [47:0] FTR_DEST_ADDR = 48'h0000_aaae_abac;
  localparam logic [7:0]  FTR_EDAC      = 8'h99;

  // Node coordinate as handed to send(): x in [5:0], y in [10:6], z in [15:11].
  typedef logic [15:0] coord_t;

  function automatic word_t apenet_2_word(apenet_header_t h);
    return word_t'(h);
  endfunction

  function automatic apenet_header_t word_2_apenet(word_t w);
    return apenet_header_t'(w[$bits(apenet_header_t)-1:0]);
  endfunction

  // Payload words for a size in bytes: ceil(size / 32).
  function automatic logic [13:0] size_to_nwords(logic [13:0] size);
    return (size >> 5) + 14'(size[4:0] != 5'd0);
  endfunction

  function automatic apenet_header_t make_header(coord_t coord, logic [3:0] task_id,
                                                 logic [15:0] ch_id, logic [13:0] size);
    apenet_header_t h;
    h             = '0;
    h.dest_x      = coord[5:0];
    h.dest_y      = coord[10:6];
    h.dest_z      = coord[15:11];
    h.intra_dest  = task_id;
    h.packet_size = size;
    h.dest_addr   = HDR_DEST_ADDR;
    h.proc_id     = ch_id;
    return h;
  endfunction

  function automatic apenet_header_t make_footer();
    apenet_header_t f;
    f           = '0;
    f.dest_addr = FTR_DEST_ADDR;
    f.edac      = FTR_EDAC;
    return f;
  endfunction

endpackage
