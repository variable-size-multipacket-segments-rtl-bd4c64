// cicq_pkg -- constants and types shared by the buffered-crossbar switch.
//
// The switch moves data one byte per clock on every link (a byte-time
// model, like the evaluation in the source design). Every segment that
// crosses the crossbar is preceded by a 4-byte header. Its layout is this
// design's own choice, since only its contents (port ID and segment length)
// and its size (4 bytes) are given:
//   byte 0 : port ID (destination output on the ingress->crossbar link,
//            source input on the crossbar->egress link)
//   byte 1 : reserved, sent as zero
//   byte 2 : segment payload length, bits 15:8
//   byte 3 : segment payload length, bits 7:0
// Packets carried inside segments are IP-like: bytes 2 and 3 of every
// packet hold its total length in bytes (big-endian), which is how the
// egress finds packet boundaries inside a segment.
package cicq_pkg;

  localparam int unsigned HDR_BYTES = 4;   // per-segment crossbar header
  localparam int unsigned LEN_W     = 16;  // width of a length field

  typedef logic [7:0] byte_t;

  // Byte position of the packet length field inside a packet.
  localparam int unsigned PKT_LEN_HI = 2;
  localparam int unsigned PKT_LEN_LO = 3;

  typedef struct packed {
    logic [7:0]       port;   // output ID (ingress side) or input ID (egress side)
    logic [LEN_W-1:0] len;    // payload length of the segment in bytes
  } seg_hdr_t;

  // Byte k (0..3) of a segment header.
  function automatic byte_t hdr_byte(seg_hdr_t h, int unsigned k);
    case (k)
      0:       return h.port;
      1:       return 8'h00;
      2:       return h.len[15:8];
      default: return h.len[7:0];
    endcase
  endfunction

endpackage
