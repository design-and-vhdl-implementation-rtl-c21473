// cea_pkg: constants and types shared by the CEALite forward and backward paths.
//
// Frame layout (byte offsets from the first destination-MAC byte; the MAC
// wrapper adds preamble and FCS). The header is 70 bytes long: bytes 0..55 are
// the static part (Ethernet, LLC/SNAP, IPv4, UDP, fixed RTP words), kept per
// flow in the Header Block RAM; bytes 56..69 are the four dynamic fields,
// written per frame into the Data Block RAM:
//   56..59 packet counter   60..63 time stamp (IP_T0)
//   64..67 byte counter     68..69 packet length (payload bytes)
// The payload (up to 256 bytes) follows at byte 70.
// The 70-byte header and the packet counter at byte 56 follow the document;
// the order of the other three dynamic fields and the static layout are this
// design's choice. Static offsets checked by the receiver: destination MAC
// 0..5, destination IPv4 address 38..41, UDP destination port 44..45 (the
// standard positions behind a 14-byte MAC and 8-byte LLC/SNAP header).
package cea_pkg;

  localparam int unsigned NUM_FLOWS      = 4;    // independent PDH interfaces
  localparam int unsigned FLOW_W         = 2;    // $clog2(NUM_FLOWS)
  localparam int unsigned HDR_BYTES      = 70;   // full header length
  localparam int unsigned STATIC_BYTES   = 56;   // header bytes from the Header Block RAM
  localparam int unsigned DYN_BYTES      = HDR_BYTES - STATIC_BYTES; // 14
  localparam int unsigned DYN_WORDS      = 4;    // dynamic fields, one 32-bit word each
  localparam int unsigned MAX_PAYLOAD    = 256;  // payload is 255 or 256 bytes
  localparam int unsigned FCS_BYTES      = 4;    // Ethernet trailer

  // Receive-side offsets
  localparam int unsigned OFS_DST_MAC    = 0;
  localparam int unsigned OFS_DST_IP     = 38;
  localparam int unsigned OFS_UDP_DPORT  = 44;

  // Receive record in Data_BLK_RAM: one 32-bit word per field, 8 words per frame
  localparam int unsigned REC_WORDS      = 8;
  typedef enum logic [2:0] {
    REC_FLOW_ID   = 3'd0,
    REC_RX_TSTAMP = 3'd1,
    REC_PKT_CNT   = 3'd2,
    REC_BYTE_CNT  = 3'd3,
    REC_PKT_LEN   = 3'd4,
    REC_TX_TSTAMP = 3'd5,
    REC_STATUS    = 3'd6,
    REC_SPARE     = 3'd7
  } rec_field_e;

  // Status word bits (REC_STATUS)
  localparam int unsigned ST_CRC_ERR     = 0;   // MAC wrapper reported a bad FCS
  localparam int unsigned ST_LEN_ERR     = 1;   // received payload length != packet length field

  // Config_BLK_RAM word map
  localparam int unsigned CFG_MAC_HI     = 0;   // MAC[47:16]
  localparam int unsigned CFG_MAC_LO     = 1;   // {MAC[15:0], 16'h0}
  localparam int unsigned CFG_IP         = 2;   // IPv4 address
  localparam int unsigned CFG_PORT0      = 3;   // {valid, 15'b0, UDP port} for flow 0, then flows 1..3
  localparam int unsigned CFG_WORDS      = CFG_PORT0 + NUM_FLOWS;

  // Data Block RAM (forward path) word map
  localparam int unsigned HALF_WORDS     = MAX_PAYLOAD / 4;            // 64 words per buffer half
  localparam int unsigned DYN_BASE       = 2 * NUM_FLOWS * HALF_WORDS; // 512: dynamic fields
  // Header Block RAM word map: 16-word slot per flow, 14 words used
  localparam int unsigned HDR_SLOT_WORDS = 16;

  // Start request handed from the data packager to the MAC transmitter
  typedef struct packed {
    logic [FLOW_W-1:0] flow;   // flow to transmit
    logic              half;   // buffer half holding the payload
    logic [8:0]        len;    // payload length in bytes (0..256)
  } tx_req_t;

endpackage
