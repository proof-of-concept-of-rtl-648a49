// quic_pkg: types and constants shared by the stages of the 1-RTT QUIC
// decryption pipeline.
//
// The pipeline carries a 32-bit data word and, next to it, a metadata word.
// The metadata starts as the AXI4-Stream TVALID, TSTRB and TLAST bits; the
// parser adds a 3-bit protocol code and a DCID flag for each of the four bytes.
// Byte lane i of a data word is bits 8*i+7:8*i and lane 0 is the earliest byte
// of the stream. The protocol codes are the document's; the lane order and the
// packing of the struct are this design's choice.
package quic_pkg;

  localparam int unsigned DW       = 32;          // stream data width
  localparam int unsigned NB       = DW / 8;      // bytes per word
  localparam int unsigned DCID_LEN = 20;          // only 20-byte DCIDs are handled
  localparam int unsigned KEY_AW   = 10;          // key memory address width
  localparam int unsigned TAG_LEN  = 16;          // AEAD_AES_128_GCM tag length

  // Byte offsets of the fixed Ethernet / IPv4 (IHL=5) / UDP stack
  localparam int unsigned ETH_LEN    = 14;
  localparam int unsigned IP_LEN     = 20;
  localparam int unsigned UDP_LEN    = 8;
  localparam int unsigned QUIC_START = ETH_LEN + IP_LEN + UDP_LEN;  // 42

  typedef enum logic [2:0] {
    P_ETH     = 3'b000,
    P_IPV4    = 3'b001,
    P_UDP     = 3'b010,
    P_QUIC    = 3'b011,
    P_UNKNOWN = 3'b100,
    P_PAD     = 3'b101
  } proto_e;

  typedef struct packed {
    logic              valid;  // TVALID
    logic              last;   // TLAST
    logic [NB-1:0]     strb;   // TSTRB
    proto_e [NB-1:0]   proto;  // protocol of each byte lane
    logic [NB-1:0]     dcid;   // byte lane holds a DCID byte
  } meta_t;

  localparam int unsigned META_W = $bits(meta_t);

  // Commands of the AES-GCM engine
  typedef enum logic [2:0] {
    GCM_NONE = 3'd0,
    GCM_S    = 3'd1,   // start: compute H
    GCM_A    = 3'd2,   // authenticate associated data
    GCM_AD   = 3'd3,   // authenticated decrypt
    GCM_AE   = 3'd4,   // authenticated encrypt
    GCM_F    = 3'd5    // finish: lengths block, produce tag
  } gcm_cmd_e;

  // Number of QUIC-protocol bytes in lanes below lane i
  function automatic logic [2:0] quic_before(input meta_t m, input int unsigned i);
    logic [2:0] n;
    n = '0;
    for (int unsigned j = 0; j < NB; j++)
      if (j < i && m.valid && m.proto[j] == P_QUIC) n = n + 3'd1;
    return n;
  endfunction

endpackage
