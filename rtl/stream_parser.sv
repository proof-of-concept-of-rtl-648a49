// stream_parser: marks every byte of an AXI4-Stream Ethernet frame with the
// protocol it belongs to and flags the bytes of a possible 20-byte DCID.
//
// Only Ethernet II / IPv4 (20-byte header) / UDP / short-header QUIC is
// recognised, so every field sits at a fixed byte offset and a word counter is
// enough. A frame starts on the first valid word after reset or after a word
// with TLAST. The EtherType (bytes 12-13) must be 0x0800 and the IPv4 protocol
// (byte 23) 0x11, otherwise the following bytes are "unknown"; a QUIC byte
// whose first byte has the long-header form bit set is also "unknown". Bytes
// past the end of the UDP datagram (Ethernet padding) and lanes whose TSTRB bit
// is low are "padding". Fields used later in the same frame are kept in
// registers; a field in the current word is taken from the word itself.
//
// Protocol codes and the DCID flag are the document's. Checking the header
// form bit and marking padding are this design's choices. Timing: output is
// registered, one cycle after the input; one word per cycle, no backpressure.
module stream_parser
  import quic_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic [DW-1:0] s_tdata,
  input  logic [NB-1:0] s_tstrb,
  input  logic          s_tlast,
  input  logic          s_tvalid,
  output logic [DW-1:0] m_data,
  output meta_t         m_meta
);

  localparam int unsigned OFF_ETYPE = 12;
  localparam int unsigned OFF_PROTO = ETH_LEN + 9;            // 23
  localparam int unsigned OFF_ULEN  = ETH_LEN + IP_LEN + 4;   // 38

  logic [11:0] wcnt_q;          // word index within the frame
  logic [7:0]  etype_hi_q, etype_lo_q, proto_q, ulen_hi_q, ulen_lo_q, qfirst_q;

  // Byte at frame offset `off`: from the current word if it is there, else the
  // register that captured it
  function automatic logic [7:0] pick(input logic [11:0] wcnt, input logic [DW-1:0] d,
                                      input int unsigned off, input logic [7:0] held);
    if (wcnt == 12'(off / NB)) return d[8*(off % NB) +: 8];
    return held;
  endfunction

  logic [7:0]  etype_hi, etype_lo, proto, ulen_hi, ulen_lo, qfirst;
  logic [15:0] udp_end;
  meta_t       meta_n;

  always_comb begin
    etype_hi = pick(wcnt_q, s_tdata, OFF_ETYPE,      etype_hi_q);
    etype_lo = pick(wcnt_q, s_tdata, OFF_ETYPE + 1,  etype_lo_q);
    proto    = pick(wcnt_q, s_tdata, OFF_PROTO,      proto_q);
    ulen_hi  = pick(wcnt_q, s_tdata, OFF_ULEN,       ulen_hi_q);
    ulen_lo  = pick(wcnt_q, s_tdata, OFF_ULEN + 1,   ulen_lo_q);
    qfirst   = pick(wcnt_q, s_tdata, QUIC_START,     qfirst_q);
    udp_end  = 16'(ETH_LEN + IP_LEN) + {ulen_hi, ulen_lo};

    meta_n       = '0;
    meta_n.valid = s_tvalid;
    meta_n.last  = s_tlast;
    meta_n.strb  = s_tstrb;
    for (int i = 0; i < NB; i++) begin
      int unsigned off;
      off = int'(wcnt_q) * NB + i;
      if (!s_tvalid || !s_tstrb[i])                         meta_n.proto[i] = P_PAD;
      else if (off < ETH_LEN)                               meta_n.proto[i] = P_ETH;
      else if ({etype_hi, etype_lo} != 16'h0800)            meta_n.proto[i] = P_UNKNOWN;
      else if (off < ETH_LEN + IP_LEN)                      meta_n.proto[i] = P_IPV4;
      else if (proto != 8'h11)                              meta_n.proto[i] = P_UNKNOWN;
      else if (off < QUIC_START)                            meta_n.proto[i] = P_UDP;
      else if (off >= 32'(udp_end))                         meta_n.proto[i] = P_PAD;
      else if (qfirst[7])                                   meta_n.proto[i] = P_UNKNOWN;
      else                                                  meta_n.proto[i] = P_QUIC;
      meta_n.dcid[i] = (meta_n.proto[i] == P_QUIC) &&
                       (off >= QUIC_START + 1) && (off < QUIC_START + 1 + DCID_LEN);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wcnt_q     <= '0;
      etype_hi_q <= '0; etype_lo_q <= '0; proto_q <= '0;
      ulen_hi_q  <= '0; ulen_lo_q  <= '0; qfirst_q <= '0;
      m_data     <= '0;
      m_meta     <= '0;
    end else begin
      m_data <= s_tdata;
      m_meta <= meta_n;
      if (s_tvalid) begin
        etype_hi_q <= etype_hi; etype_lo_q <= etype_lo; proto_q <= proto;
        ulen_hi_q  <= ulen_hi;  ulen_lo_q  <= ulen_lo;  qfirst_q <= qfirst;
        if (s_tlast)               wcnt_q <= '0;
        else if (wcnt_q != '1)     wcnt_q <= wcnt_q + 12'd1;
      end
    end
  end

endmodule
