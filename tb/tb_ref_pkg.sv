// tb_ref_pkg: reference models for the testbenches.
//
// Byte-oriented AES-128 (FIPS-197), GF(2^128) multiplication, AES-GCM over byte
// queues, QUIC header protection and a helper that builds Ethernet/IPv4/UDP
// frames carrying protected 1-RTT QUIC packets. These are written separately
// from the RTL (S-box table built by search for the inverse, state kept as a
// byte array, GHASH with the right-shift algorithm on whole blocks) so that a
// testbench compares the design with an independent computation.
package tb_ref_pkg;
  import quic_pkg::*;

  typedef byte unsigned bytes_t[$];

  function automatic byte unsigned r_mul(input byte unsigned a, input byte unsigned b);
    byte unsigned p = 0;
    for (int i = 0; i < 8; i++) begin
      if (b[0]) p ^= a;
      a = (a & 8'h80) ? ((a << 1) ^ 8'h1b) : (a << 1);
      b >>= 1;
    end
    return p;
  endfunction

  function automatic byte unsigned r_sbox(input byte unsigned x);
    byte unsigned inv = 0, s;
    if (x != 0)
      for (int c = 1; c < 256; c++) if (r_mul(x, byte'(c)) == 1) inv = byte'(c);
    s = inv;
    for (int i = 1; i <= 4; i++) s ^= byte'((inv << i) | (inv >> (8 - i)));
    return s ^ 8'h63;
  endfunction

  byte unsigned SB[256];
  bit sb_ready = 0;

  function automatic void init_sbox();
    if (!sb_ready) begin
      for (int i = 0; i < 256; i++) SB[i] = r_sbox(byte'(i));
      sb_ready = 1;
    end
  endfunction

  function automatic logic [127:0] aes128(input logic [127:0] key, input logic [127:0] pt);
    byte unsigned w[176];
    byte unsigned s[16], t[16];
    byte unsigned rc = 1, tmp[4];
    init_sbox();
    for (int i = 0; i < 16; i++) w[i] = key[127-8*i -: 8];
    for (int i = 16; i < 176; i += 4) begin
      for (int j = 0; j < 4; j++) tmp[j] = w[i-4+j];
      if (i % 16 == 0) begin
        byte unsigned t0 = tmp[0];
        tmp[0] = SB[tmp[1]] ^ rc; tmp[1] = SB[tmp[2]]; tmp[2] = SB[tmp[3]]; tmp[3] = SB[t0];
        rc = r_mul(rc, 2);
      end
      for (int j = 0; j < 4; j++) w[i+j] = w[i-16+j] ^ tmp[j];
    end
    for (int i = 0; i < 16; i++) s[i] = pt[127-8*i -: 8] ^ w[i];
    for (int r = 1; r <= 10; r++) begin
      for (int i = 0; i < 16; i++) s[i] = SB[s[i]];
      for (int c = 0; c < 4; c++) for (int row = 0; row < 4; row++) t[4*c+row] = s[4*((c+row)%4)+row];
      if (r != 10)
        for (int c = 0; c < 4; c++)
          for (int row = 0; row < 4; row++)
            s[4*c+row] = r_mul(t[4*c+row], 2) ^ r_mul(t[4*c+(row+1)%4], 3) ^ t[4*c+(row+2)%4] ^ t[4*c+(row+3)%4];
      else s = t;
      for (int i = 0; i < 16; i++) s[i] ^= w[16*r+i];
    end
    for (int i = 0; i < 16; i++) pt[127-8*i -: 8] = s[i];
    return pt;
  endfunction

  function automatic logic [127:0] gf_mul(input logic [127:0] x, input logic [127:0] y);
    logic [127:0] z = '0, v = y;
    for (int i = 127; i >= 0; i--) begin
      if (x[i]) z ^= v;
      v = v[0] ? ((v >> 1) ^ {8'he1, 120'd0}) : (v >> 1);
    end
    return z;
  endfunction

  function automatic logic [127:0] blk(input bytes_t b, input int off);
    logic [127:0] r = '0;
    for (int i = 0; i < 16; i++) if (off + i < b.size()) r[127-8*i -: 8] = b[off+i];
    return r;
  endfunction

  // AES-GCM encryption: returns ciphertext, tag in `tag`
  function automatic bytes_t gcm_encrypt(input logic [127:0] key, input logic [95:0] iv,
                                         input bytes_t aad, input bytes_t pt,
                                         output logic [127:0] tag);
    bytes_t ct;
    logic [127:0] h, y, ks;
    h = aes128(key, '0);
    y = '0;
    for (int o = 0; o < aad.size(); o += 16) y = gf_mul(y ^ blk(aad, o), h);
    for (int o = 0; o < pt.size(); o += 16) begin
      ks = aes128(key, {iv, 32'(o / 16 + 2)});
      for (int i = 0; i < 16 && o + i < pt.size(); i++) ct.push_back(pt[o+i] ^ ks[127-8*i -: 8]);
    end
    for (int o = 0; o < ct.size(); o += 16) y = gf_mul(y ^ blk(ct, o), h);
    y = gf_mul(y ^ {64'(aad.size() * 8), 64'(ct.size() * 8)}, h);
    tag = y ^ aes128(key, {iv, 32'd1});
    return ct;
  endfunction

  // A protected 1-RTT packet inside an Ethernet/IPv4/UDP frame.
  // Returns the frame bytes; `plain` receives the frame as the pipeline should
  // deliver it (header and payload decrypted, tag kept).
  function automatic bytes_t make_frame(input logic [159:0] dcid, input int pnlen,
                                        input logic [31:0] pn, input bit key_phase,
                                        input int payload_len,
                                        input logic [127:0] hp_key, input logic [127:0] pp_key,
                                        input logic [95:0] iv, input bit corrupt,
                                        output bytes_t plain);
    bytes_t f, hdr, pt, ct;
    logic [127:0] tag, mask, sample;
    logic [95:0] nonce;
    int udp_len, ip_len, hlen;
    byte unsigned first;
    hlen = 1 + 20 + pnlen;
    udp_len = 8 + hlen + payload_len + 16;
    ip_len  = 20 + udp_len;
    // Ethernet
    for (int i = 0; i < 12; i++) f.push_back(byte'(8'h10 + i));
    f.push_back(8'h08); f.push_back(8'h00);
    // IPv4
    f.push_back(8'h45); f.push_back(8'h00); f.push_back(byte'(ip_len >> 8)); f.push_back(byte'(ip_len));
    for (int i = 0; i < 5; i++) f.push_back(8'h00);
    f.push_back(8'h11);
    for (int i = 0; i < 10; i++) f.push_back(byte'(8'hc0 + i));
    // UDP
    f.push_back(8'h11); f.push_back(8'h51); f.push_back(8'h01); f.push_back(8'hbb);
    f.push_back(byte'(udp_len >> 8)); f.push_back(byte'(udp_len)); f.push_back(8'h00); f.push_back(8'h00);
    // QUIC short header
    first = 8'h40 | (key_phase ? 8'h04 : 8'h00) | byte'(pnlen - 1);
    hdr.push_back(first);
    for (int i = 0; i < 20; i++) hdr.push_back(dcid[159-8*i -: 8]);
    for (int i = pnlen - 1; i >= 0; i--) hdr.push_back(pn[8*i +: 8]);
    for (int i = 0; i < payload_len; i++) pt.push_back(byte'($urandom));
    // the packet number as sent (its low pnlen bytes) enters the nonce
    nonce = iv ^ 96'(pn & (32'hffffffff >> (8 * (4 - pnlen))));
    ct = gcm_encrypt(pp_key, nonce, hdr, pt, tag);
    plain = f;
    foreach (hdr[i]) plain.push_back(hdr[i]);
    foreach (pt[i]) plain.push_back(pt[i]);
    // protected packet
    for (int i = 0; i < 16; i++) ct.push_back(tag[127-8*i -: 8]);
    if (corrupt) ct[ct.size()-1] ^= 8'h01;   // damage the last tag byte
    for (int i = 0; i < 16; i++) plain.push_back(corrupt ? 8'h00 : tag[127-8*i -: 8]);
    sample = '0;
    for (int i = 0; i < 16; i++) sample[127-8*i -: 8] = ct[4 - pnlen + i];
    mask = aes128(hp_key, sample);
    hdr[0] ^= mask[127:120] & 8'h1f;
    for (int i = 0; i < pnlen; i++) hdr[21+i] ^= mask[119-8*i -: 8];
    foreach (hdr[i]) f.push_back(hdr[i]);
    foreach (ct[i]) f.push_back(ct[i]);
    return f;
  endfunction

  // Metadata the parser gives word w of an Ethernet/IPv4/UDP frame; `quic`
  // selects whether the UDP payload is marked 1-RTT QUIC or unknown
  function automatic meta_t word_meta(input bytes_t f, input int w, input bit quic);
    meta_t m;
    int udp_end, nw;
    udp_end = 34 + {f[38], f[39]};
    nw = (f.size() + 3) / 4;
    m = '0;
    m.valid = 1'b1;
    m.last  = (w == nw - 1);
    for (int b = 0; b < 4; b++) begin
      int o;
      o = 4 * w + b;
      m.strb[b] = (o < f.size());
      if (o >= f.size())    m.proto[b] = P_PAD;
      else if (o < 14)      m.proto[b] = P_ETH;
      else if (o < 34)      m.proto[b] = P_IPV4;
      else if (o < 42)      m.proto[b] = P_UDP;
      else if (o >= udp_end) m.proto[b] = P_PAD;
      else                  m.proto[b] = quic ? P_QUIC : P_UNKNOWN;
      m.dcid[b] = quic && o >= 43 && o < 63 && o < udp_end;
    end
    return m;
  endfunction

  function automatic logic [31:0] word_data(input bytes_t f, input int w);
    logic [31:0] d;
    for (int b = 0; b < 4; b++) d[8*b +: 8] = (4*w + b < f.size()) ? f[4*w + b] : 8'h00;
    return d;
  endfunction

endpackage
