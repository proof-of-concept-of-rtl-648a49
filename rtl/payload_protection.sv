// payload_protection: decrypts and authenticates the payload of 1-RTT packets
// with AEAD_AES_128_GCM and checks the tag.
//
// Input stage: on `keys_valid` (with the word holding the first QUIC byte) the
// pp_key and IV of the packet's key phase are copied. The packet number length
// is read from the (already unprotected) first byte and the packet number from
// the bytes after the DCID; nonce = IV xor left-padded packet number. The UDP
// length field gives the QUIC length L. Header bytes (the associated data, 22 to
// 25 bytes) and ciphertext bytes enter a byte buffer; the 16 tag bytes go to a
// tag register, copied aside when F is issued (the whole tag has arrived by
// then, and the next packet's tag may arrive before F's result). A small state machine (WAIT, START, AUTHENTICATE, DECRYPT,
// FINISHED) issues to aesgcm_pipelined: S, then the header as A blocks
// (16 bytes, then the 6..9 remaining bytes masked), then the ciphertext as AD
// blocks of 16 bytes (the last one masked), then F with
// len(A) = (21 + pnlen)*8 and len(C) = (L - 21 - pnlen - 16)*8 bits. A block is
// issued once all its bytes are in the buffer and at least 4 cycles after the
// previous command (A may follow S at once).
//
// Output stage: words wait in a DELAY-cycle delay line. Plaintext blocks from
// the engine go into a second byte buffer; as ciphertext bytes leave the delay
// line they are replaced, in order, by plaintext bytes. The computed tag is
// compared with the received one; on a mismatch the tag bytes leave as zeros and
// `auth_fail_count` is incremented. Headers and non-QUIC bytes pass unchanged.
//
// The state machine, the command sequence, the length formulas, the zeroed tag
// and the counter follow the document. The byte buffers that absorb the
// variable position of the blocks are this design's way of implementing the
// document's input selection and output multiplexers. Timing: DELAY = 32
// cycles (the document's value); one word per cycle; the engine adds 13.
module payload_protection
  import quic_pkg::*;
#(
  parameter int unsigned DELAY = 32
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [DW-1:0] in_data,
  input  meta_t         in_meta,
  input  logic          keys_valid,
  input  logic [127:0]  pp_key,
  input  logic [95:0]   iv,
  output logic [DW-1:0] out_data,
  output meta_t         out_meta,
  output logic [31:0]   auth_fail_count,
  output logic          underrun          // plaintext was not ready in time (never expected)
);

  localparam int unsigned PN_OFF = 1 + DCID_LEN;   // 21
  localparam int unsigned BUF    = 64;             // byte buffer size
  localparam int unsigned BW     = $clog2(BUF);

  typedef enum logic [2:0] {WAIT, START, AUTHENTICATE, DECRYPT, FINISHED} ph_e;

  // ============================================================ input stage
  logic [127:0] key_q;
  logic [95:0]  iv_q;
  logic [31:0]  pn_q;
  logic [2:0]   pnlen_q;
  logic [15:0]  ulen_q;
  logic [10:0]  ucnt_q, qcnt_q;
  logic [7:0]   ibuf [BUF];
  logic [10:0]  iwr_q, ird_q;
  logic [127:0] tag_rx_q;
  logic [127:0] tag_cmp_q;       // received tag, held from F until its result
  ph_e          ph_q;
  logic [2:0]   gap_q;

  // per-packet lengths
  logic [10:0] hlen, l_quic, c_end;
  assign hlen   = 11'(PN_OFF) + 11'(pnlen_q);
  assign l_quic = 11'(ulen_q) - 11'(UDP_LEN);
  assign c_end  = l_quic - 11'(TAG_LEN);

  // input bytes of this word
  logic [10:0] qidx [NB];
  logic [10:0] uidx [NB];
  logic [2:0]  nq, nu;
  logic [2:0]  pnlen_n;
  logic [15:0] ulen_n;

  always_comb begin
    pnlen_n = pnlen_q;
    ulen_n  = ulen_q;
    nq = quic_before(in_meta, NB);
    nu = '0;
    for (int i = 0; i < NB; i++) begin
      qidx[i] = qcnt_q + 11'(quic_before(in_meta, i));
      uidx[i] = ucnt_q + 11'(nu);
      if (in_meta.valid && in_meta.proto[i] == P_UDP) begin
        if (uidx[i] == 11'd4) ulen_n[15:8] = in_data[8*i +: 8];
        if (uidx[i] == 11'd5) ulen_n[7:0]  = in_data[8*i +: 8];
        nu = nu + 3'd1;
      end
      if (in_meta.valid && in_meta.proto[i] == P_QUIC && qidx[i] == 11'd0)
        pnlen_n = {1'b0, in_data[8*i +: 2]} + 3'd1;
    end
  end

  // command issue
  gcm_cmd_e     cmd;
  logic [127:0] cmd_data, cmd_mask;
  logic [10:0]  blk_end, blk_len;
  logic         blk_ready;
  logic [95:0]  nonce;

  assign nonce = iv_q ^ {64'd0, pn_q};

  always_comb begin
    cmd      = GCM_NONE;
    cmd_data = '0;
    cmd_mask = '0;
    blk_end  = ird_q;
    if (ph_q == AUTHENTICATE)
      blk_end = (ird_q + 11'd16 < hlen) ? ird_q + 11'd16 : hlen;
    else if (ph_q == DECRYPT)
      blk_end = (ird_q + 11'd16 < c_end) ? ird_q + 11'd16 : c_end;
    blk_len   = blk_end - ird_q;
    blk_ready = (iwr_q >= blk_end);
    for (int k = 0; k < 16; k++)
      if (11'(k) < blk_len) begin
        cmd_data[127 - 8*k -: 8] = ibuf[BW'(ird_q + 11'(k))];
        cmd_mask[127 - 8*k -: 8] = 8'hff;
      end
    unique case (ph_q)
      START:        cmd = GCM_S;
      AUTHENTICATE: if (gap_q >= 3'd4 && blk_ready) cmd = GCM_A;
      DECRYPT:      if (gap_q >= 3'd4 && blk_ready && blk_len != 0) cmd = GCM_AD;
      FINISHED:     if (gap_q >= 3'd4) begin
        cmd      = GCM_F;
        cmd_data = {50'd0, hlen, 3'd0, 50'd0, c_end - hlen, 3'd0};
        cmd_mask = '1;
      end
      default: ;
    endcase
  end

  // buffer write count and packet number after this word
  logic [10:0] in_w;
  logic [31:0] in_pn;
  always_comb begin
    in_w  = keys_valid ? 11'd0 : iwr_q;
    in_pn = keys_valid ? 32'd0 : pn_q;
    for (int i = 0; i < NB; i++)
      if (in_meta.valid && in_meta.proto[i] == P_QUIC) begin
        if (qidx[i] >= 11'(PN_OFF) && qidx[i] < 11'(PN_OFF) + 11'(pnlen_n))
          in_pn = {in_pn[23:0], in_data[8*i +: 8]};
        if (qidx[i] < (11'(ulen_n) - 11'(UDP_LEN + TAG_LEN)))
          in_w = in_w + 11'd1;
      end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      key_q <= '0; iv_q <= '0; pn_q <= '0; pnlen_q <= 3'd1; ulen_q <= '0;
      ucnt_q <= '0; qcnt_q <= '0; iwr_q <= '0; ird_q <= '0; tag_rx_q <= '0;
      tag_cmp_q <= '0;
      ph_q <= WAIT; gap_q <= '0;
    end else begin
      // ---- per-word parsing
      if (in_meta.valid) begin
        ulen_q  <= ulen_n;
        pnlen_q <= pnlen_n;
        ucnt_q  <= in_meta.last ? '0 : ucnt_q + 11'(nu);
        qcnt_q  <= in_meta.last ? '0 : qcnt_q + 11'(nq);
      end
      if (keys_valid) begin
        key_q <= pp_key;
        iv_q  <= iv;
        pn_q  <= '0;
        iwr_q <= '0;
        ird_q <= '0;
        ph_q  <= START;
      end
      // ---- bytes into the buffer / packet number / tag
      if (ph_q != WAIT || keys_valid) begin
        for (int i = 0; i < NB; i++)
          if (in_meta.valid && in_meta.proto[i] == P_QUIC &&
              !(qidx[i] < (11'(ulen_n) - 11'(UDP_LEN + TAG_LEN))))
            tag_rx_q[127 - 8*(qidx[i] - (11'(ulen_n) - 11'(UDP_LEN + TAG_LEN))) -: 8]
              <= in_data[8*i +: 8];
        iwr_q <= in_w;
        pn_q  <= in_pn;
      end
      // ---- command state machine
      if (cmd == GCM_F) tag_cmp_q <= tag_rx_q;
      if (cmd != GCM_NONE) gap_q <= (cmd == GCM_S) ? 3'd4 : 3'd1;
      else if (gap_q != 3'd7) gap_q <= gap_q + 3'd1;
      if (!keys_valid) begin
        unique case (ph_q)
          START:        ph_q <= AUTHENTICATE;
          AUTHENTICATE: if (cmd == GCM_A) begin
            ird_q <= blk_end;
            if (blk_end == hlen) ph_q <= DECRYPT;
          end
          DECRYPT: begin
            if (cmd == GCM_AD) ird_q <= blk_end;
            if ((cmd == GCM_AD && blk_end == c_end) || (ird_q == c_end)) ph_q <= FINISHED;
          end
          FINISHED:     if (cmd == GCM_F) ph_q <= WAIT;
          default: ;
        endcase
      end
    end
  end

  // buffer writes (no reset: only written bytes are read)
  always_ff @(posedge clk) begin
    logic [10:0] w;
    w = keys_valid ? 11'd0 : iwr_q;
    if (ph_q != WAIT || keys_valid)
      for (int i = 0; i < NB; i++)
        if (in_meta.valid && in_meta.proto[i] == P_QUIC &&
            qidx[i] < (11'(ulen_n) - 11'(UDP_LEN + TAG_LEN))) begin
          ibuf[BW'(w)] <= in_data[8*i +: 8];
          w = w + 11'd1;
        end
  end

  // ================================================================ engine
  logic         g_valid;
  gcm_cmd_e     g_cmd;
  logic [127:0] g_dout;

  aesgcm_pipelined u_gcm (
    .clk(clk), .rst_n(rst_n), .cmd(cmd), .key(key_q),
    .nonce(nonce), .din(cmd_data), .mask(cmd_mask),
    .out_valid(g_valid), .out_cmd(g_cmd), .dout(g_dout));

  // ============================================================ output stage
  logic [DW-1:0] dl_data;
  meta_t         dl_meta;

  delay_line #(.W(DW + $bits(meta_t)), .DEPTH(DELAY - 1)) u_delay (
    .clk(clk), .rst_n(rst_n), .din({in_data, in_meta}), .dout({dl_data, dl_meta}));

  logic [7:0]  obuf [BUF];
  logic [10:0] owr_q, ord_q;      // plaintext bytes written / consumed
  logic [10:0] clen_q;            // ciphertext length of the packet in flight
  // plaintext bytes in the block leaving the engine
  logic [10:0] pt_n;
  assign pt_n = (clen_q > 11'd16) ? 11'd16 : clen_q;
  logic        tag_v_q, tag_ok_q;
  logic [10:0] oq_q, ou_q;
  logic [15:0] oulen_q, oulen_n;
  logic [2:0]  opnlen_q, opnlen_n;
  logic [DW-1:0] data_n;
  logic [10:0] orc;
  logic        under_n;

  always_comb begin
    logic [10:0] oq, ou, oh, oc;
    logic [2:0]  nu2;
    oq = '0; ou = '0; oh = '0; oc = '0;
    data_n   = dl_data;
    oulen_n  = oulen_q;
    opnlen_n = opnlen_q;
    orc      = ord_q;
    under_n  = 1'b0;
    nu2      = '0;
    for (int i = 0; i < NB; i++) begin
      oq = oq_q + 11'(quic_before(dl_meta, i));
      ou = ou_q + 11'(nu2);
      if (dl_meta.valid && dl_meta.proto[i] == P_UDP) begin
        if (ou == 11'd4) oulen_n[15:8] = dl_data[8*i +: 8];
        if (ou == 11'd5) oulen_n[7:0]  = dl_data[8*i +: 8];
        nu2 = nu2 + 3'd1;
      end
      if (dl_meta.valid && dl_meta.proto[i] == P_QUIC) begin
        if (oq == 11'd0) opnlen_n = {1'b0, dl_data[8*i +: 2]} + 3'd1;
        oh = 11'(PN_OFF) + 11'(opnlen_n);
        oc = 11'(oulen_n) - 11'(UDP_LEN + TAG_LEN);
        if (oq >= oh && oq < oc) begin
          if (orc == owr_q) under_n = 1'b1;
          data_n[8*i +: 8] = obuf[BW'(orc)];
          orc = orc + 11'd1;
        end else if (oq >= oc) begin
          if (!tag_v_q) under_n = 1'b1;
          if (!tag_ok_q) data_n[8*i +: 8] = 8'h00;
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      owr_q <= '0; ord_q <= '0; clen_q <= '0;
      tag_v_q <= 1'b0; tag_ok_q <= 1'b0;
      oq_q <= '0; ou_q <= '0; oulen_q <= '0; opnlen_q <= 3'd1;
      out_data <= '0; out_meta <= '0;
      auth_fail_count <= '0;
      underrun <= 1'b0;
    end else begin
      // plaintext from the engine
      if (ph_q == AUTHENTICATE && cmd == GCM_A && blk_end == hlen) clen_q <= c_end - hlen;
      if (g_valid && g_cmd == GCM_AD) begin
        owr_q  <= owr_q + pt_n;
        clen_q <= clen_q - pt_n;
      end
      if (g_valid && g_cmd == GCM_F) begin
        tag_v_q  <= 1'b1;
        tag_ok_q <= (g_dout == tag_cmp_q);
        if (g_dout != tag_cmp_q) auth_fail_count <= auth_fail_count + 32'd1;
      end
      // words leaving
      ord_q <= orc;
      if (dl_meta.valid) begin
        oulen_q  <= oulen_n;
        opnlen_q <= opnlen_n;
        oq_q     <= dl_meta.last ? '0 : oq_q + 11'(quic_before(dl_meta, NB));
        ou_q     <= dl_meta.last ? '0 : ou_q + 11'(nu2_count(dl_meta));
        if (dl_meta.last) tag_v_q <= 1'b0;
      end
      if (under_n) underrun <= 1'b1;
      out_data <= data_n;
      out_meta <= dl_meta;
    end
  end

  always_ff @(posedge clk) begin
    if (g_valid && g_cmd == GCM_AD)
      for (int k = 0; k < 16; k++)
        if (11'(k) < pt_n) obuf[BW'(owr_q + 11'(k))] <= g_dout[127 - 8*k -: 8];
  end

  function automatic logic [2:0] nu2_count(input meta_t m);
    logic [2:0] n;
    n = '0;
    for (int i = 0; i < NB; i++) if (m.valid && m.proto[i] == P_UDP) n = n + 3'd1;
    return n;
  endfunction

endmodule
