// header_protection: removes QUIC header protection from 1-RTT packets.
//
// When `keys_valid_in` pulses (with the word holding the first QUIC byte) all
// secrets are copied into registers. The QUIC bytes are counted as they enter;
// with a 20-byte DCID and the packet number assumed 4 bytes long, the sample is
// QUIC bytes 25..40. When the last sample byte arrives, the iterative AES core
// encrypts the sample with hp_key (ECB); its output is the mask. Meanwhile the
// words wait in a delay line. At its end, the low 5 bits of the first QUIC byte
// are XORed with the low 5 bits of mask byte 0, which reveals the packet number
// length (bits 1:0, plus one) and the key phase (bit 2); that many bytes after
// the DCID are XORed with mask bytes 1..4. Mask byte 0 is the first byte of the
// AES output. The pp_key and IV of the key phase are then presented with
// `keys_valid_out`, aligned with the first QUIC word at the output.
//
// Timing: DELAY = 24 cycles. The first QUIC byte is 10 words ahead of the last
// sample byte and the mask takes 10 cycles, so it must wait at least 22 cycles;
// the document's table lists 14 register stages for this module, which would not
// leave the mask enough time in this arrangement. Output is registered.
// The secrets move to a second register set when the mask is ready, so the
// next packet may load new secrets while this one is still in the delay line.
// A 1-RTT packet long enough to be sampled makes a frame of at least 21 words,
// which keeps the mask of one packet ready before that of the next starts.
module header_protection
  import quic_pkg::*;
#(
  parameter int unsigned DELAY = 24
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [DW-1:0] in_data,
  input  meta_t         in_meta,
  input  logic          keys_valid_in,
  input  logic [127:0]  hp_key,
  input  logic [127:0]  pp_key0,
  input  logic [95:0]   iv0,
  input  logic [127:0]  pp_key1,
  input  logic [95:0]   iv1,
  output logic [DW-1:0] out_data,
  output meta_t         out_meta,
  output logic          keys_valid_out,
  output logic [127:0]  pp_key,
  output logic [95:0]   iv
);

  localparam int unsigned PN_OFF     = 1 + DCID_LEN;        // 21
  localparam int unsigned SAMPLE_OFF = PN_OFF + 4;          // 25

  // ------------------------------------------------------------ input side
  logic [127:0] hp_key_q, pp_key0_q, pp_key1_q;
  logic [95:0]  iv0_q, iv1_q;
  logic         active_q;
  logic [10:0]  qcnt_q;
  logic [127:0] sample_q, sample_n;
  logic         sample_last;
  logic [10:0]  qidx;

  always_comb begin
    sample_n    = sample_q;
    sample_last = 1'b0;
    for (int i = 0; i < NB; i++) begin
      qidx = qcnt_q + 11'(quic_before(in_meta, i));
      if (in_meta.valid && in_meta.proto[i] == P_QUIC &&
          qidx >= 11'(SAMPLE_OFF) && qidx < 11'(SAMPLE_OFF + 16)) begin
        sample_n[127 - 8*(qidx - 11'(SAMPLE_OFF)) -: 8] = in_data[8*i +: 8];
        if (qidx == 11'(SAMPLE_OFF + 15)) sample_last = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hp_key_q  <= '0; pp_key0_q <= '0; pp_key1_q <= '0;
      iv0_q     <= '0; iv1_q     <= '0;
      active_q  <= 1'b0;
      qcnt_q    <= '0;
      sample_q  <= '0;
    end else begin
      if (keys_valid_in) begin
        hp_key_q  <= hp_key;
        pp_key0_q <= pp_key0;
        iv0_q     <= iv0;
        pp_key1_q <= pp_key1;
        iv1_q     <= iv1;
        active_q  <= 1'b1;
      end
      if (in_meta.valid) begin
        sample_q <= sample_n;
        qcnt_q   <= in_meta.last ? '0 : qcnt_q + 11'(quic_before(in_meta, NB));
        if (in_meta.last) active_q <= 1'b0;
      end
    end
  end

  // ------------------------------------------------------------------ mask
  logic         aes_start, aes_busy, aes_done;
  logic [127:0] aes_out, mask_q;
  logic         mask_v_q;
  logic [127:0] opp0_q, opp1_q;   // packet secrets, handed over with the mask
  logic [95:0]  oiv0_q, oiv1_q;

  assign aes_start = sample_last && (active_q || keys_valid_in);

  aes_iterative u_aes (
    .clk(clk), .rst_n(rst_n), .start(aes_start),
    .key(keys_valid_in ? hp_key : hp_key_q), .din(sample_n),
    .busy(aes_busy), .done(aes_done), .dout(aes_out));

  // --------------------------------------------------------- output side
  logic [DW-1:0] dl_data;
  meta_t         dl_meta;

  delay_line #(.W(DW + $bits(meta_t)), .DEPTH(DELAY - 1)) u_delay (
    .clk(clk), .rst_n(rst_n), .din({in_data, in_meta}), .dout({dl_data, dl_meta}));

  logic [10:0]   oqcnt_q;
  logic [2:0]    pnlen_q;
  logic [DW-1:0] data_n;
  logic          first_n, kp_n;
  logic [2:0]    pnlen_n;
  logic [10:0]   oqidx;
  logic [7:0]    b;

  always_comb begin
    data_n  = dl_data;
    first_n = 1'b0;
    kp_n    = 1'b0;
    pnlen_n = pnlen_q;
    for (int i = 0; i < NB; i++) begin
      oqidx = oqcnt_q + 11'(quic_before(dl_meta, i));
      b     = dl_data[8*i +: 8];
      if (dl_meta.valid && dl_meta.proto[i] == P_QUIC && mask_v_q) begin
        if (oqidx == 11'd0) begin
          b       = b ^ {3'b000, mask_q[124:120]};
          first_n = 1'b1;
          kp_n    = b[2];
          pnlen_n = {1'b0, b[1:0]} + 3'd1;
        end else if (oqidx >= 11'(PN_OFF) && oqidx < 11'(PN_OFF) + 11'(pnlen_n)) begin
          b = b ^ mask_q[119 - 8*(oqidx - 11'(PN_OFF)) -: 8];
        end
      end
      data_n[8*i +: 8] = b;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      oqcnt_q        <= '0;
      pnlen_q        <= 3'd1;
      mask_q         <= '0;
      mask_v_q       <= 1'b0;
      opp0_q         <= '0;
      opp1_q         <= '0;
      oiv0_q         <= '0;
      oiv1_q         <= '0;
      out_data       <= '0;
      out_meta       <= '0;
      keys_valid_out <= 1'b0;
      pp_key         <= '0;
      iv             <= '0;
    end else begin
      if (aes_done) begin
        mask_q   <= aes_out;
        mask_v_q <= 1'b1;
        opp0_q   <= pp_key0_q;
        opp1_q   <= pp_key1_q;
        oiv0_q   <= iv0_q;
        oiv1_q   <= iv1_q;
      end
      if (dl_meta.valid) begin
        oqcnt_q <= dl_meta.last ? '0 : oqcnt_q + 11'(quic_before(dl_meta, NB));
        pnlen_q <= pnlen_n;
        if (dl_meta.last && !aes_done) mask_v_q <= 1'b0;
      end
      out_data       <= data_n;
      out_meta       <= dl_meta;
      keys_valid_out <= first_n;
      if (first_n) begin
        pp_key <= kp_n ? opp1_q : opp0_q;
        iv     <= kp_n ? oiv1_q : oiv0_q;
      end
    end
  end

endmodule
