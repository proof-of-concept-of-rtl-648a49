// aesgcm_pipelined: command-driven AEAD_AES_128_GCM engine.
//
// Two stages: encryption (aes_pipelined, 9 cycles) and authentication (ghash,
// 4 cycles). The input block, mask and command travel through delay registers
// beside the AES pipeline and then beside the GHASH stage, so every result leaves
// 13 cycles after its command. Commands (quic_pkg::gcm_cmd_e):
//   S   encrypt 128 zero bits with `key`; the result is the hash subkey H and the
//       GHASH state is cleared. The block counter is set to 1.
//   A   associated data: `din & mask` goes to GHASH and is returned unchanged.
//   AD  decrypt: the counter is incremented and nonce||counter is encrypted; the
//       output is (din xor keystream) & mask, GHASH absorbs din & mask.
//   AE  encrypt: as AD, but GHASH absorbs the produced ciphertext.
//   F   finish: `din` is the len(A)||len(C) block; nonce||1 (J0) is encrypted and
//       the output is that keystream xor the final GHASH value: the tag.
// `mask` pads partial blocks with zeros (bitwise AND), as in the document.
//
// Timing: commands may follow every 4 cycles, except that A may follow S
// directly; the GHASH multiplier sets this rate. `key` and `nonce` are sampled
// with each command. For F the document mentions the nonce followed by 32 zero
// bits; this design uses J0 = nonce||1 as GCM defines, so tags are standard.
module aesgcm_pipelined
  import quic_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  gcm_cmd_e     cmd,
  input  logic [127:0] key,
  input  logic [95:0]  nonce,
  input  logic [127:0] din,
  input  logic [127:0] mask,
  output logic         out_valid,
  output gcm_cmd_e     out_cmd,
  output logic [127:0] dout
);

  localparam int unsigned AUTH_STAGES = 4;

  typedef struct packed {
    gcm_cmd_e     cmd;
    logic [127:0] data;
    logic [127:0] mask;
  } side_t;

  logic [31:0]  ctr_q;
  logic [127:0] aes_in;
  logic         aes_in_valid;
  side_t        side_in, side_e;
  logic         aes_out_valid;
  logic [127:0] ks_e;           // keystream at the authentication stage
  logic [127:0] h_q;
  logic [127:0] ghash_y;
  logic         ghash_busy;
  logic         ghash_start, ghash_ce;
  logic [127:0] ghash_din, res_e;

  // ---------------------------------------------------------------- encryption
  always_comb begin
    aes_in = '0;
    unique case (cmd)
      GCM_AD, GCM_AE: aes_in = {nonce, ctr_q + 32'd1};
      GCM_F:          aes_in = {nonce, 32'd1};
      default:        aes_in = '0;   // S encrypts the zero block, A is unused
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ctr_q <= 32'd1;
    else if (cmd == GCM_S) ctr_q <= 32'd1;
    else if (cmd == GCM_AD || cmd == GCM_AE) ctr_q <= ctr_q + 32'd1;
  end

  assign aes_in_valid = (cmd != GCM_NONE);
  assign side_in      = '{cmd: cmd, data: din & mask, mask: mask};

  aes_pipelined #(.SIDE_W($bits(side_t))) u_aes (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (aes_in_valid),
    .key      (key),
    .din      (aes_in),
    .in_side  (side_in),
    .out_valid(aes_out_valid),
    .dout     (ks_e),
    .out_side (side_e)
  );

  // ------------------------------------------------------------ authentication
  always_comb begin
    res_e       = side_e.data;
    ghash_din   = side_e.data;
    ghash_start = 1'b0;
    ghash_ce    = 1'b0;
    if (aes_out_valid) begin
      unique case (side_e.cmd)
        GCM_S:  ghash_start = 1'b1;
        GCM_A:  ghash_ce = 1'b1;
        GCM_AD: begin
          ghash_ce = 1'b1;
          res_e    = (side_e.data ^ ks_e) & side_e.mask;
        end
        GCM_AE: begin
          ghash_ce  = 1'b1;
          res_e     = (side_e.data ^ ks_e) & side_e.mask;
          ghash_din = res_e;
        end
        GCM_F:  ghash_ce = 1'b1;
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) h_q <= '0;
    else if (aes_out_valid && side_e.cmd == GCM_S) h_q <= ks_e;
  end

  ghash u_ghash (
    .clk  (clk),
    .rst_n(rst_n),
    .h    (h_q),
    .start(ghash_start),
    .ce   (ghash_ce),
    .din  (ghash_din),
    .y    (ghash_y),
    .busy (ghash_busy)
  );

  // Delay the results by the GHASH time
  gcm_cmd_e     cmd_d [AUTH_STAGES];
  logic [127:0] res_d [AUTH_STAGES];
  logic [127:0] ks_d  [AUTH_STAGES];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < AUTH_STAGES; i++) cmd_d[i] <= GCM_NONE;
    end else begin
      cmd_d[0] <= aes_out_valid ? side_e.cmd : GCM_NONE;
      for (int i = 1; i < AUTH_STAGES; i++) cmd_d[i] <= cmd_d[i-1];
    end
  end

  always_ff @(posedge clk) begin
    res_d[0] <= res_e;
    ks_d[0]  <= ks_e;
    for (int i = 1; i < AUTH_STAGES; i++) begin
      res_d[i] <= res_d[i-1];
      ks_d[i]  <= ks_d[i-1];
    end
  end

  assign out_cmd   = cmd_d[AUTH_STAGES-1];
  assign out_valid = (out_cmd != GCM_NONE);
  assign dout      = (out_cmd == GCM_F) ? (ks_d[AUTH_STAGES-1] ^ ghash_y)
                                        : res_d[AUTH_STAGES-1];

`ifndef SYNTHESIS
  // A block must not reach GHASH while the multiplier is still busy
  assert property (@(posedge clk) disable iff (!rst_n) ghash_ce |-> !ghash_busy)
    else $error("aesgcm_pipelined: commands closer than the GHASH rate");
`endif

endmodule
