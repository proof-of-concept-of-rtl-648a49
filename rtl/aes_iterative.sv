// aes_iterative: AES-128 encryption with a single round in hardware.
//
// Used by the header protection stage to compute the AES_128_ECB mask. One
// round and one key-schedule step exist in hardware. On `start` their inputs
// are the block XORed with the key and the key itself (round 1); in the next
// nine cycles they are the state and round-key registers (rounds 2..10, the last
// without MixColumns). After the tenth round `done` pulses for one cycle and
// `dout` holds the ciphertext until the next `start`.
//
// Timing: `start` in cycle t gives `done` in cycle t+10, as the document states
// for its mask computation. A `start` while busy restarts the computation. The
// document uses an existing iterative core; this one is written from FIPS-197.
module aes_iterative
  import aes_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [127:0] key,
  input  logic [127:0] din,
  output logic         busy,
  output logic         done,
  output logic [127:0] dout
);

  logic [127:0] state_q, rk_q;
  logic [7:0]   rc_q;
  logic [3:0]   round_q;
  logic [127:0] st_in, rk_in, rk_next, full_round, last_round;
  logic [7:0]   rc_in;

  // Shared round datapath
  assign st_in      = start ? (din ^ key) : state_q;
  assign rk_in      = start ? key : rk_q;
  assign rc_in      = start ? 8'h01 : rc_q;
  assign rk_next    = next_key(rk_in, rc_in);
  assign full_round = aes_round(st_in, rk_next);
  assign last_round = aes_last_round(st_in, rk_next);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= '0;
      rk_q    <= '0;
      rc_q    <= 8'h01;
      round_q <= '0;
      busy    <= 1'b0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start || busy) begin
        rk_q    <= rk_next;
        rc_q    <= xtime(rc_in);
        round_q <= start ? 4'd2 : round_q + 4'd1;
        if (!start && round_q == 4'd10) begin
          state_q <= last_round;
          busy    <= 1'b0;
          done    <= 1'b1;
        end else begin
          state_q <= full_round;
          busy    <= 1'b1;
        end
      end
    end
  end

  assign dout = state_q;

endmodule
