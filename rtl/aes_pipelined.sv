// aes_pipelined: fully unrolled AES-128 encryption, one block per cycle.
//
// The initial AddRoundKey and round 1 form the first stage; rounds 2..9 follow,
// each with a register for the state and for its round key, and each computing
// its own round key from the previous one with the round constant fixed by its
// position. The final round (without MixColumns) is combinational after the
// ninth register. An optional side value travels with each block.
//
// Timing: a block presented with `in_valid` in cycle t appears on `dout` with
// `out_valid` in cycle t+9 (the document's 9-cycle latency). Throughput is one
// block per cycle. The structure (round modules with their own key generator)
// follows the document; the placement of the registers is this design's choice.
module aes_pipelined
  import aes_pkg::*;
#(
  parameter int unsigned SIDE_W = 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic [127:0]      key,
  input  logic [127:0]      din,
  input  logic [SIDE_W-1:0] in_side,
  output logic              out_valid,
  output logic [127:0]      dout,
  output logic [SIDE_W-1:0] out_side
);

  localparam int unsigned STAGES = 9;

  logic [127:0]      st_q   [1:STAGES];
  logic [127:0]      key_q  [1:STAGES];
  logic [SIDE_W-1:0] side_q [1:STAGES];
  logic [STAGES:1]   vld_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vld_q <= '0;
    else        vld_q <= {vld_q[STAGES-1:1], in_valid};
  end

  always_ff @(posedge clk) begin
    key_q[1]  <= next_key(key, rcon(1));
    st_q[1]   <= aes_round(din ^ key, next_key(key, rcon(1)));
    side_q[1] <= in_side;
    for (int i = 2; i <= STAGES; i++) begin
      key_q[i]  <= next_key(key_q[i-1], rcon(i));
      st_q[i]   <= aes_round(st_q[i-1], next_key(key_q[i-1], rcon(i)));
      side_q[i] <= side_q[i-1];
    end
  end

  assign out_valid = vld_q[STAGES];
  assign dout      = aes_last_round(st_q[STAGES], next_key(key_q[STAGES], rcon(10)));
  assign out_side  = side_q[STAGES];

endmodule
