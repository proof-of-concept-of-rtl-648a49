// xoodoo_hash: hashes a 160-bit DCID into a memory address with the Xoodoo
// permutation (12 rounds on a 384-bit state of 3 planes x 4 lanes x 32 bits).
//
// The DCID bytes are loaded into bytes 0..19 of the state (byte k in lane k/4,
// bits 8*(k%4)+7:8*(k%4), lanes numbered plane by plane), followed by a 0x01
// padding byte; the rest is zero. After the permutation the low OUT_W bits of
// lane 0 are the address. The twelve rounds are split over STAGES registered
// stages, so a new DCID can enter every cycle.
//
// Timing: `in_valid` in cycle t gives `out_valid` and `hash` in cycle t+STAGES.
// The document names Xoodoo as the hash of its DCID memory and does not give the
// absorbing, padding or output selection; those are this design's choices.
module xoodoo_hash #(
  parameter int unsigned STAGES = 4,     // 12 must be a multiple of STAGES
  parameter int unsigned OUT_W  = 10
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [159:0]     dcid,       // DCID byte 0 in bits 159:152
  output logic             out_valid,
  output logic [OUT_W-1:0] hash
);

  localparam int unsigned RPS = 12 / STAGES;

  typedef logic [31:0] lane_t;
  typedef lane_t [11:0] xstate_t;      // lane 4*y+x

  function automatic lane_t rotl(input lane_t v, input int unsigned n);
    return (v << n) | (v >> (32 - n));
  endfunction

  function automatic logic [11:0] rc(input int unsigned r);
    case (r)
      0: return 12'h058;  1: return 12'h038;  2: return 12'h3c0;  3: return 12'h0d0;
      4: return 12'h120;  5: return 12'h014;  6: return 12'h060;  7: return 12'h02c;
      8: return 12'h380;  9: return 12'h0f0; 10: return 12'h1a0; default: return 12'h012;
    endcase
  endfunction

  function automatic xstate_t xround(input xstate_t a, input logic [11:0] c);
    lane_t p [4];
    lane_t e [4];
    xstate_t b, t;
    // theta
    for (int x = 0; x < 4; x++) p[x] = a[x] ^ a[4+x] ^ a[8+x];
    for (int x = 0; x < 4; x++) e[x] = rotl(p[(x+3)%4], 5) ^ rotl(p[(x+3)%4], 14);
    for (int y = 0; y < 3; y++) for (int x = 0; x < 4; x++) a[4*y+x] = a[4*y+x] ^ e[x];
    // rho-west
    t = a;
    for (int x = 0; x < 4; x++) begin
      a[4+x] = t[4+(x+3)%4];
      a[8+x] = rotl(t[8+x], 11);
    end
    // iota
    a[0] = a[0] ^ {20'd0, c};
    // chi
    for (int x = 0; x < 4; x++) begin
      b[x]   = ~a[4+x] & a[8+x];
      b[4+x] = ~a[8+x] & a[x];
      b[8+x] = ~a[x]   & a[4+x];
    end
    for (int i = 0; i < 12; i++) a[i] = a[i] ^ b[i];
    // rho-east
    t = a;
    for (int x = 0; x < 4; x++) begin
      a[4+x] = rotl(t[4+x], 1);
      a[8+x] = rotl(t[8+(x+2)%4], 8);
    end
    return a;
  endfunction

  xstate_t init_st;
  always_comb begin
    init_st = '0;
    for (int k = 0; k < 20; k++) init_st[k/4][8*(k%4) +: 8] = dcid[159-8*k -: 8];
    init_st[5][7:0] = 8'h01;
  end

  xstate_t        st_q [STAGES];
  logic [STAGES-1:0] vld_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vld_q <= '0;
    else        vld_q <= {vld_q[STAGES-2:0], in_valid};
  end

  always_ff @(posedge clk) begin
    for (int s = 0; s < STAGES; s++) begin
      xstate_t v;
      v = (s == 0) ? init_st : st_q[s == 0 ? 0 : s-1];
      for (int r = 0; r < RPS; r++) v = xround(v, rc(s * RPS + r));
      st_q[s] <= v;
    end
  end

  assign out_valid = vld_q[STAGES-1];
  assign hash      = st_q[STAGES-1][0][OUT_W-1:0];

endmodule
