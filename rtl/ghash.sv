// ghash: GHASH accumulator of AES-GCM (NIST SP 800-38D) with a two-cycle
// multiplier (MALU).
//
// The state machine follows the document: INIT holds a cleared state; a block
// arriving with `ce` loads the MALU operand X = Y xor din and enters CALCULATE.
// The MALU multiplies X by the hash subkey H in GF(2^128) using the bit-serial
// shift-and-add method, 64 bits of X per cycle: in the second cycle X has been
// shifted left by 64 bits. When it finishes, Y is written and the machine waits
// in WAITING for the next block, whose operand is again Y xor din. A `start`
// pulse returns to INIT and clears Y for a new AEAD operation.
//
// Timing: `ce` in cycle t gives the updated `y` from cycle t+3. A new block may
// be given every 3 cycles; the AES-GCM engine gives one at most every 4.
module ghash (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [127:0] h,
  input  logic         start,
  input  logic         ce,
  input  logic [127:0] din,
  output logic [127:0] y,
  output logic         busy
);

  typedef enum logic [1:0] {INIT, CALCULATE, WAITING} state_e;

  localparam logic [127:0] R = {8'he1, 120'd0};

  state_e       state_q;
  logic         half_q;
  logic [127:0] x_q, z_q, v_q;
  logic [127:0] z_n, v_n;

  // 64 steps of the shift-and-add multiplication
  always_comb begin
    z_n = z_q;
    v_n = v_q;
    for (int i = 0; i < 64; i++) begin
      if (x_q[127-i]) z_n = z_n ^ v_n;
      v_n = v_n[0] ? ((v_n >> 1) ^ R) : (v_n >> 1);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= INIT;
      half_q  <= 1'b0;
      x_q     <= '0;
      z_q     <= '0;
      v_q     <= '0;
      y       <= '0;
    end else if (start) begin
      state_q <= INIT;
      y       <= '0;
    end else begin
      unique case (state_q)
        INIT, WAITING: if (ce) begin
          x_q     <= (state_q == INIT) ? din : (y ^ din);
          z_q     <= '0;
          v_q     <= h;
          half_q  <= 1'b0;
          state_q <= CALCULATE;
        end
        CALCULATE: begin
          if (!half_q) begin
            z_q    <= z_n;
            v_q    <= v_n;
            x_q    <= x_q << 64;
            half_q <= 1'b1;
          end else begin
            y       <= z_n;
            state_q <= WAITING;
          end
        end
        default: state_q <= INIT;
      endcase
    end
  end

  assign busy = (state_q == CALCULATE);

endmodule
