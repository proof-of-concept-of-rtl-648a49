// key_memory: stores the connection secrets and fetches those of a packet.
//
// One 128-bit wide memory of 2^AW words. A connection occupies five words from
// its base address: hp_key, pp_key0, iv0, pp_key1, iv1 (IVs in the upper 96 bits,
// lower 32 bits zero). When `address_valid` pulses, the base address is taken
// and the five words are read in five consecutive cycles, the address going up
// by one each cycle, into five registers. Single words are written from the
// controller (`wr_en`), so one secret of a connection can be changed alone.
//
// Data and metadata pass through a 6-cycle delay line, the document's latency:
// `address_valid` comes with the word holding the first QUIC byte, the last
// read word is registered 5 cycles later, and `keys_valid` pulses together with
// that same word at the output. The key registers hold their values until the
// next fetch. The memory is not reset; only written words are ever fetched.
module key_memory
  import quic_pkg::*;
#(
  parameter int unsigned AW = KEY_AW
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [DW-1:0] in_data,
  input  meta_t         in_meta,
  input  logic          address_valid,
  input  logic [AW-1:0] address,
  output logic [DW-1:0] out_data,
  output meta_t         out_meta,
  output logic          keys_valid,
  output logic [127:0]  hp_key,
  output logic [127:0]  pp_key0,
  output logic [95:0]   iv0,
  output logic [127:0]  pp_key1,
  output logic [95:0]   iv1,
  // controller
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  logic [127:0]  wr_data
);

  localparam int unsigned NKEYS = 5;
  localparam int unsigned DELAY = NKEYS + 1;

  logic [127:0]  mem [2**AW];
  logic [127:0]  rdata_q;
  logic [AW-1:0] base_q, rd_addr;
  logic [2:0]    cnt_q;            // words requested so far, 0 when idle
  logic [2:0]    cap_q;            // index of the word in rdata_q
  logic          cap_v_q;

  assign rd_addr = address_valid ? address : base_q + AW'(cnt_q);

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    rdata_q <= mem[rd_addr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      base_q     <= '0;
      cnt_q      <= '0;
      cap_q      <= '0;
      cap_v_q    <= 1'b0;
      keys_valid <= 1'b0;
      hp_key     <= '0;
      pp_key0    <= '0;
      iv0        <= '0;
      pp_key1    <= '0;
      iv1        <= '0;
    end else begin
      // address sequencing
      if (address_valid) begin
        base_q <= address;
        cnt_q  <= 3'd1;
      end else if (cnt_q != 3'd0) begin
        cnt_q <= (cnt_q == 3'(NKEYS - 1)) ? 3'd0 : cnt_q + 3'd1;
      end
      cap_v_q <= address_valid || (cnt_q != 3'd0);
      cap_q   <= address_valid ? 3'd0 : cnt_q;
      // capture of the read words
      keys_valid <= 1'b0;
      if (cap_v_q) begin
        unique case (cap_q)
          3'd0: hp_key  <= rdata_q;
          3'd1: pp_key0 <= rdata_q;
          3'd2: iv0     <= rdata_q[127:32];
          3'd3: pp_key1 <= rdata_q;
          default: begin
            iv1        <= rdata_q[127:32];
            keys_valid <= 1'b1;
          end
        endcase
      end
    end
  end

  delay_line #(.W(DW + $bits(meta_t)), .DEPTH(DELAY)) u_delay (
    .clk(clk), .rst_n(rst_n), .din({in_data, in_meta}), .dout({out_data, out_meta}));

endmodule
