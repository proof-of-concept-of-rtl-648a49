// dcid_lookup: finds the key base address of the connection a packet belongs to.
//
// The 20 bytes flagged as DCID by the parser are collected; when the last one
// arrives the DCID is hashed (xoodoo_hash) and the hash addresses a memory whose
// entry is the base address of the connection's secrets in the key memory. An
// entry of zero means "no connection". Writes from the controller go through a
// second hash instance: `wr_en` stores `wr_addr` at the DCID's entry, `clr_en`
// stores zero. The DCID itself is not stored, so two DCIDs with the same hash
// share an entry. After reset the memory is cleared one entry per cycle
// (`init_done` rises after 2^CAM_AW cycles); writes before that are ignored.
//
// Data and metadata pass through a DELAY-cycle delay line. When the word that
// holds the first QUIC byte leaves it, `address_valid` pulses with `address` if
// the lookup hit. If it missed (or the frame was too short to hold a DCID), the
// QUIC bytes of that frame leave re-marked "unknown" so later stages ignore
// them; on a hit the metadata is unchanged.
//
// Timing: the last DCID byte is 5 words after the first QUIC byte; hashing takes
// 4 cycles and the memory read 1, so DELAY = 5 + 4 + 2 = 11 cycles, the
// document's latency. Memory size (2^CAM_AW entries) is this design's choice.
module dcid_lookup
  import quic_pkg::*;
#(
  parameter int unsigned CAM_AW = 10,
  parameter int unsigned AW     = KEY_AW
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic [DW-1:0]  in_data,
  input  meta_t          in_meta,
  output logic [DW-1:0]  out_data,
  output meta_t          out_meta,
  output logic           address_valid,
  output logic [AW-1:0]  address,
  // controller
  input  logic           wr_en,
  input  logic           clr_en,
  input  logic [159:0]   wr_dcid,
  input  logic [AW-1:0]  wr_addr,
  output logic           init_done
);

  localparam int unsigned HASH_STAGES = 4;
  localparam int unsigned DCID_SPAN   = (DCID_LEN + 1) / NB;   // words from first QUIC byte to last DCID byte
  localparam int unsigned DELAY       = DCID_SPAN + HASH_STAGES + 2;

  // ------------------------------------------------------------ DCID capture
  logic [159:0] dcid_q, dcid_n;
  logic [4:0]   dcnt_q, dcnt_n;
  logic         lookup_go;

  always_comb begin
    dcid_n = dcid_q;
    dcnt_n = dcnt_q;
    for (int i = 0; i < NB; i++)
      if (in_meta.valid && in_meta.dcid[i] && dcnt_n < 5'(DCID_LEN)) begin
        dcid_n = {dcid_n[151:0], in_data[8*i +: 8]};
        dcnt_n = dcnt_n + 5'd1;
      end
    lookup_go = (dcnt_q < 5'(DCID_LEN)) && (dcnt_n == 5'(DCID_LEN));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dcid_q <= '0;
      dcnt_q <= '0;
    end else if (in_meta.valid) begin
      dcid_q <= dcid_n;
      dcnt_q <= in_meta.last ? 5'd0 : dcnt_n;
    end
  end

  // ---------------------------------------------------------------- hashing
  logic              lk_hv, wr_hv;
  logic [CAM_AW-1:0] lk_hash, wr_hash;

  xoodoo_hash #(.STAGES(HASH_STAGES), .OUT_W(CAM_AW)) u_hash_lookup (
    .clk(clk), .rst_n(rst_n), .in_valid(lookup_go), .dcid(dcid_n),
    .out_valid(lk_hv), .hash(lk_hash));

  // write path: the command and its value travel beside the hash
  logic [HASH_STAGES-1:0] wclr_d;
  logic [AW-1:0]          waddr_d [HASH_STAGES];

  always_ff @(posedge clk) begin
    wclr_d[0]  <= clr_en;
    waddr_d[0] <= wr_addr;
    for (int i = 1; i < HASH_STAGES; i++) begin
      wclr_d[i]  <= wclr_d[i-1];
      waddr_d[i] <= waddr_d[i-1];
    end
  end

  xoodoo_hash #(.STAGES(HASH_STAGES), .OUT_W(CAM_AW)) u_hash_write (
    .clk(clk), .rst_n(rst_n), .in_valid((wr_en || clr_en) && init_done), .dcid(wr_dcid),
    .out_valid(wr_hv), .hash(wr_hash));

  // ----------------------------------------------------------------- memory
  logic [AW-1:0]     mem [2**CAM_AW];
  logic [CAM_AW-1:0] init_addr_q;
  logic              init_q;
  logic [AW-1:0]     rd_q;
  logic              rd_valid_q;

  assign init_done = !init_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      init_q      <= 1'b1;
      init_addr_q <= '0;
    end else if (init_q) begin
      init_addr_q <= init_addr_q + 1'b1;
      if (init_addr_q == '1) init_q <= 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (init_q)     mem[init_addr_q] <= '0;
    else if (wr_hv) mem[wr_hash] <= wclr_d[HASH_STAGES-1] ? '0 : waddr_d[HASH_STAGES-1];
    rd_q <= mem[lk_hash];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rd_valid_q <= 1'b0;
    else        rd_valid_q <= lk_hv && !init_q;
  end

  // ------------------------------------------------------------ delay line
  logic [DW-1:0] dl_data;
  meta_t         dl_meta;

  delay_line #(.W(DW + $bits(meta_t)), .DEPTH(DELAY)) u_delay (
    .clk(clk), .rst_n(rst_n), .din({in_data, in_meta}), .dout({dl_data, dl_meta}));

  // ------------------------------------------------------------ output side
  logic          res_pend_q, res_hit_q;
  logic [AW-1:0] res_addr_q;
  logic          seen_q, hit_q;       // output frame: QUIC seen, lookup hit
  logic          first_quic, has_quic, hit_now;

  always_comb begin
    has_quic = 1'b0;
    for (int i = 0; i < NB; i++)
      if (dl_meta.valid && dl_meta.proto[i] == P_QUIC) has_quic = 1'b1;
    first_quic = has_quic && !seen_q;
    hit_now    = first_quic ? (res_pend_q && res_hit_q) : hit_q;

    out_data      = dl_data;
    out_meta      = dl_meta;
    address_valid = first_quic && hit_now;
    address       = res_addr_q;
    for (int i = 0; i < NB; i++)
      if (dl_meta.valid && dl_meta.proto[i] == P_QUIC && !hit_now) out_meta.proto[i] = P_UNKNOWN;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      res_pend_q <= 1'b0;
      res_hit_q  <= 1'b0;
      res_addr_q <= '0;
      seen_q     <= 1'b0;
      hit_q      <= 1'b0;
    end else begin
      if (first_quic) res_pend_q <= 1'b0;
      if (rd_valid_q) begin
        res_pend_q <= 1'b1;
        res_hit_q  <= (rd_q != '0);
        res_addr_q <= rd_q;
      end
      if (dl_meta.valid) begin
        if (dl_meta.last) begin
          seen_q <= 1'b0;
          hit_q  <= 1'b0;
        end else if (first_quic) begin
          seen_q <= 1'b1;
          hit_q  <= hit_now;
        end
      end
    end
  end

endmodule
