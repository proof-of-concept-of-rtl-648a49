// quic_decrypt_top: in-line decryption of 1-RTT QUIC packets between an
// Ethernet AXI4-Stream source and the processing-system side sink.
//
// Every frame flows through five stages, each a delay line with logic beside it:
//   stream_parser      (1 cycle)  byte protocol and DCID flags
//   dcid_lookup        (11)       DCID -> key base address, non-matches -> "unknown"
//   key_memory         (6)        fetches hp_key, pp_key0, iv0, pp_key1, iv1
//   header_protection  (24)       AES-ECB mask, unmasks first byte and packet number
//   payload_protection (32)       AES-128-GCM decryption, tag check, tag zeroed on failure
// Frames that do not carry a 1-RTT packet of a known connection leave unchanged.
// axil_controller loads the DCID memory and the key memory and exposes the
// failed-authentication counter. The latency is 74 cycles for every byte.
//
// The pipeline never stalls: s_axis_tready is always 1 and m_axis_tready is
// not used, so the sink must accept one word per cycle, and a frame must arrive
// without gaps in TVALID. TSTRB, TLAST and TVALID pass through. Byte 0 of a frame
// is in TDATA[7:0].
module quic_decrypt_top
  import quic_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // Ethernet side, AXI4-Stream slave
  input  logic [DW-1:0]     s_axis_tdata,
  input  logic [NB-1:0]     s_axis_tstrb,
  input  logic              s_axis_tlast,
  input  logic              s_axis_tvalid,
  output logic              s_axis_tready,
  // processing-system side, AXI4-Stream master
  output logic [DW-1:0]     m_axis_tdata,
  output logic [NB-1:0]     m_axis_tstrb,
  output logic              m_axis_tlast,
  output logic              m_axis_tvalid,
  input  logic              m_axis_tready,
  // control, AXI4-Lite slave
  input  logic [7:0]        s_axil_awaddr,
  input  logic              s_axil_awvalid,
  output logic              s_axil_awready,
  input  logic [31:0]       s_axil_wdata,
  input  logic [3:0]        s_axil_wstrb,
  input  logic              s_axil_wvalid,
  output logic              s_axil_wready,
  output logic [1:0]        s_axil_bresp,
  output logic              s_axil_bvalid,
  input  logic              s_axil_bready,
  input  logic [7:0]        s_axil_araddr,
  input  logic              s_axil_arvalid,
  output logic              s_axil_arready,
  output logic [31:0]       s_axil_rdata,
  output logic [1:0]        s_axil_rresp,
  output logic              s_axil_rvalid,
  input  logic              s_axil_rready,
  // status
  output logic              init_done,
  output logic [31:0]       auth_fail_count,
  output logic              underrun
);

  logic [DW-1:0] p_data, l_data, k_data, h_data, o_data;
  meta_t         p_meta, l_meta, k_meta, h_meta, o_meta;

  logic              dcid_wr, dcid_clr, key_wr;
  logic [159:0]      dcid;
  logic [KEY_AW-1:0] dcid_addr, key_addr;
  logic [127:0]      key_data;

  logic              addr_valid;
  logic [KEY_AW-1:0] addr;
  logic              km_valid;
  logic [127:0]      hp_key, pp_key0, pp_key1;
  logic [95:0]       iv0, iv1;
  logic              hp_valid;
  logic [127:0]      pp_key;
  logic [95:0]       iv;

  assign s_axis_tready = 1'b1;

  stream_parser u_parser (
    .clk(clk), .rst_n(rst_n),
    .s_tdata(s_axis_tdata), .s_tstrb(s_axis_tstrb), .s_tlast(s_axis_tlast), .s_tvalid(s_axis_tvalid),
    .m_data(p_data), .m_meta(p_meta));

  dcid_lookup u_lookup (
    .clk(clk), .rst_n(rst_n),
    .in_data(p_data), .in_meta(p_meta), .out_data(l_data), .out_meta(l_meta),
    .address_valid(addr_valid), .address(addr),
    .wr_en(dcid_wr), .clr_en(dcid_clr), .wr_dcid(dcid), .wr_addr(dcid_addr),
    .init_done(init_done));

  key_memory u_keys (
    .clk(clk), .rst_n(rst_n),
    .in_data(l_data), .in_meta(l_meta), .address_valid(addr_valid), .address(addr),
    .out_data(k_data), .out_meta(k_meta), .keys_valid(km_valid),
    .hp_key(hp_key), .pp_key0(pp_key0), .iv0(iv0), .pp_key1(pp_key1), .iv1(iv1),
    .wr_en(key_wr), .wr_addr(key_addr), .wr_data(key_data));

  header_protection u_hp (
    .clk(clk), .rst_n(rst_n),
    .in_data(k_data), .in_meta(k_meta), .keys_valid_in(km_valid),
    .hp_key(hp_key), .pp_key0(pp_key0), .iv0(iv0), .pp_key1(pp_key1), .iv1(iv1),
    .out_data(h_data), .out_meta(h_meta), .keys_valid_out(hp_valid), .pp_key(pp_key), .iv(iv));

  payload_protection u_pp (
    .clk(clk), .rst_n(rst_n),
    .in_data(h_data), .in_meta(h_meta), .keys_valid(hp_valid), .pp_key(pp_key), .iv(iv),
    .out_data(o_data), .out_meta(o_meta), .auth_fail_count(auth_fail_count), .underrun(underrun));

  axil_controller u_ctrl (
    .clk(clk), .rst_n(rst_n),
    .s_axil_awaddr(s_axil_awaddr), .s_axil_awvalid(s_axil_awvalid), .s_axil_awready(s_axil_awready),
    .s_axil_wdata(s_axil_wdata), .s_axil_wstrb(s_axil_wstrb), .s_axil_wvalid(s_axil_wvalid),
    .s_axil_wready(s_axil_wready), .s_axil_bresp(s_axil_bresp), .s_axil_bvalid(s_axil_bvalid),
    .s_axil_bready(s_axil_bready), .s_axil_araddr(s_axil_araddr), .s_axil_arvalid(s_axil_arvalid),
    .s_axil_arready(s_axil_arready), .s_axil_rdata(s_axil_rdata), .s_axil_rresp(s_axil_rresp),
    .s_axil_rvalid(s_axil_rvalid), .s_axil_rready(s_axil_rready),
    .dcid_wr(dcid_wr), .dcid_clr(dcid_clr), .dcid(dcid), .dcid_addr(dcid_addr),
    .key_wr(key_wr), .key_data(key_data), .key_addr(key_addr),
    .auth_fail_count(auth_fail_count));

  assign m_axis_tdata  = o_data;
  assign m_axis_tstrb  = o_meta.strb;
  assign m_axis_tlast  = o_meta.last;
  assign m_axis_tvalid = o_meta.valid;

  // m_axis_tready is accepted for interface completeness; the pipeline does not stall
  logic unused_tready;
  assign unused_tready = m_axis_tready;

endmodule
