// axil_controller: AXI4-Lite register interface through which software loads
// DCIDs and connection secrets and reads the failed-authentication counter.
//
// Register map (32-bit registers, byte offsets):
//   0x00 CR          write 0x1: store DCID -> DCID address in the lookup memory
//                    write 0x2: invalidate the DCID in the lookup memory
//                    write 0x4: store key value at key address in the key memory
//                    write 0x8: clear all value/address registers
//   0x04..0x14 DCID value 0..4  (160 bits, register 0 = least significant word)
//   0x18 DCID address           (key base address, low KEY_AW bits)
//   0x1C..0x28 key value 0..3   (128 bits, register 0 = least significant word)
//   0x2C key address
//   0x30 failed-authentication counter (read only)
// A write to CR produces one-cycle command pulses; CR reads back as zero.
// The sequence (fill the value registers, then the address, then write CR)
// and the CR codes 0x1/0x2/0x4 follow the document; the offsets, the word
// order and the 0x8 clear command are this design's choices.
//
// Timing: a write completes when both AW and W are valid; BVALID follows one
// cycle later and is held until BREADY. A read returns RVALID one cycle after
// ARVALID is accepted. Responses are always OKAY.
module axil_controller
  import quic_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  // AXI4-Lite slave
  input  logic [7:0]         s_axil_awaddr,
  input  logic               s_axil_awvalid,
  output logic               s_axil_awready,
  input  logic [31:0]        s_axil_wdata,
  input  logic [3:0]         s_axil_wstrb,
  input  logic               s_axil_wvalid,
  output logic               s_axil_wready,
  output logic [1:0]         s_axil_bresp,
  output logic               s_axil_bvalid,
  input  logic               s_axil_bready,
  input  logic [7:0]         s_axil_araddr,
  input  logic               s_axil_arvalid,
  output logic               s_axil_arready,
  output logic [31:0]        s_axil_rdata,
  output logic [1:0]         s_axil_rresp,
  output logic               s_axil_rvalid,
  input  logic               s_axil_rready,
  // to the pipeline
  output logic               dcid_wr,
  output logic               dcid_clr,
  output logic [159:0]       dcid,
  output logic [KEY_AW-1:0]  dcid_addr,
  output logic               key_wr,
  output logic [127:0]       key_data,
  output logic [KEY_AW-1:0]  key_addr,
  input  logic [31:0]        auth_fail_count
);

  localparam logic [7:0] A_CR = 8'h00, A_DCID0 = 8'h04, A_DADDR = 8'h18,
                         A_KEY0 = 8'h1C, A_KADDR = 8'h2C, A_FAIL = 8'h30;

  logic [31:0] dcid_r [5];
  logic [31:0] key_r  [4];
  logic        wr_fire;

  assign wr_fire        = s_axil_awvalid && s_axil_wvalid && !s_axil_bvalid;
  assign s_axil_awready = wr_fire;
  assign s_axil_wready  = wr_fire;
  assign s_axil_bresp   = 2'b00;
  assign s_axil_rresp   = 2'b00;
  assign s_axil_arready = !s_axil_rvalid;

  function automatic logic [31:0] merge(input logic [31:0] old, input logic [31:0] d,
                                        input logic [3:0] strb);
    for (int b = 0; b < 4; b++) if (strb[b]) old[8*b +: 8] = d[8*b +: 8];
    return old;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 5; i++) dcid_r[i] <= '0;
      for (int i = 0; i < 4; i++) key_r[i]  <= '0;
      dcid_addr     <= '0;
      key_addr      <= '0;
      dcid_wr       <= 1'b0;
      dcid_clr      <= 1'b0;
      key_wr        <= 1'b0;
      s_axil_bvalid <= 1'b0;
      s_axil_rvalid <= 1'b0;
      s_axil_rdata  <= '0;
    end else begin
      dcid_wr  <= 1'b0;
      dcid_clr <= 1'b0;
      key_wr   <= 1'b0;
      if (s_axil_bvalid && s_axil_bready) s_axil_bvalid <= 1'b0;
      if (wr_fire) begin
        s_axil_bvalid <= 1'b1;
        unique case (s_axil_awaddr)
          A_CR: begin
            dcid_wr  <= s_axil_wdata[0];
            dcid_clr <= s_axil_wdata[1];
            key_wr   <= s_axil_wdata[2];
            if (s_axil_wdata[3]) begin
              for (int i = 0; i < 5; i++) dcid_r[i] <= '0;
              for (int i = 0; i < 4; i++) key_r[i]  <= '0;
              dcid_addr <= '0;
              key_addr  <= '0;
            end
          end
          A_DADDR: dcid_addr <= KEY_AW'(merge(32'(dcid_addr), s_axil_wdata, s_axil_wstrb));
          A_KADDR: key_addr  <= KEY_AW'(merge(32'(key_addr), s_axil_wdata, s_axil_wstrb));
          default: begin
            for (int i = 0; i < 5; i++)
              if (s_axil_awaddr == A_DCID0 + 8'(4*i)) dcid_r[i] <= merge(dcid_r[i], s_axil_wdata, s_axil_wstrb);
            for (int i = 0; i < 4; i++)
              if (s_axil_awaddr == A_KEY0 + 8'(4*i)) key_r[i] <= merge(key_r[i], s_axil_wdata, s_axil_wstrb);
          end
        endcase
      end
      if (s_axil_rvalid && s_axil_rready) s_axil_rvalid <= 1'b0;
      if (s_axil_arvalid && !s_axil_rvalid) begin
        s_axil_rvalid <= 1'b1;
        s_axil_rdata  <= '0;
        unique case (s_axil_araddr)
          A_DADDR: s_axil_rdata <= 32'(dcid_addr);
          A_KADDR: s_axil_rdata <= 32'(key_addr);
          A_FAIL:  s_axil_rdata <= auth_fail_count;
          default: begin
            for (int i = 0; i < 5; i++) if (s_axil_araddr == A_DCID0 + 8'(4*i)) s_axil_rdata <= dcid_r[i];
            for (int i = 0; i < 4; i++) if (s_axil_araddr == A_KEY0 + 8'(4*i))  s_axil_rdata <= key_r[i];
          end
        endcase
      end
    end
  end

  assign dcid     = {dcid_r[4], dcid_r[3], dcid_r[2], dcid_r[1], dcid_r[0]};
  assign key_data = {key_r[3], key_r[2], key_r[1], key_r[0]};

`ifndef SYNTHESIS
  // AXI: a response stays valid until accepted
  assert property (@(posedge clk) disable iff (!rst_n) s_axil_bvalid && !s_axil_bready |=> s_axil_bvalid);
  assert property (@(posedge clk) disable iff (!rst_n) s_axil_rvalid && !s_axil_rready |=> s_axil_rvalid && $stable(s_axil_rdata));
`endif

endmodule
