// tb_stream_parser: streams frames of several kinds (IPv4/UDP with a short
// header packet, with Ethernet padding, IPv4/TCP, IPv6, a long-header packet,
// a frame after a TVALID gap) and compares the protocol code and DCID flag of
// every byte with an independent classification, one cycle after the input.
module tb_stream_parser;
  import quic_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [31:0] s_tdata = '0, m_data;
  logic [3:0]  s_tstrb = '0;
  logic        s_tlast = 0, s_tvalid = 0;
  meta_t       m_meta;
  int checks = 0, failures = 0;
  int n_kind[6];

  stream_parser dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send(input bytes_t f, input bit quic_ok);
    int nw;
    meta_t e;
    nw = (f.size() + 3) / 4;
    for (int w = 0; w < nw; w++) begin
      @(negedge clk);
      s_tvalid = 1; s_tlast = (w == nw - 1);
      s_tdata = word_data(f, w);
      for (int b = 0; b < 4; b++) s_tstrb[b] = (4*w + b < f.size());
      e = word_meta(f, w, quic_ok);
      // frames that are not IPv4/UDP: everything after Ethernet is unknown
      if (!({f[12], f[13]} == 16'h0800))
        for (int b = 0; b < 4; b++) if (4*w + b >= 14 && 4*w + b < f.size()) begin e.proto[b] = P_UNKNOWN; e.dcid[b] = 0; end
      if ({f[12], f[13]} == 16'h0800 && f[23] != 8'h11)
        for (int b = 0; b < 4; b++) if (4*w + b >= 34 && 4*w + b < f.size()) begin e.proto[b] = P_UNKNOWN; e.dcid[b] = 0; end
      @(posedge clk); #1;
      checks++;
      if (m_meta !== e || m_data !== word_data(f, w)) begin
        failures++;
        $display("FAIL word %0d meta %h exp %h", w, m_meta, e);
      end
      for (int b = 0; b < 4; b++) n_kind[int'(m_meta.proto[b])]++;
    end
    @(negedge clk); s_tvalid = 0; s_tlast = 0;
  endtask

  initial begin
    bytes_t f, p;
    n_kind = '{0, 0, 0, 0, 0, 0};
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 4; k++) begin
      f = make_frame({$urandom, $urandom, $urandom, $urandom, $urandom}, 1 + k, $urandom, k[0],
                     10 + 7 * k, '0, '0, '0, 0, p);
      if (k == 2) repeat (5) f.push_back(8'h00);     // Ethernet padding
      send(f, 1);
    end
    // long header: QUIC bytes become unknown
    f[42] = 8'hc3;
    send(f, 0);
    // TCP
    f[42] = 8'h43; f[23] = 8'h06;
    send(f, 0);
    // IPv6
    f[12] = 8'h86; f[13] = 8'hdd;
    send(f, 0);
    // back to a good frame after a gap
    repeat (3) @(negedge clk);
    f = make_frame({$urandom, $urandom, $urandom, $urandom, $urandom}, 2, $urandom, 0, 33, '0, '0, '0, 0, p);
    send(f, 1);
    foreach (n_kind[i]) begin checks++; if (n_kind[i] == 0) begin failures++; $display("FAIL code %0d never seen", i); end end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
