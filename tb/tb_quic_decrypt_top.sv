// tb_quic_decrypt_top: end-to-end test of the decryption pipeline at its
// default sizes.
//
// Loads DCIDs and connection secrets through the AXI4-Lite port, then streams
// Ethernet frames back to back or with gaps: protected 1-RTT packets of known
// connections (both key phases, packet number lengths 1..4, payloads from 1
// byte up to a full 1518-byte frame, Ethernet padding after the UDP datagram,
// the shortest packets that can be sampled sent back to back), packets with a
// damaged tag, packets with an unknown or invalidated DCID, and non-UDP /
// non-IPv4 frames. Expected output frames come from the reference model:
// decrypted header and payload with the tag kept, or the tag zeroed on an
// authentication failure, or the frame unchanged. Checks every output frame,
// the 74-cycle latency of every frame, the failure counter read back over
// AXI4-Lite, and that each mechanism (lookup hit and miss, both key phases,
// every packet number length, tag failure, non-QUIC pass-through, padding,
// back-to-back frames, DCID invalidation, shortest packets, largest frame,
// replacing one key/IV pair of a live connection) happened at least once.
module tb_quic_decrypt_top;
  import quic_pkg::*;
  import tb_ref_pkg::*;

  localparam int LATENCY = 74;

  logic clk = 0, rst_n = 0;
  logic [31:0] s_axis_tdata = '0;
  logic [3:0]  s_axis_tstrb = '0;
  logic        s_axis_tlast = 0, s_axis_tvalid = 0, s_axis_tready;
  logic [31:0] m_axis_tdata;
  logic [3:0]  m_axis_tstrb;
  logic        m_axis_tlast, m_axis_tvalid, m_axis_tready = 1;
  logic [7:0]  s_axil_awaddr = 0, s_axil_araddr = 0;
  logic        s_axil_awvalid = 0, s_axil_wvalid = 0, s_axil_bready = 1, s_axil_arvalid = 0, s_axil_rready = 1;
  logic [31:0] s_axil_wdata = 0;
  logic [3:0]  s_axil_wstrb = 4'hf;
  logic        s_axil_awready, s_axil_wready, s_axil_bvalid, s_axil_arready, s_axil_rvalid;
  logic [1:0]  s_axil_bresp, s_axil_rresp;
  logic [31:0] s_axil_rdata;
  logic        init_done, underrun;
  logic [31:0] auth_fail_count;

  quic_decrypt_top dut (.*);

  always #5 clk = ~clk;
  int cyc = 0;
  always @(posedge clk) cyc++;

  int checks = 0, failures = 0;

  // mechanism counters
  int n_hit, n_miss, n_kp[2], n_pn[5], n_fail, n_nonquic, n_pad, n_b2b, n_cleared, n_short, n_max, n_keyupd;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------------ AXI-Lite
  task automatic axil_write(input logic [7:0] a, input logic [31:0] d);
    @(negedge clk);
    s_axil_awaddr = a; s_axil_wdata = d; s_axil_awvalid = 1; s_axil_wvalid = 1;
    do @(posedge clk); while (!(s_axil_awready && s_axil_wready));
    @(negedge clk); s_axil_awvalid = 0; s_axil_wvalid = 0;
    while (!s_axil_bvalid) @(negedge clk);
  endtask

  task automatic axil_read(input logic [7:0] a, output logic [31:0] d);
    @(negedge clk);
    s_axil_araddr = a; s_axil_arvalid = 1;
    do @(posedge clk); while (!s_axil_arready);
    @(negedge clk); s_axil_arvalid = 0;
    while (!s_axil_rvalid) @(negedge clk);
    d = s_axil_rdata;
  endtask

  task automatic load_dcid(input logic [159:0] d, input logic [9:0] base, input bit clear);
    for (int i = 0; i < 5; i++) axil_write(8'h04 + 8'(4*i), d[32*i +: 32]);
    axil_write(8'h18, 32'(base));
    axil_write(8'h00, clear ? 32'h2 : 32'h1);
  endtask

  task automatic load_key(input logic [9:0] a, input logic [127:0] k);
    axil_write(8'h2C, 32'(a));
    for (int i = 0; i < 4; i++) axil_write(8'h1C + 8'(4*i), k[32*i +: 32]);
    axil_write(8'h00, 32'h4);
  endtask

  // --------------------------------------------------------------- connections
  localparam int NCONN = 3;
  logic [159:0] c_dcid [NCONN];
  logic [9:0]   c_base [NCONN];
  logic [127:0] c_hp [NCONN], c_pp [NCONN][2];
  logic [95:0]  c_iv [NCONN][2];

  // ------------------------------------------------------------ stream driver
  bytes_t exp_frames[$];
  int     in_time[$];
  int     last_end = -10;

  task automatic send(input bytes_t f, input bytes_t exp, input int gap);
    int nw;
    if (gap == 0 && last_end == cyc) n_b2b++;
    repeat (gap) begin @(negedge clk); s_axis_tvalid = 0; s_axis_tlast = 0; end
    exp_frames.push_back(exp);
    nw = (f.size() + 3) / 4;
    for (int w = 0; w < nw; w++) begin
      @(negedge clk);
      if (w == 0) in_time.push_back(cyc);
      s_axis_tvalid = 1;
      s_axis_tlast  = (w == nw - 1);
      for (int b = 0; b < 4; b++) begin
        s_axis_tdata[8*b +: 8] = (4*w + b < f.size()) ? f[4*w + b] : 8'h00;
        s_axis_tstrb[b]        = (4*w + b < f.size());
      end
    end
    @(negedge clk); s_axis_tvalid = 0; s_axis_tlast = 0;
    last_end = cyc;
  endtask

  // ------------------------------------------------------------ output monitor
  bytes_t cur;
  int     out_start = -1;
  int     frames_out = 0;
  always @(posedge clk) if (rst_n && m_axis_tvalid) begin
    if (out_start < 0) out_start = cyc;
    for (int b = 0; b < 4; b++) if (m_axis_tstrb[b]) cur.push_back(m_axis_tdata[8*b +: 8]);
    if (m_axis_tlast) begin
      bytes_t e;
      int t;
      frames_out++;
      e = exp_frames.pop_front();
      t = in_time.pop_front();
      checks++;
      if (cur != e) begin
        failures++;
        $display("FAIL frame %0d: content differs (got %0d bytes, exp %0d)", frames_out, cur.size(), e.size());
        foreach (e[i]) if (i < cur.size() && cur[i] != e[i]) begin
          $display("  first difference at byte %0d: %h exp %h", i, cur[i], e[i]);
          break;
        end
      end
      checks++;
      if (out_start - t != LATENCY + 1) begin
        failures++;
        $display("FAIL frame %0d latency %0d", frames_out, out_start - t - 1);
      end
      cur = {};
      out_start = -1;
    end
  end

  // ---------------------------------------------------------------- frames
  function automatic bytes_t plain_frame(input int len, input bit ipv4);
    bytes_t f;
    for (int i = 0; i < len; i++) f.push_back(byte'($urandom));
    f[12] = ipv4 ? 8'h08 : 8'h86; f[13] = ipv4 ? 8'h00 : 8'hdd;
    if (ipv4) begin f[14] = 8'h45; f[23] = 8'h06; end   // TCP
    return f;
  endfunction

  task automatic send_quic(input int c, input int pnlen, input bit kp, input int plen,
                           input bit corrupt, input int pad, input int gap, input bit known);
    bytes_t f, p;
    logic [31:0] pn;
    pn = $urandom;
    f = make_frame(c_dcid[c], pnlen, pn, kp, plen, c_hp[c], c_pp[c][kp], c_iv[c][kp], corrupt, p);
    repeat (pad) begin f.push_back(8'h00); p.push_back(8'h00); end
    if (pad > 0) n_pad++;
    if (!known) p = f;
    if (known) begin
      n_hit++; n_kp[kp]++; n_pn[pnlen]++;
      if (corrupt) n_fail++;
    end
    send(f, p, gap);
  endtask

  initial begin
    logic [31:0] rd;
    int exp_fail;
    exp_fail = 0;
    {n_hit, n_miss, n_fail, n_nonquic, n_pad, n_b2b, n_cleared, n_short, n_max, n_keyupd} = '0;
    n_kp = '{0, 0}; n_pn = '{0, 0, 0, 0, 0};
    for (int c = 0; c < NCONN; c++) begin
      c_dcid[c] = {$urandom, $urandom, $urandom, $urandom, $urandom};
      c_base[c] = 10'(8 + 16 * c);
      c_hp[c]   = {$urandom, $urandom, $urandom, $urandom};
      for (int k = 0; k < 2; k++) begin
        c_pp[c][k] = {$urandom, $urandom, $urandom, $urandom};
        c_iv[c][k] = {$urandom, $urandom, $urandom};
      end
    end
    repeat (4) @(negedge clk);
    rst_n = 1;
    while (!init_done) @(negedge clk);
    for (int c = 0; c < NCONN; c++) begin
      load_dcid(c_dcid[c], c_base[c], 0);
      load_key(c_base[c] + 0, c_hp[c]);
      load_key(c_base[c] + 1, c_pp[c][0]);
      load_key(c_base[c] + 2, {c_iv[c][0], 32'd0});
      load_key(c_base[c] + 3, c_pp[c][1]);
      load_key(c_base[c] + 4, {c_iv[c][1], 32'd0});
    end
    repeat (10) @(negedge clk);

    // every packet number length, both key phases, a range of payload sizes
    for (int i = 0; i < 16; i++)
      send_quic(i % NCONN, 1 + i % 4, (i / 4) % 2, 4 + 13 * i, 0, 0, (i % 3 == 0) ? 0 : 2, 1);
    // damaged tags
    send_quic(0, 4, 0, 40, 1, 0, 0, 1);
    send_quic(1, 2, 1, 17, 1, 0, 3, 1);
    exp_fail = 2;
    // Ethernet padding after the UDP datagram
    send_quic(2, 3, 0, 5, 0, 6, 1, 1);
    // non-QUIC frames
    begin bytes_t f; f = plain_frame(64, 1); send(f, f, 0); n_nonquic++; end
    begin bytes_t f; f = plain_frame(97, 0); send(f, f, 2); n_nonquic++; end
    // unknown DCID: passes unchanged
    begin
      bytes_t f, p;
      f = make_frame({$urandom, $urandom, $urandom, $urandom, $urandom}, 2, 32'h1234, 0, 50,
                     c_hp[0], c_pp[0][0], c_iv[0][0], 0, p);
      send(f, f, 0); n_miss++;
    end
    // long payload
    send_quic(1, 4, 1, 300, 0, 0, 0, 1);
    // the largest frame: 1500-byte IP packet, 1518 bytes with the Ethernet header
    send_quic(0, 4, 0, 1500 - 20 - 8 - 25 - 16, 0, 0, 0, 1);
    n_max++;
    // the shortest packets that can be sampled (41 QUIC bytes), back to back
    for (int i = 0; i < 8; i++) begin
      send_quic(i % NCONN, 1 + i % 4, i % 2, 4 - i % 4, i == 5, 0, 0, 1);
      n_short++;
    end
    exp_fail = 3;
    // key update: replace the key-phase-1 pair of connection 1 alone
    repeat (LATENCY + 20) @(negedge clk);
    c_pp[1][1] = {$urandom, $urandom, $urandom, $urandom};
    c_iv[1][1] = {$urandom, $urandom, $urandom};
    load_key(c_base[1] + 3, c_pp[1][1]);
    load_key(c_base[1] + 4, {c_iv[1][1], 32'd0});
    send_quic(1, 3, 1, 70, 0, 0, 0, 1);
    send_quic(1, 2, 0, 20, 0, 0, 0, 1);
    n_keyupd++;
    // invalidate connection 2, then its packets pass unchanged
    repeat (LATENCY + 20) @(negedge clk);
    load_dcid(c_dcid[2], 10'd0, 1);
    repeat (10) @(negedge clk);
    send_quic(2, 2, 0, 33, 0, 0, 0, 0); n_cleared++; n_miss++;
    send_quic(0, 1, 1, 8, 0, 0, 0, 1);
    repeat (LATENCY + 40) @(negedge clk);

    checks++;
    if (exp_frames.size() != 0) begin failures++; $display("FAIL %0d frames missing", exp_frames.size()); end
    axil_read(8'h30, rd);
    checks++;
    if (rd != 32'(exp_fail)) begin failures++; $display("FAIL failure counter %0d exp %0d", rd, exp_fail); end
    checks++;
    if (underrun) begin failures++; $display("FAIL plaintext underrun"); end
    $display("mechanisms: hit=%0d miss=%0d kp0=%0d kp1=%0d pn1=%0d pn2=%0d pn3=%0d pn4=%0d fail=%0d nonquic=%0d pad=%0d b2b=%0d cleared=%0d short=%0d max=%0d keyupdate=%0d",
             n_hit, n_miss, n_kp[0], n_kp[1], n_pn[1], n_pn[2], n_pn[3], n_pn[4], n_fail, n_nonquic, n_pad, n_b2b, n_cleared, n_short, n_max, n_keyupd);
    foreach (n_pn[i]) if (i > 0) begin checks++; if (n_pn[i] == 0) failures++; end
    checks += 12;
    if (n_hit == 0 || n_miss == 0 || n_kp[0] == 0 || n_kp[1] == 0 || n_fail == 0 ||
        n_nonquic == 0 || n_pad == 0 || n_b2b == 0 || n_cleared == 0 || n_short == 0 || n_max == 0 || n_keyupd == 0) begin
      failures++; $display("FAIL a mechanism was not exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
