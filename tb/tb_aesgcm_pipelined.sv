// tb_aesgcm_pipelined: drives the AES-GCM engine with command sequences
// S, A..., AD/AE..., F at the fastest allowed rate (A right after S, then one
// command every 4 cycles). Checks: the GCM specification test case 4 (60-byte
// plaintext, 20-byte AAD) in encrypt mode, and random messages in decrypt mode
// against the reference model; every output block and tag, and the 13-cycle
// latency of each command.
module tb_aesgcm_pipelined;
  import quic_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  gcm_cmd_e cmd = GCM_NONE, out_cmd;
  logic [127:0] key, din, mask, dout;
  logic [95:0] nonce;
  logic out_valid;
  int checks = 0, failures = 0, cyc = 0;
  logic [127:0] exp_q[$];
  int t_q[$];

  aesgcm_pipelined dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Every command except S produces a checked output
  always @(negedge clk) if (rst_n && out_valid && out_cmd != GCM_S) begin
    logic [127:0] e;
    int t;
    e = exp_q.pop_front();
    t = t_q.pop_front();
    checks++;
    if (dout !== e) begin failures++; $display("FAIL cmd %s out %h exp %h", out_cmd.name(), dout, e); end
    checks++;
    if (cyc - t != 13) begin failures++; $display("FAIL latency %0d", cyc - t); end
  end

  function automatic logic [127:0] mask_of(input int n);
    return ~(128'h0) << (8 * (16 - n));
  endfunction

  task automatic issue(input gcm_cmd_e c, input logic [127:0] d, input int n, input int gap,
                       input bit expect_out, input logic [127:0] e);
    cmd = c; din = d; mask = (n >= 16) ? '1 : mask_of(n);
    if (expect_out) begin exp_q.push_back(e); t_q.push_back(cyc); end
    @(negedge clk); cmd = GCM_NONE;
    repeat (gap - 1) @(negedge clk);
  endtask

  // One AEAD operation; `enc` selects AE, otherwise `data` is ciphertext
  task automatic run(input logic [127:0] k, input logic [95:0] iv, input bytes_t aad,
                     input bytes_t data, input bytes_t exp_out, input logic [127:0] exp_tag,
                     input bit enc);
    int na, nd;
    key = k; nonce = iv;
    issue(GCM_S, '0, 16, 1, 0, '0);
    for (int o = 0; o < aad.size(); o += 16) begin
      na = aad.size() - o;
      issue(GCM_A, blk(aad, o), na, 4, 1, blk(aad, o) & ((na >= 16) ? '1 : mask_of(na)));
    end
    for (int o = 0; o < data.size(); o += 16) begin
      nd = data.size() - o;
      issue(enc ? GCM_AE : GCM_AD, blk(data, o), nd, 4, 1,
            blk(exp_out, o) & ((nd >= 16) ? '1 : mask_of(nd)));
    end
    issue(GCM_F, {64'(aad.size() * 8), 64'(data.size() * 8)}, 16, 4, 1, exp_tag);
    repeat (16) @(negedge clk);
  endtask

  initial begin
    bytes_t aad, pt, ct;
    logic [127:0] k, tag;
    logic [95:0] iv;
    key = '0; din = '0; mask = '0; nonce = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // GCM specification, test case 4
    aad = {};
    pt = {};
    ct = {};
    foreach (TC4_A[i]) aad.push_back(TC4_A[i]);
    foreach (TC4_P[i]) pt.push_back(TC4_P[i]);
    foreach (TC4_C[i]) ct.push_back(TC4_C[i]);
    run(128'hfeffe9928665731c6d6a8f9467308308, 96'hcafebabefacedbaddecaf888, aad, pt, ct,
        128'h5bc94fbc3221a5db94fae95ae7121a47, 1);
    // Random messages, decrypt mode
    for (int m = 0; m < 8; m++) begin
      aad = {}; pt = {};
      k = {$urandom, $urandom, $urandom, $urandom};
      iv = {$urandom, $urandom, $urandom};
      repeat (22 + m % 4) aad.push_back(byte'($urandom));
      repeat (m * 7) pt.push_back(byte'($urandom));
      ct = gcm_encrypt(k, iv, aad, pt, tag);
      run(k, iv, aad, ct, pt, tag, 0);
    end
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL missing outputs"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam byte unsigned TC4_A[20] = '{8'hfe,8'hed,8'hfa,8'hce,8'hde,8'had,8'hbe,8'hef,8'hfe,8'hed,
    8'hfa,8'hce,8'hde,8'had,8'hbe,8'hef,8'hab,8'had,8'hda,8'hd2};
  localparam byte unsigned TC4_P[60] = '{
    8'hd9,8'h31,8'h32,8'h25,8'hf8,8'h84,8'h06,8'he5,8'ha5,8'h59,8'h09,8'hc5,8'haf,8'hf5,8'h26,8'h9a,
    8'h86,8'ha7,8'ha9,8'h53,8'h15,8'h34,8'hf7,8'hda,8'h2e,8'h4c,8'h30,8'h3d,8'h8a,8'h31,8'h8a,8'h72,
    8'h1c,8'h3c,8'h0c,8'h95,8'h95,8'h68,8'h09,8'h53,8'h2f,8'hcf,8'h0e,8'h24,8'h49,8'ha6,8'hb5,8'h25,
    8'hb1,8'h6a,8'hed,8'hf5,8'haa,8'h0d,8'he6,8'h57,8'hba,8'h63,8'h7b,8'h39};
  localparam byte unsigned TC4_C[60] = '{
    8'h42,8'h83,8'h1e,8'hc2,8'h21,8'h77,8'h74,8'h24,8'h4b,8'h72,8'h21,8'hb7,8'h84,8'hd0,8'hd4,8'h9c,
    8'he3,8'haa,8'h21,8'h2f,8'h2c,8'h02,8'ha4,8'he0,8'h35,8'hc1,8'h7e,8'h23,8'h29,8'hac,8'ha1,8'h2e,
    8'h21,8'hd5,8'h14,8'hb2,8'h54,8'h66,8'h93,8'h1c,8'h7d,8'h8f,8'h6a,8'h5a,8'hac,8'h84,8'haa,8'h05,
    8'h1b,8'ha3,8'h0b,8'h39,8'h6a,8'h0a,8'hac,8'h97,8'h3d,8'h58,8'he0,8'h91};
endmodule
