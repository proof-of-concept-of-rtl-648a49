// tb_header_protection: sends protected packets of every packet-number length
// and both key phases, including the shortest frames that can be sampled sent
// back to back, and a non-QUIC frame. Checks: every word arrives exactly 24
// cycles later; the first byte and the packet number are unmasked and every
// other byte is unchanged; keys_valid_out pulses only with the first QUIC word
// and carries the pp_key and IV of the packet's key phase.
module tb_header_protection;
  import quic_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [31:0] in_data = '0, out_data;
  meta_t in_meta = '0, out_meta;
  logic keys_valid_in = 0, keys_valid_out;
  logic [127:0] hp_key = '0, pp_key0 = '0, pp_key1 = '0, pp_key;
  logic [95:0] iv0 = '0, iv1 = '0, iv;
  int checks = 0, failures = 0, cyc = 0, n_kp1 = 0, n_short = 0;

  header_protection dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0]  exp_d[$];
  meta_t        exp_m[$];
  logic         exp_k[$];
  logic [127:0] exp_pk[$];
  logic [95:0]  exp_iv[$];
  int           exp_t[$];

  always @(negedge clk) if (rst_n) begin
    if (exp_t.size() > 0 && exp_t[0] == cyc) begin
      checks++;
      if (out_data !== exp_d[0] || out_meta !== exp_m[0] || keys_valid_out !== exp_k[0] ||
          (exp_k[0] && (pp_key !== exp_pk[0] || iv !== exp_iv[0]))) begin
        failures++;
        $display("FAIL cyc %0d data %h kv %b exp %h %b", cyc, out_data, keys_valid_out, exp_d[0], exp_k[0]);
      end
      void'(exp_d.pop_front()); void'(exp_m.pop_front()); void'(exp_k.pop_front());
      void'(exp_pk.pop_front()); void'(exp_iv.pop_front()); void'(exp_t.pop_front());
    end else if (keys_valid_out || out_meta.valid) begin
      failures++; checks++;
      $display("FAIL unexpected output at %0d", cyc);
    end
  end

  task automatic send(input int pnlen, input bit kp, input int plen, input bit quic);
    bytes_t f, p, e;
    logic [127:0] hk, k0, k1;
    logic [95:0] v0, v1;
    int nw;
    hk = {4{$urandom}}; k0 = {4{$urandom}}; k1 = {4{$urandom}};
    v0 = {3{$urandom}}; v1 = {3{$urandom}};
    f = make_frame({5{$urandom}}, pnlen, $urandom, kp, plen, hk, kp ? k1 : k0, kp ? v1 : v0, 0, p);
    if (!quic) begin f[23] = 8'h06; p[23] = 8'h06; end    // TCP: nothing to unmask
    e = f;
    if (quic) for (int j = 42; j < 42 + 21 + pnlen; j++) e[j] = p[j];
    nw = (f.size() + 3) / 4;
    if (kp) n_kp1++;
    if (f.size() <= 84) n_short++;
    for (int w = 0; w < nw; w++) begin
      @(negedge clk);
      in_data = word_data(f, w); in_meta = word_meta(f, w, quic);
      keys_valid_in = quic && (w == 10);
      hp_key = hk; pp_key0 = k0; pp_key1 = k1; iv0 = v0; iv1 = v1;
      if (w != 10) begin hp_key = '1; pp_key0 = '1; pp_key1 = '1; end
      exp_d.push_back(word_data(e, w)); exp_m.push_back(in_meta);
      exp_k.push_back(quic && w == 10); exp_pk.push_back(kp ? k1 : k0); exp_iv.push_back(kp ? v1 : v0);
      exp_t.push_back(cyc + 24);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 12; i++) begin
      send(1 + i % 4, i[2], 3 + 13 * i, 1);
      if (i % 5 == 4) begin @(negedge clk); in_meta = '0; keys_valid_in = 0; end
    end
    // shortest sampled frames, back to back
    for (int i = 0; i < 6; i++) send(1 + i % 4, i[0], 4 - i % 4, 1);
    send(2, 0, 30, 0);
    send(4, 1, 40, 1);
    @(negedge clk); in_meta = '0; keys_valid_in = 0;
    repeat (30) @(negedge clk);
    checks++;
    if (exp_t.size() != 0 || n_kp1 == 0 || n_short == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
