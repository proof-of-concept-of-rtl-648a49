// tb_payload_protection: feeds packets whose header protection is already
// removed, with keys_valid and the packet's pp_key and IV on the first QUIC
// word. Covers packet-number lengths 1..4, payloads from 1 byte to several
// hundred (block-aligned and not), damaged tags, the shortest frames back to
// back, gaps between frames and a non-QUIC frame. Checks: each word leaves
// exactly 32 cycles later with the payload decrypted, the tag kept when it
// matches and zeroed when not, the failure counter, and no underrun.
module tb_payload_protection;
  import quic_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [31:0] in_data = '0, out_data;
  meta_t in_meta = '0, out_meta;
  logic keys_valid = 0, underrun;
  logic [127:0] pp_key = '0;
  logic [95:0] iv = '0;
  logic [31:0] auth_fail_count;
  int checks = 0, failures = 0, cyc = 0, n_fail = 0, n_short = 0;

  payload_protection dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] exp_d[$];
  meta_t       exp_m[$];
  int          exp_t[$];

  always @(negedge clk) if (rst_n) begin
    if (exp_t.size() > 0 && exp_t[0] == cyc) begin
      checks++;
      if (out_data !== exp_d[0] || out_meta !== exp_m[0]) begin
        failures++;
        $display("FAIL cyc %0d data %h meta %h exp %h %h", cyc, out_data, out_meta, exp_d[0], exp_m[0]);
      end
      void'(exp_d.pop_front()); void'(exp_m.pop_front()); void'(exp_t.pop_front());
    end else if (out_meta.valid) begin
      failures++; checks++;
      $display("FAIL unexpected output at %0d", cyc);
    end
  end

  task automatic send(input int pnlen, input bit kp, input int plen, input bit bad, input bit quic);
    bytes_t f, p, e;
    logic [127:0] k;
    logic [95:0] v;
    int nw;
    k = {4{$urandom}}; v = {3{$urandom}};
    f = make_frame({5{$urandom}}, pnlen, $urandom, kp, plen, {4{$urandom}}, k, v, bad, p);
    e = f;
    for (int j = 42; j < 42 + 21 + pnlen; j++) e[j] = p[j];   // header already unprotected
    if (!quic) begin e[23] = 8'h06; p = e; end
    nw = (f.size() + 3) / 4;
    if (bad && quic) n_fail++;
    if (f.size() <= 84) n_short++;
    for (int w = 0; w < nw; w++) begin
      @(negedge clk);
      in_data = word_data(e, w); in_meta = word_meta(e, w, quic);
      keys_valid = quic && (w == 10);
      pp_key = (w == 10) ? k : '1; iv = (w == 10) ? v : '1;
      exp_d.push_back(word_data(p, w)); exp_m.push_back(in_meta);
      exp_t.push_back(cyc + 32);
    end
  endtask

  task automatic idle(input int n);
    @(negedge clk); in_meta = '0; keys_valid = 0;
    repeat (n - 1) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 16; i++) begin
      send(1 + i % 4, i[1], 1 + 23 * i, i % 7 == 3, 1);
      if (i % 3 == 2) idle(1 + i);
    end
    send(4, 0, 64, 0, 1);
    send(1, 1, 32, 0, 1);
    send(2, 0, 500, 1, 1);
    send(3, 1, 1050, 0, 1);
    idle(2);
    // shortest frames that can be sampled, back to back
    for (int i = 0; i < 8; i++) send(1 + i % 4, i[0], 4 - i % 4, i == 5, 1);
    send(2, 0, 40, 0, 0);
    send(1, 0, 17, 0, 1);
    idle(60);
    checks += 3;
    if (exp_t.size() != 0) failures++;
    if (auth_fail_count !== 32'(n_fail)) begin
      failures++;
      $display("FAIL auth_fail_count %0d expected %0d", auth_fail_count, n_fail);
    end
    if (underrun !== 1'b0 || n_short == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
