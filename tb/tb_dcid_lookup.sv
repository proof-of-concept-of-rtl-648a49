// tb_dcid_lookup: registers DCIDs with key base addresses, invalidates one, and
// streams frames whose DCID is registered, invalidated or unknown, plus a
// frame too short to hold a DCID. Checks: the 11-cycle delay of every word,
// address_valid pulsing exactly with the word holding the first QUIC byte and
// carrying the registered address, and QUIC bytes re-marked "unknown" on a miss
// while everything else passes unchanged.
module tb_dcid_lookup;
  import quic_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [31:0] in_data = '0, out_data;
  meta_t in_meta = '0, out_meta;
  logic address_valid, wr_en = 0, clr_en = 0, init_done;
  logic [9:0] address, wr_addr = '0;
  logic [159:0] wr_dcid = '0;
  int checks = 0, failures = 0, cyc = 0, n_hit = 0, n_miss = 0;

  dcid_lookup dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected output words, in order, with the cycle they must appear
  logic [31:0] exp_d[$];
  meta_t       exp_m[$];
  logic        exp_av[$];
  logic [9:0]  exp_a[$];
  int          exp_t[$];

  always @(negedge clk) if (rst_n) begin
    if (exp_t.size() > 0 && exp_t[0] == cyc) begin
      checks++;
      if (out_data !== exp_d[0] || out_meta !== exp_m[0] || address_valid !== exp_av[0] ||
          (exp_av[0] && address !== exp_a[0])) begin
        failures++;
        $display("FAIL cyc %0d data %h meta %h av %b addr %h / exp %h %h %b %h", cyc, out_data, out_meta,
                 address_valid, address, exp_d[0], exp_m[0], exp_av[0], exp_a[0]);
      end
      void'(exp_d.pop_front()); void'(exp_m.pop_front()); void'(exp_av.pop_front());
      void'(exp_a.pop_front()); void'(exp_t.pop_front());
    end else if (address_valid || out_meta.valid) begin
      failures++; checks++;
      $display("FAIL unexpected output at %0d", cyc);
    end
  end

  task automatic reg_dcid(input logic [159:0] d, input logic [9:0] a, input bit clr);
    @(negedge clk); wr_dcid = d; wr_addr = a; wr_en = !clr; clr_en = clr;
    @(negedge clk); wr_en = 0; clr_en = 0;
    repeat (6) @(negedge clk);
  endtask

  task automatic send(input bytes_t f, input bit hit, input logic [9:0] a);
    int nw;
    meta_t m, em;
    nw = (f.size() + 3) / 4;
    if (hit) n_hit++; else n_miss++;
    for (int w = 0; w < nw; w++) begin
      @(negedge clk);
      m = word_meta(f, w, 1);
      in_data = word_data(f, w); in_meta = m;
      em = hit ? m : word_meta(f, w, 0);
      if (!hit) em.dcid = m.dcid;
      exp_d.push_back(in_data); exp_m.push_back(em);
      exp_av.push_back(hit && w == 10); exp_a.push_back(a);
      exp_t.push_back(cyc + 11);
    end
    @(negedge clk); in_meta = '0;
  endtask

  initial begin
    bytes_t f, p;
    logic [159:0] d[4];
    repeat (3) @(negedge clk);
    rst_n = 1;
    while (!init_done) @(negedge clk);
    foreach (d[i]) d[i] = {$urandom, $urandom, $urandom, $urandom, $urandom};
    reg_dcid(d[0], 10'h005, 0);
    reg_dcid(d[1], 10'h3f0, 0);
    reg_dcid(d[2], 10'h0a0, 0);
    reg_dcid(d[2], 10'h000, 1);
    for (int i = 0; i < 8; i++) begin
      int c;
      c = i % 4;
      f = make_frame(d[c], 1 + i % 4, $urandom, 0, 8 + 9 * i, '0, '0, '0, 0, p);
      send(f, c < 2, c == 0 ? 10'h005 : 10'h3f0);
      if (i % 3 == 1) repeat (2) @(negedge clk);
    end
    // too short to carry a complete DCID: UDP payload of 10 bytes
    f = make_frame(d[0], 1, 0, 0, 4, '0, '0, '0, 0, p);
    f[38] = 8'h00; f[39] = 8'd18;
    while (f.size() > 60) void'(f.pop_back());
    send(f, 0, 0);
    repeat (20) @(negedge clk);
    checks++;
    if (exp_t.size() != 0 || n_hit == 0 || n_miss == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
