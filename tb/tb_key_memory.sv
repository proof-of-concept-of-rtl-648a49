// tb_key_memory: fills the secrets of three connections, changes one secret of
// a connection alone, then sends frames whose address_valid pulse (on the word
// holding the first QUIC byte) points at the connections in turn, including
// frames back to back. Checks: data and metadata delayed by exactly 6 cycles,
// keys_valid pulsing only with the delayed address_valid word, and all five
// secrets matching what was written for that connection.
module tb_key_memory;
  import quic_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [31:0] in_data = '0, out_data;
  meta_t in_meta = '0, out_meta;
  logic address_valid = 0, keys_valid, wr_en = 0;
  logic [9:0] address = '0, wr_addr = '0;
  logic [127:0] wr_data = '0, hp_key, pp_key0, pp_key1;
  logic [95:0] iv0, iv1;
  int checks = 0, failures = 0, cyc = 0;
  logic [127:0] mem [1024];

  key_memory dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] exp_d[$];
  meta_t       exp_m[$];
  logic [9:0]  exp_a[$];   // address of the fetch, or '1 when no keys_valid
  logic        exp_k[$];
  int          exp_t[$];

  always @(negedge clk) if (rst_n) begin
    if (exp_t.size() > 0 && exp_t[0] == cyc) begin
      logic [9:0] a;
      a = exp_a[0];
      checks++;
      if (out_data !== exp_d[0] || out_meta !== exp_m[0] || keys_valid !== exp_k[0]) begin
        failures++;
        $display("FAIL cyc %0d data %h kv %b exp %h %b", cyc, out_data, keys_valid, exp_d[0], exp_k[0]);
      end
      if (exp_k[0]) begin
        checks++;
        if (hp_key !== mem[a] || pp_key0 !== mem[a+1] || iv0 !== mem[a+2][127:32] ||
            pp_key1 !== mem[a+3] || iv1 !== mem[a+4][127:32]) begin
          failures++;
          $display("FAIL keys of base %0d", a);
        end
      end
      void'(exp_d.pop_front()); void'(exp_m.pop_front()); void'(exp_a.pop_front());
      void'(exp_k.pop_front()); void'(exp_t.pop_front());
    end else if (keys_valid || out_meta.valid) begin
      failures++; checks++;
      $display("FAIL unexpected output at %0d", cyc);
    end
  end

  task automatic wr(input logic [9:0] a, input logic [127:0] d);
    @(negedge clk); wr_en = 1; wr_addr = a; wr_data = d; mem[a] = d;
    @(negedge clk); wr_en = 0;
  endtask

  task automatic send(input bytes_t f, input logic [9:0] a);
    int nw;
    nw = (f.size() + 3) / 4;
    for (int w = 0; w < nw; w++) begin
      @(negedge clk);
      in_data = word_data(f, w); in_meta = word_meta(f, w, 1);
      address_valid = (w == 10); address = (w == 10) ? a : 10'($urandom);
      exp_d.push_back(in_data); exp_m.push_back(in_meta);
      exp_k.push_back(w == 10); exp_a.push_back(a);
      exp_t.push_back(cyc + 6);
    end
  endtask

  initial begin
    bytes_t f, p;
    logic [9:0] base[3] = '{10'd0, 10'd5, 10'd1019};
    repeat (3) @(negedge clk);
    rst_n = 1;
    foreach (base[c])
      for (int k = 0; k < 5; k++)
        wr(base[c] + 10'(k), (k == 2 || k == 4) ? {$urandom, $urandom, $urandom, 32'd0}
                                                 : {$urandom, $urandom, $urandom, $urandom});
    wr(base[1] + 10'd3, {4{$urandom}});   // rotate one key of connection 1
    for (int i = 0; i < 9; i++) begin
      f = make_frame({5{$urandom}}, 1 + i % 4, $urandom, i[0], 4 + 7 * i, '0, '0, '0, 0, p);
      send(f, base[i % 3]);
      if (i % 4 == 3) begin
        @(negedge clk); in_meta = '0; address_valid = 0;
        repeat (3) @(negedge clk);
      end
    end
    @(negedge clk); in_meta = '0; address_valid = 0;
    repeat (12) @(negedge clk);
    checks++;
    if (exp_t.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
