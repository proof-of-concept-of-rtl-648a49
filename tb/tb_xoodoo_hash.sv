// tb_xoodoo_hash: compares the pipelined DCID hash with a separately written
// model of the Xoodoo permutation (planes as 3x4 arrays of lanes), for DCIDs
// entered one per cycle, and checks the 4-cycle latency.
module tb_xoodoo_hash;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic [159:0] dcid;
  logic [9:0] hash;
  int checks = 0, failures = 0, cyc = 0;
  logic [9:0] exp_q[$];
  int t_q[$];

  xoodoo_hash dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] rl(input logic [31:0] v, input int n);
    return (v << n) | (v >> (32 - n));
  endfunction

  function automatic logic [9:0] ref_hash(input logic [159:0] d);
    logic [31:0] a[3][4], p[4], e[4], b[3][4], t[4];
    int unsigned c[12] = '{'h58, 'h38, 'h3c0, 'hd0, 'h120, 'h14, 'h60, 'h2c, 'h380, 'hf0, 'h1a0, 'h12};
    foreach (a[y, x]) a[y][x] = 0;
    for (int k = 0; k < 20; k++) a[k/16][(k/4)%4][8*(k%4) +: 8] = d[159-8*k -: 8];
    a[1][1][7:0] = 8'h01;
    for (int r = 0; r < 12; r++) begin
      for (int x = 0; x < 4; x++) p[x] = a[0][x] ^ a[1][x] ^ a[2][x];
      for (int x = 0; x < 4; x++) e[x] = rl(p[(x+3)%4], 5) ^ rl(p[(x+3)%4], 14);
      foreach (a[y, x]) a[y][x] ^= e[x];
      t = a[1];
      for (int x = 0; x < 4; x++) a[1][x] = t[(x+3)%4];
      for (int x = 0; x < 4; x++) a[2][x] = rl(a[2][x], 11);
      a[0][0] ^= c[r];
      foreach (b[y, x]) b[y][x] = ~a[(y+1)%3][x] & a[(y+2)%3][x];
      foreach (a[y, x]) a[y][x] ^= b[y][x];
      for (int x = 0; x < 4; x++) a[1][x] = rl(a[1][x], 1);
      t = a[2];
      for (int x = 0; x < 4; x++) a[2][x] = rl(t[(x+2)%4], 8);
    end
    return a[0][0][9:0];
  endfunction

  always @(negedge clk) if (rst_n && out_valid) begin
    logic [9:0] e;
    int t;
    e = exp_q.pop_front();
    t = t_q.pop_front();
    checks++;
    if (hash !== e) begin failures++; $display("FAIL hash %h exp %h", hash, e); end
    checks++;
    if (cyc - t != 4) begin failures++; $display("FAIL latency %0d", cyc - t); end
  end

  initial begin
    dcid = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 50; i++) begin
      @(negedge clk);
      dcid = (i == 0) ? '0 : {$urandom, $urandom, $urandom, $urandom, $urandom};
      in_valid = (i % 5 != 4);
      if (in_valid) begin exp_q.push_back(ref_hash(dcid)); t_q.push_back(cyc); end
    end
    @(negedge clk); in_valid = 0;
    repeat (8) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
