// tb_aes_pipelined: streams one block per cycle through the unrolled AES-128
// and checks every result, in order, 9 cycles after its input.
module tb_aes_pipelined;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic [127:0] key, din, dout;
  logic [7:0] in_side, out_side;
  int checks = 0, failures = 0;
  logic [127:0] exp_q[$];
  int t_in[$];
  int cyc = 0;

  aes_pipelined #(.SIDE_W(8)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (rst_n && out_valid) begin
    logic [127:0] e;
    int t;
    e = exp_q.pop_front();
    t = t_in.pop_front();
    checks++;
    if (dout !== e) begin failures++; $display("FAIL %h exp %h", dout, e); end
    checks++;
    if (cyc - t != 9) begin failures++; $display("FAIL latency %0d", cyc - t); end
  end

  initial begin
    key = '0; din = '0; in_side = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    key = 128'h000102030405060708090a0b0c0d0e0f; din = 128'h00112233445566778899aabbccddeeff;
    in_valid = 1; exp_q.push_back(128'h69c4e0d86a7b0430d8cdb78070b4c55a); t_in.push_back(cyc);
    for (int i = 0; i < 40; i++) begin
      @(negedge clk);
      key = {$urandom, $urandom, $urandom, $urandom};
      din = {$urandom, $urandom, $urandom, $urandom};
      in_valid = (i % 7 != 3);
      if (in_valid) begin exp_q.push_back(aes128(key, din)); t_in.push_back(cyc); end
    end
    @(negedge clk); in_valid = 0;
    repeat (15) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
