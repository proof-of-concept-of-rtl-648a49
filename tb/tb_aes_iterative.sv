// tb_aes_iterative: checks the iterative AES-128 core against the FIPS-197
// example and against the reference model for random keys and blocks, and
// checks that `done` comes exactly 10 cycles after `start`.
module tb_aes_iterative;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0, start = 0;
  logic [127:0] key, din, dout;
  logic busy, done;
  int checks = 0, failures = 0;

  aes_iterative dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [127:0] k, input logic [127:0] p, input logic [127:0] exp);
    int n = 0;
    @(negedge clk); key = k; din = p; start = 1;
    @(negedge clk); start = 0; key = '0; din = '0;
    n = 1;
    while (!done) begin @(negedge clk); n++; end
    checks++;
    if (dout !== exp) begin failures++; $display("FAIL data %h exp %h", dout, exp); end
    checks++;
    if (n != 10) begin failures++; $display("FAIL latency %0d", n); end
  endtask

  initial begin
    key = '0; din = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(128'h000102030405060708090a0b0c0d0e0f, 128'h00112233445566778899aabbccddeeff,
        128'h69c4e0d86a7b0430d8cdb78070b4c55a);
    for (int i = 0; i < 20; i++) begin
      logic [127:0] k = {$urandom, $urandom, $urandom, $urandom};
      logic [127:0] p = {$urandom, $urandom, $urandom, $urandom};
      run(k, p, aes128(k, p));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
