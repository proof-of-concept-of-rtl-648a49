// tb_ghash: feeds random blocks to the GHASH accumulator, one every 4 cycles,
// restarts it between messages and checks the state after every block against
// the reference field multiplication, 3 cycles after the block.
module tb_ghash;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, ce = 0, busy;
  logic [127:0] h, din, y;
  int checks = 0, failures = 0;

  ghash dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [127:0] ref_y;
    h = '0; din = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int m = 0; m < 6; m++) begin
      h = {$urandom, $urandom, $urandom, $urandom};
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      ref_y = '0;
      for (int b = 0; b <= m; b++) begin
        din = {$urandom, $urandom, $urandom, $urandom};
        ce = 1; ref_y = gf_mul(ref_y ^ din, h);
        @(negedge clk); ce = 0;
        @(negedge clk); @(negedge clk);
        checks++;
        if (y !== ref_y) begin failures++; $display("FAIL y %h exp %h", y, ref_y); end
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
