// tb_axil_controller: drives the AXI4-Lite port like a processor would: random
// register writes with partial byte strobes, address and data presented in
// different cycles, slow response acceptance, and reads of every register
// including the failure counter. A reference copy of the registers predicts
// every read. CR writes must give exactly one pulse per
// requested command, carrying the current DCID, key and addresses; the clear
// command must zero the registers. Read data must arrive one cycle after
// the address is accepted.
module tb_axil_controller;
  import quic_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [7:0]  s_axil_awaddr = '0, s_axil_araddr = '0;
  logic        s_axil_awvalid = 0, s_axil_awready, s_axil_wvalid = 0, s_axil_wready;
  logic [31:0] s_axil_wdata = '0, s_axil_rdata;
  logic [3:0]  s_axil_wstrb = '0;
  logic [1:0]  s_axil_bresp, s_axil_rresp;
  logic        s_axil_bvalid, s_axil_bready = 0, s_axil_arvalid = 0, s_axil_arready;
  logic        s_axil_rvalid, s_axil_rready = 0;
  logic        dcid_wr, dcid_clr, key_wr;
  logic [159:0] dcid;
  logic [127:0] key_data;
  logic [KEY_AW-1:0] dcid_addr, key_addr;
  logic [31:0] auth_fail_count = 32'h1234;
  int checks = 0, failures = 0, cyc = 0;
  int n_dw = 0, n_dc = 0, n_kw = 0;        // pulses seen
  int e_dw = 0, e_dc = 0, e_kw = 0;        // pulses expected
  logic [31:0] regs [13];                  // reference copy, index = offset/4

  axil_controller dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] rmask(input int r);
    return (r == 6 || r == 11) ? 32'((1 << KEY_AW) - 1) : 32'hffffffff;
  endfunction

  // command pulses must carry the register contents
  always @(negedge clk) if (rst_n) begin
    if (dcid_wr || dcid_clr) begin
      checks++;
      if (dcid !== {regs[5], regs[4], regs[3], regs[2], regs[1]} || 32'(dcid_addr) !== regs[6]) begin
        failures++; $display("FAIL dcid pulse contents");
      end
    end
    if (key_wr) begin
      checks++;
      if (key_data !== {regs[10], regs[9], regs[8], regs[7]} || 32'(key_addr) !== regs[11]) begin
        failures++; $display("FAIL key pulse contents");
      end
    end
    n_dw += int'(dcid_wr); n_dc += int'(dcid_clr); n_kw += int'(key_wr);
  end

  task automatic write(input logic [7:0] a, input logic [31:0] d, input logic [3:0] s);
    int r;
    @(negedge clk);
    if ($urandom % 2) begin s_axil_awvalid = 1; s_axil_awaddr = a; repeat ($urandom % 3) @(negedge clk); end
    s_axil_wvalid = 1; s_axil_wdata = d; s_axil_wstrb = s;
    if (!s_axil_awvalid) begin repeat ($urandom % 3) @(negedge clk); s_axil_awvalid = 1; s_axil_awaddr = a; end
    #1;
    while (!(s_axil_awready && s_axil_wready)) begin @(negedge clk); #1; end
    @(posedge clk);
    @(negedge clk);
    s_axil_awvalid = 0; s_axil_wvalid = 0;
    checks++;
    if (!s_axil_bvalid || s_axil_bresp !== 2'b00) begin failures++; $display("FAIL no BVALID"); end
    // reference model
    r = a / 4;
    if (a == 8'h00) begin
      e_dw += int'(d[0]); e_dc += int'(d[1]); e_kw += int'(d[2]);
      if (d[3]) for (int i = 1; i < 12; i++) regs[i] = '0;
    end else if (r >= 1 && r <= 11) begin
      for (int b = 0; b < 4; b++) if (s[b]) regs[r][8*b +: 8] = d[8*b +: 8];
      regs[r] &= rmask(r);
    end
    repeat ($urandom % 4) @(negedge clk);
    s_axil_bready = 1;
    @(negedge clk); s_axil_bready = 0;
  endtask

  task automatic read(input logic [7:0] a);
    logic [31:0] e;
    @(negedge clk);
    s_axil_arvalid = 1; s_axil_araddr = a;
    #1;
    while (!s_axil_arready) begin @(negedge clk); #1; end
    @(posedge clk);
    @(negedge clk);
    s_axil_arvalid = 0;
    e = (a == 8'h30) ? auth_fail_count : (a == 8'h00 || a / 4 > 12) ? 32'h0 : regs[a / 4];
    checks++;
    if (!s_axil_rvalid || s_axil_rdata !== e || s_axil_rresp !== 2'b00) begin
      failures++; $display("FAIL read %h got %h exp %h", a, s_axil_rdata, e);
    end
    repeat ($urandom % 3) @(negedge clk);
    checks++;
    if (!s_axil_rvalid || s_axil_rdata !== e) begin failures++; $display("FAIL RVALID not held"); end
    s_axil_rready = 1;
    @(negedge clk); s_axil_rready = 0;
  endtask

  initial begin
    for (int i = 0; i < 13; i++) regs[i] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i <= 12; i++) read(8'(4 * i));
    // the driver's sequence: value registers, address, command
    for (int n = 0; n < 6; n++) begin
      for (int i = 1; i <= 5; i++) write(8'(4 * i), $urandom, 4'hf);
      write(8'h18, $urandom, 4'hf);
      write(8'h00, n == 4 ? 32'h2 : 32'h1, 4'hf);
      for (int i = 7; i <= 10; i++) write(8'(4 * i), $urandom, 4'hf);
      write(8'h2c, $urandom, 4'hf);
      write(8'h00, 32'h4, 4'hf);
    end
    // partial strobes and random order
    for (int n = 0; n < 40; n++) write(8'(4 * (1 + $urandom % 11)), $urandom, 4'($urandom));
    for (int i = 0; i <= 12; i++) read(8'(4 * i));
    write(8'h00, 32'h5, 4'hf);
    auth_fail_count = 32'd7;
    read(8'h30);
    write(8'h00, 32'h8, 4'hf);
    for (int i = 0; i <= 12; i++) read(8'(4 * i));
    read(8'h3c);
    repeat (3) @(negedge clk);
    checks++;
    if (n_dw != e_dw || n_dc != e_dc || n_kw != e_kw || e_dc == 0) begin
      failures++; $display("FAIL pulses %0d/%0d %0d/%0d %0d/%0d", n_dw, e_dw, n_dc, e_dc, n_kw, e_kw);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
