// tb_vmrhf_regs: checks the Avalon-MM register file on its own: pixel and
// band-start strobes towards the core, the one-cycle read latency, the
// STATUS ready/overrun bits and their clearing by a RESULT read.
module tb_vmrhf_regs;
  import vmrhf_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [1:0] avs_address = '0;
  logic avs_write = 0, avs_read = 0;
  logic [31:0] avs_writedata = '0;
  logic [31:0] avs_readdata;
  logic row_start, pix_valid;
  pixel_t pix;
  logic res_valid = 0;
  pixel_t res_pix = '0;

  vmrhf_regs dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(logic [31:0] got, logic [31:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // Write: strobes must be visible combinationally during the write cycle.
  task automatic bus_write(logic [1:0] a, logic [31:0] d, bit exp_pix, bit exp_start);
    @(negedge clk);
    avs_address = a; avs_writedata = d; avs_write = 1;
    #1;
    expect_eq({31'd0, pix_valid}, {31'd0, exp_pix}, "pix_valid");
    expect_eq({31'd0, row_start}, {31'd0, exp_start}, "row_start");
    if (exp_pix) expect_eq({8'd0, pix}, {8'd0, d[23:0]}, "pix");
    @(posedge clk);
    #1 avs_write = 0;
  endtask

  task automatic bus_read(logic [1:0] a, output logic [31:0] d);
    @(negedge clk);
    avs_address = a; avs_read = 1;
    @(posedge clk);
    #1 avs_read = 0;
    d = avs_readdata;      // registered on the edge that took the read
  endtask

  task automatic result_in(logic [23:0] p);
    @(negedge clk);
    res_valid = 1; res_pix = pixel_t'(p);
    @(posedge clk);
    #1 res_valid = 0;
  endtask

  initial begin
    logic [31:0] d;
    repeat (3) @(posedge clk);
    rst_n = 1;
    bus_write(2'd0, 32'hAB123456, 1, 0);
    bus_write(2'd1, 32'h00000001, 0, 1);
    bus_write(2'd1, 32'h00000000, 0, 0);
    bus_write(2'd2, 32'h00000001, 0, 0);
    bus_read(2'd2, d);  expect_eq(d, 32'h0, "status after reset");
    result_in(24'h0a0b0c);
    bus_read(2'd2, d);  expect_eq(d, 32'h1, "status ready");
    bus_read(2'd3, d);  expect_eq(d, 32'h000a0b0c, "result");
    bus_read(2'd2, d);  expect_eq(d, 32'h0, "status cleared");
    result_in(24'h111111);
    result_in(24'h222222);
    bus_read(2'd2, d);  expect_eq(d, 32'h3, "status overrun");
    bus_read(2'd3, d);  expect_eq(d, 32'h00222222, "newest result");
    bus_read(2'd2, d);  expect_eq(d, 32'h0, "overrun cleared");
    bus_read(2'd0, d);  expect_eq(d, 32'h0, "pixel register reads 0");
    for (int i = 0; i < 200; i++) begin
      automatic logic [23:0] p = 24'($urandom);
      result_in(p);
      bus_read(2'd3, d);  expect_eq(d, {8'd0, p}, "random result");
      bus_write(2'd0, {8'($urandom), 24'(i * 77)}, 1, 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
