// tb_vrf: checks the vector rational stage (shared norm plus three
// component datapaths) on directed and random median triples.
module tb_vrf;
  import vmrhf_pkg::*;
  import vmrhf_ref_pkg::*;

  int checks = 0, failures = 0;
  pixel_t p1, p2, p3, y;

  vrf dut (.phi1(p1), .phi2(p2), .phi3(p3), .y(y));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [23:0] a, logic [23:0] b, logic [23:0] c, logic [23:0] exp, string what);
    p1 = pixel_t'(a); p2 = pixel_t'(b); p3 = pixel_t'(c);
    #1;
    checks++;
    if (y !== pixel_t'(exp)) begin
      failures++;
      $display("FAIL %s: %h %h %h -> %h expected %h", what, a, b, c, y, exp);
    end
  endtask

  initial begin
    rgb_t r1, r2, r3, ry;
    // Phi1 = Phi3, so the norm is 0 and den = 240 in every component:
    // r: 2*200-0-0 = 400 -> +40, g: 0 -> 0, b: 2*0-100-100 = -200 -> 0
    check(24'h000064, 24'hc80000, 24'h000064, 24'hf00000, "norm 0");
    // Phi1 and Phi3 differ in all components by 60: norm = 180/2 = 90,
    // den = 330. r: 2*250-30-90 = 380 -> +40 clamps at 255
    check(24'h1e1e1e, 24'hfa6464, 24'h5a5a5a, 24'hff6464, "norm 90");
    // One component differs (norm 200, den 440): r: 2*250-0-200 = 300 -> 0
    check(24'h000000, 24'hfa0000, 24'hc80000, 24'hfa0000, "norm 200");
    for (int i = 0; i < 20000; i++) begin
      automatic logic [23:0] a = 24'($urandom), b = 24'($urandom), c = 24'($urandom);
      if (i % 3 == 0) c = a ^ {16'd0, 8'($urandom_range(0, 3))};
      if (i % 3 == 1) c = {a[23:8], 8'($urandom)};
      unpack(a, r1); unpack(b, r2); unpack(c, r3);
      ref_stage2(r1, r2, r3, ry);
      check(a, b, c, pack(ry), "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
