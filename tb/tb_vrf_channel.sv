// tb_vrf_channel: checks one colour component of the rational stage:
// hand-worked cases for every quotient (0, 1, 2), both signs and both
// clamps, then random inputs against the reference.
module tb_vrf_channel;
  import vmrhf_pkg::*;
  import vmrhf_ref_pkg::*;

  int checks = 0, failures = 0;
  comp_t p1, p2, p3, y;
  logic [NORM_W-1:0] n;

  vrf_channel dut (.phi1(p1), .phi2(p2), .phi3(p3), .norm(n), .y(y));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(int a, int b, int c, int nn, int exp, string what);
    p1 = comp_t'(a); p2 = comp_t'(b); p3 = comp_t'(c); n = NORM_W'(nn);
    #1;
    checks++;
    if (y !== comp_t'(exp)) begin
      failures++;
      $display("FAIL %s: phi=%0d,%0d,%0d n=%0d y=%0d expected %0d", what, a, b, c, nn, y, exp);
    end
  endtask

  initial begin
    check(100, 100, 100, 0, 100, "flat");                // num 0
    check(100, 120, 100, 0, 120, "small num, q=0");      // 40/240 -> 0
    check(0, 150, 0, 0, 190, "q=1 positive");            // 300/240 -> 1
    check(0, 250, 0, 0, 255, "q=2 clamp high");          // 500/240 -> 2, 250+80
    check(0, 240, 0, 0, 255, "q=2 exact");               // 480/240 -> 2, 240+80
    check(0, 200, 0, 0, 240, "q=1 exact-ish");           // 400/240 -> 1
    check(200, 60, 200, 0, 20, "q=1 negative");          // -280/240 -> -1
    check(255, 0, 255, 0, 0, "q=2 clamp low");           // -510/240 -> -2
    check(255, 10, 0, 765, 10, "large norm");            // -235/1005 -> 0
    check(0, 150, 0, 61, 150, "norm lowers q");          // 300/301 -> 0
    check(0, 150, 0, 60, 190, "norm boundary");          // 300/300 -> 1
    for (int i = 0; i < 20000; i++) begin
      automatic int a = $urandom_range(0, 255), b = $urandom_range(0, 255), c = $urandom_range(0, 255);
      automatic int nn = (i % 2) ? $urandom_range(0, 80) : $urandom_range(0, 765);
      check(a, b, c, nn, ref_comp(a, b, c, nn), "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
