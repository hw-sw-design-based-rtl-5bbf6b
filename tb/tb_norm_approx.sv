// tb_norm_approx: checks the approximate colour-distance block against
// hand-worked values for each correction case and against the reference
// model on random pixel pairs.
module tb_norm_approx;
  import vmrhf_pkg::*;
  import vmrhf_ref_pkg::*;

  int checks = 0, failures = 0;
  pixel_t a, b;
  logic [NORM_W-1:0] norm;

  norm_approx dut (.a(a), .b(b), .norm(norm));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [23:0] pa, logic [23:0] pb, int unsigned exp, string what);
    a = pixel_t'(pa);
    b = pixel_t'(pb);
    #1;
    checks++;
    if (norm !== NORM_W'(exp)) begin
      failures++;
      $display("FAIL %s: a=%h b=%h norm=%0d expected %0d", what, pa, pb, norm, exp);
    end
  endtask

  initial begin
    rgb_t ra, rb;
    // hand-worked: one nonzero difference, c = 1
    check(24'h0a0000, 24'h000000, 10, "c=1");
    check(24'h00ff00, 24'h000000, 255, "c=1 max");
    check(24'h123456, 24'h123456, 0, "equal");
    // two nonzero differences, c = 4/3: (3+4)*3/4 = 5
    check(24'h030400, 24'h000000, 5, "c=4/3");
    check(24'hff00ff, 24'h000000, 382, "c=4/3 max");   // 510*3/4
    // three nonzero differences, c = 2: (2+2+3)/2 = 3
    check(24'h020203, 24'h000000, 3, "c=2");
    check(24'hffffff, 24'h000000, 382, "c=2 max");     // 765/2
    check(24'h102030, 24'h201008, 36, "c=2 mixed");    // (16+16+40)/2
    // random pairs against the reference model
    for (int i = 0; i < 20000; i++) begin
      logic [23:0] va, vb;
      va = 24'($urandom);
      vb = (i % 3 == 0) ? {va[23:8], 8'($urandom)} : 24'($urandom);
      if (i % 5 == 0) vb = {8'($urandom), va[15:0]};
      unpack(va, ra);
      unpack(vb, rb);
      check(va, vb, ref_norm(ra, rb), "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
