// tb_vmf: checks the vector median filter for a nine-pixel and a five-pixel
// window: directed cases (a single impulse, identical pixels, a tie) and
// random windows against the brute-force reference.
module tb_vmf;
  import vmrhf_pkg::*;
  import vmrhf_ref_pkg::*;

  int checks = 0, failures = 0;
  pixel_t win9 [9];
  pixel_t win5 [5];
  pixel_t med9, med5;

  vmf #(.N(9)) dut9 (.win(win9), .med(med9));
  vmf #(.N(5)) dut5 (.win(win5), .med(med5));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cmp(pixel_t got, logic [23:0] exp, string what);
    checks++;
    if (got !== pixel_t'(exp)) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    rgb_t v [9];
    rgb_t m;
    int idx9 [9] = '{0, 1, 2, 3, 4, 5, 6, 7, 8};
    int idx5 [9] = '{0, 1, 2, 3, 4, 0, 0, 0, 0};

    // A single white impulse among equal grey pixels: the grey wins.
    for (int i = 0; i < 9; i++) win9[i] = pixel_t'(24'h808080);
    win9[4] = pixel_t'(24'hffffff);
    #1 cmp(med9, 24'h808080, "impulse");
    // Graded values 0..8 (grey): the middle one is the median.
    for (int i = 0; i < 9; i++) win9[i] = pixel_t'({3{8'(10 * ((i * 5) % 9))}});
    #1 cmp(med9, {3{8'd40}}, "graded");
    // Two distinct values, 4 of one and 5 of the other: the majority wins.
    for (int i = 0; i < 9; i++) win9[i] = pixel_t'(i < 4 ? 24'h102030 : 24'h302010);
    #1 cmp(med9, 24'h302010, "majority");
    // Tie between two pixels: the lower index wins.
    for (int i = 0; i < 5; i++) win5[i] = pixel_t'(24'h000000);
    win5[3] = pixel_t'(24'h0a0a0a);
    win5[4] = pixel_t'(24'h0a0a0a);
    win5[0] = pixel_t'(24'h0a0a0a);
    win5[1] = pixel_t'(24'h000000);
    win5[2] = pixel_t'(24'h000000);
    // 0 and 0a0a0a: three of 0a, two of 0 -> 0a0a0a at index 0
    #1 cmp(med5, 24'h0a0a0a, "five");

    for (int t = 0; t < 4000; t++) begin
      automatic logic [23:0] base = 24'($urandom);
      for (int i = 0; i < 9; i++) begin
        automatic logic [23:0] p = (t % 2) ? 24'($urandom)
                                 : base ^ 24'($urandom_range(0, 255)) ^ {16'd0, 8'($urandom)} << 8;
        win9[i] = pixel_t'(p);
        unpack(p, v[i]);
      end
      for (int i = 0; i < 5; i++) win5[i] = win9[i];
      #1;
      ref_vmf(v, 9, idx9, m);
      cmp(med9, pack(m), "random9");
      ref_vmf(v, 5, idx5, m);
      cmp(med5, pack(m), "random5");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
