// tb_vmrhf_pkg: checks the shared constants and mask helpers: the filter
// constants, the size of each window subset and the window indices it
// selects (cross 1,3,4,5,7; full 0..8; diagonals 0,2,4,6,8).
module tb_vmrhf_pkg;
  import vmrhf_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(int got, int exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    automatic int cross_idx [5] = '{1, 3, 4, 5, 7};
    automatic int diag_idx  [5] = '{0, 2, 4, 6, 8};
    @(posedge clk);
    expect_eq(int'(PIX_W), 8, "PIX_W");
    expect_eq(int'(K1), 40, "K1");
    expect_eq(int'(W_CONST), 240, "W_CONST");
    expect_eq(int'(mask_count(MASK_CROSS)), 5, "cross size");
    expect_eq(int'(mask_count(MASK_FULL)), 9, "full size");
    expect_eq(int'(mask_count(MASK_DIAG)), 5, "diagonal size");
    for (int k = 0; k < 5; k++) begin
      expect_eq(int'(mask_index(MASK_CROSS, k)), cross_idx[k], "cross index");
      expect_eq(int'(mask_index(MASK_DIAG, k)), diag_idx[k], "diagonal index");
    end
    for (int k = 0; k < 9; k++) expect_eq(int'(mask_index(MASK_FULL, k)), k, "full index");
    // A random mask: the k-th index must be the k-th set bit.
    for (int t = 0; t < 200; t++) begin
      automatic logic [WIN-1:0] m = WIN'($urandom);
      automatic int k = 0;
      for (int i = 0; i < WIN; i++) if (m[i]) begin
        expect_eq(int'(mask_index(m, k)), i, "random mask index");
        k++;
      end
      expect_eq(int'(mask_count(m)), k, "random mask count");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
