// tb_window_buffer: feeds bands of pixels with random idle cycles and band
// restarts, and checks that a window is reported after nine pixels of a new
// band and after every three pixels after that, with the last nine pixels
// in arrival order.
module tb_window_buffer;
  import vmrhf_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic row_start = 0, in_valid = 0;
  pixel_t in_pix = '0;
  pixel_t win [WIN];
  logic win_valid;
  int n_first = 0, n_next = 0;

  window_buffer dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Model: history of accepted pixels and the count since the band start.
  pixel_t hist [$];
  int since_start;
  bit expect_valid;
  bit was_first;

  task automatic send(pixel_t p, bit start);
    @(negedge clk);
    row_start = start;
    in_valid  = 1'b1;
    in_pix    = p;
    if (start) since_start = 0;
    hist.push_back(p);
    if (hist.size() > 9) void'(hist.pop_front());
    since_start++;
    expect_valid = (since_start == 9) || (since_start > 9 && (since_start - 9) % 3 == 0);
    was_first = (since_start == 9);
    @(posedge clk);
    #1;
    row_start = 1'b0;
    in_valid  = 1'b0;
    checks++;
    if (win_valid !== expect_valid) begin
      failures++;
      $display("FAIL valid=%b expected %b after %0d pixels", win_valid, expect_valid, since_start);
    end
    if (expect_valid) begin
      if (was_first) n_first++; else n_next++;
      for (int i = 0; i < 9; i++) begin
        checks++;
        if (win[i] !== hist[i]) begin
          failures++;
          $display("FAIL win[%0d]=%h expected %h", i, win[i], hist[i]);
        end
      end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int band = 0; band < 30; band++) begin
      automatic int len = (band % 4 == 3) ? $urandom_range(1, 14) : $urandom_range(9, 40);
      for (int i = 0; i < len; i++) begin
        send(pixel_t'(24'($urandom)), i == 0);
        if ($urandom_range(0, 3) == 0) begin
          @(posedge clk);
          #1;
          checks++;
          if (win_valid !== 1'b0) begin
            failures++;
            $display("FAIL valid while idle");
          end
        end
      end
    end
    checks++;
    if (n_first == 0 || n_next == 0) begin
      failures++;
      $display("FAIL first windows %0d, following windows %0d", n_first, n_next);
    end
    $display("windows: first of band %0d, following %0d", n_first, n_next);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
