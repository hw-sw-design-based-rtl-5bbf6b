// tb_vmrhf_core: streams random image bands into the filter core, column by
// column, and checks every filtered pixel against the reference model and
// the two-cycle latency from window to result.
module tb_vmrhf_core;
  import vmrhf_pkg::*;
  import vmrhf_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic row_start = 0, in_valid = 0;
  pixel_t in_pix = '0;
  logic out_valid;
  pixel_t out_pix;

  vmrhf_core dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [23:0] expq [$];
  longint cyc = 0, last_pix_cyc [$];

  always @(posedge clk) cyc <= cyc + 1;

  // Result checker: every out_valid pops the oldest expected pixel.
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      checks++;
      if (expq.size() == 0) begin
        failures++;
        $display("FAIL unexpected result %h", out_pix);
      end else begin
        automatic logic [23:0] e = expq.pop_front();
        automatic longint t = last_pix_cyc.pop_front();
        if (out_pix !== pixel_t'(e)) begin
          failures++;
          $display("FAIL result %h expected %h", out_pix, e);
        end
        checks++;
        if (cyc - t != 3) begin
          failures++;
          $display("FAIL latency %0d cycles, expected 3", cyc - t);
        end
      end
    end
  end

  initial begin
    rgb_t col [3], w [9], y;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int band = 0; band < 12; band++) begin
      automatic int width = $urandom_range(3, 30);
      automatic logic [23:0] base = 24'($urandom);
      for (int c = 0; c < width; c++) begin
        for (int r = 0; r < 3; r++) begin
          automatic logic [23:0] p = (band % 2) ? 24'($urandom)
                                      : base ^ {3{8'($urandom_range(0, 31))}};
          if ($urandom_range(0, 19) == 0) p = 24'($urandom);   // impulse
          @(negedge clk);
          row_start = (c == 0 && r == 0);
          in_valid  = 1'b1;
          in_pix    = pixel_t'(p);
          for (int i = 0; i < 8; i++) w[i] = w[i+1];
          unpack(p, w[8]);
          if (c >= 2 && r == 2) begin
            ref_pixel(w, y);
            expq.push_back(pack(y));
            last_pix_cyc.push_back(cyc);
          end
        end
        if (band % 3 == 1) begin
          @(negedge clk);
          in_valid  = 1'b0;
          row_start = 1'b0;
        end
      end
      @(negedge clk);
      in_valid  = 1'b0;
      row_start = 1'b0;
    end
    repeat (5) @(posedge clk);
    checks++;
    if (expq.size() != 0) begin
      failures++;
      $display("FAIL %0d results missing", expq.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
