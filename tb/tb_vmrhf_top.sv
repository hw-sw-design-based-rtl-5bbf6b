// tb_vmrhf_top: end-to-end test of the filter accelerator through its
// Avalon-MM registers, at full size and default parameters.
//
// It plays the role of the processor software: for every band of three
// image rows it sets the band-start bit, sends the nine pixels of the first
// window and then one three-pixel column per window, polls STATUS until the
// result is ready and reads RESULT. Two images are filtered:
//   1. a 176x144 colour image (the image size the filter is evaluated on):
//      smooth colour ramps and disks, plus approximately Gaussian noise of
//      variance 100 and 1% impulses. Every interior pixel is compared with
//      the reference model, and the PSNR of the noisy and filtered images
//      against the clean one is reported.
//   2. a 176x30 stress image drawn from a five-level palette (top half)
//      and from black and white (bottom half), which drives the rational
//      stage into its rarer cases (quotient 1 and 2, both clamps).
// Checked besides the pixels: the result appears exactly four bus cycles
// after the write of a window's last pixel, and the overrun flag works.
// Every datapath case is counted, and one that never occurs is a failure.
module tb_vmrhf_top;
  import vmrhf_ref_pkg::*;

  localparam int IMG_W = 176;
  localparam int IMG_H = 144;
  localparam int STRESS_H = 30;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [1:0] avs_address = '0;
  logic avs_write = 0, avs_read = 0;
  logic [31:0] avs_writedata = '0;
  logic [31:0] avs_readdata;

  vmrhf_top dut (.*);

  always #5 clk = ~clk;   // 100 MHz in simulation; cycles are what count

  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin : watchdog
    repeat (5_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [23:0] clean [IMG_H][IMG_W];
  logic [23:0] img   [IMG_H][IMG_W];
  logic [23:0] filt  [IMG_H][IMG_W];

  int n_bands = 0, n_first_windows = 0, n_next_windows = 0, n_polls = 0;
  int n_overrun = 0;

  task automatic bus_write(logic [1:0] a, logic [31:0] d);
    @(negedge clk);
    avs_address = a; avs_writedata = d; avs_write = 1;
    @(posedge clk);
    #1 avs_write = 0;
  endtask

  task automatic bus_read(logic [1:0] a, output logic [31:0] d);
    @(negedge clk);
    avs_address = a; avs_read = 1;
    @(posedge clk);
    #1 avs_read = 0;
    d = avs_readdata;
  endtask

  function automatic int clip(int v);
    return v < 0 ? 0 : (v > 255 ? 255 : v);
  endfunction

  function automatic int gauss10();   // sum of four uniforms, variance ~100
    int s = 0;
    for (int i = 0; i < 4; i++) s += $urandom_range(0, 18) - 9;
    return s;
  endfunction

  // Filter rows 0..h-1 of img through the accelerator; results go to filt.
  task automatic filter_image(int h, bit count);
    logic [31:0] d;
    rgb_t w [9], y;
    for (int r = 0; r + 2 < h; r++) begin
      bus_write(2'd1, 32'h1);               // band start
      n_bands++;
      for (int c = 0; c < IMG_W; c++) begin
        longint t_last;
        for (int k = 0; k < 3; k++) begin
          bus_write(2'd0, {8'd0, img[r+k][c]});
          for (int i = 0; i < 8; i++) w[i] = w[i+1];
          unpack(img[r+k][c], w[8]);
        end
        t_last = cyc;                       // edge count at the last write
        if (c < 2) continue;
        if (c == 2) n_first_windows++; else n_next_windows++;
        ref_pixel(w, y, count);
        // poll STATUS
        for (int p = 0; p < 16; p++) begin
          bus_read(2'd2, d);
          n_polls++;
          if (d[0]) break;
        end
        checks++;
        if (!d[0] || cyc - t_last != 4) begin
          failures++;
          $display("FAIL result ready %0d cycles after the last pixel, expected 4 (ready=%b)",
                   cyc - t_last, d[0]);
        end
        bus_read(2'd3, d);
        filt[r+1][c-1] = d[23:0];
        checks++;
        if (d[23:0] !== pack(y)) begin
          failures++;
          if (failures < 20)
            $display("FAIL pixel (%0d,%0d): got %h expected %h", r + 1, c - 1, d[23:0], pack(y));
        end
      end
    end
  endtask

  function automatic real psnr(bit use_filt);
    real se = 0.0;
    int n = 0;
    for (int r = 1; r < IMG_H - 1; r++)
      for (int c = 1; c < IMG_W - 1; c++)
        for (int k = 0; k < 3; k++) begin
          int a = int'(clean[r][c][8*k +: 8]);
          int b = use_filt ? int'(filt[r][c][8*k +: 8]) : int'(img[r][c][8*k +: 8]);
          se += real'((a - b) * (a - b));
          n++;
        end
    return 10.0 * $log10(255.0 * 255.0 / (se / n));
  endfunction

  initial begin
    logic [31:0] d;
    longint t0, t1;
    automatic int levels [5] = '{0, 40, 128, 200, 255};

    // Clean image: colour ramps with two flat disks; then the noisy copy.
    for (int r = 0; r < IMG_H; r++)
      for (int c = 0; c < IMG_W; c++) begin
        automatic int rr = clip(c + r / 2 + 20);
        automatic int gg = clip(200 - r);
        automatic int bb = clip(60 + (c * 3) / 4);
        if ((r - 50) * (r - 50) + (c - 60) * (c - 60) < 400) begin rr = 230; gg = 30; bb = 40; end
        if ((r - 100) * (r - 100) + (c - 130) * (c - 130) < 600) begin rr = 20; gg = 90; bb = 220; end
        clean[r][c] = {8'(rr), 8'(gg), 8'(bb)};
        if ($urandom_range(0, 99) == 0) img[r][c] = 24'($urandom);
        else img[r][c] = {8'(clip(rr + gauss10())), 8'(clip(gg + gauss10())), 8'(clip(bb + gauss10()))};
        filt[r][c] = img[r][c];             // borders stay unfiltered
      end

    repeat (3) @(posedge clk);
    rst_n = 1;

    t0 = cyc;
    filter_image(IMG_H, 1'b1);
    t1 = cyc;
    $display("image %0dx%0d: %0d windows in %0d bus cycles (%0.1f per pixel)",
             IMG_W, IMG_H, n_first_windows + n_next_windows, t1 - t0,
             real'(t1 - t0) / real'(n_first_windows + n_next_windows));
    $display("PSNR noisy %0.2f dB, filtered %0.2f dB", psnr(1'b0), psnr(1'b1));

    // Stress image from a five-level palette.
    for (int r = 0; r < STRESS_H; r++)
      for (int c = 0; c < IMG_W; c++)
        if (r < STRESS_H / 2)
          img[r][c] = {8'(levels[$urandom_range(0, 4)]), 8'(levels[$urandom_range(0, 4)]),
                       8'(levels[$urandom_range(0, 4)])};
        else   // black and white only: reaches the largest quotient more often
          img[r][c] = {{8{1'($urandom)}}, {8{1'($urandom)}}, {8{1'($urandom)}}};
    filter_image(STRESS_H, 1'b1);

    // Overrun: two windows complete without RESULT being read.
    bus_write(2'd1, 32'h1);
    for (int i = 0; i < 12; i++) bus_write(2'd0, 32'h00102030 + 32'(i));
    repeat (4) @(posedge clk);
    bus_read(2'd2, d);
    checks++;
    if (d[1:0] !== 2'b11) begin
      failures++;
      $display("FAIL status %b after unread results, expected overrun", d[1:0]);
    end else n_overrun++;
    bus_read(2'd3, d);
    bus_read(2'd2, d);
    checks++;
    if (d[1:0] !== 2'b00) begin
      failures++;
      $display("FAIL status %b after RESULT read, expected 00", d[1:0]);
    end

    $display("bands %0d, nine-pixel windows %0d, three-pixel windows %0d, status polls %0d",
             n_bands, n_first_windows, n_next_windows, n_polls);
    $display("norm cases c=1 %0d, c=4/3 %0d, c=2 %0d", n_case_c1, n_case_c43, n_case_c2);
    $display("quotient 0 %0d, 1 %0d, 2 %0d; corrections down %0d up %0d; clamped at 0 %0d, at 255 %0d",
             n_q[0], n_q[1], n_q[2], n_neg, n_pos, n_clamp_lo, n_clamp_hi);
    begin
      automatic int ev [11] = '{n_first_windows, n_next_windows, n_case_c1, n_case_c43, n_case_c2,
                      n_q[1], n_q[2], n_neg, n_pos, n_clamp_lo, n_clamp_hi};
      foreach (ev[i]) begin
        checks++;
        if (ev[i] == 0) begin
          failures++;
          $display("FAIL event %0d never happened", i);
        end
      end
      checks++;
      if (n_overrun == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
