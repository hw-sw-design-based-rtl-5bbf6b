// vmrhf_core: the vector median rational hybrid filter.
//
// First stage: three vector median filters run on the same 3x3 window, each
// on its own subset of it: the cross (Phi1, five pixels), the whole window
// (Phi2, nine pixels) and the two diagonals (Phi3, five pixels). Their
// medians remove impulsive noise. Second stage: the vector rational function
// (vrf) combines the three medians into the output pixel, smoothing Gaussian
// noise while keeping edges. The window is filled by window_buffer, nine
// pixels for the first window of a band and three for each following one.
//
// The two-stage structure, the three masks and the loading scheme follow the
// filter's description; the two pipeline registers (after the medians and
// after the rational function) are this implementation's choice.
//
// Timing: the edge that accepts a window's last pixel loads the window
// register; the next edge loads the three medians and the one after that
// the output pixel, so out_valid is high for one cycle starting two rising
// edges after the accepting edge. The pipeline takes a new window every
// cycle; with three pixels per window, the input, not the core, sets the
// rate.
module vmrhf_core
  import vmrhf_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   row_start,
  input  logic   in_valid,
  input  pixel_t in_pix,
  output logic   out_valid,
  output pixel_t out_pix
);

  localparam int unsigned N_CROSS = mask_count(MASK_CROSS);
  localparam int unsigned N_FULL  = mask_count(MASK_FULL);
  localparam int unsigned N_DIAG  = mask_count(MASK_DIAG);

  pixel_t win [WIN];
  logic   win_valid;

  window_buffer u_window (
    .clk      (clk),
    .rst_n    (rst_n),
    .row_start(row_start),
    .in_valid (in_valid),
    .in_pix   (in_pix),
    .win      (win),
    .win_valid(win_valid)
  );

  // Subsets of the window for the three median filters.
  pixel_t sub_cross [N_CROSS];
  pixel_t sub_full  [N_FULL];
  pixel_t sub_diag  [N_DIAG];

  for (genvar k = 0; k < N_CROSS; k++) begin : g_cross
    localparam int unsigned IDX = mask_index(MASK_CROSS, k);
    assign sub_cross[k] = win[IDX];
  end
  for (genvar k = 0; k < N_FULL; k++) begin : g_full
    localparam int unsigned IDX = mask_index(MASK_FULL, k);
    assign sub_full[k] = win[IDX];
  end
  for (genvar k = 0; k < N_DIAG; k++) begin : g_diag
    localparam int unsigned IDX = mask_index(MASK_DIAG, k);
    assign sub_diag[k] = win[IDX];
  end

  pixel_t med1, med2, med3;

  vmf #(.N(N_CROSS)) u_vmf1 (.win(sub_cross), .med(med1));
  vmf #(.N(N_FULL))  u_vmf2 (.win(sub_full),  .med(med2));
  vmf #(.N(N_DIAG))  u_vmf3 (.win(sub_diag),  .med(med3));

  // Stage 1 register: the three medians.
  pixel_t phi1, phi2, phi3;
  logic   phi_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phi1      <= '0;
      phi2      <= '0;
      phi3      <= '0;
      phi_valid <= 1'b0;
    end else begin
      phi_valid <= win_valid;
      if (win_valid) begin
        phi1 <= med1;
        phi2 <= med2;
        phi3 <= med3;
      end
    end
  end

  pixel_t y;

  vrf u_vrf (.phi1(phi1), .phi2(phi2), .phi3(phi3), .y(y));

  // Stage 2 register: the filtered pixel.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_pix   <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= phi_valid;
      if (phi_valid) out_pix <= y;
    end
  end

endmodule
