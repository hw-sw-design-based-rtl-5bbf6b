// vmrhf_top: the filter accelerator as an Avalon-MM peripheral.
//
// The processor writes noisy pixels into the register file (vmrhf_regs),
// which passes them to the filter core (vmrhf_core); each complete window
// produces one filtered pixel, which the processor reads back from the
// RESULT register. Software is expected to send the nine pixels of the first
// window of a band after setting CONTROL bit 0, then three pixels (one new
// column, top to bottom) per following window, and to read RESULT after each
// window. RESULT and STATUS are updated on the third rising edge after the
// edge that took the write of the window's last pixel, so a read sampled on
// the fourth edge or later returns the new pixel (one-cycle read latency
// on top).
//
// The split into processor software and this hardware part, and the
// register block between them, follow the system's structure; the processor,
// the bus interconnect and the other peripherals are outside this module.
module vmrhf_top
  import vmrhf_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [1:0]  avs_address,
  input  logic        avs_write,
  input  logic [31:0] avs_writedata,
  input  logic        avs_read,
  output logic [31:0] avs_readdata
);

  logic   row_start;
  logic   pix_valid;
  pixel_t pix;
  logic   res_valid;
  pixel_t res_pix;

  vmrhf_regs u_regs (
    .clk          (clk),
    .rst_n        (rst_n),
    .avs_address  (avs_address),
    .avs_write    (avs_write),
    .avs_writedata(avs_writedata),
    .avs_read     (avs_read),
    .avs_readdata (avs_readdata),
    .row_start    (row_start),
    .pix_valid    (pix_valid),
    .pix          (pix),
    .res_valid    (res_valid),
    .res_pix      (res_pix)
  );

  vmrhf_core u_core (
    .clk      (clk),
    .rst_n    (rst_n),
    .row_start(row_start),
    .in_valid (pix_valid),
    .in_pix   (pix),
    .out_valid(res_valid),
    .out_pix  (res_pix)
  );

endmodule
