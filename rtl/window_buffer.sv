// window_buffer: 3x3 filter window fed three pixels at a time.
//
// Pixels arrive column by column, top to bottom, so a window is nine
// consecutive pixels and the next window to the right is the last six of
// them plus the three pixels of the new column. The buffer is a nine-entry
// shift register: every accepted pixel moves the window by one place
// (win[0] drops out, the new pixel enters at win[8]). After a band start
// (row_start) nine pixels form the first window; after that every third
// pixel completes a new window. win_valid pulses for one cycle when the
// window register holds a complete new window.
//
// The 9-then-3 loading scheme and the shift register come from the filter's
// pixel-loading description; the band-start signal, the pulse and the reset
// values are this implementation's choices.
//
// Timing: a pixel accepted at a rising edge is in win[8] after that edge; the
// edge that takes the completing pixel also raises win_valid for one cycle.
// A row_start in the same cycle as a pixel makes that pixel the first of the
// new band.
module window_buffer
  import vmrhf_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   row_start,
  input  logic   in_valid,
  input  pixel_t in_pix,
  output pixel_t win [WIN],
  output logic   win_valid
);

  logic       first;     // current band has not produced a window yet
  logic [3:0] count;     // pixels accepted towards the next window
  logic       first_n;
  logic [3:0] count_n;

  always_comb begin
    first_n = row_start ? 1'b1 : first;
    count_n = row_start ? 4'd0 : count;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      first     <= 1'b1;
      count     <= '0;
      win_valid <= 1'b0;
      for (int i = 0; i < WIN; i++) win[i] <= '0;
    end else begin
      win_valid <= 1'b0;
      first     <= first_n;
      count     <= count_n;
      if (in_valid) begin
        for (int i = 0; i < WIN - 1; i++) win[i] <= win[i+1];
        win[WIN-1] <= in_pix;
        if (count_n + 4'd1 == (first_n ? 4'd9 : 4'd3)) begin
          win_valid <= 1'b1;
          count     <= '0;
          first     <= 1'b0;
        end else begin
          count <= count_n + 4'd1;
        end
      end
    end
  end

endmodule
