// vmrhf_regs: Avalon-MM slave register file of the filter accelerator.
//
// The processor feeds the filter through these registers and collects the
// result. Register map (32-bit words, word addresses):
//   0  PIXEL   write  {8'h00, R, G, B}: one pixel into the window
//   1  CONTROL write  bit 0 = 1: the next pixel starts a new band, so the
//                     next window needs nine pixels instead of three
//   2  STATUS  read   bit 0: a result is waiting in RESULT;
//                     bit 1: a result was overwritten before it was read
//   3  RESULT  read   {8'h00, R, G, B} of the last filtered pixel; reading
//                     it clears both STATUS bits
// Reads have a fixed latency of one cycle (readdata is registered); the
// slave never stalls the bus, so there is no waitrequest.
//
// That the processor and the filter meet in a register block on the Avalon
// bus is the system's structure; the map, the data format, the status bits
// and the bus timing are this implementation's choices.
module vmrhf_regs
  import vmrhf_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // Avalon-MM slave
  input  logic [1:0]  avs_address,
  input  logic        avs_write,
  input  logic [31:0] avs_writedata,
  input  logic        avs_read,
  output logic [31:0] avs_readdata,
  // towards the filter core
  output logic        row_start,
  output logic        pix_valid,
  output pixel_t      pix,
  input  logic        res_valid,
  input  pixel_t      res_pix
);

  typedef enum logic [1:0] {
    REG_PIXEL   = 2'd0,
    REG_CONTROL = 2'd1,
    REG_STATUS  = 2'd2,
    REG_RESULT  = 2'd3
  } reg_addr_e;

  reg_addr_e addr;
  pixel_t    result;
  logic      ready;
  logic      overrun;
  logic      result_read;

  assign addr        = reg_addr_e'(avs_address);
  assign pix_valid   = avs_write && addr == REG_PIXEL;
  assign pix         = pixel_t'(avs_writedata[3*PIX_W-1:0]);
  assign row_start   = avs_write && addr == REG_CONTROL && avs_writedata[0];
  assign result_read = avs_read && addr == REG_RESULT;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      result  <= '0;
      ready   <= 1'b0;
      overrun <= 1'b0;
    end else begin
      if (res_valid) begin
        result  <= res_pix;
        ready   <= 1'b1;
        overrun <= overrun || (ready && !result_read);
      end else if (result_read) begin
        ready   <= 1'b0;
        overrun <= 1'b0;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      avs_readdata <= '0;
    end else if (avs_read) begin
      unique case (addr)
        REG_STATUS: avs_readdata <= {30'd0, overrun, ready};
        REG_RESULT: avs_readdata <= {8'd0, result};
        default:    avs_readdata <= '0;
      endcase
    end
  end

  // An Avalon master never reads and writes in the same cycle.
  a_no_read_write: assert property (@(posedge clk) disable iff (!rst_n)
                                    !(avs_read && avs_write));

endmodule
