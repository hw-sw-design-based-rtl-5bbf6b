// vrf_channel: rational-function datapath for one colour component.
//
// Computes y = Phi2 + k1 * (2*Phi2 - Phi1 - Phi3) / (w + ||Phi1 - Phi3||)
// with the operator chain and widths of the filter's second-stage diagram:
//   Add   Phi1 + Phi3                        9 bits
//   Shift Phi2 << 1                          9 bits
//   Sub   (Phi2 << 1) - (Phi1 + Phi3)        9-bit magnitude plus a sign
//   Add   w + norm                           10 bits
//   Div   |numerator| / denominator          2-bit integer quotient
//   Mul   quotient * k1                      8 bits
// The quotient cannot exceed 2 because |numerator| <= 510 and the
// denominator is at least w = 240. The diagram ends at the multiplier; the
// final addition of Phi2 (from the filter equation), the sign handling, the
// truncating division and the clamping of the result to 0..255 are this
// implementation's choices. The divider is a two-step restoring divider.
//
// Interface: phi1, phi2, phi3 one component each, norm the shared
// approximate norm ||Phi1 - Phi3||, y the filtered component. Parameters k1
// and w default to 40 and 240. Purely combinational.
module vrf_channel
  import vmrhf_pkg::*;
#(
  parameter int unsigned K1_P = K1,
  parameter int unsigned W_P  = W_CONST
) (
  input  comp_t             phi1,
  input  comp_t             phi2,
  input  comp_t             phi3,
  input  logic [NORM_W-1:0] norm,
  output comp_t             y
);

  logic [PIX_W:0]    sum13;     // Add:   9 bits
  logic [PIX_W:0]    dbl2;      // Shift: 9 bits
  logic              neg;       // sign of the numerator
  logic [PIX_W:0]    num_mag;   // Sub:   9-bit magnitude
  logic [NORM_W-1:0] den;       // Add w: 10 bits
  logic [NORM_W:0]   rem;
  logic [1:0]        quo;       // Div:   2 bits
  logic [PIX_W-1:0]  prod;      // Mul:   8 bits
  logic [PIX_W+1:0]  acc;       // Phi2 +/- prod, before clamping

  always_comb begin
    sum13 = (PIX_W+1)'(phi1) + (PIX_W+1)'(phi3);
    dbl2  = {phi2, 1'b0};
    neg   = sum13 > dbl2;
    num_mag = neg ? (sum13 - dbl2) : (dbl2 - sum13);
    den   = NORM_W'(W_P) + norm;

    // Two-bit restoring division.
    rem = (NORM_W+1)'(num_mag);
    quo = '0;
    if (rem >= {den, 1'b0}) begin
      quo[1] = 1'b1;
      rem    = rem - {den, 1'b0};
    end
    if (rem >= (NORM_W+1)'(den)) begin
      quo[0] = 1'b1;
    end

    prod = PIX_W'(quo) * PIX_W'(K1_P);

    if (neg) begin
      acc = (PIX_W+2)'(phi2) - (PIX_W+2)'(prod);
      y   = acc[PIX_W+1] ? '0 : acc[PIX_W-1:0];          // clamp at 0
    end else begin
      acc = (PIX_W+2)'(phi2) + (PIX_W+2)'(prod);
      y   = acc[PIX_W] ? '1 : acc[PIX_W-1:0];            // clamp at 255
    end
  end

endmodule
