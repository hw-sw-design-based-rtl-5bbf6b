// vrf: vector rational function, the second stage of the hybrid filter.
//
// Takes the three first-stage vector medians Phi1, Phi2, Phi3 and returns
//   y = Phi2 + k1 * (-Phi1 + 2*Phi2 - Phi3) / (w + ||Phi1 - Phi3||)
// component by component. The norm ||Phi1 - Phi3|| is a vector quantity and
// is computed once (norm_approx) and shared by the three component datapaths
// (vrf_channel). The structure follows the filter's second-stage diagram;
// sharing one norm among the components is how the equation reads.
//
// Interface: phi1, phi2, phi3 RGB pixels in, y RGB pixel out.
// Purely combinational.
module vrf
  import vmrhf_pkg::*;
(
  input  pixel_t phi1,
  input  pixel_t phi2,
  input  pixel_t phi3,
  output pixel_t y
);

  logic [NORM_W-1:0] norm13;

  norm_approx u_norm (
    .a   (phi1),
    .b   (phi3),
    .norm(norm13)
  );

  vrf_channel u_r (.phi1(phi1.r), .phi2(phi2.r), .phi3(phi3.r), .norm(norm13), .y(y.r));
  vrf_channel u_g (.phi1(phi1.g), .phi2(phi2.g), .phi3(phi3.g), .norm(norm13), .y(y.g));
  vrf_channel u_b (.phi1(phi1.b), .phi2(phi2.b), .phi3(phi3.b), .norm(norm13), .y(y.b));

endmodule
