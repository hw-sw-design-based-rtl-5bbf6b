// norm_approx: approximate Euclidean (L2) distance between two colour pixels.
//
// The exact norm sqrt(dr^2 + dg^2 + db^2) needs squares and a square root.
// This block replaces it with the sum of the absolute component differences
// divided by a correction factor c chosen from how many differences are zero:
//   two or three zero  -> c = 1    (the sum is already the exact norm)
//   one zero           -> c = 4/3  (implemented as 3*sum/4)
//   none zero          -> c = 2    (implemented as sum/2)
// The approximation and the three cases follow the filter's hardware
// description; c = 4/3 for the one-zero case and truncation of the scaled
// sums are this implementation's reading.
//
// Interface: a, b are RGB pixels; norm is an unsigned NORM_W-bit result
// (at most 3*255 = 765). Purely combinational, no clock.
module norm_approx
  import vmrhf_pkg::*;
(
  input  pixel_t            a,
  input  pixel_t            b,
  output logic [NORM_W-1:0] norm
);

  comp_t            dr, dg, db;
  logic [NORM_W-1:0] sum;
  logic [NORM_W+1:0] sum3;   // 3*sum, up to 2295
  logic [1:0]        nonzero;

  function automatic comp_t absdiff(comp_t p, comp_t q);
    return (p >= q) ? comp_t'(p - q) : comp_t'(q - p);
  endfunction

  always_comb begin
    dr      = absdiff(a.r, b.r);
    dg      = absdiff(a.g, b.g);
    db      = absdiff(a.b, b.b);
    sum     = NORM_W'(dr) + NORM_W'(dg) + NORM_W'(db);
    sum3    = (NORM_W+2)'(sum) + ((NORM_W+2)'(sum) << 1);
    nonzero = 2'(int'(dr != '0) + int'(dg != '0) + int'(db != '0));
    unique case (nonzero)
      2'd0, 2'd1: norm = sum;                      // c = 1
      2'd2:       norm = NORM_W'(sum3 >> 2);       // c = 4/3
      default:    norm = NORM_W'(sum >> 1);        // c = 2
    endcase
  end

endmodule
