// vmrhf_pkg: types and constants shared by the vector median rational hybrid
// filter (VMRHF).
//
// A colour pixel is three 8-bit components. The rational-function constants
// are the ones given for h = 6 and k = 0.025: k1 = 1/k = 40 and w = h/k = 240.
// The window is 3x3, numbered as pixels arrive: column by column, top to
// bottom, so index 0..2 is the left column, 4 is the centre and 6..8 is the
// right column. The three first-stage median filters look at three subsets of
// that window: a cross (Phi1), the full window (Phi2) and the diagonals
// (Phi3). The masks are bit vectors over window indices 8..0.
package vmrhf_pkg;

  localparam int unsigned PIX_W   = 8;    // bits per colour component
  localparam int unsigned WIN     = 9;    // 3x3 window
  localparam int unsigned NORM_W  = 10;   // width of the approximate norm
  localparam int unsigned K1      = 40;   // 1/k
  localparam int unsigned W_CONST = 240;  // h/k

  // Window masks, bit i set when window index i takes part.
  localparam logic [WIN-1:0] MASK_CROSS = 9'b010_111_010; // indices 1,3,4,5,7
  localparam logic [WIN-1:0] MASK_FULL  = 9'b111_111_111; // all nine
  localparam logic [WIN-1:0] MASK_DIAG  = 9'b101_010_101; // indices 0,2,4,6,8

  typedef logic [PIX_W-1:0] comp_t;

  typedef struct packed {
    comp_t r;
    comp_t g;
    comp_t b;
  } pixel_t;

  // Number of ones in a mask, used to size the median filters.
  function automatic int unsigned mask_count(logic [WIN-1:0] m);
    int unsigned n = 0;
    for (int i = 0; i < WIN; i++) n += int'(m[i]);
    return n;
  endfunction

  // Window index of the k-th set bit of a mask, counting from bit 0.
  function automatic int unsigned mask_index(logic [WIN-1:0] m, int unsigned k);
    int unsigned seen = 0;
    int unsigned idx  = 0;
    for (int i = 0; i < WIN; i++) begin
      if (m[i]) begin
        if (seen == k) idx = i;
        seen++;
      end
    end
    return idx;
  endfunction

endpackage
