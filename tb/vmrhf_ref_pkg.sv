// vmrhf_ref_pkg: integer reference model of the hybrid filter for the
// testbenches. It computes, with plain integer arithmetic and brute-force
// loops, what the RTL must produce:
//   ref_norm  : sum of |component differences| / c, c = 1, 4/3 or 2 when two
//               or more, one or none of the differences are zero
//   ref_vmf   : the vector of a list with the smallest sum of ref_norm
//               distances to all others (first one on a tie)
//   ref_comp  : y = p2 + 40 * trunc((2*p2 - p1 - p3) / (240 + n)), clamped
//   ref_pixel : both stages for a 3x3 window given as 9 pixels in column
//               order (index 4 is the centre)
// It also keeps event counters the end-to-end test uses to prove that each
// case of the datapath was exercised.
package vmrhf_ref_pkg;

  typedef int unsigned rgb_t [3];   // r, g, b

  int unsigned n_case_c1, n_case_c43, n_case_c2;   // norm cases (stage 2 norm)
  int unsigned n_q [3];                            // division results 0, 1, 2
  int unsigned n_neg, n_pos;                       // sign of a nonzero correction
  int unsigned n_clamp_lo, n_clamp_hi;             // clamped results

  function automatic int iabs(int v);
    return v < 0 ? -v : v;
  endfunction

  function automatic int unsigned ref_norm(rgb_t a, rgb_t b);
    int s = 0, zeros = 0;
    for (int c = 0; c < 3; c++) begin
      s += iabs(int'(a[c]) - int'(b[c]));
      if (a[c] == b[c]) zeros++;
    end
    if (zeros >= 2) return s;
    if (zeros == 1) return (3 * s) / 4;
    return s / 2;
  endfunction

  function automatic int ref_norm_case(rgb_t a, rgb_t b);
    int zeros = 0;
    for (int c = 0; c < 3; c++) if (a[c] == b[c]) zeros++;
    return zeros >= 2 ? 0 : (zeros == 1 ? 1 : 2);
  endfunction

  function automatic void ref_vmf(rgb_t v [9], int n, int idx [9], output rgb_t med);
    int best = -1;
    int best_d = 0;
    for (int i = 0; i < n; i++) begin
      int d = 0;
      for (int j = 0; j < n; j++) d += ref_norm(v[idx[i]], v[idx[j]]);
      if (best < 0 || d < best_d) begin
        best   = i;
        best_d = d;
      end
    end
    med = v[idx[best]];
  endfunction

  function automatic int unsigned ref_comp(int unsigned p1, int unsigned p2,
                                          int unsigned p3, int unsigned n,
                                          bit count = 0);
    int num = 2 * int'(p2) - int'(p1) - int'(p3);
    int den = 240 + int'(n);
    int q   = iabs(num) / den;        // magnitude, truncated
    int y   = int'(p2) + (num < 0 ? -40 * q : 40 * q);
    if (count) begin
      n_q[q]++;
      if (q != 0 && num < 0) n_neg++;
      if (q != 0 && num > 0) n_pos++;
      if (y < 0) n_clamp_lo++;
      if (y > 255) n_clamp_hi++;
    end
    if (y < 0) y = 0;
    if (y > 255) y = 255;
    return y;
  endfunction

  function automatic void ref_stage2(rgb_t p1, rgb_t p2, rgb_t p3, output rgb_t y,
                                     input bit count = 0);
    int unsigned n = ref_norm(p1, p3);
    if (count) begin
      case (ref_norm_case(p1, p3))
        0: n_case_c1++;
        1: n_case_c43++;
        default: n_case_c2++;
      endcase
    end
    for (int c = 0; c < 3; c++) y[c] = ref_comp(p1[c], p2[c], p3[c], n, count);
  endfunction

  function automatic void ref_pixel(rgb_t w [9], output rgb_t y, input bit count = 0);
    int m_cross [9] = '{1, 3, 4, 5, 7, 0, 0, 0, 0};
    int m_full  [9] = '{0, 1, 2, 3, 4, 5, 6, 7, 8};
    int m_diag  [9] = '{0, 2, 4, 6, 8, 0, 0, 0, 0};
    rgb_t p1, p2, p3;
    ref_vmf(w, 5, m_cross, p1);
    ref_vmf(w, 9, m_full, p2);
    ref_vmf(w, 5, m_diag, p3);
    ref_stage2(p1, p2, p3, y, count);
  endfunction

  function automatic logic [23:0] pack(rgb_t p);
    return {p[0][7:0], p[1][7:0], p[2][7:0]};
  endfunction

  function automatic void unpack(logic [23:0] v, output rgb_t p);
    p[0] = 32'(v[23:16]);
    p[1] = 32'(v[15:8]);
    p[2] = 32'(v[7:0]);
  endfunction

endpackage
