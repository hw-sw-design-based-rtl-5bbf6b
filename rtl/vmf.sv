// vmf: vector median filter over N colour pixels.
//
// For every pixel x_i of the window it forms the aggregated distance
//   d_i = sum over j of ||x_i - x_j||
// and outputs the pixel with the smallest d_i (the vector median). The
// distance between two pixels is the approximate L2 norm of norm_approx, the
// same approximation the rational stage uses. All N*(N-1)/2 pair distances
// are computed in parallel, one norm_approx per pair, and each one is added to
// the sums of both pixels of the pair. When several pixels share the smallest
// sum, the one with the lowest index wins.
//
// The definition (equations for d_i and the arg-min) is the filter's; the
// parallel pair structure, the shared approximate norm and the tie rule are
// this implementation's choices.
//
// Interface: win[0..N-1] in, med out. Purely combinational.
module vmf
  import vmrhf_pkg::*;
#(
  parameter int unsigned N = 9
) (
  input  pixel_t win [N],
  output pixel_t med
);

  localparam int unsigned NP     = N * (N - 1) / 2;
  localparam int unsigned DIST_W = NORM_W + $clog2(N);

  logic [NORM_W-1:0] pair_norm [NP];

  for (genvar i = 0; i < N; i++) begin : g_row
    for (genvar j = i + 1; j < N; j++) begin : g_col
      localparam int unsigned P = i * N - (i * (i + 1)) / 2 + (j - i - 1);
      norm_approx u_norm (
        .a   (win[i]),
        .b   (win[j]),
        .norm(pair_norm[P])
      );
    end
  end

  logic [DIST_W-1:0] agg [N];
  logic [DIST_W-1:0] best_agg;
  logic [$clog2(N)-1:0] best;

  always_comb begin
    for (int i = 0; i < N; i++) agg[i] = '0;
    for (int i = 0; i < N; i++) begin
      for (int j = i + 1; j < N; j++) begin
        agg[i] += DIST_W'(pair_norm[i * N - (i * (i + 1)) / 2 + (j - i - 1)]);
        agg[j] += DIST_W'(pair_norm[i * N - (i * (i + 1)) / 2 + (j - i - 1)]);
      end
    end
    best      = '0;
    best_agg = agg[0];
    for (int i = 1; i < N; i++) begin
      if (agg[i] < best_agg) begin
        best      = $clog2(N)'(i);
        best_agg = agg[i];
      end
    end
    med = win[best];
  end

endmodule
