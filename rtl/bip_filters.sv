// bip_filters: the eight frequency-decomposing filters of the binary image
// preprocessor, applied to one pixel.
//
// Input is the 4x4 neighbourhood of the pixel p at (x,y): win[r][c] =
// I(y-2+r, x-2+c), so p is win[2][2]. The filters are, in order (bit k-1 of
// `planes` for filter k):
//   1 3x3 Laplacian            [1 1 1; 1 -8 1; 1 1 1]
//   2 3x3 Sobel, 0 degrees     [1 0 -1; 2 0 -2; 1 0 -1]
//   3 3x3 Sobel, 90 degrees    [1 2 1; 0 0 0; -1 -2 -1]
//   4 3x3 diagonal, 135 deg.   [1 1 -2; 1 -2 1; -2 1 1]
//   5 3x3 diagonal, 45 deg.    [-2 1 1; 1 -2 1; 1 1 -2]
//   6 3x3 Laplacian (diagonal) [0 0 0; 1 -3 1; 0 1 0]
//   7 4x4 third-order high pass, horizontal (row 2: -1 3 -3 1)
//   8 4x4 third-order high pass, vertical   (column 2: -1 3 -3 1, top down)
// Kernels are applied as correlation (not flipped) with their centre element
// (index floor(N/2)) on p, so 3x3 kernels use win[1..3][1..3]. The output bit
// is 1 when the filter response is >= 0. Centring and orientation are this
// design's reading of the coefficient table. Combinational.
module bip_filters (
  input  logic [3:0][3:0][7:0] win,
  output logic [7:0]           planes
);

  typedef int kern_t [4][4];

  // 4x4 kernels; 3x3 ones sit in rows/columns 1..3
  localparam kern_t K [8] = '{
    '{'{0,0,0,0}, '{0, 1, 1, 1}, '{0, 1,-8, 1}, '{0, 1, 1, 1}},
    '{'{0,0,0,0}, '{0, 1, 0,-1}, '{0, 2, 0,-2}, '{0, 1, 0,-1}},
    '{'{0,0,0,0}, '{0, 1, 2, 1}, '{0, 0, 0, 0}, '{0,-1,-2,-1}},
    '{'{0,0,0,0}, '{0, 1, 1,-2}, '{0, 1,-2, 1}, '{0,-2, 1, 1}},
    '{'{0,0,0,0}, '{0,-2, 1, 1}, '{0, 1,-2, 1}, '{0, 1, 1,-2}},
    '{'{0,0,0,0}, '{0, 0, 0, 0}, '{0, 1,-3, 1}, '{0, 0, 1, 0}},
    '{'{0,0,0,0}, '{0, 0, 0, 0}, '{-1,3,-3, 1}, '{0, 0, 0, 0}},
    '{'{0,0,-1,0}, '{0, 0, 3, 0}, '{0, 0,-3, 0}, '{0, 0, 1, 0}}
  };

  always_comb begin
    for (int k = 0; k < 8; k++) begin
      logic signed [13:0] acc;
      acc = '0;
      for (int r = 0; r < 4; r++)
        for (int c = 0; c < 4; c++)
          if (K[k][r][c] != 0)
            acc = acc + 14'(signed'(K[k][r][c])) * signed'({6'b0, win[r][c]});
      planes[k] = (acc >= 0);
    end
  end

endmodule
