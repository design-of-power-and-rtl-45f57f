// Reference model of the Sobel edge-detection datapath, for testbenches.
// It works from plain integers: the Sobel masks as coefficient arrays, the
// approximate squares from a table (approx_square.hex, produced by an
// independent bit-level model of the approximate multiplier), and a
// square root found by search.
package sobel_ref_pkg;
  int unsigned sq_table [256];

  function automatic void load_squares();
    logic [15:0] t [256];
    $readmemh("tb/approx_square.hex", t);
    foreach (t[i]) sq_table[i] = int'(t[i]);
  endfunction

  // Sobel masks, [row][col].
  localparam int MX [3][3] = '{'{-1, 0, 1}, '{-2, 0, 2}, '{-1, 0, 1}};
  localparam int MY [3][3] = '{'{-1, -2, -1}, '{0, 0, 0}, '{1, 2, 1}};

  // Gx, Gy of the 3x3 neighbourhood w[row][col].
  function automatic void gradients(input int w [3][3], output int gx, output int gy);
    gx = 0; gy = 0;
    for (int r = 0; r < 3; r++)
      for (int c = 0; c < 3; c++) begin
        gx += MX[r][c] * w[r][c];
        gy += MY[r][c] * w[r][c];
      end
  endfunction

  function automatic int unsigned floor_sqrt(int unsigned v);
    int unsigned r = 0;
    while ((r + 1) * (r + 1) <= v) r++;
    return r;
  endfunction

  // Scaled magnitude from the gradients: squares of |G|/4 from the table.
  function automatic int mag_of(int gx, int gy);
    int ax = ((gx < 0) ? -gx : gx) / 4;
    int ay = ((gy < 0) ? -gy : gy) / 4;
    return int'(floor_sqrt(sq_table[ax] + sq_table[ay]));
  endfunction

  // Same with exact squares, to measure what the approximation changes.
  function automatic int exact_mag_of(int gx, int gy);
    int ax = ((gx < 0) ? -gx : gx) / 4;
    int ay = ((gy < 0) ? -gy : gy) / 4;
    int unsigned s = ax * ax + ay * ay;
    return int'(floor_sqrt(s));
  endfunction
endpackage
