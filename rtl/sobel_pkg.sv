// Shared types and constants of the Sobel edge-detection datapath.
// Pixels are 8-bit unsigned grey levels. A 3x3 neighbourhood is held as
// win[row][col], row 0 at the top and col 0 on the left. Sobel gradients of
// 8-bit pixels lie in -1020..1020 and need 11 signed bits. The gradient
// magnitude is carried in 9 bits: it is computed from gradients scaled down
// by 4 (see gradient_magnitude), so it never exceeds 361.
package sobel_pkg;
  localparam int unsigned PIX_W  = 8;
  localparam int unsigned GRAD_W = 11;
  localparam int unsigned MAG_W  = 9;

  typedef logic [PIX_W-1:0]         pixel_t;
  typedef pixel_t                   window_t [3][3];
  typedef logic signed [GRAD_W-1:0] grad_t;
  typedef logic [MAG_W-1:0]         mag_t;
endpackage
