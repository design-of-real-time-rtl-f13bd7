// edge_pkg: types and constants shared by the edge detection pipelines.
//
// Pixels are 8-bit unsigned intensities. Gradients are 9-bit signed
// differences of two pixels. The gradient direction used by nonmaximum
// suppression is one of four unit steps (dx,dy); the neighbour in the
// opposite direction is (-dx,-dy). x grows to the right along a line and
// y grows downwards (later lines), which is this design's own convention.
package edge_pkg;

  localparam int unsigned PIX_W  = 8;   // pixel width
  localparam int unsigned GRAD_W = 9;   // signed gradient width

  // Gaussian vector (1,3,4,3,1); the 1D result is divided by its sum.
  localparam int unsigned GAUSS_SUM = 12;

  typedef logic [PIX_W-1:0]         pixel_t;
  typedef logic signed [GRAD_W-1:0] grad_t;

  // Quantised gradient direction (dx,dy).
  typedef enum logic [1:0] {
    DIR_E  = 2'd0,   // (1, 0)
    DIR_S  = 2'd1,   // (0, 1)
    DIR_NE = 2'd2,   // (1,-1)
    DIR_SE = 2'd3    // (1, 1)
  } dir_t;

  // Magnitude pixel carried with its direction through the suppression window.
  typedef struct packed {
    dir_t   dir;
    pixel_t mag;
  } magdir_t;

endpackage
