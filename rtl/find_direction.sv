// find_direction: quantises the gradient direction to one of four unit steps.
//
// With Sx and Sy the horizontal and vertical gradients:
//   (1,0)  if |Sy| < 0.5*|Sx|
//   (0,1)  if |Sx| < 0.5*|Sy|
//   (1,-1) if Sx*Sy < 0
//   (1,1)  otherwise
// tested in that order. The slope 0.5 (26.6 degrees) replaces tan 22.5 so
// that the test is a one-bit shift and a compare; this and the order of the
// tests follow the document. Sx*Sy < 0 is evaluated as "signs differ and
// neither is zero". Purely combinational.
module find_direction
  import edge_pkg::*;
(
  input  grad_t sx,
  input  grad_t sy,
  output dir_t  dir
);

  logic [8:0] ax, ay;   // magnitudes, 0..255

  always_comb begin
    ax = sx[8] ? 9'(-sx) : 9'(sx);
    ay = sy[8] ? 9'(-sy) : 9'(sy);
    if ({ay, 1'b0} < {1'b0, ax})
      dir = DIR_E;
    else if ({ax, 1'b0} < {1'b0, ay})
      dir = DIR_S;
    else if ((sx[8] != sy[8]) && (sx != '0) && (sy != '0))
      dir = DIR_NE;
    else
      dir = DIR_SE;
  end

endmodule
