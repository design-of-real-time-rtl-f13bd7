// gradient: horizontal and vertical gradient and gradient magnitude.
//
// The 8-bit input is extended to 9 bits and two differences are formed: Sx
// against the previous pixel of the line (one register) and Sy against the
// pixel one line above (one line FIFO). The magnitude is Sx^2 + Sy^2, which
// would need 17 bits; it is saturated to 8 bits, giving 255 whenever the sum
// does not fit. All three outputs are registered together.
//
// Timing, with p[k] the input on enable k, the outputs latched on enable k
// are Sx = p[k] - p[k-1], Sy = p[k] - p[k-W] and M = min(Sx^2+Sy^2, 255).
// Which operand is subtracted from which is this design's choice; the 9-bit
// signed differences and the saturation to 255 follow the document.
module gradient
  import edge_pkg::*;
#(
  parameter int unsigned IMG_W = 256
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   en,
  input  pixel_t din,
  output grad_t  sx,
  output grad_t  sy,
  output pixel_t mag
);

  pixel_t       prev, above;
  grad_t        dx, dy;
  logic [16:0]  sqx, sqy;
  logic [16:0]  sq_sum;
  pixel_t       mag_sat;

  line_delay #(.WIDTH(8), .DEPTH(IMG_W)) u_line (.clk, .rst_n, .en, .din(din), .dout(above));

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)  prev <= '0;
    else if (en) prev <= din;

  always_comb begin
    dx      = $signed({1'b0, din}) - $signed({1'b0, prev});
    dy      = $signed({1'b0, din}) - $signed({1'b0, above});
    sqx     = 17'($unsigned(18'(dx) * 18'(dx)));
    sqy     = 17'($unsigned(18'(dy) * 18'(dy)));
    sq_sum  = sqx + sqy;
    mag_sat = (sq_sum > 17'd255) ? 8'd255 : sq_sum[7:0];
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      sx  <= '0;
      sy  <= '0;
      mag <= '0;
    end else if (en) begin
      sx  <= dx;
      sy  <= dy;
      mag <= mag_sat;
    end

endmodule
