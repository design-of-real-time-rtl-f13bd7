// gauss_conv1d: one-dimensional convolution with the Gaussian vector
// (1,3,4,3,1), normalised back to an 8-bit pixel.
//
// The convolver is in transposed form: the input is multiplied by 3 and 4
// (shift-and-add constants) and added to a chain of four delay elements, so
// the critical path holds only one adder and the final adder. Partial sums
// are 8, 11, 12 and 12 bits wide, the widths of the delay registers in the
// reference architecture, and the 12-bit sum is divided by the coefficient
// sum 12 in a registered output stage.
//
// STRIDE sets the length of every delay element in pixel enables: 1 gives
// the horizontal convolver; the line length gives the vertical convolver,
// whose delay elements then are line FIFOs holding the intermediate image.
// Timing: the output latched on enable k is
//   (x[k] + 3x[k-S] + 4x[k-2S] + 3x[k-3S] + x[k-4S]) / 12, truncated,
// where x[k] is the input presented on enable k.
// The division by 12 (truncating) is this design's reading of "a divider by
// sum of coefficients"; the figure's adder tree and widths are followed.
module gauss_conv1d
  import edge_pkg::*;
#(
  parameter int unsigned STRIDE = 1
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   en,
  input  pixel_t din,
  output pixel_t dout
);

  logic [7:0]  r1;
  logic [10:0] r2;
  logic [11:0] r3, r4;
  logic [9:0]  x3;
  logic [10:0] x4;
  logic [11:0] sum;

  always_comb begin
    x3  = {2'b00, din} + {1'b0, din, 1'b0};
    x4  = {1'b0, din, 2'b00};
    sum = r4 + 12'(din);
  end

  line_delay #(.WIDTH(8),  .DEPTH(STRIDE)) u_d1 (.clk, .rst_n, .en, .din(din),                     .dout(r1));
  line_delay #(.WIDTH(11), .DEPTH(STRIDE)) u_d2 (.clk, .rst_n, .en, .din(11'(r1) + 11'(x3)),       .dout(r2));
  line_delay #(.WIDTH(12), .DEPTH(STRIDE)) u_d3 (.clk, .rst_n, .en, .din(12'(r2) + 12'(x4)),       .dout(r3));
  line_delay #(.WIDTH(12), .DEPTH(STRIDE)) u_d4 (.clk, .rst_n, .en, .din(r3 + 12'(x3)),            .dout(r4));

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)  dout <= '0;
    else if (en) dout <= pixel_t'(sum / 12'(GAUSS_SUM));

endmodule
