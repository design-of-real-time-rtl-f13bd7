// nonmax_suppress: keeps a gradient magnitude only where it is a local
// maximum along the gradient direction.
//
// The direction of each incoming pixel is found from (Sx,Sy) and travels with
// its magnitude. Two line FIFOs and three rows of three registers hold the
// 3x3 neighbourhood. The centre's direction drives a select unit that puts
// one neighbour at a time on a shared comparison bus (a one-hot AND-OR bus,
// the on-chip equivalent of the 3-state bus of the original board design):
//   phase A, the clock after a pixel enable: the neighbour M+ in the
//            gradient direction is on the bus; M>M+ and M>=M+ are stored;
//   phase B, the following clocks up to and including the next pixel
//            enable: the opposite neighbour M- is on the bus, and on that
//            enable the centre is output if (M>M+ and M>=M-) or
//            (M>M- and M>=M+), and 0 otherwise.
// Two comparisons per pixel period, as in the document, so pixel enables
// must be at least two clocks apart (checked by an assertion).
//
// Window, with s[k] the input on enable k: after enable k the top row holds
// s[k..k-2] (the line below the centre, y+1), the middle row
// s[k-W..k-W-2] and the bottom row s[k-2W..k-2W-2]; the first register of a
// row is x+1. The output latched on enable k+1 is the decision for that
// window, whose centre is s[k-W-1]; so dout latched on enable k belongs to
// s[k-W-2]. Deciding on the next enable keeps this latency the same
// whatever the spacing of the enables.
module nonmax_suppress
  import edge_pkg::*;
#(
  parameter int unsigned IMG_W = 256
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   en,
  input  grad_t  sx,
  input  grad_t  sy,
  input  pixel_t mag,
  output pixel_t dout
);

  dir_t    dir_in;
  magdir_t in_w, f1, f2;
  magdir_t win [3][3];          // [row: 0=y+1,1=y,2=y-1][col: 0=x+1,1=x,2=x-1]
  logic    phase_a, phase_b;
  logic [7:0] sel;              // one-hot bus drivers: 3-state control
  pixel_t  nb [8];              // neighbours in bus order
  pixel_t  bus, centre;
  logic    gt, ge, gt_a, ge_a;

  find_direction u_dir (.sx(sx), .sy(sy), .dir(dir_in));
  assign in_w = '{dir: dir_in, mag: mag};

  line_delay #(.WIDTH($bits(magdir_t)), .DEPTH(IMG_W)) u_fifo1 (.clk, .rst_n, .en, .din(in_w), .dout(f1));
  line_delay #(.WIDTH($bits(magdir_t)), .DEPTH(IMG_W)) u_fifo2 (.clk, .rst_n, .en, .din(f1),   .dout(f2));

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      for (int r = 0; r < 3; r++)
        for (int c = 0; c < 3; c++) win[r][c] <= '0;
    end else if (en) begin
      win[0][0] <= in_w;
      win[1][0] <= f1;
      win[2][0] <= f2;
      for (int r = 0; r < 3; r++) begin
        win[r][1] <= win[r][0];
        win[r][2] <= win[r][1];
      end
    end

  // Neighbours in bus order: 0 (1,1) 1 (0,1) 2 (-1,1) 3 (1,0) 4 (-1,0)
  // 5 (1,-1) 6 (0,-1) 7 (-1,-1)
  always_comb begin
    nb[0] = win[0][0].mag; nb[1] = win[0][1].mag; nb[2] = win[0][2].mag;
    nb[3] = win[1][0].mag; nb[4] = win[1][2].mag;
    nb[5] = win[2][0].mag; nb[6] = win[2][1].mag; nb[7] = win[2][2].mag;
    centre = win[1][1].mag;
  end

  // 3-state control: which neighbour drives the bus in this phase.
  always_comb begin
    sel = '0;
    unique case (win[1][1].dir)
      DIR_E:  sel = phase_b ? 8'b0001_0000 : 8'b0000_1000;  // M+ (1,0),  M- (-1,0)
      DIR_S:  sel = phase_b ? 8'b0100_0000 : 8'b0000_0010;  // M+ (0,1),  M- (0,-1)
      DIR_NE: sel = phase_b ? 8'b0000_0100 : 8'b0010_0000;  // M+ (1,-1), M- (-1,1)
      DIR_SE: sel = phase_b ? 8'b1000_0000 : 8'b0000_0001;  // M+ (1,1),  M- (-1,-1)
      default: sel = '0;
    endcase
  end

  always_comb begin
    bus = '0;
    for (int i = 0; i < 8; i++) bus |= nb[i] & {8{sel[i]}};
    gt = centre >  bus;
    ge = centre >= bus;
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      phase_a <= 1'b0;
      phase_b <= 1'b0;
      gt_a    <= 1'b0;
      ge_a    <= 1'b0;
      dout    <= '0;
    end else begin
      phase_a <= en;
      if (phase_a) begin
        gt_a    <= gt;
        ge_a    <= ge;
        phase_b <= 1'b1;
      end
      if (en) begin
        dout    <= ((gt_a && ge) || (gt && ge_a)) ? centre : '0;
        phase_b <= 1'b0;
      end
    end

  // Two bus comparisons per pixel: a pixel enable may not follow another
  // one on the next clock.
  a_pix_rate: assert property (@(posedge clk) disable iff (!rst_n) en |=> !en)
    else $error("nonmax_suppress: pixel enables closer than two clocks");

endmodule
