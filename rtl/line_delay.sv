// line_delay: fixed-length FIFO that delays a pixel stream by one image line
// (or any DEPTH >= 1 pixel enables).
//
// It is the "FIFO" of the line-buffered windows: on each cycle with en high
// the word at din is written and the word written DEPTH enables earlier is
// presented at dout, registered. Seen from a circuit that samples dout on
// the same enable as it presents din, dout holds the input of exactly DEPTH
// enables before. DEPTH = 1 is a plain register. Longer delays are a
// circular buffer of DEPTH-1 words with one pointer (read before write of
// the same address) followed by the output register, the way a single-port
// line store is used. The memory itself is not reset: dout is undefined
// until DEPTH enables have passed. Using on-chip memory instead of the board
// SRAM is this design's choice.
module line_delay #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 256
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic [WIDTH-1:0] din,
  output logic [WIDTH-1:0] dout
);

  if (DEPTH <= 1) begin : g_reg
    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n)  dout <= '0;
      else if (en) dout <= din;
  end else begin : g_ram
    localparam int unsigned N  = DEPTH - 1;
    localparam int unsigned AW = (N > 1) ? $clog2(N) : 1;
    logic [WIDTH-1:0] mem [N];
    logic [AW-1:0]    ptr;

    always_ff @(posedge clk) begin
      if (en) begin
        mem[ptr] <= din;
        dout     <= mem[ptr];
      end
    end

    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n) ptr <= '0;
      else if (en) ptr <= (ptr == AW'(N - 1)) ? '0 : ptr + 1'b1;
  end

endmodule
