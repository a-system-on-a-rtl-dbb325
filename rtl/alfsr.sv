// alfsr: autonomous linear feedback shift register, the hardware form of the
// pseudorandom test pattern generator.
//
// WIDTH D flip-flops in a chain a(W-1) -> ... -> a0, shifting one place toward
// a0 on every rising clock edge. The bit entering the chain is the XOR of the
// stages picked by TAPS. The default is the four-stage register of the
// characteristic polynomial p(x) = x^4 + x + 1: the new bit is a1 xor a0, which
// walks through all 15 non-zero states before repeating. Outputs Y(W-1)..Y0 are
// the stage values a(W-1)..a0, valid one clock after each edge.
//
// The polynomial, the stage chain and the outputs are the methodology's. The
// synchronous rst that loads the non-zero SEED is this design's addition: the
// register has no other input, and an all-zero state would never leave itself.
module alfsr #(
  parameter int              WIDTH = 4,
  parameter logic [WIDTH-1:0] TAPS = 4'b0011,
  parameter logic [WIDTH-1:0] SEED = 4'b0001
) (
  input  logic             clk,
  input  logic             rst,
  output logic [WIDTH-1:0] y
);

  logic [WIDTH-1:0] a;

  always_ff @(posedge clk) begin
    if (rst) a <= SEED;
    else     a <= {^(a & TAPS), a[WIDTH-1:1]};
  end

  assign y = a;

  initial assert (SEED != '0) else $error("alfsr: SEED must be non-zero");

endmodule
