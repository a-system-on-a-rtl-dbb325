// tam_mux: output half of the multiplexer-based direct-access TAM.
//
// Passes the response bus of the core selected by sel (the same ENABLE pins that
// steer tam_demux) to the TAM output bus. Each core drives the low bits of its
// W-bit input and zeros above its own pin count. A select value with no core
// behind it gives all zeros (this design's choice). Purely combinational.
//
//   sel  core select, SEL_W bits
//   x    one W-bit response bus per core
//   out  TAM output bus, W bits (width of the widest core output)
module tam_mux #(
  parameter int N     = 4,
  parameter int W     = 7,
  parameter int SEL_W = 2
) (
  input  logic [SEL_W-1:0] sel,
  input  logic [W-1:0]     x [N],
  output logic [W-1:0]     out
);

  always_comb begin
    out = '0;
    for (int k = 0; k < N; k++)
      if (int'(sel) == k) out = x[k];
  end

endmodule
