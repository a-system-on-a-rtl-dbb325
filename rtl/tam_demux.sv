// tam_demux: input half of the multiplexer-based direct-access TAM.
//
// The TAM input bus z is routed to the input port of the one core whose index
// equals sel (the SOC's ENABLE pins); every other core port sees all zeros. Bus
// width W is the largest input-pin count of any core on the TAM, so a core uses
// the low bits of its port and leaves the rest. Purely combinational.
//
// Unselected ports are driven to 0 rather than left floating: an on-chip bus in
// two-state logic has no high-impedance value. That is this design's choice.
//
//   sel  core select, SEL_W bits; values >= N select nothing
//   z    TAM input bus, W bits
//   y    one W-bit bus per core, y[k] for core k
module tam_demux #(
  parameter int N     = 4,
  parameter int W     = 36,
  parameter int SEL_W = 2
) (
  input  logic [SEL_W-1:0] sel,
  input  logic [W-1:0]     z,
  output logic [W-1:0]     y [N]
);

  always_comb begin
    for (int k = 0; k < N; k++)
      y[k] = (int'(sel) == k) ? z : '0;
  end

endmodule
