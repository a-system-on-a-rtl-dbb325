// s27: the ISCAS-89 s27 benchmark core with a fault-injection cell on every wire.
//
// Three D flip-flops (asynchronous active-high reset to 0), two inverters, one
// AND, one NAND, two OR and four NOR gates:
//   G14 = NOT(G0)        G8  = AND(G14,G6)    G15 = OR(G12,G8)   G16 = OR(G3,G8)
//   G9  = NAND(G16,G15)  G10 = NOR(G14,G11)   G11 = NOR(G5,G9)   G12 = NOR(G1,G7)
//   G13 = NOR(G2,G12)    G17 = NOT(G11)
//   G5 <= G10, G6 <= G11, G7 <= G13 on the rising edge of CK
// Clock and reset are bits of the input port, so that the whole core, clock
// included, can be driven through a test access bus. Input ports:
//   in_dat = {G0,G1,G2,G3,rst,CK}   (G0 is bit 5, CK is bit 0)
//   out_dat = G17
// G17 changes combinationally with G0..G3 and with the state after each CK edge.
//
// Each of the 19 wires (6 inputs, the output, 12 internal) passes a fault_mux at
// its driver; with every select at FI_PASS the block is the plain s27. The netlist
// is the benchmark's; the one-cell-per-stem placement and the select numbering are
// this design's choice:
//   fsel[0..5]  G0 G1 G2 G3 rst CK     fsel[6]  G17
//   fsel[7..18] G5 G10 G6 G11 G7 G13 G14 G8 G15 G12 G16 G9
// A fault on a flip-flop output (G5, G6, G7) acts on the flip-flop's Q.
module s27
  import soc_pkg::*;
(
  input  logic [5:0] in_dat,
  input  fault_sel_e fsel [S27_WIRES],
  output logic       out_dat
);

  logic g0, g1, g2, g3, rst, ck;
  logic g5, g10, g6, g11, g7, g13, g14, g8, g15, g12, g16, g9, g17;
  logic g10_g, g11_g, g13_g, g14_g, g8_g, g15_g, g12_g, g16_g, g9_g, g17_g;
  logic q5, q6, q7;

  // Primary inputs
  fault_mux u_fi_g0  (.d(in_dat[5]), .sel(fsel[0]), .q(g0));
  fault_mux u_fi_g1  (.d(in_dat[4]), .sel(fsel[1]), .q(g1));
  fault_mux u_fi_g2  (.d(in_dat[3]), .sel(fsel[2]), .q(g2));
  fault_mux u_fi_g3  (.d(in_dat[2]), .sel(fsel[3]), .q(g3));
  fault_mux u_fi_rst (.d(in_dat[1]), .sel(fsel[4]), .q(rst));
  fault_mux u_fi_ck  (.d(in_dat[0]), .sel(fsel[5]), .q(ck));

  // State: three flip-flops with asynchronous reset
  always_ff @(posedge ck or posedge rst) begin
    if (rst) begin
      q5 <= 1'b0;
      q6 <= 1'b0;
      q7 <= 1'b0;
    end else begin
      q5 <= g10;
      q6 <= g11;
      q7 <= g13;
    end
  end

  // Gates (_g is the gate output before its wire's fault cell)
  always_comb begin
    g14_g = ~g0;
    g8_g  = g14 & g6;
    g12_g = ~(g1 | g7);
    g13_g = ~(g2 | g12);
    g15_g = g12 | g8;
    g16_g = g3 | g8;
    g9_g  = ~(g16 & g15);
    g11_g = ~(g5 | g9);
    g10_g = ~(g14 | g11);
    g17_g = ~g11;
  end

  // Primary output
  fault_mux u_fi_g17 (.d(g17_g), .sel(fsel[6]), .q(g17));

  // Internal wires
  fault_mux u_fi_g5  (.d(q5),    .sel(fsel[7]),  .q(g5));
  fault_mux u_fi_g10 (.d(g10_g), .sel(fsel[8]),  .q(g10));
  fault_mux u_fi_g6  (.d(q6),    .sel(fsel[9]),  .q(g6));
  fault_mux u_fi_g11 (.d(g11_g), .sel(fsel[10]), .q(g11));
  fault_mux u_fi_g7  (.d(q7),    .sel(fsel[11]), .q(g7));
  fault_mux u_fi_g13 (.d(g13_g), .sel(fsel[12]), .q(g13));
  fault_mux u_fi_g14 (.d(g14_g), .sel(fsel[13]), .q(g14));
  fault_mux u_fi_g8  (.d(g8_g),  .sel(fsel[14]), .q(g8));
  fault_mux u_fi_g15 (.d(g15_g), .sel(fsel[15]), .q(g15));
  fault_mux u_fi_g12 (.d(g12_g), .sel(fsel[16]), .q(g12));
  fault_mux u_fi_g16 (.d(g16_g), .sel(fsel[17]), .q(g16));
  fault_mux u_fi_g9  (.d(g9_g),  .sel(fsel[18]), .q(g9));

  assign out_dat = g17;

endmodule
