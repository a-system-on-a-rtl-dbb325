// c17: the ISCAS-85 c17 benchmark core with a fault-injection cell on every wire.
//
// Six 2-input NAND gates, five primary inputs N1 N2 N3 N6 N7, two outputs N22 N23
// and four internal wires N10 N11 N16 N19:
//   N10 = NAND(N1,N3)   N11 = NAND(N3,N6)   N16 = NAND(N2,N11)
//   N19 = NAND(N11,N7)  N22 = NAND(N10,N16) N23 = NAND(N16,N19)
// Each of the 11 wires passes through a fault_mux at its driver, so one select
// forces a stuck-at value on the wire and on all of its fanout. With every select
// at FI_PASS the block is the plain c17. Purely combinational.
//
// The netlist is the benchmark's. Placing one cell per wire stem and numbering the
// selects inputs first, then outputs, then internal wires, is this design's choice:
//   fsel[0..4]  N1 N2 N3 N6 N7     fsel[5..6]  N22 N23
//   fsel[7..10] N10 N11 N16 N19
//
//   in_dat   {N1,N2,N3,N6,N7}  (N1 is bit 4)
//   out_dat  {N22,N23}         (N22 is bit 1)
module c17
  import soc_pkg::*;
(
  input  logic [4:0]  in_dat,
  input  fault_sel_e  fsel [C17_WIRES],
  output logic [1:0]  out_dat
);

  logic n1, n2, n3, n6, n7;
  logic n10, n11, n16, n19, n22, n23;
  logic n10_g, n11_g, n16_g, n19_g, n22_g, n23_g;

  // Primary inputs
  fault_mux u_fi_n1 (.d(in_dat[4]), .sel(fsel[0]), .q(n1));
  fault_mux u_fi_n2 (.d(in_dat[3]), .sel(fsel[1]), .q(n2));
  fault_mux u_fi_n3 (.d(in_dat[2]), .sel(fsel[2]), .q(n3));
  fault_mux u_fi_n6 (.d(in_dat[1]), .sel(fsel[3]), .q(n6));
  fault_mux u_fi_n7 (.d(in_dat[0]), .sel(fsel[4]), .q(n7));

  // Gates (_g is the gate output before its wire's fault cell)
  always_comb begin
    n10_g = ~(n1 & n3);
    n11_g = ~(n3 & n6);
    n16_g = ~(n2 & n11);
    n19_g = ~(n11 & n7);
    n22_g = ~(n10 & n16);
    n23_g = ~(n16 & n19);
  end

  // Primary outputs
  fault_mux u_fi_n22 (.d(n22_g), .sel(fsel[5]), .q(n22));
  fault_mux u_fi_n23 (.d(n23_g), .sel(fsel[6]), .q(n23));

  // Internal wires
  fault_mux u_fi_n10 (.d(n10_g), .sel(fsel[7]),  .q(n10));
  fault_mux u_fi_n11 (.d(n11_g), .sel(fsel[8]),  .q(n11));
  fault_mux u_fi_n16 (.d(n16_g), .sel(fsel[9]),  .q(n16));
  fault_mux u_fi_n19 (.d(n19_g), .sel(fsel[10]), .q(n19));

  assign out_dat = {n22, n23};

endmodule
