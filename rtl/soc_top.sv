// soc_top: the complete test architecture, three systems-on-chip side by side.
//
//   mixed_*  SOC_MIXED: s27, s298, c17, c432   ENABLE 2 bits, Z 36 bits, OUT 7 bits
//   comb_*   SOC_COMB : ten combinational cores ENABLE 4 bits, Z 157,    OUT 64
//   seq_*    SOC_SEQ  : ten sequential cores    ENABLE 4 bits, Z 21,     OUT 19
//   lfsr_*   the four-stage autonomous LFSR pattern generator (x^4 + x + 1)
//
// Each SOC has its own TAM pins (enable, z, out), its wrapper mode pin
// (test_mode), the functional pins of its wrapped cores (func_in, func_out), the
// core-side pins of wrappers whose core is not part of this design (ext_core_in,
// ext_core_out), and the fault-injection selects of the c17 and s27 it holds. A
// core is tested by setting test_mode, putting its index on enable and driving
// its inputs on z; its response appears on out in the same cycle (combinational
// path), or after the CK bit (z[0]) toggles for the sequential s27.
//
// The LFSR is the hardware form of the pseudorandom pattern generator; it runs on
// lfsr_clk and is reloaded with its seed while lfsr_rst is high. It is not wired
// to a TAM: in this methodology the stimuli arrive from off chip, and the LFSR is
// offered as the on-chip alternative.
//
// The per-core arrays are as wide as their SOC's bus for every core, so many of
// their output bits (those above a core's own pin count, and the functional
// outputs of c17 and s27 beyond their two and one bits) are constant 0.
module soc_top
  import soc_pkg::*;
(
  // SOC_MIXED
  input  logic [1:0]   mixed_enable,
  input  logic [35:0]  mixed_z,
  output logic [6:0]   mixed_out,
  input  logic         mixed_test_mode,
  input  logic [35:0]  mixed_func_in      [4],
  output logic [6:0]   mixed_func_out     [4],
  output logic [35:0]  mixed_ext_core_in  [4],
  input  logic [6:0]   mixed_ext_core_out [4],
  input  fault_sel_e   mixed_c17_fsel     [C17_WIRES],
  input  fault_sel_e   mixed_s27_fsel     [S27_WIRES],
  // SOC_COMB
  input  logic [3:0]   comb_enable,
  input  logic [156:0] comb_z,
  output logic [63:0]  comb_out,
  input  logic         comb_test_mode,
  input  logic [156:0] comb_func_in       [10],
  output logic [63:0]  comb_func_out      [10],
  output logic [156:0] comb_ext_core_in   [10],
  input  logic [63:0]  comb_ext_core_out  [10],
  input  fault_sel_e   comb_c17_fsel      [C17_WIRES],
  // SOC_SEQ
  input  logic [3:0]   seq_enable,
  input  logic [20:0]  seq_z,
  output logic [18:0]  seq_out,
  input  logic         seq_test_mode,
  input  logic [20:0]  seq_func_in        [10],
  output logic [18:0]  seq_func_out       [10],
  output logic [20:0]  seq_ext_core_in    [10],
  input  logic [18:0]  seq_ext_core_out   [10],
  input  fault_sel_e   seq_s27_fsel       [S27_WIRES],
  // pattern generator
  input  logic         lfsr_clk,
  input  logic         lfsr_rst,
  output logic [3:0]   lfsr_y
);

  // SOC_COMB holds no s27 and SOC_SEQ no c17: their selects are tied to pass.
  fault_sel_e no_c17_fault [C17_WIRES];
  fault_sel_e no_s27_fault [S27_WIRES];
  always_comb begin
    for (int i = 0; i < C17_WIRES; i++) no_c17_fault[i] = FI_PASS;
    for (int i = 0; i < S27_WIRES; i++) no_s27_fault[i] = FI_PASS;
  end

  soc #(.KIND(SOC_MIXED)) u_soc_mixed (
    .enable       (mixed_enable),
    .z            (mixed_z),
    .out          (mixed_out),
    .test_mode    (mixed_test_mode),
    .func_in      (mixed_func_in),
    .func_out     (mixed_func_out),
    .ext_core_in  (mixed_ext_core_in),
    .ext_core_out (mixed_ext_core_out),
    .c17_fsel     (mixed_c17_fsel),
    .s27_fsel     (mixed_s27_fsel)
  );

  soc #(.KIND(SOC_COMB)) u_soc_comb (
    .enable       (comb_enable),
    .z            (comb_z),
    .out          (comb_out),
    .test_mode    (comb_test_mode),
    .func_in      (comb_func_in),
    .func_out     (comb_func_out),
    .ext_core_in  (comb_ext_core_in),
    .ext_core_out (comb_ext_core_out),
    .c17_fsel     (comb_c17_fsel),
    .s27_fsel     (no_s27_fault)
  );

  soc #(.KIND(SOC_SEQ)) u_soc_seq (
    .enable       (seq_enable),
    .z            (seq_z),
    .out          (seq_out),
    .test_mode    (seq_test_mode),
    .func_in      (seq_func_in),
    .func_out     (seq_func_out),
    .ext_core_in  (seq_ext_core_in),
    .ext_core_out (seq_ext_core_out),
    .c17_fsel     (no_c17_fault),
    .s27_fsel     (seq_s27_fsel)
  );

  alfsr #(.WIDTH(4), .TAPS(4'b0011), .SEED(4'b0001)) u_alfsr (
    .clk (lfsr_clk),
    .rst (lfsr_rst),
    .y   (lfsr_y)
  );

endmodule
