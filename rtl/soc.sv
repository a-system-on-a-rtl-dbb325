// soc: one system-on-chip of wrapped cores on a multiplexer-based direct-access
// test access mechanism (TAM).
//
// The SOC has three test pins: ENABLE selects a core, the input bus Z carries its
// test stimuli and the output bus OUT returns its response. tam_demux routes Z to
// the selected core's wrapper, tam_mux brings that wrapper's response to OUT, so
// the selected core is reached from the SOC pins as if it were a stand-alone chip.
// Z is as wide as the core with the most inputs and OUT as wide as the core with
// the most outputs; a smaller core uses the low bits (bit k of its port is Z[k]
// and OUT[k]) and the bits above read 0.
//
// Every core sits in a core_wrapper. When test_mode is 1 the wrapper of the core
// selected by ENABLE is in test mode (inputs from the TAM, outputs to the TAM);
// every other wrapper, and all of them when test_mode is 0, is in normal mode,
// joining the core to its functional pins func_in/func_out.
//
// KIND picks the configuration (soc_pkg): SOC_MIXED (s27, s298, c17, c432),
// SOC_COMB (ten ISCAS-85 cores), SOC_SEQ (ten ISCAS-89 cores) or one of the
// further mixed systems MIXED_1..MIXED_4. The
// cores c17 and s27 are built here, each with fault-injection cells controlled by
// c17_fsel/s27_fsel. For every other core the wrapper is built and its core side
// is brought out: ext_core_in carries what the core would receive, ext_core_out
// takes its response. The whole block is combinational from pins to pins; s27
// receives its clock and reset as Z (or func_in) bits 0 and 1.
//
// The TAM structure, the bus widths, the core order and the two-mode wrapper
// follow the methodology. Driving unused bus bits to 0 instead of leaving them
// undriven, and deriving each wrapper's enable from test_mode and ENABLE, are
// this design's choices. The c17_fsel and s27_fsel ports exist in every
// configuration so that all of them share one port list; in a configuration
// without a c17 (or s27) the corresponding selects have nothing to drive and
// are reported as unused. func_in, func_out, ext_core_in and ext_core_out are
// arrays with one full bus width element per core, so that every configuration
// has the same port shapes; each core uses only its own low bits, and the output
// bits above a core's pin count are constant 0. In the slots that hold c17 or
// s27, ext_core_in is 0 and ext_core_out is not read.
module soc
  import soc_pkg::*;
#(
  parameter soc_kind_e KIND = SOC_MIXED,
  localparam int NC    = num_cores(KIND),
  localparam int SEL_W = sel_width(KIND),
  localparam int ZW    = tam_in_width(KIND),
  localparam int OW    = tam_out_width(KIND)
) (
  // TAM pins
  input  logic [SEL_W-1:0] enable,
  input  logic [ZW-1:0]    z,
  output logic [OW-1:0]    out,
  // wrapper mode
  input  logic             test_mode,
  // functional pins of each wrapped core (low bits used)
  input  logic [ZW-1:0]    func_in      [NC],
  output logic [OW-1:0]    func_out     [NC],
  // core side of wrappers whose core is outside this design
  output logic [ZW-1:0]    ext_core_in  [NC],
  input  logic [OW-1:0]    ext_core_out [NC],
  // fault-injection selects of the built cores
  input  fault_sel_e       c17_fsel     [C17_WIRES],
  input  fault_sel_e       s27_fsel     [S27_WIRES]
);

  localparam int C17_AT = slot_of(KIND, C17);
  localparam int S27_AT = slot_of(KIND, S27);

  logic [ZW-1:0] tam_to_core [NC];
  logic [OW-1:0] core_to_tam [NC];

  tam_demux #(.N(NC), .W(ZW), .SEL_W(SEL_W)) u_demux (
    .sel (enable),
    .z   (z),
    .y   (tam_to_core)
  );

  tam_mux #(.N(NC), .W(OW), .SEL_W(SEL_W)) u_mux (
    .sel (enable),
    .x   (core_to_tam),
    .out (out)
  );

  for (genvar k = 0; k < NC; k++) begin : g_core
    localparam int IW  = core_in_width(KIND, k);
    localparam int OWK = core_out_width(KIND, k);

    logic           test_en;
    logic [IW-1:0]  cin;
    logic [OWK-1:0] cout;
    logic [OWK-1:0] fout;
    logic [OWK-1:0] tout;

    assign test_en = test_mode && (int'(enable) == k);

    core_wrapper #(.IN_W(IW), .OUT_W(OWK)) u_wrap (
      .test_en  (test_en),
      .func_in  (func_in[k][IW-1:0]),
      .tam_in   (tam_to_core[k][IW-1:0]),
      .core_in  (cin),
      .core_out (cout),
      .func_out (fout),
      .tam_out  (tout)
    );

    assign func_out[k]    = OW'(fout);
    assign core_to_tam[k] = OW'(tout);

    if (k == C17_AT) begin : g_c17
      c17 u_core (.in_dat(cin), .fsel(c17_fsel), .out_dat(cout));
      assign ext_core_in[k] = '0;
    end else if (k == S27_AT) begin : g_s27
      s27 u_core (.in_dat(cin), .fsel(s27_fsel), .out_dat(cout));
      assign ext_core_in[k] = '0;
    end else begin : g_ext
      assign ext_core_in[k] = ZW'(cin);
      assign cout           = ext_core_out[k][OWK-1:0];
    end
  end

endmodule
