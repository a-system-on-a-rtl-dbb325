// core_wrapper: test wrapper around one core, in the style of a P1500-compliant
// core with two modes.
//
// Every core input has a 2:1 multiplexer choosing the normal (functional) signal
// or the test signal from the TAM; every core output has a 1:2 demultiplexer
// sending the response to the normal output or back to the TAM. All of them share
// one enable: 0 is normal mode, 1 is test mode. The demultiplexer output that is
// not selected is held at 0 (this design's choice). There is no bypass register
// and no instruction register: the TAM selects one core at a time, so a bypass
// path is not needed. Purely combinational.
//
//   test_en   0 normal mode, 1 test mode
//   func_in   normal inputs          tam_in   test stimuli from the TAM
//   core_in   to the core's inputs   core_out from the core's outputs
//   func_out  normal outputs         tam_out  test response to the TAM
module core_wrapper #(
  parameter int IN_W  = 6,
  parameter int OUT_W = 1
) (
  input  logic             test_en,
  input  logic [IN_W-1:0]  func_in,
  input  logic [IN_W-1:0]  tam_in,
  output logic [IN_W-1:0]  core_in,
  input  logic [OUT_W-1:0] core_out,
  output logic [OUT_W-1:0] func_out,
  output logic [OUT_W-1:0] tam_out
);

  always_comb begin
    core_in  = test_en ? tam_in : func_in;
    func_out = test_en ? '0 : core_out;
    tam_out  = test_en ? core_out : '0;
  end

endmodule
