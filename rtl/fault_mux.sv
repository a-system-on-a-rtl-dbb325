// fault_mux: fault-injection cell placed in one wire of a core under test.
//
// A 4-input multiplexer whose data inputs are the wire itself, logic 1, logic 0
// and the wire again. With select 00 (or 11) the wire runs as it is; 01 injects a
// stuck-at-1 fault and 10 a stuck-at-0 fault. Purely combinational, no timing.
// The select encoding follows the hardware fault-injection scheme of the
// methodology; the two-state behaviour of the unused code 11 (normal) too.
//
//   d    fault-free value driven onto the wire
//   sel  fault select (soc_pkg::fault_sel_e)
//   q    value seen by every gate the wire feeds
module fault_mux
  import soc_pkg::*;
(
  input  logic       d,
  input  fault_sel_e sel,
  output logic       q
);

  always_comb q = inject(d, sel);

endmodule
