// hbb_neuron -- one neuron as a hardware building block (HBB): an X:Y truth
// table with X = FANIN*B_IN address bits and Y = ACT_BITS output bits.
//
// A neuron with few quantized inputs has a finite input space, so whatever
// arithmetic it does during training (weights, sum, activation) collapses to
// a fixed function of its X input bits, i.e. a lookup table over all 2^X
// input combinations.  This module states that table in closed form: the
// output for address addr is nid_pkg::neq_eval(LAYER, NEURON, ..., addr), in
// which every weight and the bias are elaboration-time constants.  A
// synthesizer therefore sees a pure X-input, Y-output combinational function
// and maps it to LUTs exactly as it would an enumerated case table (7
// address bits in the input layer, 14 in the hidden and output layers).
//
// The trained tables are not published; neq_eval is a quantized-perceptron
// stand-in (see nid_pkg).  Stating the table in closed form instead of as a
// 2^X-entry constant array is this design's choice: it keeps elaboration of
// the 16384-entry tables of the 14-input neurons cheap in every tool.
//
// Interface: addr = the neuron's FANIN inputs packed, input k in
// addr[k*B_IN +: B_IN]; act = the neuron's ACT_BITS-bit output code.
// Timing: purely combinational, no clock.
module hbb_neuron
  import nid_pkg::*;
#(
  parameter int unsigned LAYER  = 1,
  parameter int unsigned NEURON = 0,
  parameter int unsigned FANIN  = nid_pkg::NEQ_FANIN,
  parameter int unsigned B_IN   = nid_pkg::IN_BITS
) (
  input  logic [FANIN*B_IN-1:0] addr,
  output act_t                  act
);

  always_comb begin
    act = neq_eval(int'(LAYER), int'(NEURON), int'(FANIN), int'(B_IN), 32'(addr));
  end

endmodule
