// nid_bnn -- binarized neural network for network intrusion detection.
//
// A 593-bit binarized flow record goes through three sparse quantized layers
// built from truth-table neurons: 49 input-layer neurons (7 one-bit inputs
// each), 7 hidden neurons (7 two-bit inputs each) and one output neuron (7
// two-bit inputs).  Every neuron emits a 2-bit code.  The output neuron's code
// is the score; the record is flagged as an attack when the score lies in the
// upper half of its range (score[1] = 1), which corresponds to a positive
// logit of a binary classifier.  Topology, widths and fan-in follow the
// described network; the decision rule, the valid handshake and the reset
// are this design's choices.
//
// Each layer registers its outputs, so the pipeline has three stages:
// out_valid/score/attack appear 3 clocks after the record is presented with
// in_valid, and a new record may be presented every clock (no back-pressure).
// rst_n is active low and synchronous and clears the valid pipeline.
//
// Interface:
//   features[i]  feature bit i of the binarized record (i = 0..N_FEATURES-1)
//   score        2-bit output-layer code (0..3)
//   attack       1 = attack, 0 = benign
module nid_bnn
  import nid_pkg::*;
#(
  parameter int unsigned N_IN = nid_pkg::N_FEATURES,
  parameter int unsigned N_L1 = nid_pkg::L1_NEURONS,
  parameter int unsigned N_L2 = nid_pkg::L2_NEURONS,
  parameter int unsigned F    = nid_pkg::NEQ_FANIN
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_valid,
  input  logic [N_IN-1:0] features,
  output logic            out_valid,
  output act_t            score,
  output logic            attack
);

  logic                     l1_valid, l2_valid;
  logic [N_L1*ACT_BITS-1:0] l1_act;
  logic [N_L2*ACT_BITS-1:0] l2_act;

  // Input layer: 1-bit features, sparse fan-in F.
  neq_layer #(
    .LAYER(1), .N_IN(N_IN), .N_OUT(N_L1), .FANIN(F), .B_IN(IN_BITS), .STRIDE(L1_STRIDE)
  ) u_input_layer (
    .clk, .rst_n,
    .in_valid (in_valid), .in_data (features),
    .out_valid(l1_valid), .out_data(l1_act)
  );

  // Hidden layer: 2-bit activations, sparse fan-in F.
  neq_layer #(
    .LAYER(2), .N_IN(N_L1), .N_OUT(N_L2), .FANIN(F), .B_IN(ACT_BITS), .STRIDE(L2_STRIDE)
  ) u_hidden_layer (
    .clk, .rst_n,
    .in_valid (l1_valid), .in_data (l1_act),
    .out_valid(l2_valid), .out_data(l2_act)
  );

  // Output layer: a single neuron over the hidden activations.
  neq_layer #(
    .LAYER(3), .N_IN(N_L2), .N_OUT(L3_NEURONS), .FANIN(F), .B_IN(ACT_BITS), .STRIDE(L3_STRIDE)
  ) u_output_layer (
    .clk, .rst_n,
    .in_valid (l2_valid), .in_data (l2_act),
    .out_valid(out_valid), .out_data(score)
  );

  assign attack = score[ACT_BITS-1];

endmodule
