// nid_pkg -- shared constants and neuron model of the intrusion-detection
// binarized network.
//
// The network is a LogicNets-style sparse quantized MLP: every neuron sees
// only NEQ_FANIN = 7 of the previous layer's outputs, so its whole function can be
// enumerated as a truth table and laid down as logic.  The topology numbers
// below (593 binary features, 49 / 7 / 1 neurons, fan-in 7, 1-bit inputs,
// 2-bit activations) are those of the published network.
//
// The trained weights and the trained sparse connection map are not
// published, so this package defines a fixed, deterministic stand-in:
//   * weight  w(l,n,k) = c - 3 if c < 3 else c - 2, in {-3,-2,-1,1,2,3},
//               c = (53*l + 29*n + 17*k + 11*n*k + 5*k*k + 3) mod 6
//               (never zero, so every neuron of the network stays live)
//   * bias    b(l,n)   = ((17*l + 23*n) mod 5) - 2,                     in [-2,2]
//   * input   x        = 2*code - (2^B_IN - 1)   (1-bit: -1/+1, 2-bit: -3,-1,+1,+3)
//   * sum     s        = b + sum_k w(l,n,k) * x_k
//   * output  code     = clamp(floor(s / 2^B_IN) + 2, 0, 3)   (2-bit activation)
//   * input k of neuron n comes from previous-layer output
//                       ((n*FANIN + k) * STRIDE) mod N_IN
// Replacing these functions with the trained network's tables and map gives
// the trained design; the hardware structure does not change.
package nid_pkg;

  // Topology of the published network.
  localparam int unsigned N_FEATURES = 593;  // binarized UNSW-NB15 record
  localparam int unsigned L1_NEURONS = 49;   // input layer
  localparam int unsigned L2_NEURONS = 7;    // hidden layer
  localparam int unsigned L3_NEURONS = 1;    // output layer
  localparam int unsigned NEQ_FANIN  = 7;    // inputs per neuron, every layer
  localparam int unsigned IN_BITS    = 1;    // feature width
  localparam int unsigned ACT_BITS   = 2;    // activation width, every layer

  // Sparse-map strides.  593 is prime, and the 49 connections of the hidden
  // layer use 5 (coprime to 49), so no neuron sees the same input twice.
  localparam int unsigned L1_STRIDE = 173;
  localparam int unsigned L2_STRIDE = 5;
  localparam int unsigned L3_STRIDE = 1;

  typedef logic [ACT_BITS-1:0] act_t;

  // Stand-in trained weight of input k of neuron n in layer l.
  function automatic int neq_weight(int l, int n, int k);
    int c;
    c = (53 * l + 29 * n + 17 * k + 11 * n * k + 5 * k * k + 3) % 6;
    return (c < 3) ? c - 3 : c - 2;
  endfunction

  function automatic int neq_bias(int l, int n);
    return ((17 * l + 23 * n) % 5) - 2;
  endfunction

  // Neuron-equivalent: quantized perceptron output for one truth-table
  // address.  Input k occupies address bits [k*b_in +: b_in].
  function automatic act_t neq_eval(int l, int n, int fanin, int b_in, int unsigned addr);
    int s;
    int q;
    int code;
    int mask;
    s    = neq_bias(l, n);
    mask = (1 << b_in) - 1;
    for (int k = 0; k < fanin; k++) begin
      code = int'((addr >> (k * b_in)) & mask);
      s += neq_weight(l, n, k) * (2 * code - mask);
    end
    q = s >>> b_in;            // floor division by 2^b_in
    q = q + 2;
    if (q < 0) q = 0;
    if (q > 3) q = 3;
    return act_t'(q);
  endfunction

  // Index of the previous-layer output that feeds input k of neuron n.
  function automatic int unsigned neq_conn(int unsigned n, int unsigned k, int unsigned fanin,
                                           int unsigned stride, int unsigned n_in);
    return ((n * fanin + k) * stride) % n_in;
  endfunction

endpackage
