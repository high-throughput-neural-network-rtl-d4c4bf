// neq_layer -- one sparse, quantized layer of the network, registered at its
// output.
//
// Each of the N_OUT neurons takes FANIN inputs chosen from the N_IN inputs of
// the layer by a fixed sparse connection map (nid_pkg::neq_conn), presents
// them as the address of its truth table (hbb_neuron) and the resulting
// ACT_BITS-bit codes are captured in one register stage.  Sparse fan-in and
// table neurons follow the described network; the particular map is a
// stand-in because the trained map is not published.
//
// Interface: in_data packs input i in in_data[i*B_IN +: B_IN]; out_data packs
// neuron n in out_data[n*ACT_BITS +: ACT_BITS].  in_valid marks a sample;
// out_valid follows it one clock later.  There is no back-pressure: the layer
// accepts a sample every clock.  rst_n (active low, synchronous) clears only
// the valid flag; the data register is not reset.
// Timing: latency 1 clock, throughput 1 sample per clock.
module neq_layer
  import nid_pkg::*;
#(
  parameter int unsigned LAYER  = 1,
  parameter int unsigned N_IN   = nid_pkg::N_FEATURES,
  parameter int unsigned N_OUT  = nid_pkg::L1_NEURONS,
  parameter int unsigned FANIN  = nid_pkg::NEQ_FANIN,
  parameter int unsigned B_IN   = nid_pkg::IN_BITS,
  parameter int unsigned STRIDE = nid_pkg::L1_STRIDE
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      in_valid,
  input  logic [N_IN*B_IN-1:0]      in_data,
  output logic                      out_valid,
  output logic [N_OUT*ACT_BITS-1:0] out_data
);

  logic [N_OUT*ACT_BITS-1:0] act;

  for (genvar n = 0; n < N_OUT; n++) begin : g_neuron
    logic [FANIN*B_IN-1:0] addr;
    for (genvar k = 0; k < FANIN; k++) begin : g_tap
      localparam int unsigned SRC = neq_conn(n, k, FANIN, STRIDE, N_IN);
      assign addr[k*B_IN +: B_IN] = in_data[SRC*B_IN +: B_IN];
    end
    hbb_neuron #(
      .LAYER (LAYER),
      .NEURON(n),
      .FANIN (FANIN),
      .B_IN  (B_IN)
    ) u_hbb (
      .addr(addr),
      .act (act[n*ACT_BITS +: ACT_BITS])
    );
  end

  always_ff @(posedge clk) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
    out_data <= act;
  end

endmodule
