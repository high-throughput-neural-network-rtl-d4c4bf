// tb_neq_layer -- checks one sparse layer in its default configuration, the
// input layer (593 one-bit inputs, 49 neurons, fan-in 7).
//
// Random input vectors are applied with random gaps in in_valid.  One clock
// later out_data must equal the reference: for every neuron the inputs
// ((n*7 + k) * 173) mod 593 are gathered and run through a reference neuron
// written here (signed +/-1 inputs, weight/bias formulas, threshold
// activation).  out_valid must follow in_valid with a latency of exactly one
// clock, and a synchronous reset must clear it.  The test also checks that
// the connection map gives no neuron a repeated input and that every neuron
// produced every output code at least once.  A watchdog ends a hung run.
module tb_neq_layer;

  localparam int N_IN  = 593;
  localparam int N_OUT = 49;
  localparam int F     = 7;
  localparam int NVEC  = 3000;

  logic              clk = 1'b0;
  logic              rst_n;
  logic              in_valid;
  logic [N_IN-1:0]   in_data;
  logic              out_valid;
  logic [2*N_OUT-1:0] out_data;

  int checks   = 0;
  int failures = 0;

  always #5 clk = ~clk;

  neq_layer dut (
    .clk, .rst_n, .in_valid, .in_data, .out_valid, .out_data
  );

  function automatic int src_ref(int n, int k);
    return ((n * F + k) * 173) % N_IN;
  endfunction

  // Stand-in weight of input k of input-layer neuron n.
  function automatic int w_ref(int n, int k);
    int c;
    c = (53 + 29 * n + 17 * k + 11 * n * k + 5 * k * k + 3) % 6;
    return (c < 3) ? c - 3 : c - 2;
  endfunction

  function automatic logic [1:0] neuron_ref(int n, logic [N_IN-1:0] x);
    int s;
    s = ((17 + 23 * n) % 5) - 2;
    for (int k = 0; k < F; k++)
      s += w_ref(n, k) * (x[src_ref(n, k)] ? 1 : -1);
    if (s < -2)     return 2'd0;
    else if (s < 0) return 2'd1;
    else if (s < 2) return 2'd2;
    else            return 2'd3;
  endfunction

  task automatic fail(string msg);
    failures++;
    if (failures < 10) $display("FAIL %s", msg);
  endtask

  logic [N_IN-1:0] prev_data;
  logic            prev_valid;
  int              seen [N_OUT][4];

  initial begin
    seen = '{default: '{default: 0}};
    // The map must give each neuron F distinct inputs.
    for (int n = 0; n < N_OUT; n++)
      for (int k = 0; k < F; k++)
        for (int j = k + 1; j < F; j++) begin
          checks++;
          if (src_ref(n, k) == src_ref(n, j)) fail($sformatf("neuron %0d repeats an input", n));
        end

    rst_n = 1'b0; in_valid = 1'b0; in_data = '0;
    repeat (3) @(posedge clk);
    #1; checks++; if (out_valid) fail("out_valid set during reset");
    rst_n = 1'b1;

    for (int v = 0; v < NVEC; v++) begin
      // Random vector; the density of ones varies per vector.
      int dens;
      dens = $urandom_range(1, 7);
      for (int i = 0; i < N_IN; i++) in_data[i] = ($urandom_range(0, 7) < dens);
      in_valid = ($urandom_range(0, 3) != 0);
      prev_data  = in_data;
      prev_valid = in_valid;
      @(posedge clk); #1;
      checks++;
      if (out_valid !== prev_valid) fail($sformatf("vector %0d: out_valid %0b expected %0b", v, out_valid, prev_valid));
      if (prev_valid) begin
        for (int n = 0; n < N_OUT; n++) begin
          logic [1:0] e;
          e = neuron_ref(n, prev_data);
          checks++;
          if (out_data[2*n +: 2] !== e)
            fail($sformatf("vector %0d neuron %0d: got %0d expected %0d", v, n, out_data[2*n +: 2], e));
          seen[n][e]++;
        end
      end
    end

    // Synchronous reset clears a pending valid.
    in_valid = 1'b1; @(posedge clk); #1;
    checks++; if (!out_valid) fail("out_valid missing before reset test");
    rst_n = 1'b0; @(posedge clk); #1;
    checks++; if (out_valid) fail("reset did not clear out_valid");
    rst_n = 1'b1; in_valid = 1'b0;

    for (int n = 0; n < N_OUT; n++)
      for (int c = 0; c < 4; c++) begin
        checks++;
        if (seen[n][c] == 0) fail($sformatf("neuron %0d never produced code %0d", n, c));
      end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NVEC + 1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
