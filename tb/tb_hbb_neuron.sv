// tb_hbb_neuron -- exhaustive check of the truth-table neuron.
//
// Two neurons are instantiated: one of the input layer (7 one-bit inputs,
// 128 entries) and one of the hidden layer (7 two-bit inputs, 16384 entries).
// Every address is applied and the output compared with a reference written
// here from the neuron definition: signed inputs (+/-1 for 1-bit,
// -3/-1/+1/+3 for 2-bit), weight and bias formulas, and the activation as
// three thresholds (-D, 0, +D with D = 2^B_IN) rather than the shift-and-clamp
// form the design uses.  A few entries are also checked against hand-worked
// values.  A watchdog ends the run if it hangs.
module tb_hbb_neuron;

  localparam int F = 7;

  logic [F-1:0]   a1;
  logic [1:0]     q1;
  logic [2*F-1:0] a2;
  logic [1:0]     q2;

  int checks   = 0;
  int failures = 0;

  hbb_neuron #(.LAYER(1), .NEURON(5), .FANIN(F), .B_IN(1)) u_l1 (.addr(a1), .act(q1));
  hbb_neuron #(.LAYER(2), .NEURON(3), .FANIN(F), .B_IN(2)) u_l2 (.addr(a2), .act(q2));

  function automatic int w_ref(int l, int n, int k);
    int h;
    h = (53 * l + 29 * n + 17 * k + 11 * n * k + 5 * k * k + 3) % 6;
    return (h < 3) ? h - 3 : h - 2;
  endfunction

  function automatic logic [1:0] ref_out(int l, int n, int bw, int unsigned addr);
    int s;
    int d;
    int c;
    s = ((17 * l + 23 * n) % 5) - 2;
    for (int k = 0; k < F; k++) begin
      c = int'((addr >> (k * bw)) & ((1 << bw) - 1));
      s += w_ref(l, n, k) * ((bw == 1) ? ((c != 0) ? 1 : -1) : (2 * c - 3));
    end
    d = 1 << bw;
    if (s < -d)     return 2'd0;
    else if (s < 0) return 2'd1;
    else if (s < d) return 2'd2;
    else            return 2'd3;
  endfunction

  task automatic check(string what, logic [1:0] got, logic [1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    int hist [4];
    hist = '{default: 0};
    // Hand-worked: layer 1 neuron 5 has c_k = (201 + 72k + 5k^2) mod 6 = (3 + 5k^2) mod 6,
    // so w = +1,-1,+3,-3,+3,-1,+1 (sum 3), and bias ((17+115) mod 5) - 2 = 0.
    // With only input j set, s = -3 + 2*w_j.  Thresholds are -2, 0, +2.
    a1 = 7'h7f; #1; check("l1 all ones", q1, 2'd3);   // s = +3
    a1 = 7'h00; #1; check("l1 all zeros", q1, 2'd0);  // s = -3
    a1 = 7'h01; #1; check("l1 only in0", q1, 2'd1);   // s = -1
    a1 = 7'h04; #1; check("l1 only in2", q1, 2'd3);   // s = +3
    a1 = 7'h08; #1; check("l1 only in3", q1, 2'd0);   // s = -9

    for (int unsigned a = 0; a < (1 << F); a++) begin
      a1 = a[F-1:0]; #1;
      check($sformatf("l1 addr %0d", a), q1, ref_out(1, 5, 1, a));
    end
    for (int unsigned a = 0; a < (1 << (2 * F)); a++) begin
      a2 = a[2*F-1:0]; #1;
      check($sformatf("l2 addr %0d", a), q2, ref_out(2, 3, 2, a));
      hist[q2]++;
    end
    // The 14-input table must use all four codes, or the test above is weak.
    for (int c = 0; c < 4; c++) begin
      checks++;
      if (hist[c] == 0) begin
        failures++;
        $display("FAIL hidden neuron never produced code %0d", c);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
