// tb_nid_bnn -- end-to-end test of the intrusion-detection network at its
// default size (593 features, 49 / 7 / 1 neurons, fan-in 7).
//
// Random binarized records are streamed in, with the density of ones varied
// per record so that every output code occurs.  A reference model written
// here computes all three layers (sparse gather, signed inputs, weight and
// bias formulas, threshold activation) and the attack decision.  Each result
// must appear exactly 3 clocks after its record was presented, in order, and
// no output may appear without a record.  The stream contains idle gaps,
// long back-to-back bursts (one record per clock) and a reset in the middle
// of a burst, after which the records in flight must be dropped.  Each of
// these events, every score code and both decisions are counted and must
// occur at least once.  A watchdog ends a hung run.
module tb_nid_bnn;

  localparam int N_IN    = 593;
  localparam int N_L1    = 49;
  localparam int N_L2    = 7;
  localparam int F       = 7;
  localparam longint LATENCY = 3;
  localparam int NREC    = 4000;

  logic            clk = 1'b0;
  logic            rst_n;
  logic            in_valid;
  logic [N_IN-1:0] features;
  logic            out_valid;
  logic [1:0]      score;
  logic            attack;

  int checks   = 0;
  int failures = 0;

  always #5 clk = ~clk;

  nid_bnn dut (.clk, .rst_n, .in_valid, .features, .out_valid, .score, .attack);

  // ---------------- reference model ----------------
  function automatic int w_ref(int l, int n, int k);
    int c;
    c = (53 * l + 29 * n + 17 * k + 11 * n * k + 5 * k * k + 3) % 6;
    return (c < 3) ? c - 3 : c - 2;
  endfunction

  function automatic int b_ref(int l, int n);
    return ((17 * l + 23 * n) % 5) - 2;
  endfunction

  function automatic int act_ref(int s, int d);
    if (s < -d)     return 0;
    else if (s < 0) return 1;
    else if (s < d) return 2;
    else            return 3;
  endfunction

  function automatic int net_ref(logic [N_IN-1:0] x);
    int h1 [N_L1];
    int h2 [N_L2];
    int s;
    for (int n = 0; n < N_L1; n++) begin
      s = b_ref(1, n);
      for (int k = 0; k < F; k++)
        s += w_ref(1, n, k) * (x[((n * F + k) * 173) % N_IN] ? 1 : -1);
      h1[n] = act_ref(s, 2);
    end
    for (int n = 0; n < N_L2; n++) begin
      s = b_ref(2, n);
      for (int k = 0; k < F; k++)
        s += w_ref(2, n, k) * (2 * h1[((n * F + k) * 5) % N_L1] - 3);
      h2[n] = act_ref(s, 4);
    end
    s = b_ref(3, 0);
    for (int k = 0; k < F; k++)
      s += w_ref(3, 0, k) * (2 * h2[k] - 3);
    return act_ref(s, 4);
  endfunction

  // ---------------- scoreboard ----------------
  typedef struct {
    longint cyc;
    int     score;
  } exp_t;

  exp_t   expq[$];
  longint cyc = 0;
  int     n_out = 0;
  int     n_in = 0;
  int     ev_gap = 0, ev_burst = 0, ev_flush = 0, ev_attack = 0, ev_benign = 0;
  int     ev_code [4] = '{0, 0, 0, 0};
  int     run = 0;

  task automatic fail(string msg);
    failures++;
    if (failures < 10) $display("FAIL %s", msg);
  endtask

  always @(posedge clk) cyc <= cyc + 1;

  // Output side: compare after every edge.
  always @(posedge clk) begin
    #1;
    if (out_valid) begin
      checks++;
      if (expq.size() == 0) begin
        fail($sformatf("cycle %0d: output without a record", cyc));
      end else begin
        exp_t e;
        e = expq.pop_front();
        if (cyc - e.cyc != LATENCY)
          fail($sformatf("cycle %0d: latency %0d expected %0d", cyc, cyc - e.cyc, LATENCY));
        checks++;
        if (int'(score) != e.score)
          fail($sformatf("cycle %0d: score %0d expected %0d", cyc, score, e.score));
        checks++;
        if (attack !== (e.score >= 2))
          fail($sformatf("cycle %0d: attack %0b for score %0d", cyc, attack, e.score));
        ev_code[e.score]++;
        if (e.score >= 2) ev_attack++; else ev_benign++;
        n_out++;
      end
    end else if (expq.size() != 0 && cyc - expq[0].cyc > LATENCY) begin
      checks++;
      fail($sformatf("cycle %0d: result of cycle %0d missing", cyc, expq[0].cyc));
      void'(expq.pop_front());
    end
  end

  task automatic drive_record();
    int dens;
    dens = $urandom_range(1, 15);
    for (int i = 0; i < N_IN; i++) features[i] = ($urandom_range(0, 15) < dens);
    in_valid = 1'b1;
  endtask

  initial begin
    rst_n = 1'b0; in_valid = 1'b0; features = '0;
    repeat (4) @(posedge clk);
    #2; rst_n = 1'b1;
    while (n_in < NREC) begin
      if ($urandom_range(0, 9) < 2) begin
        // idle gap of 1..4 clocks
        int g;
        g = $urandom_range(1, 4);
        in_valid = 1'b0;
        repeat (g) @(posedge clk);
        #2;
        ev_gap++;
        run = 0;
      end else begin
        drive_record();
        @(posedge clk);
        // The record is taken at this edge; its result is due LATENCY edges later.
        expq.push_back('{cyc: cyc, score: net_ref(features)});
        n_in++;
        run++;
        if (run == 16) ev_burst++;
        #2;
      end
      // Once, in the middle of a burst, reset the pipeline.
      if (n_in == NREC / 2 && run >= 2 && ev_flush == 0) begin
        in_valid = 1'b0;
        rst_n = 1'b0;
        @(posedge clk);
        #2;
        rst_n = 1'b1;
        // Results still in flight are dropped by the reset.
        checks++;
        if (out_valid) fail("out_valid during reset");
        if (expq.size() > 0) ev_flush++;
        expq.delete();
        run = 0;
      end
    end
    in_valid = 1'b0;
    repeat (int'(LATENCY) + 2) @(posedge clk);
    #2;
    checks++;
    if (expq.size() != 0) fail($sformatf("%0d results never appeared", expq.size()));

    $display("events: gaps=%0d bursts16=%0d flushes=%0d attack=%0d benign=%0d codes=%0d/%0d/%0d/%0d outputs=%0d",
             ev_gap, ev_burst, ev_flush, ev_attack, ev_benign,
             ev_code[0], ev_code[1], ev_code[2], ev_code[3], n_out);
    checks += 9;
    if (ev_gap == 0)    fail("no idle gap");
    if (ev_burst == 0)  fail("no 16-record back-to-back burst");
    if (ev_flush == 0)  fail("no reset with records in flight");
    if (ev_attack == 0) fail("no attack decision");
    if (ev_benign == 0) fail("no benign decision");
    for (int c = 0; c < 4; c++) if (ev_code[c] == 0) fail($sformatf("score %0d never seen", c));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NREC * 3 + 1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
