// tb_nid_testset_stream -- throughput run at the size of the UNSW-NB15 test
// partition: 82,332 records streamed into nid_bnn back to back, one per
// clock, with the design at its default size.
//
// The real records are not available here, so each record is random with a
// per-record density of ones.  Every result is compared with a reference
// model of the network written here, and the run checks the rate: the last
// result must leave exactly N_RECORDS + 2 clocks after the first record was
// presented (one record per clock, 3-clock latency), with out_valid high on
// every one of the N_RECORDS consecutive clocks in between.  The attack and
// benign decisions are tallied.  A watchdog ends a hung run.
module tb_nid_testset_stream;

  localparam int     N_IN      = 593;
  localparam int     N_L1      = 49;
  localparam int     N_L2      = 7;
  localparam int     F         = 7;
  localparam longint LATENCY   = 3;
  localparam int     N_RECORDS = 82332;

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

  function automatic int w_ref(int l, int n, int k);
    int c;
    c = (53 * l + 29 * n + 17 * k + 11 * n * k + 5 * k * k + 3) % 6;
    return (c < 3) ? c - 3 : c - 2;
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
      s = ((17 + 23 * n) % 5) - 2;
      for (int k = 0; k < F; k++)
        s += w_ref(1, n, k) * (x[((n * F + k) * 173) % N_IN] ? 1 : -1);
      h1[n] = act_ref(s, 2);
    end
    for (int n = 0; n < N_L2; n++) begin
      s = ((34 + 23 * n) % 5) - 2;
      for (int k = 0; k < F; k++)
        s += w_ref(2, n, k) * (2 * h1[((n * F + k) * 5) % N_L1] - 3);
      h2[n] = act_ref(s, 4);
    end
    s = (51 % 5) - 2;
    for (int k = 0; k < F; k++)
      s += w_ref(3, 0, k) * (2 * h2[k] - 3);
    return act_ref(s, 4);
  endfunction

  int     expq[$];
  longint cyc = 0;
  longint first_in = -1, first_out = -1, last_out = -1;
  int     n_out = 0, n_attack = 0, n_benign = 0;

  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) begin
    #1;
    if (out_valid) begin
      int e;
      if (first_out < 0) first_out = cyc;
      last_out = cyc;
      checks++;
      if (expq.size() == 0) begin
        failures++;
        $display("FAIL output without a record at cycle %0d", cyc);
      end else begin
        e = expq.pop_front();
        if (int'(score) != e || attack !== (e >= 2)) begin
          failures++;
          if (failures < 10) $display("FAIL record %0d: score %0d expected %0d", n_out, score, e);
        end
      end
      if (attack) n_attack++; else n_benign++;
      n_out++;
    end
  end

  initial begin
    rst_n = 1'b0; in_valid = 1'b0; features = '0;
    repeat (3) @(posedge clk);
    #2; rst_n = 1'b1;
    for (int r = 0; r < N_RECORDS; r++) begin
      int dens;
      dens = $urandom_range(1, 15);
      for (int i = 0; i < N_IN; i++) features[i] = ($urandom_range(0, 15) < dens);
      in_valid = 1'b1;
      @(posedge clk);
      if (r == 0) first_in = cyc;
      expq.push_back(net_ref(features));
      #2;
    end
    in_valid = 1'b0;
    repeat (int'(LATENCY) + 3) @(posedge clk);
    #2;

    $display("records=%0d outputs=%0d attack=%0d benign=%0d first_out-first_in=%0d last_out-first_in=%0d",
             N_RECORDS, n_out, n_attack, n_benign, first_out - first_in, last_out - first_in);
    checks += 5;
    if (n_out != N_RECORDS) begin failures++; $display("FAIL %0d outputs for %0d records", n_out, N_RECORDS); end
    if (first_out - first_in != LATENCY) begin failures++; $display("FAIL first latency %0d", first_out - first_in); end
    if (last_out - first_in != longint'(N_RECORDS) - 1 + LATENCY) begin
      failures++; $display("FAIL stream took %0d clocks", last_out - first_in + 1);
    end
    if (n_attack == 0 || n_benign == 0) begin failures++; $display("FAIL one decision never made"); end
    if (expq.size() != 0) begin failures++; $display("FAIL %0d results missing", expq.size()); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (N_RECORDS + 1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
