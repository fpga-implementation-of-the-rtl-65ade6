// tb_cmantec_top: end-to-end training runs of the whole learner at reduced
// size (7 inputs, 24 neurons, 256 patterns, 8 clocks per serial bit).
// Patterns are sent over the serial line; each workload then pulses start and
// waits for done. After a successful run the testbench reads the trained
// weights and recomputes, with its own model of the neurons and the majority,
// the network output for every training pattern left in the pattern memory:
// all must match their class. Workloads:
//   1. XOR of 2 inputs      2. XOR of 3 inputs   3. parity of 5 inputs
//   4. a random function of 7 inputs on 96 patterns (grows beyond 16 neurons,
//      so the Tfac module scans several groups)
//   5. XOR of 2 inputs with gfac above any Tfac: every error adds a neuron
//      until the network is full
//   6. XOR of 3 inputs with contradicting copies of two patterns and
//      phi = 2: the copies can only be learned by removing them as noise
// Monitors check every phase length: majority 8 + 2*NI (3 less for a
// pattern presented again without a new draw), largest Tfac
// 34 + ceil(n_active/16), weight update 4 + 2*NI clocks. Each mechanism
// (pattern retired as correct, weight update, neuron added, pattern presented
// again, noise removal, multi-group Tfac scan, network full, success) is
// counted and must occur at least once.
module tb_cmantec_top;
  import cmantec_pkg::*;
  localparam int NI = 7, NN = 24, MAX_PAT = 256, CPB = 8;
  localparam int AW = $clog2(MAX_PAT + 1), CW = $clog2(NN + 1);

  logic clk = 0, rst_n = 0, rx = 1, load_clear = 0, start = 0;
  logic [EXP_W-1:0] gfac = 16'd328;          // 0.01
  logic [4:0] log2_imax = 5'd14;             // Imax = 16384
  logic phi_en = 0;
  logic [7:0] phi = 8'h20;                   // 2.0
  logic busy, done, success, full, rx_frame_err, load_overflow, noise_removed;
  logic [CW-1:0] n_active;
  logic [AW-1:0] n_pat, n_train, n_elig;
  logic [15:0] cyc_maj, cyc_tfac, cyc_upd;
  int checks = 0, failures = 0;
  int ev_correct = 0, ev_update = 0, ev_add = 0, ev_resend = 0, ev_noise = 0;
  int ev_multi = 0, ev_full = 0, ev_success = 0;
  int tf_expect = 0, tf_pending = 0;

  cmantec_top #(.NI(NI), .NN(NN), .MAX_PAT(MAX_PAT), .CLKS_PER_BIT(CPB)) dut (.*);

  always #5 clk = ~clk;

  task automatic fail(input string m);
    failures++;
    $display("FAIL %s", m);
  endtask

  // ---------------- mechanism counters and phase-length monitors ----------
  logic [CW-1:0] prev_active = '0;
  logic maj_d = 0, upd_d = 0, upd_dd = 0;
  bit   resent = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.pb_correct) ev_correct++;
    if (|dut.upd_sel)   ev_update++;
    if (dut.pb_resend)  ev_resend++;
    if (noise_removed)  ev_noise++;
    if (n_active > prev_active && prev_active != 0) ev_add++;
    prev_active <= n_active;
    // the recorded length is visible one clock after the phase ends
    maj_d <= dut.maj_valid;
    if (dut.pb_resend) resent = 1;
    if (dut.pb_req)    resent = 0;
    if (maj_d) begin
      checks++;
      // a re-presented pattern skips the 3-clock random draw
      if (int'(cyc_maj) != 8 + 2 * NI - (resent ? 3 : 0))
        fail($sformatf("majority phase %0d clocks", cyc_maj));
    end
    upd_d  <= |dut.up_done;
    upd_dd <= upd_d;
    if (upd_dd) begin
      checks++;
      if (int'(cyc_upd) != 4 + 2 * NI) fail($sformatf("update phase %0d clocks", cyc_upd));
    end
    if (tf_pending) begin
      checks++;
      if (int'(cyc_tfac) != tf_expect) fail($sformatf("Tfac phase %0d clocks, expected %0d", cyc_tfac, tf_expect));
    end
    tf_pending = 0;
    if (dut.u_ctrl.tm_done) begin
      tf_expect  = 34 + (int'(n_active) + 15) / 16;
      tf_pending = 1;
      if (n_active > 16) ev_multi++;
    end
  end

  // ---------------- serial line ----------------
  task automatic send_byte(input logic [7:0] d);
    rx = 0; repeat (CPB) @(posedge clk);
    for (int i = 0; i < 8; i++) begin rx = d[i]; repeat (CPB) @(posedge clk); end
    rx = 1; repeat (CPB + 1) @(posedge clk);
  endtask

  task automatic send_pattern(input logic [NI-1:0] bits, input logic cls);
    for (int i = 0; i < NI; i++) send_byte(bits[i] ? 8'h80 : 8'h00);
    send_byte({7'd0, cls});
  endtask

  // ---------------- reference model of the trained network ----------------
  function automatic logic net_out(input logic [NI-1:0][PSI_W-1:0] x);
    int ones, n;
    n = int'(n_active);
    ones = 0;
    for (int k = 0; k < n; k++)
      if (neuron_h(k, x) > 0) ones++;
    return (2 * ones > n);
  endfunction

  function automatic int neuron_h(input int k, input logic [NI-1:0][PSI_W-1:0] x);
    int h, wv;
    h = -bias_of(k);
    for (int i = 0; i < NI; i++) begin
      int m;
      wv = weight_of(k, i);
      m = ((wv < 0 ? -wv : wv) * int'(x[i])) >>> PSI_FRAC;
      h += (wv < 0) ? -m : m;
    end
    return h;
  endfunction

  // weights and biases of all neurons, copied each clock from the hierarchy
  int wcopy [NN][NI];
  int bcopy [NN];
  for (genvar g = 0; g < NN; g++) begin : g_copy
    always @(negedge clk) begin
      for (int i = 0; i < NI; i++) wcopy[g][i] = int'(dut.g_neuron[g].u_neuron.w[i]);
      bcopy[g] = int'(dut.g_neuron[g].u_neuron.b);
    end
  end
  function automatic int weight_of(input int k, input int i); return wcopy[k][i]; endfunction
  function automatic int bias_of(input int k);                return bcopy[k];    endfunction

  task automatic verify_trained(input string name);
    int bad;
    @(negedge clk);
    bad = 0;
    for (int p = 0; p < int'(n_train); p++) begin
      if (net_out(dut.u_pat.mem[p].x) !== dut.u_pat.mem[p].cls) bad++;
    end
    checks++;
    if (bad != 0) fail($sformatf("%s: %0d training patterns misclassified", name, bad));
  endtask

  task automatic run(input string name, input bit expect_success, output int neurons);
    int cyc;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    cyc = 0;
    while (!done && cyc < 4_000_000) begin @(negedge clk); cyc++; end
    neurons = int'(n_active);
    $display("%s: done=%0b success=%0b full=%0b neurons=%0d patterns kept %0d of %0d, %0d clocks",
             name, done, success, full, n_active, n_train, n_pat, cyc);
    checks++;
    if (!done) begin
      fail({name, " did not finish"});
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
    if (success) ev_success++;
    if (full)    ev_full++;
    checks++;
    if (success != expect_success) fail({name, " unexpected outcome"});
    if (success) verify_trained(name);
  endtask

  task automatic clear_patterns();
    @(negedge clk) load_clear = 1;
    @(negedge clk) load_clear = 0;
  endtask

  initial begin
    repeat (30_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n;
    logic [NI-1:0] v;
    repeat (5) @(negedge clk);
    rst_n = 1;
    repeat (5) @(negedge clk);

    // 1. XOR2
    for (int p = 0; p < 4; p++) send_pattern(NI'(p), ^p[1:0]);
    repeat (20) @(negedge clk);
    checks++;
    if (int'(n_pat) != 4) fail($sformatf("loaded %0d patterns", n_pat));
    run("xor2", 1, n);
    checks++;
    if (n < 2) fail("xor2 needs at least two neurons");

    // 2. XOR3
    clear_patterns();
    for (int p = 0; p < 8; p++) send_pattern(NI'(p), ^p[2:0]);
    run("xor3", 1, n);

    // 3. parity of 5
    clear_patterns();
    for (int p = 0; p < 32; p++) send_pattern(NI'(p), ^p[4:0]);
    run("parity5", 1, n);

    // 4. random function of 7 inputs
    clear_patterns();
    for (int p = 0; p < 96; p++) begin
      v = NI'(p * 37 + 11);
      send_pattern(v, 1'($urandom));
    end
    run("random7", 1, n);

    // 5. gfac above every Tfac: neurons are added until none is left
    clear_patterns();
    for (int p = 0; p < 4; p++) send_pattern(NI'(p), ^p[1:0]);
    gfac = 16'hFFFF;
    run("xor2-no-learning", 0, n);
    checks++;
    if (!full || n != NN) fail("network should be full");
    gfac = 16'd328;

    // 6. XOR3 with contradicting copies, noise filtering on
    clear_patterns();
    for (int p = 0; p < 8; p++) send_pattern(NI'(p), ^p[2:0]);
    for (int r = 0; r < 3; r++) begin
      send_pattern(NI'(1), 1'b0);
      send_pattern(NI'(6), 1'b1);
    end
    phi_en = 1;
    log2_imax = 5'd8;
    run("xor3-noisy", 1, n);
    phi_en = 0;
    log2_imax = 5'd14;

    $display("events: correct=%0d update=%0d add=%0d represent=%0d noise=%0d multigroup=%0d full=%0d success=%0d",
             ev_correct, ev_update, ev_add, ev_resend, ev_noise, ev_multi, ev_full, ev_success);
    checks += 8;
    if (ev_correct == 0) fail("no pattern retired as correct");
    if (ev_update == 0)  fail("no weight update");
    if (ev_add == 0)     fail("no neuron added");
    if (ev_resend == 0)  fail("no re-presentation");
    if (ev_noise == 0)   fail("no noisy pattern removed");
    if (ev_multi == 0)   fail("no multi-group Tfac scan");
    if (ev_full == 0)    fail("network never full");
    if (ev_success == 0) fail("no successful training");
    checks++;
    if (rx_frame_err || load_overflow) fail("serial or load error");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
