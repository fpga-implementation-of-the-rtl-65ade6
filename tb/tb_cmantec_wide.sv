// tb_cmantec_wide: the learner built for 63 inputs, the widest
// configuration of the pattern memory (64 bytes per pattern: 63 inputs and
// the class). The network is cut to 16 neurons and the memory to 128
// patterns to keep the run short; the serial line runs at 4 clocks per bit.
// Workload: 3-input parity of inputs 0, 31 and 62 over all 8 combinations,
// with every other input set to a small random value (at most 4/128)
// that is fixed per pattern. Those extra values usually make the 8 patterns
// linearly separable, so one to three neurons are enough.
// Checks: all 8 patterns load, training ends with success, the trained
// weights classify every pattern (recomputed here with an independent model
// of the neurons and the majority vote) and the phase lengths, majority
// 8 + 2*63 = 134, largest Tfac 34 + ceil(n/16) and weight update
// 4 + 2*63 = 130 clocks.
module tb_cmantec_wide;
  import cmantec_pkg::*;
  localparam int NI = 63, NN = 16, MAXP = 128, CPB = 4, NP = 8;
  localparam int AW = $clog2(MAXP + 1), CW = $clog2(NN + 1);
  localparam int SEL [3] = '{0, 31, 62};

  logic clk = 0, rst_n = 0, rx = 1, load_clear = 0, start = 0;
  logic [EXP_W-1:0] gfac = 16'd328;
  logic [4:0] log2_imax = 5'd14;
  logic phi_en = 0;
  logic [7:0] phi = 8'h20;
  logic busy, done, success, full, rx_frame_err, load_overflow, noise_removed;
  logic [CW-1:0] n_active;
  logic [AW-1:0] n_pat, n_train, n_elig;
  logic [15:0] cyc_maj, cyc_tfac, cyc_upd;
  int checks = 0, failures = 0, n_upd = 0, n_maj = 0, n_tf = 0;
  bit resent = 0;

  cmantec_top #(.NI(NI), .NN(NN), .MAX_PAT(MAXP), .CLKS_PER_BIT(CPB)) dut (.*);

  always #5 clk = ~clk;

  task automatic fail(input string m);
    failures++;
    $display("FAIL %s", m);
  endtask

  logic maj_d = 0, upd_d = 0, upd_dd = 0, tf_d = 0;
  int   tf_expect = 0;
  always @(posedge clk) if (rst_n) begin
    maj_d  <= dut.maj_valid;
    upd_d  <= |dut.up_done;
    upd_dd <= upd_d;
    tf_d   <= dut.u_ctrl.tm_done;
    if (dut.u_ctrl.tm_done) tf_expect <= 34 + (int'(n_active) + 15) / 16;
    if (dut.pb_resend) resent = 1;
    if (dut.pb_req)    resent = 0;
    if (|dut.upd_sel) n_upd++;
    if (maj_d) begin
      checks++;
      n_maj++;
      if (int'(cyc_maj) != 8 + 2 * NI - (resent ? 3 : 0)) fail($sformatf("majority phase %0d", cyc_maj));
    end
    if (tf_d) begin
      checks++;
      n_tf++;
      if (int'(cyc_tfac) != tf_expect) fail($sformatf("Tfac phase %0d, expected %0d", cyc_tfac, tf_expect));
    end
    if (upd_dd) begin
      checks++;
      if (int'(cyc_upd) != 4 + 2 * NI) fail($sformatf("update phase %0d", cyc_upd));
    end
  end

  task automatic send_byte(input logic [7:0] d);
    rx = 0; repeat (CPB) @(posedge clk);
    for (int i = 0; i < 8; i++) begin rx = d[i]; repeat (CPB) @(posedge clk); end
    rx = 1; repeat (CPB + 1) @(posedge clk);
  endtask

  int wcopy [NN][NI];
  int bcopy [NN];
  for (genvar g = 0; g < NN; g++) begin : g_copy
    always @(negedge clk) begin
      for (int i = 0; i < NI; i++) wcopy[g][i] = int'(dut.g_neuron[g].u_neuron.w[i]);
      bcopy[g] = int'(dut.g_neuron[g].u_neuron.b);
    end
  end

  logic [7:0] pat_psi [NP][NI];
  logic       pat_t   [NP];

  function automatic logic net_out(input int p);
    int ones, n;
    n = int'(n_active);
    ones = 0;
    for (int k = 0; k < n; k++) begin
      int h;
      h = -bcopy[k];
      for (int i = 0; i < NI; i++) begin
        int m, wv;
        wv = wcopy[k][i];
        m  = ((wv < 0 ? -wv : wv) * int'(pat_psi[p][i])) >>> PSI_FRAC;
        h += (wv < 0) ? -m : m;
      end
      if (h > 0) ones++;
    end
    return (2 * ones > n);
  endfunction

  initial begin
    repeat (6_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc;
    for (int p = 0; p < NP; p++) begin
      for (int i = 0; i < NI; i++) pat_psi[p][i] = 8'($urandom_range(0, 4));
      for (int j = 0; j < 3; j++) pat_psi[p][SEL[j]] = p[j] ? 8'h80 : 8'h00;
      pat_t[p] = ^p[2:0];
    end
    repeat (5) @(negedge clk);
    rst_n = 1;
    for (int p = 0; p < NP; p++) begin
      for (int i = 0; i < NI; i++) send_byte(pat_psi[p][i]);
      send_byte({7'd0, pat_t[p]});
    end
    repeat (10) @(negedge clk);
    checks += 2;
    if (int'(n_pat) != NP) fail($sformatf("loaded %0d patterns", n_pat));
    if (rx_frame_err || load_overflow) fail("load error");
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    cyc = 0;
    while (!done && cyc < 4_000_000) begin @(negedge clk); cyc++; end
    $display("parity3 of 63 inputs: done=%0b success=%0b neurons=%0d updates=%0d majority=%0d tfac=%0d, %0d clocks",
             done, success, n_active, n_upd, n_maj, n_tf, cyc);
    checks += 4;
    if (!done) fail("training did not finish");
    if (!success) fail("training did not succeed");
    if (n_upd == 0) fail("no weight update");
    if (n_tf == 0) fail("no largest-Tfac phase");
    for (int p = 0; p < NP; p++) begin
      checks++;
      if (net_out(p) !== pat_t[p]) fail($sformatf("pattern %0d misclassified", p));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
