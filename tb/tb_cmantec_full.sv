// tb_cmantec_full: the learner at its default size (15 inputs, 8+8-bit
// weights, 94 neurons, 37888-pattern memory, 115200 baud at 72.72 MHz).
// Sends the XOR of two inputs (the other 13 inputs zero) over the serial
// line, trains with gfac = 0.01 and Imax = 16384, and checks that training
// succeeds, that the trained weights classify all four patterns (recomputed
// here with an independent model of the neurons and the majority), and the
// phase lengths: majority 8 + 2*15 = 38, largest Tfac 34 + ceil(n/16),
// weight update 4 + 2*15 = 34 clocks.
module tb_cmantec_full;
  import cmantec_pkg::*;
  localparam int NI = 15, NN = 94, CPB = 631;
  localparam int AW = $clog2(37888 + 1), CW = $clog2(NN + 1);

  logic clk = 0, rst_n = 0, rx = 1, load_clear = 0, start = 0;
  logic [EXP_W-1:0] gfac = 16'd328;
  logic [4:0] log2_imax = 5'd14;
  logic phi_en = 0;
  logic [7:0] phi = 8'h20;
  logic busy, done, success, full, rx_frame_err, load_overflow, noise_removed;
  logic [CW-1:0] n_active;
  logic [AW-1:0] n_pat, n_train, n_elig;
  logic [15:0] cyc_maj, cyc_tfac, cyc_upd;
  int checks = 0, failures = 0, n_upd = 0;
  bit resent = 0;

  cmantec_top dut (.*);

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
      if (int'(cyc_maj) != 8 + 2 * NI - (resent ? 3 : 0)) fail($sformatf("majority phase %0d", cyc_maj));
    end
    if (tf_d) begin
      checks++;
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

  function automatic logic net_out(input int p);
    int ones, n;
    n = int'(n_active);
    ones = 0;
    for (int k = 0; k < n; k++) begin
      int h;
      h = -bcopy[k];
      for (int i = 0; i < 2; i++) begin
        int m, wv;
        wv = wcopy[k][i];
        m  = ((wv < 0 ? -wv : wv) * (p[i] ? 128 : 0)) >>> PSI_FRAC;
        h += (wv < 0) ? -m : m;
      end
      if (h > 0) ones++;
    end
    return (2 * ones > n);
  endfunction

  initial begin
    repeat (20_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc;
    repeat (5) @(negedge clk);
    rst_n = 1;
    for (int p = 0; p < 4; p++) begin
      for (int i = 0; i < NI; i++) send_byte((i < 2 && p[i]) ? 8'h80 : 8'h00);
      send_byte({7'd0, ^p[1:0]});
    end
    repeat (10) @(negedge clk);
    checks++;
    if (int'(n_pat) != 4) fail($sformatf("loaded %0d patterns", n_pat));
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    cyc = 0;
    while (!done && cyc < 8_000_000) begin @(negedge clk); cyc++; end
    $display("xor2: success=%0b neurons=%0d updates=%0d, %0d clocks", success, n_active, n_upd, cyc);
    checks += 3;
    if (!success) fail("training did not succeed");
    if (n_active < 2) fail("XOR needs at least two neurons");
    if (n_upd == 0) fail("no weight update");
    for (int p = 0; p < 4; p++) begin
      checks++;
      if (net_out(p) !== ^p[1:0]) fail($sformatf("pattern %0d misclassified", p));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
