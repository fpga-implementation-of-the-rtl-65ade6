// tb_pattern_block: loads 12 two-input patterns (first input byte = pattern
// id) and checks
//   * that one pass of req/cmd_correct returns every pattern exactly once and
//     then answers none, with pat_valid 4 clocks after req;
//   * that cmd_learned makes all training patterns eligible again mid-pass;
//   * the noise filter: counts are built with cmd_learned, the expected noisy
//     set is computed here in floating point as c > mean + phi*sd over the
//     training patterns, and after cmd_filter a full pass must return exactly
//     the patterns that are not noisy, with n_train reduced accordingly;
//   * that the filter does nothing while phi_en is low.
module tb_pattern_block;
  import cmantec_pkg::*;
  localparam int NI = 2, MAX_PAT = 16, NP = 12;
  localparam int AW = $clog2(MAX_PAT + 1);
  logic clk = 0, rst_n = 0;
  logic load_clear = 0, load_valid = 0;
  logic [7:0] load_byte = 0;
  logic [AW-1:0] n_pat, n_train, n_elig;
  logic load_full;
  logic cmd_init = 0, req = 0, cmd_resend = 0, cmd_correct = 0, cmd_learned = 0, cmd_filter = 0;
  logic phi_en = 0;
  logic [7:0] phi = 8'h10;
  logic ready, none, filter_removed, pat_valid, target;
  logic [NI-1:0][PSI_W-1:0] psi;
  int checks = 0, failures = 0, removed = 0;
  int cnt [NP];

  pattern_block #(.NI(NI), .MAX_PAT(MAX_PAT)) dut (
    .clk, .rst_n, .load_clear, .load_valid, .load_byte, .n_pat, .load_full,
    .cmd_init, .req, .cmd_resend, .cmd_correct, .cmd_learned, .cmd_filter, .phi_en, .phi,
    .ready, .none, .filter_removed, .n_train, .n_elig, .pat_valid, .psi, .target
  );

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n && filter_removed) removed++;

  task automatic fail(input string m);
    failures++;
    $display("FAIL %s", m);
  endtask

  task automatic pulse(ref logic sig);
    @(negedge clk) sig = 1;
    @(negedge clk) sig = 0;
    while (!ready) @(negedge clk);
  endtask

  // draws one pattern; returns its id or -1 for none
  task automatic draw(output int id);
    int cyc;
    @(negedge clk) req = 1;
    @(negedge clk) req = 0;
    cyc = 1;
    while (!pat_valid && !none && cyc < 50) begin @(negedge clk); cyc++; end
    if (none) id = -1;
    else begin
      id = int'(psi[0]);
      checks += 2;
      if (cyc != 4) fail($sformatf("pat_valid after %0d clocks", cyc));
      if (psi[1] !== 8'(id ^ 8'h5A) || target !== id[0]) fail("pattern content");
    end
    while (!ready) @(negedge clk);
  endtask

  // one full pass; marks which ids were returned
  task automatic pass(output bit seen [NP], output int n);
    int id;
    n = 0;
    for (int i = 0; i < NP; i++) seen[i] = 0;
    forever begin
      draw(id);
      if (id < 0) break;
      if (id >= NP || seen[id]) fail($sformatf("pattern %0d repeated or unknown", id));
      else seen[id] = 1;
      n++;
      pulse(cmd_correct);
      if (n > NP) break;
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit seen [NP];
    int n, id;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // load: bytes id, id^5A, class
    for (int p = 0; p < NP; p++) begin
      logic [7:0] b [3];
      b[0] = 8'(p); b[1] = 8'(p ^ 8'h5A); b[2] = {7'h3F, 1'(p)};
      for (int k = 0; k < 3; k++) begin
        @(negedge clk) begin load_valid = 1; load_byte = b[k]; end
        @(negedge clk) load_valid = 0;
      end
    end
    checks++;
    if (int'(n_pat) != NP) fail($sformatf("n_pat %0d", n_pat));
    pulse(cmd_init);
    // a full pass
    pass(seen, n);
    checks++;
    if (n != NP) fail($sformatf("pass returned %0d patterns", n));
    // learned resets the eligible set
    pulse(cmd_learned);   // counts the last drawn pattern once more
    checks++;
    if (int'(n_elig) != NP) fail("learned did not reset eligibility");
    for (int i = 0; i < NP; i++) cnt[i] = 0;
    // restart cleanly: init clears all counts
    pulse(cmd_init);
    for (int r = 0; r < 60; r++) begin
      draw(id);
      if (id < 0) begin fail("none while eligible"); break; end
      // patterns 3 and 7 are "hard": learn them often, others rarely
      if (id == 3 || id == 7 || ($urandom % 8) == 0) begin
        pulse(cmd_learned);
        cnt[id]++;
      end else pulse(cmd_correct);
    end
    // filter disabled: nothing happens
    phi_en = 0;
    @(negedge clk) cmd_filter = 1;
    @(negedge clk) cmd_filter = 0;
    repeat (3) @(negedge clk);
    checks++;
    if (int'(n_train) != NP || removed != 0) fail("filter ran while disabled");
    // filter enabled, phi = 1.0
    begin
      real mean, var_, sd;
      int exp_keep;
      bit noisy [NP];
      mean = 0; var_ = 0;
      for (int i = 0; i < NP; i++) mean += cnt[i];
      mean /= NP;
      for (int i = 0; i < NP; i++) var_ += (cnt[i] - mean) * (cnt[i] - mean);
      sd = $sqrt(var_ / NP);
      exp_keep = 0;
      for (int i = 0; i < NP; i++) begin
        noisy[i] = (real'(cnt[i]) > mean + 1.0 * sd);
        if (!noisy[i]) exp_keep++;
      end
      phi_en = 1;
      pulse(cmd_filter);
      checks += 2;
      if (int'(n_train) != exp_keep) fail($sformatf("n_train %0d expected %0d", n_train, exp_keep));
      if (removed != NP - exp_keep) fail($sformatf("removed %0d", removed));
      pass(seen, n);
      for (int i = 0; i < NP; i++) begin
        checks++;
        if (seen[i] == noisy[i]) fail($sformatf("pattern %0d noisy=%0b seen=%0b", i, noisy[i], seen[i]));
      end
      $display("counts 3:%0d 7:%0d mean %f sd %f kept %0d", cnt[3], cnt[7], mean, sd, exp_keep);
      checks++;
      if (exp_keep == NP) fail("no noisy pattern produced");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
