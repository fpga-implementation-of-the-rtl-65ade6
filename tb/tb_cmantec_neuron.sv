// tb_cmantec_neuron: trains one neuron (4 inputs, 8+8-bit weights, Imax = 16)
// on random patterns and checks, against a model kept in the testbench:
//   * S = (h > 0), h computed from the model's weights with the same
//     truncation of each product;
//   * Tfac against T/T0 * exp(-|h|/T) computed in floating point, within
//     0.6 % + 4 LSB (fixed-point temperature, x and table);
//   * weights and bias after each update, bit-exact from the Tfac the
//     neuron reports, and saturation at the weight range after repeated
//     updates in one direction;
//   * the phase latencies: evaluation 2*NI+2, Tfac N1+N2+16, update 2*NI+2
//     clocks from the starting pulse to the done pulse;
//   * clear and temp_reset, and a zero tfac output when the neuron is inactive
//     or correct.
module tb_cmantec_neuron;
  import cmantec_pkg::*;
  localparam int NI = 4, N1 = 8, N2 = 8, W = N1 + N2, T0 = 1 << N2;
  localparam int LOG2_IMAX = 4;

  logic clk = 0, rst_n = 0;
  logic clear = 0, temp_reset = 0, active = 1, pat_valid = 0, target = 0;
  logic maj_valid = 0, maj = 0, upd_sel = 0;
  logic [4:0] log2_imax = 5'(LOG2_IMAX);
  logic [NI-1:0][PSI_W-1:0] psi;
  logic s, eval_done, tfac_done, upd_done;
  logic [EXP_W-1:0] tfac;
  int checks = 0, failures = 0;
  int mw [NI];
  int mb, mi;
  int n_upd = 0, n_sat = 0, n_tf = 0;

  cmantec_neuron #(.NI(NI), .N1(N1), .N2(N2), .T0(T0)) dut (
    .clk, .rst_n, .clear, .temp_reset, .active, .log2_imax, .pat_valid, .psi, .target,
    .maj_valid, .maj, .upd_sel, .s, .tfac, .eval_done, .tfac_done, .upd_done
  );

  always #5 clk = ~clk;

  task automatic fail(input string m);
    failures++;
    $display("FAIL %s", m);
  endtask

  function automatic int model_h();
    int h;
    h = -mb;
    for (int i = 0; i < NI; i++) begin
      int m;
      m = ((mw[i] < 0 ? -mw[i] : mw[i]) * int'(psi[i])) >>> PSI_FRAC;
      h += (mw[i] < 0) ? -m : m;
    end
    return h;
  endfunction

  function automatic int sat(input int v);
    if (v > 2**(W-1) - 1) begin n_sat++; return 2**(W-1) - 1; end
    if (v < -(2**(W-1)))  begin n_sat++; return -(2**(W-1)); end
    return v;
  endfunction

  // waits for a done signal, returns the clocks since the start pulse
  task automatic wait_done(input int which, output int cyc);
    cyc = 0;
    do begin
      @(negedge clk);
      cyc++;
    end while (!((which == 0 && eval_done) || (which == 1 && tfac_done) || (which == 2 && upd_done)) && cyc < 1000);
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc, h;
    psi = '0;
    for (int i = 0; i < NI; i++) mw[i] = 0;
    mb = 0; mi = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int t = 0; t < 400; t++) begin
      if (t % 100 == 99) begin
        // clear every so often
        clear = 1; @(negedge clk); clear = 0;
        for (int i = 0; i < NI; i++) mw[i] = 0;
        mb = 0; mi = 0;
      end
      if (t % 37 == 20) begin
        temp_reset = 1; @(negedge clk); temp_reset = 0;
        mi = 0;
      end
      for (int i = 0; i < NI; i++) psi[i] = (t < 200) ? PSI_W'(($urandom % 2) << PSI_FRAC) : PSI_W'($urandom);
      target = 1'($urandom);
      // evaluation
      pat_valid = 1; @(negedge clk); pat_valid = 0;
      wait_done(0, cyc);
      checks++;
      if (cyc != 2 * NI + 1) fail($sformatf("eval latency %0d", cyc + 1));
      @(negedge clk);
      h = model_h();
      checks++;
      if (s !== (h > 0)) fail($sformatf("S=%0b h=%0d", s, h));
      // network output: force a mismatch most of the time
      maj = ($urandom % 5 == 0) ? target : ~target;
      maj_valid = 1; @(negedge clk); maj_valid = 0;
      if (maj == target) begin
        repeat (3) @(negedge clk);
        continue;
      end
      wait_done(1, cyc);
      checks++;
      if (cyc != W + 15) fail($sformatf("tfac latency %0d", cyc + 1));
      @(negedge clk);
      begin
        real tr, xr, er, err;
        int  got;
        got = int'(dut.tfac_r);
        tr  = real'(T0) * (1.0 - real'(mi) / real'(2 ** LOG2_IMAX));
        if (tr <= 0.0) er = 0.0;
        else begin
          xr = real'(h < 0 ? -h : h) / tr;
          er = (xr >= 8.0) ? 0.0 : (tr / real'(T0)) * $exp(-xr) * 32768.0;
        end
        err = real'(got) - er;
        if (err < 0) err = -err;
        checks++;
        n_tf++;
        if (err > 0.006 * er + 4.0) fail($sformatf("tfac %0d ref %f h=%0d I=%0d", got, er, h, mi));
        checks++;
        if ((s != target) && tfac !== dut.tfac_r) fail("tfac output not passed");
        if ((s == target) && tfac !== '0)         fail("tfac output not masked");
        if (s != target) begin
          active = 0; #1;
          checks++;
          if (tfac !== '0) fail("inactive neuron shows tfac");
          active = 1;
        end
        // update when the neuron is wrong
        if (s != target) begin
          int st;
          upd_sel = 1; @(negedge clk); upd_sel = 0;
          wait_done(2, cyc);
          checks++;
          if (cyc != 2 * NI + 1) fail($sformatf("update latency %0d", cyc + 1));
          @(negedge clk);
          for (int i = 0; i < NI; i++) begin
            st = (got * int'(psi[i])) >>> (EXP_FRAC + PSI_FRAC - N2);
            mw[i] = sat(target ? mw[i] + st : mw[i] - st);
          end
          st = (got * (1 << PSI_FRAC)) >>> (EXP_FRAC + PSI_FRAC - N2);
          mb = sat(target ? mb - st : mb + st);
          if (mi < 2 ** LOG2_IMAX) mi++;
          n_upd++;
          for (int i = 0; i < NI; i++) begin
            checks++;
            if (int'(dut.w[i]) != mw[i]) fail($sformatf("w[%0d]=%0d exp %0d", i, dut.w[i], mw[i]));
          end
          checks += 2;
          if (int'(dut.b) != mb) fail($sformatf("b=%0d exp %0d", dut.b, mb));
          if (int'(dut.iter) != mi) fail($sformatf("I=%0d exp %0d", dut.iter, mi));
        end
      end
    end
    // saturation: from cleared weights (Tfac near 1 at h = 0) apply the same
    // positive update repeatedly; weights climb to the top of the range and
    // the bias to the bottom, and must stay there.
    clear = 1; @(negedge clk); clear = 0;
    for (int i = 0; i < NI; i++) mw[i] = 0;
    mb = 0; mi = 0;
    for (int i = 0; i < NI; i++) psi[i] = 8'hFF;
    target = 1'b1;
    pat_valid = 1; @(negedge clk); pat_valid = 0;
    wait_done(0, cyc);
    @(negedge clk);
    maj = 1'b0;
    maj_valid = 1; @(negedge clk); maj_valid = 0;
    wait_done(1, cyc);
    @(negedge clk);
    begin
      int got, st;
      got = int'(dut.tfac_r);
      checks++;
      if (got < 32000) fail($sformatf("Tfac at h = 0 is %0d", got));
      for (int r = 0; r < 140; r++) begin
        upd_sel = 1; @(negedge clk); upd_sel = 0;
        wait_done(2, cyc);
        @(negedge clk);
        for (int i = 0; i < NI; i++) begin
          st = (got * int'(psi[i])) >>> (EXP_FRAC + PSI_FRAC - N2);
          mw[i] = sat(mw[i] + st);
        end
        st = (got * (1 << PSI_FRAC)) >>> (EXP_FRAC + PSI_FRAC - N2);
        mb = sat(mb - st);
      end
      for (int i = 0; i < NI; i++) begin
        checks++;
        if (int'(dut.w[i]) != mw[i] || mw[i] != 2**(W-1) - 1) fail($sformatf("saturated w[%0d]=%0d", i, dut.w[i]));
      end
      checks++;
      if (int'(dut.b) != mb || mb != -(2**(W-1))) fail($sformatf("saturated b=%0d", dut.b));
    end
    checks++;
    if (n_upd < 20 || n_tf < 50 || n_sat == 0) fail("too few updates exercised");
    $display("updates=%0d tfac=%0d saturations=%0d", n_upd, n_tf, n_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
