// tb_s_module: random neuron outputs and numbers of active neurons; the
// expected network output is 1 exactly when twice the count of ON active
// neurons exceeds the number of active neurons.
module tb_s_module;
  localparam int NN = 94;
  localparam int CW = $clog2(NN + 1);
  logic [NN-1:0] s, active;
  logic [CW-1:0] n_active;
  logic          maj;
  int checks = 0, failures = 0;

  s_module #(.NN(NN)) dut (.s, .active, .n_active, .maj);

  task automatic run(input int n, input int density);
    int ones;
    logic expct;
    n_active = CW'(n);
    ones = 0;
    for (int i = 0; i < NN; i++) begin
      active[i] = (i < n);
      s[i]      = (($urandom % 100) < density);
      if (active[i] && s[i]) ones++;
    end
    #1;
    expct = (2 * ones > n);
    checks++;
    if (maj !== expct) begin
      failures++;
      $display("FAIL n=%0d ones=%0d maj=%0b", n, ones, maj);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // exact ties and one-over cases
    for (int n = 1; n <= NN; n++) begin
      n_active = CW'(n);
      for (int o = n / 2 - 1; o <= n / 2 + 1; o++) begin
        if (o < 0 || o > n) continue;
        active = '0; s = '1;     // inactive neurons are ON: must be ignored
        for (int i = 0; i < n; i++) begin active[i] = 1'b1; s[i] = (i < o); end
        #1;
        checks++;
        if (maj !== (2 * o > n)) begin failures++; $display("FAIL tie n=%0d o=%0d", n, o); end
      end
    end
    for (int t = 0; t < 3000; t++) run(1 + ($urandom % NN), $urandom % 100);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
