// tb_tfac_module: random Tfac vectors (zero beyond the active neurons, and
// with many zeros and duplicated maxima); checks the maximum, the lowest index
// holding it and that done arrives ceil(n_active/16) + 1 clocks after start.
module tb_tfac_module;
  import cmantec_pkg::*;
  localparam int NN = 94;
  localparam int IW = $clog2(NN), CW = $clog2(NN + 1);
  logic clk = 0, rst_n = 0, start = 0, done;
  logic [CW-1:0] n_active;
  logic [NN-1:0][EXP_W-1:0] tfac;
  logic [EXP_W-1:0] max_tfac;
  logic [IW-1:0]    index;
  int checks = 0, failures = 0;

  tfac_module #(.NN(NN)) dut (.clk, .rst_n, .start, .n_active, .tfac, .done, .max_tfac, .index);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    n_active = '0; tfac = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 500; t++) begin
      int n, cyc, bi;
      logic [EXP_W-1:0] bv;
      n = (t < NN) ? t + 1 : 1 + ($urandom % NN);
      n_active = CW'(n);
      for (int i = 0; i < NN; i++) begin
        if (i >= n || ($urandom % 3) == 0) tfac[i] = '0;
        else if (t % 4 == 0)               tfac[i] = EXP_W'($urandom % 8);   // ties
        else                               tfac[i] = EXP_W'($urandom);
      end
      bv = '0; bi = 0;
      for (int i = 0; i < n; i++) if (tfac[i] > bv) begin bv = tfac[i]; bi = i; end
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      checks += 3;
      if (max_tfac !== bv) begin failures++; $display("FAIL max %0d exp %0d (n=%0d)", max_tfac, bv, n); end
      if (bv != 0 && int'(index) != bi) begin failures++; $display("FAIL idx %0d exp %0d", index, bi); end
      if (cyc != (n + 15) / 16 + 1) begin failures++; $display("FAIL cycles %0d n=%0d", cyc, n); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
