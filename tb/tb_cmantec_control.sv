// tb_cmantec_control: drives the control block alone (4 neurons) with the
// testbench standing in for the pattern block and the neurons, and checks the
// decisions and command sequence of each branch of the algorithm:
//   start -> clear + pb_init, one active neuron, pb_req;
//   majority equal to the target -> pb_correct, next pb_req;
//   majority wrong, a Tfac above gfac -> upd_sel on the largest (lowest index
//     on ties) -> pb_learned;
//   majority wrong, all Tfac <= gfac -> neuron added, temp_reset, pb_learned,
//     pb_resend, then pb_filter after that step;
//   none -> done with success;  no neuron left -> done with full.
// It also checks the network output (maj) and the recorded phase lengths for
// the delays the testbench applies.
module tb_cmantec_control;
  import cmantec_pkg::*;
  localparam int NN = 4, CW = $clog2(NN + 1);
  logic clk = 0, rst_n = 0, start = 0;
  logic [EXP_W-1:0] gfac = 16'd1000;
  logic pb_ready = 1, pb_none = 0, target = 0;
  logic pb_init, pb_req, pb_resend, pb_correct, pb_learned, pb_filter;
  logic [NN-1:0] s = '0;
  logic [NN-1:0][EXP_W-1:0] tfac = '0;
  logic eval_done = 0, tfac_done = 0, upd_done = 0;
  logic clear, temp_reset, maj_valid, maj, busy, done, success, full;
  logic [NN-1:0] active, upd_sel;
  logic [CW-1:0] n_active;
  logic [15:0] cyc_maj, cyc_tfac, cyc_upd;
  int checks = 0, failures = 0;

  cmantec_control #(.NN(NN)) dut (.*);

  always #5 clk = ~clk;

  task automatic fail(input string m);
    failures++;
    $display("FAIL %s", m);
  endtask

  // waits up to N clocks for a signal and counts a failure if it never comes
  `define EXPECT_SIG(SIG, N) \
    begin \
      int waited_; \
      waited_ = 0; \
      while (!(SIG) && waited_ < (N)) begin @(negedge clk); waited_++; end \
      checks++; \
      if (!(SIG)) fail(`"missing SIG`"); \
    end

  // one evaluation: answers req after 4 clocks, eval_done after 6 more
  task automatic evaluate(input logic [NN-1:0] sv, input logic tg, input bit via_resend);
    if (via_resend) `EXPECT_SIG(pb_resend, 10)
    else `EXPECT_SIG(pb_req, 10)
    repeat (4) @(negedge clk);
    s = sv; target = tg;
    repeat (5) @(negedge clk);
    eval_done = 1; @(negedge clk); eval_done = 0;
    checks += 2;
    if (!maj_valid) fail("maj_valid not raised");
    @(negedge clk);
    if (int'(cyc_maj) != 11) fail($sformatf("cyc_maj %0d", cyc_maj));
  endtask

  task automatic tfac_phase(input logic [NN-1:0][EXP_W-1:0] tv);
    repeat (6) @(negedge clk);
    tfac = tv;
    tfac_done = 1; @(negedge clk); tfac_done = 0;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    checks += 3;
    if (!clear || !pb_init) fail("start did not clear/init");
    if (int'(n_active) != 1 || active != 4'b0001) fail("one active neuron expected");
    // correct answer: neuron 0 ON, target 1 (neuron 1 ON is inactive, ignored)
    evaluate(4'b0011, 1'b1, 0);
    checks++;
    if (maj !== 1'b1) fail("maj");
    `EXPECT_SIG(pb_correct, 3)
    // wrong answer, neuron 0 above gfac -> update neuron 0
    evaluate(4'b0000, 1'b1, 0);
    tfac_phase({16'd0, 16'd0, 16'd0, 16'd2000});
    `EXPECT_SIG(upd_sel[0], 10)
    checks++;
    if (upd_sel != 4'b0001) fail("wrong neuron selected");
    checks++;
    if (int'(cyc_tfac) != 10) fail($sformatf("cyc_tfac %0d", cyc_tfac));
    repeat (5) @(negedge clk);
    upd_done = 1; @(negedge clk); upd_done = 0;
    `EXPECT_SIG(pb_learned, 3)
    @(negedge clk);
    checks++;
    if (int'(cyc_upd) != 7) fail($sformatf("cyc_upd %0d", cyc_upd));
    // wrong answer, no Tfac above gfac -> add neuron 1
    evaluate(4'b0000, 1'b1, 0);
    tfac_phase({16'd0, 16'd0, 16'd0, 16'd1000});
    `EXPECT_SIG(temp_reset, 10)
    checks += 2;
    if (!pb_learned) fail("pattern not counted on addition");
    @(negedge clk);
    if (int'(n_active) != 2) fail("neuron not added");
    // the same pattern again; now two neurons, tie -> wrong, neuron 1 wins
    evaluate(4'b0001, 1'b1, 1);
    checks++;
    if (maj !== 1'b0) fail("tie must give 0");
    tfac_phase({16'd0, 16'd0, 16'd3000, 16'd3000});
    `EXPECT_SIG(upd_sel[0], 10)
    checks++;
    if (upd_sel != 4'b0001) fail("tie must pick the lowest index");
    upd_done = 1; @(negedge clk); upd_done = 0;
    `EXPECT_SIG(pb_filter, 10)
    // neurons 2 and 3 added, then full
    for (int k = 0; k < 3; k++) begin
      evaluate('0, 1'b1, k != 0 ? 1 : 0);
      tfac_phase('0);
      if (k < 2) `EXPECT_SIG(temp_reset, 10)
    end
    `EXPECT_SIG(done, 10)
    checks += 2;
    if (!full || success) fail("expected full");
    if (int'(n_active) != NN) fail("not all neurons active");
    // restart and finish with none -> success
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    `EXPECT_SIG(pb_req, 10)
    repeat (3) @(negedge clk);
    pb_none = 1; @(negedge clk); pb_none = 0;
    `EXPECT_SIG(done, 5)
    checks++;
    if (!success || full) fail("expected success");
    for (int i = 0; i < 5; i++) begin
      checks++;
      if (pb_req) fail("pb_req after done");
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
