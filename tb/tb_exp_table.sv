// tb_exp_table: compares every table entry and its upper neighbour with
// exp(-k/8) computed by the simulator's $exp, allowing one LSB of rounding.
module tb_exp_table;
  import cmantec_pkg::*;
  logic [5:0]       k;
  logic [EXP_W-1:0] e0, e1;
  int checks = 0, failures = 0;

  exp_table dut (.k, .e0, .e1);

  function automatic int ref_val(input int n);
    return $rtoi($exp(-real'(n) / 8.0) * 32768.0 + 0.5);
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 64; n++) begin
      int d0, d1;
      k = 6'(n);
      #1;
      d0 = int'(e0) - ref_val(n);
      d1 = int'(e1) - ref_val(n + 1);
      checks += 2;
      if (d0 > 1 || d0 < -1) begin failures++; $display("FAIL e0[%0d]=%0d ref %0d", n, e0, ref_val(n)); end
      if (d1 > 1 || d1 < -1) begin failures++; $display("FAIL e1[%0d]=%0d ref %0d", n, e1, ref_val(n+1)); end
    end
    checks++;
    if (!(e0 > e1)) failures++;  // monotonic at the end of the table
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
