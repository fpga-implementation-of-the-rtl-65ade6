// tb_shift_add_mult: checks the shift-and-add multiplier against the
// simulator's own multiplication for corner operands and random operands.
module tb_shift_add_mult;
  localparam int A_W = 18, B_W = 18;
  logic [A_W-1:0]     a;
  logic [B_W-1:0]     b;
  logic [A_W+B_W-1:0] p;
  int checks = 0, failures = 0;

  shift_add_mult #(.A_W(A_W), .B_W(B_W)) dut (.a, .b, .p);

  task automatic check(input logic [A_W-1:0] x, input logic [B_W-1:0] y);
    logic [A_W+B_W-1:0] expct;
    a = x; b = y;
    #1;
    expct = (A_W+B_W)'(x) * (A_W+B_W)'(y);
    checks++;
    if (p !== expct) begin
      failures++;
      $display("FAIL %0d * %0d = %0d, expected %0d", x, y, p, expct);
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
    check('0, '0); check('1, '1); check('1, 1); check(1, '1); check(18'h20000, 18'h20000);
    for (int i = 0; i < 2000; i++) check(A_W'($urandom), B_W'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
