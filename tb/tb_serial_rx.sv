// tb_serial_rx: sends random 8N1 frames at 16 clocks per bit with random
// idle gaps and checks every received byte, then a frame with a low stop bit
// which must raise frame_err and deliver no byte.
module tb_serial_rx;
  localparam int CPB = 16;
  logic clk = 0, rst_n = 0, rx = 1;
  logic byte_valid, frame_err;
  logic [7:0] byte_data;
  int checks = 0, failures = 0, got = 0, errs = 0;
  logic [7:0] q [$];

  serial_rx #(.CLKS_PER_BIT(CPB)) dut (.clk, .rst_n, .rx, .byte_valid, .byte_data, .frame_err);

  always #5 clk = ~clk;

  task automatic send(input logic [7:0] d, input logic stop);
    rx = 0; repeat (CPB) @(posedge clk);
    for (int i = 0; i < 8; i++) begin rx = d[i]; repeat (CPB) @(posedge clk); end
    rx = stop; repeat (CPB) @(posedge clk);
    rx = 1; repeat (CPB + ($urandom % 5)) @(posedge clk);
  endtask

  always @(posedge clk) if (rst_n) begin
    if (byte_valid) begin
      logic [7:0] e;
      got++;
      checks++;
      if (q.size() == 0) begin failures++; $display("FAIL unexpected byte"); end
      else begin
        e = q.pop_front();
        if (byte_data !== e) begin failures++; $display("FAIL got %h exp %h", byte_data, e); end
      end
    end
    if (frame_err) errs++;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4) @(posedge clk);
    rst_n = 1;
    repeat (10) @(posedge clk);
    for (int i = 0; i < 200; i++) begin
      logic [7:0] d;
      d = 8'($urandom);
      q.push_back(d);
      send(d, 1'b1);
    end
    send(8'hA5, 1'b0);
    repeat (4 * CPB) @(posedge clk);
    checks += 3;
    if (got != 200) begin failures++; $display("FAIL got %0d bytes", got); end
    if (errs != 1)  begin failures++; $display("FAIL frame errors %0d", errs); end
    if (q.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
