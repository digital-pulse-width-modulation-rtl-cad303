// tb_ring_counter: self-checking test of the one-hot ring counter (256
// taps, the default). With a random advance enable, a bench-side tap index
// (incremented modulo 256 on every enabled clock) must always be the only
// high tap. Runs a little over three revolutions, so the wrap from tap 255
// to tap 0 is exercised and counted.
`timescale 1ns/1ps
module tb_ring_counter;
  localparam int TAPS = 256;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic [TAPS-1:0] taps;
  int checks = 0, failures = 0, idx = 0, wraps = 0;

  ring_counter dut (.clk, .rst_n, .en, .taps);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    checks++;
    if (taps !== TAPS'(1)) begin failures++; $display("reset state wrong"); end
    for (int i = 0; i < 1200; i++) begin
      en = ($urandom_range(0, 3) != 0);
      @(negedge clk);
      if (en) begin
        if (idx == TAPS - 1) wraps++;
        idx = (idx + 1) % TAPS;
      end
      checks++;
      if (taps !== (TAPS'(1) << idx)) begin
        failures++;
        if (failures < 10) $display("cycle %0d: expected tap %0d", i, idx);
      end
    end
    checks++;
    if (wraps < 2) begin failures++; $display("wrap seen only %0d times", wraps); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
