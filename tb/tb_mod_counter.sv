// tb_mod_counter: self-checking test of the 8-bit (default) enabled
// up-counter. With a random enable, a bench-side integer count modulo 256
// must match the output every clock; the wrap from 255 to 0 is counted and
// must happen.
`timescale 1ns/1ps
module tb_mod_counter;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic [7:0] count;
  int checks = 0, failures = 0, ref_count = 0, wraps = 0;

  mod_counter dut (.clk, .rst_n, .en, .count);

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
    for (int i = 0; i < 1000; i++) begin
      en = ($urandom_range(0, 4) != 0);
      @(negedge clk);
      if (en) begin
        if (ref_count == 255) wraps++;
        ref_count = (ref_count + 1) % 256;
      end
      checks++;
      if (int'(count) != ref_count) begin failures++; if (failures < 10) $display("cycle %0d: count %0d exp %0d", i, count, ref_count); end
    end
    checks++;
    if (wraps == 0) begin failures++; $display("counter never wrapped"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
