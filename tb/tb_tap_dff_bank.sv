// tb_tap_dff_bank: self-checking test of the per-tap D flip-flop bank
// (256 bits, the default). Random words go in; each must come out exactly
// one clock later, and the synchronous reset must clear every bit.
`timescale 1ns/1ps
module tb_tap_dff_bank;
  localparam int W = 256;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [W-1:0] d, q, prev;
  int checks = 0, failures = 0;

  tap_dff_bank dut (.clk, .rst_n, .d, .q);

  always #5 clk = ~clk;

  function automatic logic [W-1:0] rand_word();
    logic [W-1:0] w;
    for (int k = 0; k < W; k += 32) w[k +: 32] = $urandom;
    return w;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = '1;
    repeat (2) @(negedge clk);
    checks++;
    if (q !== '0) begin failures++; $display("reset did not clear the bank"); end
    rst_n = 1'b1;
    for (int i = 0; i < 300; i++) begin
      prev = (i % 17 == 0) ? (W'(1) << (i % W)) : rand_word();
      d = prev;
      @(negedge clk);
      checks++;
      if (q !== prev) begin failures++; if (failures < 10) $display("word %0d not delayed by one clock", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
