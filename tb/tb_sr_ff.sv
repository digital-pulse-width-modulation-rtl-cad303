// tb_sr_ff: self-checking test of the clocked SR flip-flop.
//
// Two instances, one with RESET winning a tie and one with SET winning, are
// driven with random SET/RESET pairs. A reference model kept in the bench
// predicts Q for each clock; Q' must always be the complement of Q. All four
// input combinations are counted and each must occur.
`timescale 1ns/1ps
module tb_sr_ff;
  logic clk = 1'b0, rst_n = 1'b0, set = 1'b0, reset = 1'b0;
  logic q0, qn0, q1, qn1;
  logic m0, m1;
  int checks = 0, failures = 0;
  int combo [4];

  sr_ff #(.SET_WINS(1'b0)) dut0 (.clk, .rst_n, .set, .reset, .q(q0), .qn(qn0));
  sr_ff #(.SET_WINS(1'b1)) dut1 (.clk, .rst_n, .set, .reset, .q(q1), .qn(qn1));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    m0 = 1'b0; m1 = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 400; i++) begin
      set   = 1'($urandom_range(0, 1));
      reset = 1'($urandom_range(0, 1));
      combo[{set, reset}]++;
      // reference: tie -> 0 for dut0, 1 for dut1
      if (set && reset) begin m0 = 1'b0; m1 = 1'b1; end
      else if (set)     begin m0 = 1'b1; m1 = 1'b1; end
      else if (reset)   begin m0 = 1'b0; m1 = 1'b0; end
      @(negedge clk);
      checks++;
      if (q0 !== m0 || q1 !== m1 || qn0 !== ~q0 || qn1 !== ~q1) begin
        failures++;
        $display("mismatch i=%0d set=%b reset=%b q0=%b exp %b q1=%b exp %b", i, set, reset, q0, m0, q1, m1);
      end
    end
    // synchronous reset clears Q
    set = 1'b1; reset = 1'b0; @(negedge clk);
    rst_n = 1'b0; @(negedge clk);
    checks++;
    if (q0 !== 1'b0 || q1 !== 1'b0) begin failures++; $display("reset did not clear Q"); end
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (combo[k] == 0) begin failures++; $display("input combination %0d never applied", k); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
