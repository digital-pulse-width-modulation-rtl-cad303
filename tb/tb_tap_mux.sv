// tb_tap_mux: self-checking test of the 256:1 tap multiplexer (default
// size). For one-hot inputs every select value is tried against every hot
// position class: the output must be 1 exactly when the select names the
// hot input. Random inputs and selects are checked against in_bits[sel]
// computed in the bench by shifting.
`timescale 1ns/1ps
module tb_tap_mux;
  localparam int SB = 8;
  localparam int W  = 1 << SB;
  logic [W-1:0]  in_bits;
  logic [SB-1:0] sel;
  logic          out_bit;
  int checks = 0, failures = 0;

  tap_mux dut (.in_bits, .sel, .out_bit);

  initial begin
    for (int hot = 0; hot < W; hot++) begin
      in_bits = W'(1) << hot;
      for (int s = 0; s < W; s += 1 + (s % 7)) begin
        sel = SB'(s);
        #1;
        checks++;
        if (out_bit !== (s == hot)) begin failures++; if (failures < 10) $display("hot=%0d sel=%0d out=%b", hot, s, out_bit); end
      end
      sel = SB'(hot); #1;
      checks++;
      if (out_bit !== 1'b1) begin failures++; if (failures < 10) $display("hot=%0d not selected", hot); end
    end
    for (int i = 0; i < 2000; i++) begin
      for (int k = 0; k < W; k += 32) in_bits[k +: 32] = $urandom;
      sel = SB'($urandom);
      #1;
      checks++;
      if (out_bit !== ((in_bits >> sel) & W'(1)) != 0) begin failures++; if (failures < 10) $display("random mismatch sel=%0d", sel); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
