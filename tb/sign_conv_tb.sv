// Self-checking testbench for sign_conv: all 2^17 coefficients. For h >= 0
// hm must equal h; for h < 0 hm must equal |h| - 1 (the one's complement
// of the low 16 bits); neg must be the sign bit.
module sign_conv_tb;
  import vhbcse_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [H_W-1:0]  h;
  logic [HM_W-1:0] hm;
  logic            neg;

  sign_conv dut (.h(h), .hm(hm), .neg(neg));

  initial begin
    for (int i = 0; i < (1 << H_W); i++) begin
      int v, exp_hm;
      h = H_W'(i);
      v = (i >= (1 << (H_W - 1))) ? i - (1 << H_W) : i;   // signed value
      exp_hm = (v < 0) ? -v - 1 : v;
      #1;
      checks++;
      if (int'(hm) != exp_hm || neg != (v < 0)) begin
        failures++;
        if (failures < 10) $display("FAIL h=%0d hm=%0d neg=%b exp %0d", v, hm, neg, exp_hm);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
