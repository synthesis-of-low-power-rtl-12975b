// Self-checking testbench for ppg: every 16-bit x; pp1, pp2, pp3 must be
// x, 2x and 3x as signed 18-bit numbers.
module ppg_tb;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic signed [15:0] x;
  logic signed [17:0] pp1, pp2, pp3;

  ppg dut (.x(x), .pp1(pp1), .pp2(pp2), .pp3(pp3));

  initial begin
    for (int v = -32768; v < 32768; v++) begin
      x = 16'(v);
      #1;
      checks++;
      if (int'(pp1) != v || int'(pp2) != 2 * v || int'(pp3) != 3 * v) begin
        failures++;
        if (failures < 10) $display("FAIL x=%0d pp=%0d %0d %0d", v, pp1, pp2, pp3);
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
