// Self-checking testbench for mux_unit. Random partial products, selects
// and match flags; the expected output of each multiplexer is sel * x
// (0, x, 2x, 3x) unless the group is the redundant upper half of a matching
// nibble or byte, in which case it must be zero.
module mux_unit_tb;
  import vhbcse_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_idle = 0;
  logic signed [15:0]       x;
  logic signed [17:0]       pp1, pp2, pp3;
  logic [N_G2-1:0][1:0]     sel;
  logic [N_G4-1:0]          m4;
  logic [N_G8-1:0]          m8;
  logic [N_G2-1:0][17:0]    pp;

  mux_unit dut (.pp1(pp1), .pp2(pp2), .pp3(pp3), .sel(sel), .m4(m4), .m8(m8), .pp(pp));

  initial begin
    for (int t = 0; t < 20000; t++) begin
      x = 16'($urandom);
      pp1 = 18'(x); pp2 = 18'(2 * int'(x)); pp3 = 18'(3 * int'(x));
      sel = 16'($urandom);
      m4 = 4'($urandom); m8 = 2'($urandom);
      #1;
      for (int i = 0; i < N_G2; i++) begin
        bit idle;
        int e;
        idle = ((i % 2 == 1) && m4[i/2]) || ((i % 4 >= 2) && m8[i/4]);
        e = idle ? 0 : int'(sel[i]) * int'(x);
        n_idle += int'(idle);
        checks++;
        if (int'(signed'(pp[i])) != e) begin
          failures++;
          if (failures < 10) $display("FAIL i=%0d sel=%0d idle=%b got %0d exp %0d", i, sel[i], idle, signed'(pp[i]), e);
        end
      end
    end
    checks++;
    if (n_idle == 0) begin failures++; $display("FAIL no idle multiplexer exercised"); end
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
