// Self-checking testbench for cl_gen: all 2^16 multiplexed coefficients.
// The expected selects are hm's 2-bit digits (hm / 4^i mod 4); the expected
// match flags compare those digits (nibbles) arithmetically.
module cl_gen_tb;
  import vhbcse_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_m4 = 0, n_m8 = 0;
  logic [HM_W-1:0]      hm;
  logic [N_G2-1:0][1:0] sel;
  logic [N_G4-1:0]      m4;
  logic [N_G8-1:0]      m8;

  cl_gen dut (.hm(hm), .sel(sel), .m4(m4), .m8(m8));

  initial begin
    for (int v = 0; v < (1 << HM_W); v++) begin
      bit bad;
      hm = HM_W'(v);
      #1;
      bad = 0;
      for (int i = 0; i < N_G2; i++)
        if (int'(sel[i]) != (v / (4 ** i)) % 4) bad = 1;
      for (int j = 0; j < N_G4; j++) begin
        bit e;
        e = ((v / (4 ** (2*j+1))) % 4) == ((v / (4 ** (2*j))) % 4);
        if (m4[j] != e) bad = 1;
        n_m4 += int'(e);
      end
      for (int k = 0; k < N_G8; k++) begin
        bit e;
        e = ((v / (16 ** (2*k+1))) % 16) == ((v / (16 ** (2*k))) % 16);
        if (m8[k] != e) bad = 1;
        n_m8 += int'(e);
      end
      checks++;
      if (bad) begin
        failures++;
        if (failures < 10) $display("FAIL hm=%h sel=%h m4=%b m8=%b", hm, sel, m4, m8);
      end
    end
    // Each nibble matches for 4 of 16 patterns, each byte for 16 of 256.
    checks++;
    if (n_m4 != 4 * 65536 / 4 || n_m8 != 2 * 65536 / 16) begin
      failures++;
      $display("FAIL match counts m4=%0d m8=%0d", n_m4, n_m8);
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
