// Self-checking testbench for final_add. For random and corner (x, h) the
// testbench forms the multiplexed coefficient, its 2-bit digits, the match
// flags and the partial products itself; the partial products of redundant
// upper halves are filled with random junk, which final_add must ignore
// because it reuses the lower half. The result must equal x * h exactly.
module final_add_tb;
  import vhbcse_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_m4 = 0, n_m8 = 0, n_neg = 0;
  logic [N_G2-1:0][17:0]  pp;
  logic [N_G4-1:0]        m4;
  logic [N_G8-1:0]        m8;
  logic signed [15:0]     x;
  logic                   neg;
  logic signed [32:0]     p;

  final_add dut (.pp(pp), .m4(m4), .m8(m8), .x(x), .neg(neg), .p(p));

  task automatic run(int xv, int hv);
    int hmv;
    int d[N_G2];
    bit idle;
    longint expv;
    x   = 16'(xv);
    neg = (hv < 0);
    hmv = (hv < 0) ? -hv - 1 : hv;
    for (int i = 0; i < N_G2; i++) d[i] = (hmv >> (2 * i)) & 3;
    for (int j = 0; j < N_G4; j++) m4[j] = (d[2*j+1] == d[2*j]);
    for (int k = 0; k < N_G8; k++) m8[k] = (((hmv >> (8*k + 4)) & 15) == ((hmv >> (8*k)) & 15));
    for (int i = 0; i < N_G2; i++) begin
      idle = ((i % 2 == 1) && m4[i/2]) || ((i % 4 >= 2) && m8[i/4]);
      pp[i] = idle ? 18'($urandom) : 18'(d[i] * xv);
    end
    #1;
    expv = longint'(xv) * longint'(hv);
    n_m4 += $countones(m4); n_m8 += $countones(m8); n_neg += int'(neg);
    checks++;
    if (longint'(p) != expv) begin
      failures++;
      if (failures < 10) $display("FAIL x=%0d h=%0d p=%0d exp %0d", xv, hv, p, expv);
    end
  endtask

  initial begin
    int cx[6] = '{0, 1, -1, 32767, -32768, 12345};
    int ch[10] = '{0, 1, -1, 65535, -65536, -65535, 21845, -21846, 4369, -4370};
    foreach (cx[i]) foreach (ch[j]) run(cx[i], ch[j]);
    for (int t = 0; t < 50000; t++)
      run(int'(16'sh0 + $signed(16'($urandom))), int'($signed(17'($urandom))));
    checks++;
    if (n_m4 == 0 || n_m8 == 0 || n_neg == 0) begin
      failures++;
      $display("FAIL coverage m4=%0d m8=%0d neg=%0d", n_m4, n_m8, n_neg);
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
