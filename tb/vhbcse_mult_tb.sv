// Self-checking testbench for vhbcse_mult, fed by a ppg as in the filter. Reset must clear the product
// register. Then, every clock, random (or corner) x and h are applied with
// a random enable; one clock after an enabled cycle p must equal x * h of
// that cycle (latency one clock), and with the enable low p must hold.
module vhbcse_mult_tb;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_en = 0, n_hold = 0;
  logic               rst_n, en;
  logic signed [15:0] x;
  logic signed [16:0] h;
  logic signed [32:0] p;
  longint             expv;

  logic signed [17:0] pp1, pp2, pp3;

  ppg u_ppg (.x(x), .pp1(pp1), .pp2(pp2), .pp3(pp3));
  vhbcse_mult dut (.clk(clk), .rst_n(rst_n), .en(en), .x(x), .pp1(pp1), .pp2(pp2), .pp3(pp3),
                   .h(h), .p(p));

  initial begin
    int cx[5] = '{1, -1, 32767, -32768, -12345};
    int ch[6] = '{1, -1, 65535, -65536, 43690, -21846};
    rst_n = 0; en = 1; x = 16'sd100; h = 17'sd100;
    @(posedge clk); @(posedge clk);
    #1 checks++;
    if (p != 0) begin failures++; $display("FAIL reset p=%0d", p); end
    rst_n = 1;
    expv = 0;
    for (int t = 0; t < 20030; t++) begin
      if (t < 30) begin
        x = 16'(cx[t % 5]); h = 17'(ch[t / 5]); en = 1;
      end else begin
        x = 16'($urandom); h = 17'($urandom); en = ($urandom % 4) != 0;
      end
      @(posedge clk);
      if (en) expv = longint'(x) * longint'(h);
      #1;
      checks++;
      if (en) n_en++; else n_hold++;
      if (longint'(p) != expv) begin
        failures++;
        if (failures < 10) $display("FAIL t=%0d en=%b x=%0d h=%0d p=%0d exp %0d", t, en, x, h, p, expv);
      end
    end
    checks++;
    if (n_en == 0 || n_hold == 0) begin failures++; $display("FAIL enable coverage"); end
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
