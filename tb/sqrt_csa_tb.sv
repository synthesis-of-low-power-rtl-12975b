// Self-checking testbench for sqrt_csa.
// Checks the 16-bit default adder and a 37-bit and a 3-bit instance (the
// widths used in the filter and the smallest truncated block case) against
// the simulator's own '+': corner operands first, then random ones.
module sqrt_csa_tb;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [15:0] a16, b16, s16;  logic ci16, co16;
  logic [36:0] a37, b37, s37;  logic ci37, co37;
  logic [2:0]  a3,  b3,  s3;   logic ci3,  co3;

  sqrt_csa                dut16 (.a(a16), .b(b16), .cin(ci16), .s(s16), .cout(co16));
  sqrt_csa #(.W(37))      dut37 (.a(a37), .b(b37), .cin(ci37), .s(s37), .cout(co37));
  sqrt_csa #(.W(3))       dut3  (.a(a3),  .b(b3),  .cin(ci3),  .s(s3),  .cout(co3));

  task automatic check_all();
    logic [16:0] e16;  logic [37:0] e37;  logic [3:0] e3;
    #1;
    e16 = {1'b0, a16} + {1'b0, b16} + 17'(ci16);
    e37 = {1'b0, a37} + {1'b0, b37} + 38'(ci37);
    e3  = {1'b0, a3}  + {1'b0, b3}  + 4'(ci3);
    checks += 3;
    if ({co16, s16} !== e16) begin failures++; $display("FAIL16 %h+%h+%b=%h exp %h", a16, b16, ci16, {co16, s16}, e16); end
    if ({co37, s37} !== e37) begin failures++; $display("FAIL37 %h+%h+%b=%h exp %h", a37, b37, ci37, {co37, s37}, e37); end
    if ({co3, s3}   !== e3)  begin failures++; $display("FAIL3 %h+%h+%b=%h exp %h",  a3,  b3,  ci3,  {co3, s3},  e3);  end
  endtask

  initial begin
    // Carry-propagation corners: all ones plus one, alternating patterns.
    a16 = '1; b16 = '0; ci16 = 1; a37 = '1; b37 = '0; ci37 = 1; a3 = '1; b3 = '0; ci3 = 1; check_all();
    a16 = '1; b16 = '1; ci16 = 1; a37 = '1; b37 = '1; ci37 = 1; a3 = '1; b3 = '1; ci3 = 1; check_all();
    a16 = 16'h5555; b16 = 16'hAAAA; ci16 = 1; a37 = {1'b0, {18{2'b01}}}; b37 = {1'b1, {18{2'b10}}}; ci37 = 1;
    a3 = 3'b101; b3 = 3'b010; ci3 = 1; check_all();
    a16 = 0; b16 = 0; ci16 = 0; a37 = 0; b37 = 0; ci37 = 0; a3 = 0; b3 = 0; ci3 = 0; check_all();
    // Exhaustive 3-bit.
    for (int i = 0; i < 128; i++) begin
      {a3, b3, ci3} = 7'(i);
      a16 = 16'($urandom); b16 = 16'($urandom); ci16 = 1'($urandom);
      a37 = {5'($urandom), 32'($urandom)}; b37 = {5'($urandom), 32'($urandom)}; ci37 = 1'($urandom);
      check_all();
    end
    for (int i = 0; i < 20000; i++) begin
      a16 = 16'($urandom); b16 = 16'($urandom); ci16 = 1'($urandom);
      a37 = {5'($urandom), 32'($urandom)}; b37 = {5'($urandom), 32'($urandom)}; ci37 = 1'($urandom);
      a3 = 3'($urandom); b3 = 3'($urandom); ci3 = 1'($urandom);
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Watchdog.
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
