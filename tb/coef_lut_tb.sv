// Self-checking testbench for coef_lut. After reset every word must read
// zero. Random single-word writes and whole-table loads (each strobe
// randomly high or low, sometimes both in one clock, where the single word
// must win) are mirrored in a shadow array; after every clock all words
// must match the shadow, so a write is visible right after its clock edge.
module coef_lut_tb;
  localparam int TAPS = 16;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_wr = 0, n_ld = 0, n_both = 0;
  logic                    rst_n, we;
  logic [3:0]              waddr;
  logic signed [16:0]      wdata;
  logic                    ld;
  logic [TAPS-1:0][16:0]   ld_data;
  logic [TAPS-1:0][16:0]   coef;
  logic [16:0]             shadow [TAPS];

  coef_lut dut (.clk(clk), .rst_n(rst_n), .we(we), .waddr(waddr), .wdata(wdata),
                .ld(ld), .ld_data(ld_data), .coef(coef));

  task automatic compare();
    checks++;
    for (int i = 0; i < TAPS; i++)
      if (coef[i] !== shadow[i]) begin
        failures++;
        if (failures < 10) $display("FAIL word %0d = %h exp %h", i, coef[i], shadow[i]);
        break;
      end
  endtask

  initial begin
    rst_n = 0; we = 0; waddr = 0; wdata = 0; ld = 0; ld_data = '0;
    for (int i = 0; i < TAPS; i++) shadow[i] = '0;
    @(posedge clk); #1;
    compare();
    rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      we = 1'($urandom); waddr = 4'($urandom); wdata = 17'($urandom);
      ld = ($urandom % 4) == 0;
      for (int i = 0; i < TAPS; i++) ld_data[i] = 17'($urandom);
      @(posedge clk);
      if (ld) begin
        for (int i = 0; i < TAPS; i++) shadow[i] = ld_data[i];
        n_ld++;
      end
      if (we) begin shadow[waddr] = wdata; n_wr++; end
      if (we && ld) n_both++;
      #1;
      compare();
    end
    // A second reset clears the table again.
    rst_n = 0; we = 0; ld = 0;
    @(posedge clk);
    for (int i = 0; i < TAPS; i++) shadow[i] = '0;
    #1 compare();
    checks++;
    if (n_wr == 0 || n_ld == 0 || n_both == 0) begin failures++; $display("FAIL write coverage"); end
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
