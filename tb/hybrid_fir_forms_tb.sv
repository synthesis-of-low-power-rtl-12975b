// Checks that the group size only changes the structure, not the result:
// three hybrid_fir instances - pure transposed form (16 taps, GROUP 1), pure
// direct form (16 taps, GROUP 16) and a 12-tap filter in groups of 3 - get
// the same random samples with random gaps, and new coefficients between
// bursts. Each output is checked against the hybrid-form definition for its
// own group size G,
//   y[n] = sum_g sum_l hsnap[n-gG][gG+l] * x[n-gG-l],
// (hsnap[m] = coefficients in force when sample m was accepted), which is
// the plain convolution once the coefficients have been stable for TAPS
// samples; for G = TAPS it is always the plain convolution.
module hybrid_fir_forms_tb;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_out = 0;
  logic               rst_n, x_valid, coef_we;
  logic [3:0]         coef_addr;
  logic signed [16:0] coef_wdata;
  logic signed [15:0] x_in;
  logic               yv_t, yv_d, yv_h;
  logic signed [36:0] y_t, y_d;
  logic signed [36:0] y_h;        // 12 taps: 33 + 4 bits as well
  logic signed [37:0] e_t, e_d, e_h;

  hybrid_fir #(.TAPS(16), .GROUP(1)) u_trans (
    .clk(clk), .rst_n(rst_n), .coef_we(coef_we), .coef_addr(coef_addr), .coef_wdata(coef_wdata),
    .x_valid(x_valid), .x_in(x_in), .adapt(1'b0), .d_in('0), .y_valid(yv_t), .y_out(y_t), .e_out(e_t));
  hybrid_fir #(.TAPS(16), .GROUP(16)) u_direct (
    .clk(clk), .rst_n(rst_n), .coef_we(coef_we), .coef_addr(coef_addr), .coef_wdata(coef_wdata),
    .x_valid(x_valid), .x_in(x_in), .adapt(1'b0), .d_in('0), .y_valid(yv_d), .y_out(y_d), .e_out(e_d));
  hybrid_fir #(.TAPS(12), .GROUP(3)) u_hyb12 (
    .clk(clk), .rst_n(rst_n), .coef_we(coef_we && coef_addr < 12), .coef_addr(coef_addr),
    .coef_wdata(coef_wdata), .x_valid(x_valid), .x_in(x_in), .adapt(1'b0), .d_in('0),
    .y_valid(yv_h), .y_out(y_h), .e_out(e_h));

  localparam int MAXN = 2048;
  int     h  [16];
  int     xs [MAXN];
  int     hsnap [MAXN][16];
  int     n_acc = 0;
  longint exp_t [$], exp_d [$], exp12 [$];

  function automatic longint ref_y(int n, int taps, int grp);
    longint acc = 0;
    for (int g = 0; g < taps / grp; g++) begin
      int m = n - g * grp;
      if (m < 0) continue;
      for (int l = 0; l < grp; l++)
        if (m - l >= 0) acc += longint'(hsnap[m][g*grp + l]) * longint'(xs[m - l]);
    end
    return acc;
  endfunction

  always @(posedge clk) begin
    if (rst_n && x_valid) begin
      xs[n_acc] = int'(x_in);
      for (int k = 0; k < 16; k++) hsnap[n_acc][k] = h[k];
      exp_t.push_back(ref_y(n_acc, 16, 1));
      exp_d.push_back(ref_y(n_acc, 16, 16));
      exp12.push_back(ref_y(n_acc, 12, 3));
      n_acc++;
    end
  end

  always @(posedge clk) begin
    #1;
    if (rst_n && (yv_t || yv_d || yv_h)) begin
      longint et, ed, e12;
      checks++;
      if (!(yv_t && yv_d && yv_h) || exp_t.size() == 0) begin
        failures++;
        $display("FAIL valid mismatch %b%b%b", yv_t, yv_d, yv_h);
      end else begin
        et = exp_t.pop_front();
        ed = exp_d.pop_front();
        e12 = exp12.pop_front();
        n_out++;
        if (longint'(y_t) != et || longint'(y_d) != ed || longint'(y_h) != e12) begin
          failures++;
          if (failures < 10) $display("FAIL y %0d %0d %0d exp %0d %0d %0d", y_t, y_d, y_h, et, ed, e12);
        end
      end
    end
  end

  initial begin
    rst_n = 0; x_valid = 0; coef_we = 0; coef_addr = 0; coef_wdata = 0; x_in = 0;
    for (int k = 0; k < 16; k++) h[k] = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int round = 0; round < 4; round++) begin
      for (int k = 0; k < 16; k++) begin
        coef_we = 1; coef_addr = 4'(k); coef_wdata = 17'($urandom);
        @(posedge clk);
        h[k] = int'(coef_wdata);
        #1;
      end
      coef_we = 0;
      for (int t = 0; t < 400; t++) begin
        x_valid = ($urandom % 3) != 0;
        x_in = 16'($urandom);
        @(posedge clk); #1;
      end
      x_valid = 0;
      repeat (4) @(posedge clk);
      #1;
    end
    checks++;
    if (exp_t.size() != 0 || n_out < 800) begin failures++; $display("FAIL outputs missing"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
