// End-to-end self-checking testbench for hybrid_fir at its default size
// (16 taps in four groups of four).
//
// The testbench keeps its own history of accepted samples and, for every
// sample, a snapshot of the coefficients in force when it was accepted. The
// expected output follows the hybrid-form definition: group g contributes
// the products formed GROUP*g samples earlier, with the coefficients in force
// then,
//   y[n] = sum_g sum_l hsnap[n - g*GROUP][g*GROUP + l] * x[n - g*GROUP - l],
// which for coefficients that do not change is the plain convolution
// sum_k h[k] x[n-k]. Every output must come exactly two clocks after its
// sample.
//
// Phases: impulse response (the output must replay the coefficients),
// random samples with random gaps and coefficient rewrites while data is in
// flight, full-scale extremes, a reset in mid-stream, and adaptive (LMS)
// operation identifying an unknown 16-tap system. In adaptive mode the
// testbench applies the same fixed-point LMS rule to its own coefficient
// copy (error scaled by 2^-16 and saturated, product scaled by 2^-12, sum
// saturated, update in force two clocks after the sample), so y and the
// error are checked bit for bit; it also requires the weights to end close
// to the unknown system and the error to shrink. Counted mechanisms, each of
// which must occur: negative coefficients, 4-bit and 8-bit horizontal
// matches in the multipliers, gaps in the input, back-to-back samples,
// coefficient rewrites during streaming, a synchronous reset that clears the
// pipeline, LMS weight updates, and saturation of the scaled error.
module hybrid_fir_tb;
  localparam int TAPS  = 16;
  localparam int GROUP = 4;
  localparam int MAXN  = 8192;
  localparam int LATENCY = 2;   // clock cycles from x_valid to y_valid
  localparam int E_SHIFT = 16;
  localparam int U_SHIFT = 12;
  localparam longint HMAX = 65535, HMIN = -65536;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_neg = 0, n_m4 = 0, n_m8 = 0, n_gap = 0, n_b2b = 0, n_rewrite = 0, n_reset = 0;
  int n_upd = 0, n_esat = 0;

  logic               rst_n;
  logic               coef_we;
  logic [3:0]         coef_addr;
  logic signed [16:0] coef_wdata;
  logic               x_valid;
  logic signed [15:0] x_in;
  logic               adapt;
  logic signed [36:0] d_in;
  logic               y_valid;
  logic signed [36:0] y_out;
  logic signed [37:0] e_out;

  hybrid_fir dut (
    .clk(clk), .rst_n(rst_n), .coef_we(coef_we), .coef_addr(coef_addr),
    .coef_wdata(coef_wdata), .x_valid(x_valid), .x_in(x_in),
    .adapt(adapt), .d_in(d_in),
    .y_valid(y_valid), .y_out(y_out), .e_out(e_out)
  );

  // Reference state.
  int     shadow [TAPS];          // coefficients now in the LUT
  int     hsnap  [MAXN][TAPS];    // coefficients in force for sample n
  int     xs     [MAXN];          // accepted samples
  int     n_acc;                  // samples accepted since reset
  longint exp_q  [$];
  longint expe_q [$];
  longint ylog   [$];             // every output, in order
  longint cyc_q  [$];
  // Pending LMS updates: the clock edge at which each is loaded, the sample
  // it belongs to and its scaled, saturated error.
  longint upd_due [$];
  int     upd_n   [$];
  longint upd_eq  [$];
  longint cycle = 0;
  bit     prev_valid;

  function automatic longint ref_y(int n);
    longint acc = 0;
    for (int g = 0; g < TAPS / GROUP; g++) begin
      int m = n - g * GROUP;          // sample at which group g formed its products
      if (m < 0) continue;
      for (int l = 0; l < GROUP; l++)
        if (m - l >= 0)
          acc += longint'(hsnap[m][g*GROUP + l]) * longint'(xs[m - l]);
    end
    return acc;
  endfunction

  // Coverage of the multiplier's horizontal matches, from the coefficient.
  function automatic longint sat17(longint v);
    return (v > HMAX) ? HMAX : (v < HMIN) ? HMIN : v;
  endfunction

  function automatic void count_coef(int h);
    int hm = (h < 0) ? -h - 1 : h;
    if (h < 0) n_neg++;
    for (int j = 0; j < 4; j++) if (((hm >> (4*j + 2)) & 3) == ((hm >> (4*j)) & 3)) n_m4++;
    for (int k = 0; k < 2; k++) if (((hm >> (8*k + 4)) & 15) == ((hm >> (8*k)) & 15)) n_m8++;
  endfunction

  // Model update at each clock edge, using the values driven before it.
  always @(posedge clk) begin
    cycle++;
    if (!rst_n) begin
      n_acc = 0;
      for (int i = 0; i < TAPS; i++) shadow[i] = 0;
      exp_q.delete(); expe_q.delete(); cyc_q.delete();
      upd_due.delete(); upd_n.delete(); upd_eq.delete();
      prev_valid = 0;
    end else begin
      if (x_valid) begin
        longint yv, ev, eq;
        xs[n_acc] = int'(x_in);
        for (int i = 0; i < TAPS; i++) begin
          hsnap[n_acc][i] = shadow[i];
          count_coef(shadow[i]);
        end
        yv = ref_y(n_acc);
        ev = longint'(d_in) - yv;
        exp_q.push_back(yv);
        expe_q.push_back(ev);
        cyc_q.push_back(cycle);
        if (adapt) begin
          eq = ev >>> E_SHIFT;
          if (eq != sat17(eq)) n_esat++;
          upd_due.push_back(cycle + 2);
          upd_n.push_back(n_acc);
          upd_eq.push_back(sat17(eq));
        end
        n_acc++;
        if (prev_valid) n_b2b++;
      end else if (n_acc > 0) n_gap++;
      if (upd_due.size() > 0 && upd_due[0] == cycle) begin
        int     un;
        longint ueq, dk;
        void'(upd_due.pop_front());
        un  = upd_n.pop_front();
        ueq = upd_eq.pop_front();
        for (int k = 0; k < TAPS; k++) begin
          dk = (un - k >= 0) ? (ueq * longint'(xs[un - k])) >>> U_SHIFT : 0;
          shadow[k] = int'(sat17(longint'(shadow[k]) + dk));
        end
        n_upd++;
      end
      if (coef_we) begin
        shadow[coef_addr] = int'(coef_wdata);
        if (exp_q.size() > 0 || n_acc > GROUP) n_rewrite++;
      end
      prev_valid = x_valid;
    end
  end

  // Output checker.
  always @(posedge clk) begin
    #1;
    if (rst_n && y_valid) begin
      longint e, ee, c;
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL unexpected output %0d", y_out);
      end else begin
        ylog.push_back(longint'(y_out));
        e = exp_q.pop_front();
        ee = expe_q.pop_front();
        c = cyc_q.pop_front();
        if (longint'(e_out) != ee) begin
          failures++;
          if (failures < 10) $display("FAIL e=%0d exp %0d", e_out, ee);
        end
        // c is the edge that accepted the sample, cycle the edge that
        // registered the result: x_valid in clock cycle t gives y_valid in t+2.
        if (longint'(y_out) != e || cycle - c + 1 != LATENCY) begin
          failures++;
          if (failures < 10)
            $display("FAIL y=%0d exp %0d latency %0d (cycle %0d, updates %0d)", y_out, e, cycle - c + 1, cycle, n_upd);
        end
      end
    end
  end

  task automatic write_coef(int addr, int val);
    coef_we = 1; coef_addr = 4'(addr); coef_wdata = 17'(val);
    @(posedge clk); #1;
    coef_we = 0;
  endtask

  task automatic send(int val);
    x_valid = 1; x_in = 16'(val);
    @(posedge clk); #1;
    x_valid = 0;
  endtask

  task automatic drain();
    repeat (4) @(posedge clk);
    #1;
  endtask

  initial begin
    rst_n = 0; coef_we = 0; coef_addr = 0; coef_wdata = 0; x_valid = 0; x_in = 0;
    adapt = 0; d_in = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;

    // Phase 1: impulse response. Coefficients chosen to hit both match
    // levels and both signs; the output must replay them in order.
    begin
      int hc[TAPS] = '{1, -1, 65535, -65536, 21845, -21846, 4369, -4370,
                       255, 3855, -3856, 12336, 100, -100, 32767, -32768};
      for (int i = 0; i < TAPS; i++) write_coef(i, hc[i]);
      send(1);
      for (int i = 1; i < TAPS + 4; i++) send(0);
      drain();
    end

    // Phase 2: random samples, random gaps, coefficient rewrites in flight.
    for (int t = 0; t < 3000; t++) begin
      x_valid    = ($urandom % 4) != 0;
      x_in       = 16'($urandom);
      coef_we    = ($urandom % 8) == 0;
      coef_addr  = 4'($urandom);
      coef_wdata = 17'($urandom);
      @(posedge clk); #1;
    end
    x_valid = 0; coef_we = 0;
    drain();

    // Phase 3: full scale, largest products of both signs back to back.
    for (int i = 0; i < TAPS; i++) write_coef(i, -65536);
    for (int i = 0; i < 2 * TAPS; i++) send(-32768);
    for (int i = 0; i < TAPS; i++) write_coef(i, 65535);
    for (int i = 0; i < 2 * TAPS; i++) send(-32768);
    drain();

    // Phase 4: reset in the middle of a stream clears samples, partial sums
    // and coefficients; afterwards the filter restarts from zero.
    for (int i = 0; i < TAPS; i++) write_coef(i, i * 1000 - 7000);
    for (int i = 0; i < 6; i++) send(i * 1111 - 3000);
    rst_n = 0;
    @(posedge clk); #1;
    rst_n = 1;
    n_reset++;
    checks++;
    if (y_out != 0 || e_out != 0 || y_valid) begin failures++; $display("FAIL reset did not clear the outputs"); end
    for (int i = 0; i < TAPS; i++) write_coef(i, 3 * i - 20);
    for (int i = 0; i < 40; i++) send(int'($signed(16'($urandom))));
    drain();

    // Phase 5: adaptive mode, identification of an unknown system. The
    // desired response is the unknown filter's exact output; the first
    // samples are large so that the scaled error saturates.
    begin
      int     htrue [TAPS];
      int     hist  [TAPS];
      longint dsum, err_first = 0, err_last = 0;
      int     nsamp = 0;
      for (int k = 0; k < TAPS; k++) htrue[k] = int'($urandom % 40001) - 20000;
      for (int k = 0; k < TAPS; k++) hist[k] = 0;
      for (int i = 0; i < TAPS; i++) write_coef(i, 0);
      adapt = 1;
      for (int t = 0; t < 2500; t++) begin
        int xv;
        xv = (t < 8) ? ((t % 2) ? 32767 : -32768) : int'($urandom % 8193) - 4096;
        for (int k = TAPS - 1; k > 0; k--) hist[k] = hist[k-1];
        hist[0] = xv;
        dsum = 0;
        for (int k = 0; k < TAPS; k++) dsum += longint'(htrue[k]) * longint'(hist[k]);
        // Four outliers at the start drive the scaled error into saturation.
        if (t < 4) dsum = (t % 2) ? 64'sd34359738367 : -64'sd34359738368;
        x_valid = 1; x_in = 16'(xv); d_in = 37'(dsum);
        if (t % 7 == 3) begin           // a gap now and then
          @(posedge clk); #1;
          x_valid = 0;
        end
        @(posedge clk); #1;
        x_valid = 0;
        nsamp++;
        begin
          longint ae;
          ae = (e_out < 0) ? -longint'(e_out) : longint'(e_out);
          if (t >= 100 && t < 200)   err_first += ae;
          if (t >= 2400 && t < 2500) err_last  += ae;
        end
      end
      drain();
      adapt = 0;
      d_in = 0;
      checks++;
      if (err_last * 20 > err_first) begin
        failures++;
        $display("FAIL LMS error did not shrink: %0d -> %0d", err_first, err_last);
      end
      // Read the learnt weights back as the impulse response, adaptation off.
      for (int i = 0; i < TAPS; i++) send(0);
      drain();
      ylog.delete();
      send(1);
      for (int i = 1; i < TAPS; i++) send(0);
      drain();
      for (int k = 0; k < TAPS; k++) begin
        longint dw;
        dw = ylog[k] - longint'(htrue[k]);
        checks++;
        if (dw > 64 || dw < -64) begin
          failures++;
          $display("FAIL LMS weight %0d = %0d, system %0d", k, ylog[k], htrue[k]);
        end
      end
      $display("LMS: mean |e| over 100 samples %0d -> %0d", err_first / 100, err_last / 100);
    end

    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL %0d outputs missing", exp_q.size()); end

    $display("mechanisms: negative coef %0d, m4 match %0d, m8 match %0d, gaps %0d, back-to-back %0d, rewrites in flight %0d, resets %0d, LMS updates %0d, error saturations %0d",
             n_neg, n_m4, n_m8, n_gap, n_b2b, n_rewrite, n_reset, n_upd, n_esat);
    if (n_upd == 0)     begin failures++; $display("FAIL no LMS update"); end
    if (n_esat == 0)    begin failures++; $display("FAIL no error saturation"); end
    checks += 2;
    if (n_neg == 0)     begin failures++; $display("FAIL no negative coefficient used"); end
    if (n_m4 == 0)      begin failures++; $display("FAIL no 4-bit match"); end
    if (n_m8 == 0)      begin failures++; $display("FAIL no 8-bit match"); end
    if (n_gap == 0)     begin failures++; $display("FAIL no input gap"); end
    if (n_b2b == 0)     begin failures++; $display("FAIL no back-to-back samples"); end
    if (n_rewrite == 0) begin failures++; $display("FAIL no coefficient rewrite in flight"); end
    if (n_reset == 0)   begin failures++; $display("FAIL no reset"); end
    checks += 7;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
