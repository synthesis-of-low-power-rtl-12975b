// Self-checking testbench for lms_update (16 taps, error shift 16, product
// shift 12). Each trial pulses start for one clock with a random error of
// random magnitude (small, large and saturating) and random samples, then
// applies random current weights (some close to the limits) in the next
// clock. upd_valid must be high in exactly that clock, and every w_new must
// equal sat17(w + ((sat17(e >>> 16) * x) >>> 12)), worked out here with
// 64-bit integers.
module lms_update_tb;
  localparam int TAPS = 16;
  localparam longint HMAX = 65535, HMIN = -65536;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_esat = 0, n_wsat = 0;
  logic                      rst_n, start, upd_valid;
  logic signed [37:0]        e;
  logic [TAPS-1:0][15:0]     xvec;
  logic [TAPS-1:0][16:0]     wvec, w_new;

  lms_update dut (.clk(clk), .rst_n(rst_n), .start(start), .e(e), .xvec(xvec),
                  .wvec(wvec), .upd_valid(upd_valid), .w_new(w_new));

  function automatic longint sat17(longint v);
    return (v > HMAX) ? HMAX : (v < HMIN) ? HMIN : v;
  endfunction

  initial begin
    rst_n = 0; start = 0; e = 0; xvec = '0; wvec = '0;
    @(posedge clk); #1;
    checks++;
    if (upd_valid) begin failures++; $display("FAIL upd_valid after reset"); end
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      longint ev, eq, xk, wk, expw;
      logic signed [16:0] got;
      case (t % 3)
        0: ev = longint'($signed(20'($urandom)));
        1: ev = longint'($signed(32'($urandom)));
        default: ev = longint'({$urandom, $urandom}) >>> 27;   // mostly saturates
      endcase
      e = 38'(ev);
      for (int k = 0; k < TAPS; k++) xvec[k] = 16'($urandom);
      start = 1;
      @(posedge clk); #1;
      start = 0;
      for (int k = 0; k < TAPS; k++)
        wvec[k] = (k % 4 == 0) ? 17'((k % 8 == 0) ? 65535 - ($urandom % 64) : -65536 + ($urandom % 64))
                               : 17'($urandom);
      #1;
      checks++;
      if (!upd_valid) begin failures++; $display("FAIL upd_valid missing"); end
      eq = sat17(ev >>> 16);
      if (eq != (ev >>> 16)) n_esat++;
      for (int k = 0; k < TAPS; k++) begin
        xk = longint'($signed(xvec[k]));
        wk = longint'($signed(wvec[k]));
        expw = sat17(wk + ((eq * xk) >>> 12));
        if (expw != wk + ((eq * xk) >>> 12)) n_wsat++;
        got = w_new[k];
        checks++;
        if (longint'(got) != expw) begin
          failures++;
          if (failures < 10) $display("FAIL e=%0d x=%0d w=%0d got %0d exp %0d", ev, xk, wk, got, expw);
        end
      end
      @(posedge clk); #1;
      checks++;
      if (upd_valid) begin failures++; $display("FAIL upd_valid longer than one clock"); end
    end
    checks++;
    if (n_esat == 0 || n_wsat == 0) begin failures++; $display("FAIL saturation coverage %0d %0d", n_esat, n_wsat); end
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
