// Reconfigurable hybrid-form FIR filter with VHBCSE constant multipliers.
//
//   y[n] = sum_{k=0}^{TAPS-1} h[k] * x[n-k]
//
// The TAPS taps are split into M = TAPS/GROUP groups of GROUP taps. Inside a
// group the filter is in direct form: one short delay line x[n] .. x[n-GROUP+1],
// shared by all groups, feeds GROUP multipliers whose products are summed by
// an adder line,
//   b_g[n] = sum_{l<GROUP} h[g*GROUP+l] * x[n-l].
// Between groups it is in transposed form: the group sums are accumulated
// along a chain that is delayed by GROUP samples per group,
//   s_{M-1}[n] = b_{M-1}[n],   s_g[n] = b_g[n] + s_{g+1}[n-GROUP],  y = s_0.
// GROUP = 1 gives the plain transposed form, GROUP = TAPS the direct form;
// the mix keeps the adder line of each group short (as the transposed form
// does) while needing only GROUP-1 sample registers (as the direct form
// does). Every multiplier is a vhbcse_mult; the x/2x/3x partial products of
// a delay-line sample are formed once (ppg) and shared by the M multipliers
// that read it. Every adder is a sqrt_csa, and the
// coefficients sit in a coef_lut that can be rewritten while the filter runs.
//
// Interface: coef_we/coef_addr/coef_wdata program tap coef_addr (two's
// complement, 17 bits). x_valid/x_in deliver one signed 16-bit sample; a
// sample may come every clock or with any gaps. y_valid/y_out return the
// full-precision signed result for that sample exactly two clocks later
// (one clock in the multipliers' product registers, one in the output and
// chain registers). A coefficient written in the same clock as a sample
// applies from the next sample on; samples already in the chain keep the
// partial sums of the old coefficients.
//
// Adaptive mode: with adapt high, every output also drives an LMS update of
// the coefficients. The desired response d_in comes with its sample; in the
// clock after the sample the error e = d - y is formed next to y, and
// lms_update loads the updated weights into the LUT one clock later, so a
// weight update is in force from the sample accepted two clocks after the
// sample it was computed from (delayed LMS). e_out returns the error with
// y_out. The direct-form weight update needs the full sample history
// x[n] .. x[n-TAPS+1], so in this mode the delay line is TAPS long; the
// filtering itself only reads its first GROUP entries.
//
// Reset (synchronous, active low) clears coefficients, samples and partial
// sums. The grouping into direct-form sections joined in transposed form is
// this design's reading of the hybrid form; the tap count, the group size,
// the valid handshake, the timing, the LMS step size and the format of d_in
// (same scale as y_out) are its own choices.
module hybrid_fir
  import vhbcse_pkg::X_W, vhbcse_pkg::H_W;
#(
  parameter  int unsigned TAPS  = 16,
  parameter  int unsigned GROUP = 4,
  parameter  int unsigned E_SHIFT = 16,   // LMS step size mu = 2^-(E_SHIFT+U_SHIFT)
  parameter  int unsigned U_SHIFT = 12,
  localparam int unsigned AW    = (TAPS > 1) ? $clog2(TAPS) : 1,
  localparam int unsigned P_W   = X_W + H_W,
  localparam int unsigned Y_W   = P_W + AW
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     coef_we,
  input  logic [AW-1:0]            coef_addr,
  input  logic signed [H_W-1:0]    coef_wdata,
  input  logic                     x_valid,
  input  logic signed [X_W-1:0]    x_in,
  input  logic                     adapt,
  input  logic signed [Y_W-1:0]    d_in,
  output logic                     y_valid,
  output logic signed [Y_W-1:0]    y_out,
  output logic signed [Y_W:0]      e_out
);
  localparam int unsigned M = TAPS / GROUP;

  initial begin
    assert (GROUP >= 1 && TAPS % GROUP == 0)
      else $error("hybrid_fir: TAPS must be a multiple of GROUP");
  end

  // ---------------------------------------------------------------- LUT
  logic [TAPS-1:0][H_W-1:0] coef;

  logic                     upd_valid;
  logic [TAPS-1:0][H_W-1:0] w_new;

  coef_lut #(.TAPS(TAPS)) u_lut (
    .clk(clk), .rst_n(rst_n), .we(coef_we), .waddr(coef_addr),
    .wdata(coef_wdata), .ld(upd_valid), .ld_data(w_new), .coef(coef)
  );

  // ------------------------------------------ shared direct-form delay line
  // xr[l] = x[n-l+1] once sample n has been accepted; xr[1..GROUP-1] feed
  // the filter, xr[1..TAPS] the weight update.
  logic [TAPS:1][X_W-1:0]    xr;
  logic [GROUP-1:0][X_W-1:0] xd;     // xd[l] = x[n-l] while sample n is offered
  logic signed [Y_W-1:0]     d_r;    // desired response of the last sample

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      xr  <= '0;
      d_r <= '0;
    end else if (x_valid) begin
      xr[1] <= x_in;
      for (int l = 2; l <= TAPS; l++) xr[l] <= xr[l-1];
      d_r <= d_in;
    end
  end

  assign xd[0] = x_in;
  for (genvar l = 1; l < GROUP; l++) begin : g_xd
    assign xd[l] = xr[l];
  end

  // Partial products x, 2x, 3x of each delay-line sample, shared by the
  // multipliers of all groups that read that sample.
  logic [GROUP-1:0][X_W+1:0] pp1, pp2, pp3;
  for (genvar l = 0; l < GROUP; l++) begin : g_ppg
    ppg #(.X_W(X_W)) u_ppg (.x(xd[l]), .pp1(pp1[l]), .pp2(pp2[l]), .pp3(pp3[l]));
  end

  // One clock after a sample the products for it sit in the multipliers.
  logic v1;
  always_ff @(posedge clk) begin
    if (!rst_n) v1 <= 1'b0;
    else        v1 <= x_valid;
  end

  // --------------------------------------------------------------- groups
  logic [M-1:0][Y_W-1:0] b;          // group sums
  logic [M-1:0][Y_W-1:0] s;          // chain sums

  for (genvar g = 0; g < M; g++) begin : g_grp
    logic [GROUP-1:0][P_W-1:0] prod;
    logic [GROUP:0][Y_W-1:0]   acc;   // adder line of the group

    assign acc[0] = '0;
    for (genvar l = 0; l < GROUP; l++) begin : g_tap
      vhbcse_mult #(.X_W(X_W)) u_mult (
        .clk(clk), .rst_n(rst_n), .en(x_valid),
        .x(xd[l]), .pp1(pp1[l]), .pp2(pp2[l]), .pp3(pp3[l]),
        .h(coef[g*GROUP+l]), .p(prod[l])
      );
      sqrt_csa #(.W(Y_W)) u_add (
        .a   (acc[l]),
        .b   ({{(Y_W - P_W){prod[l][P_W-1]}}, prod[l]}),
        .cin (1'b0),
        .s   (acc[l+1]),
        .cout()
      );
    end
    assign b[g] = acc[GROUP];

    // Transposed link: GROUP-deep delay of the next group's chain sum.
    if (g == M - 1) begin : g_last
      assign s[g] = b[g];
    end else begin : g_link
      logic [GROUP-1:0][Y_W-1:0] dly;
      always_ff @(posedge clk) begin
        if (!rst_n) dly <= '0;
        else if (v1) begin
          dly[0] <= s[g+1];
          for (int d = 1; d < GROUP; d++) dly[d] <= dly[d-1];
        end
      end
      sqrt_csa #(.W(Y_W)) u_chain (
        .a(b[g]), .b(dly[GROUP-1]), .cin(1'b0), .s(s[g]), .cout()
      );
    end
  end

  // ------------------------------------------------------ error and LMS
  logic signed [Y_W:0] err;          // d[n] - y[n] while v1 is high

  sqrt_csa #(.W(Y_W + 1)) u_err (
    .a   ({d_r[Y_W-1], d_r}),
    .b   (~{s[0][Y_W-1], s[0]}),
    .cin (1'b1),
    .s   (err),
    .cout()
  );

  logic [TAPS-1:0][X_W-1:0] xvec;
  for (genvar k = 0; k < TAPS; k++) begin : g_xvec
    assign xvec[k] = xr[k+1];
  end

  lms_update #(
    .TAPS(TAPS), .E_W(Y_W + 1), .E_SHIFT(E_SHIFT), .U_SHIFT(U_SHIFT)
  ) u_lms (
    .clk(clk), .rst_n(rst_n), .start(v1 && adapt), .e(err),
    .xvec(xvec), .wvec(coef), .upd_valid(upd_valid), .w_new(w_new)
  );

  // --------------------------------------------------------------- output
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      y_valid <= 1'b0;
      y_out   <= '0;
      e_out   <= '0;
    end else begin
      y_valid <= v1;
      if (v1) begin
        y_out <= s[0];
        e_out <= err;
      end
    end
  end
endmodule
