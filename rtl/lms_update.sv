// LMS weight-update unit for the adaptive mode of the hybrid-form filter.
//
// For a sample n whose output y[n] has just been formed, the least-mean-
// square rule moves every coefficient along the gradient of the squared
// error e[n] = d[n] - y[n]:
//   w_k <- w_k + mu * e[n] * x[n-k],   mu = 2^-(E_SHIFT + U_SHIFT).
// The error is first scaled by 2^-E_SHIFT (arithmetic shift) and saturated
// to the 17-bit coefficient format, so that the products e*x can be formed
// by the same VHBCSE multipliers as the filter taps (the scaled error takes
// the place of the coefficient). Each product is then scaled by 2^-U_SHIFT
// and added to the current weight with a square-root carry-select adder,
// saturating to 17 bits.
//
// Interface and timing: start (one clock) with e and the sample vector
// xvec = {x[n], x[n-1], ...} valid; the products are registered at that
// edge, and in the next clock upd_valid is high with w_new computed from the
// weights wvec present in that clock. The caller loads w_new into the
// coefficient LUT at the end of that clock. Two clocks from start to
// weights in force: a delayed LMS.
//
// The LMS rule itself is the textbook one; the power-of-two step size, the
// saturation, the reuse of the VHBCSE multiplier and the two-clock pipeline
// are this design's choices.
module lms_update
  import vhbcse_pkg::X_W, vhbcse_pkg::H_W;
#(
  parameter  int unsigned TAPS    = 16,
  parameter  int unsigned E_W     = 38,   // width of the error input
  parameter  int unsigned E_SHIFT = 16,
  parameter  int unsigned U_SHIFT = 12,
  localparam int unsigned P_W     = X_W + H_W
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          start,
  input  logic signed [E_W-1:0]         e,
  input  logic [TAPS-1:0][X_W-1:0]      xvec,
  input  logic [TAPS-1:0][H_W-1:0]      wvec,
  output logic                          upd_valid,
  output logic [TAPS-1:0][H_W-1:0]      w_new
);
  localparam logic signed [H_W-1:0] HMAX = {1'b0, {(H_W-1){1'b1}}};
  localparam logic signed [H_W-1:0] HMIN = {1'b1, {(H_W-1){1'b0}}};

  logic signed [E_W-1:0] e_sh;
  logic signed [H_W-1:0] e_q;

  // Scaled error, saturated to the coefficient format.
  assign e_sh = e >>> E_SHIFT;
  always_comb begin
    if (e_sh[E_W-1:H_W-1] == '0 || e_sh[E_W-1:H_W-1] == '1) e_q = e_sh[H_W-1:0];
    else if (e_sh[E_W-1])                                  e_q = HMIN;
    else                                                   e_q = HMAX;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) upd_valid <= 1'b0;
    else        upd_valid <= start;
  end

  for (genvar k = 0; k < TAPS; k++) begin : g_tap
    logic signed [P_W-1:0]   prod;
    logic signed [P_W-1:0]   delta;
    logic signed [P_W-1:0]   sum;
    logic [H_W-1:0]          w_sat;

    logic [X_W+1:0] pp1, pp2, pp3;

    ppg #(.X_W(X_W)) u_ppg (.x(xvec[k]), .pp1(pp1), .pp2(pp2), .pp3(pp3));

    vhbcse_mult #(.X_W(X_W)) u_mult (
      .clk(clk), .rst_n(rst_n), .en(start),
      .x(xvec[k]), .pp1(pp1), .pp2(pp2), .pp3(pp3), .h(e_q), .p(prod)
    );

    assign delta = prod >>> U_SHIFT;

    // Weight plus step; the weight is sign-extended to the product width,
    // which cannot overflow because |delta| < 2^(P_W-1-U_SHIFT).
    sqrt_csa #(.W(P_W)) u_add (
      .a   ({{(P_W - H_W){wvec[k][H_W-1]}}, wvec[k]}),
      .b   (delta),
      .cin (1'b0),
      .s   (sum),
      .cout()
    );

    // Saturate: the sum fits when its bits above the coefficient's sign
    // bit are all copies of that sign bit.
    always_comb begin
      if (sum[P_W-1:H_W-1] == '0 || sum[P_W-1:H_W-1] == '1) w_sat = sum[H_W-1:0];
      else if (sum[P_W-1])                                  w_sat = HMIN;
      else                                                  w_sat = HMAX;
    end
    assign w_new[k] = w_sat;
  end
endmodule
