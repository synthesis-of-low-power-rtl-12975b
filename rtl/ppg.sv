// Partial product generator (PPG) of the VHBCSE constant multiplier.
//
// A 2-bit group of the coefficient can only ask for 0, x, 2x or 3x, so these
// are formed once and shared by all eight multiplexers. x and 2x are wiring;
// 3x = x + 2x needs the one adder of the stage. Because bit 0 of 2x is zero,
// 3x[0] = x[0] and only the upper part (x >>> 1) + x needs adding: a 17-bit
// square-root carry-select adder for a 16-bit x, i.e. 17 full-adder cells.
//
// Interface: signed x (X_W bits) in; pp1 = x, pp2 = 2x, pp3 = 3x out, each
// X_W+2 bits signed. Purely combinational.
module ppg #(
  parameter int unsigned X_W = vhbcse_pkg::X_W
) (
  input  logic signed [X_W-1:0]   x,
  output logic signed [X_W+1:0]   pp1,
  output logic signed [X_W+1:0]   pp2,
  output logic signed [X_W+1:0]   pp3
);
  logic [X_W:0] half_x, full_x, upper;

  assign pp1 = {{2{x[X_W-1]}}, x};
  assign pp2 = {x[X_W-1], x, 1'b0};

  assign half_x = {{2{x[X_W-1]}}, x[X_W-1:1]};  // x >>> 1, sign-extended
  assign full_x = {x[X_W-1], x};                // x, sign-extended

  sqrt_csa #(.W(X_W + 1)) u_add3 (
    .a   (half_x),
    .b   (full_x),
    .cin (1'b0),
    .s   (upper),
    .cout()
  );

  assign pp3 = {upper, x[0]};
endmodule
