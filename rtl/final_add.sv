// Final addition stage of the VHBCSE constant multiplier.
//
// Adds the eight selected partial products with their weights 4^i, reusing
// the horizontal common sub-expressions found by the CL generator:
//   nibble j : P4[j] = pp[2j] + 4 * (m4[j] ? pp[2j] : pp[2j+1])
//   byte   k : P8[k] = P4[2k] + 16 * (m8[k] ? P4[2k] : P4[2k+1])
//   word     : P16   = P8[0] + 256 * P8[1]          ( = x * hm )
// Then the sign correction: for a negative coefficient hm = |h| - 1, so
//   T = P16 + x and p = -T (two's complement: ~T + 1);
// otherwise p = P16. Every adder is a square-root carry-select adder.
//
// Interface: pp/m4/m8 from the multiplexer unit and CL generator, x and the
// coefficient sign neg; p is the exact signed product, X_W+17 bits.
// Purely combinational.
//
// The hierarchy of 4-bit and 8-bit sums, the reuse of the lower half and the
// two's complement of the result under the sign bit follow the architecture.
// Adding the extra x before negation (so the product is exact rather than off
// by one x) and keeping the full-precision result instead of shifting it
// right by one bit are this design's choices.
module final_add
  import vhbcse_pkg::N_G2, vhbcse_pkg::N_G4, vhbcse_pkg::N_G8;
#(
  parameter int unsigned X_W = vhbcse_pkg::X_W
) (
  input  logic [N_G2-1:0][X_W+1:0]  pp,
  input  logic [N_G4-1:0]           m4,
  input  logic [N_G8-1:0]           m8,
  input  logic signed [X_W-1:0]     x,
  input  logic                      neg,
  output logic signed [X_W+16:0]    p
);
  localparam int unsigned W4  = X_W + 4;
  localparam int unsigned W8  = X_W + 8;
  localparam int unsigned W16 = X_W + 16;
  localparam int unsigned WP  = X_W + 17;

  logic [N_G4-1:0][W4-1:0] p4;
  logic [N_G8-1:0][W8-1:0] p8;
  logic [W16-1:0]          p16;
  logic [WP-1:0]           t, t_inv;

  // 4-bit horizontal level.
  for (genvar j = 0; j < N_G4; j++) begin : g_p4
    logic [X_W+1:0] hi;
    assign hi = m4[j] ? pp[2*j] : pp[2*j+1];
    sqrt_csa #(.W(W4)) u_add (
      .a   ({{2{pp[2*j][X_W+1]}}, pp[2*j]}),
      .b   ({hi, 2'b00}),
      .cin (1'b0),
      .s   (p4[j]),
      .cout()
    );
  end

  // 8-bit horizontal level.
  for (genvar k = 0; k < N_G8; k++) begin : g_p8
    logic [W4-1:0] hi;
    assign hi = m8[k] ? p4[2*k] : p4[2*k+1];
    sqrt_csa #(.W(W8)) u_add (
      .a   ({{4{p4[2*k][W4-1]}}, p4[2*k]}),
      .b   ({hi, 4'b0000}),
      .cin (1'b0),
      .s   (p8[k]),
      .cout()
    );
  end

  // 16-bit level: x * hm.
  sqrt_csa #(.W(W16)) u_add16 (
    .a   ({{8{p8[0][W8-1]}}, p8[0]}),
    .b   ({p8[1], 8'b0}),
    .cin (1'b0),
    .s   (p16),
    .cout()
  );

  // Sign correction: T = x*hm + x for a negative coefficient, then -T.
  sqrt_csa #(.W(WP)) u_addx (
    .a   ({p16[W16-1], p16}),
    .b   (neg ? {{(WP - X_W){x[X_W-1]}}, x}
              : '0),
    .cin (1'b0),
    .s   (t),
    .cout()
  );

  assign t_inv = t ^ {WP{neg}};

  sqrt_csa #(.W(WP)) u_neg (
    .a   (t_inv),
    .b   ('0),
    .cin (neg),
    .s   (p),
    .cout()
  );
endmodule
