// VHBCSE reconfigurable constant multiplier: p = h * x.
//
// The coefficient h (17-bit two's complement) is programmable, the sample x
// (X_W-bit signed) changes every cycle. The product is formed without a
// general multiplier, by the vertical-horizontal binary common
// sub-expression elimination (VHBCSE) scheme:
//   sign_conv : hm = h[16] ? ~h[15:0] : h[15:0]
//   cl_gen    : 2-bit group selects of hm, 4-bit and 8-bit half-match flags
//   ppg       : partial products x, 2x, 3x (one adder), outside this module
//   mux_unit  : one 0/x/2x/3x multiplexer per 2-bit group, redundant upper
//               halves held at zero
//   final_add : nibble, byte and word sums reusing matched halves, then the
//               sign correction
// and the result is stored in an output register.
//
// The partial-product generator is not inside: its outputs x, 2x, 3x depend
// only on the sample, so in a filter one ppg serves every multiplier that
// sees the same sample (the vertical common sub-expression across
// coefficients), and each multiplier only selects and adds.
//
// Interface: clk, rst_n (synchronous, active low), en (capture), x, the
// shared pp1/pp2/pp3 (= x, 2x, 3x from a ppg fed with the same x) and h; p
// is the registered signed product, X_W+17 bits, valid the cycle after en.
// Latency one clock. The stage order and the output register follow the
// architecture; the reset and the enable are this design's choice.
module vhbcse_mult
  import vhbcse_pkg::H_W, vhbcse_pkg::HM_W, vhbcse_pkg::N_G2, vhbcse_pkg::N_G4,
         vhbcse_pkg::N_G8;
#(
  parameter int unsigned X_W = vhbcse_pkg::X_W
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    en,
  input  logic signed [X_W-1:0]   x,
  input  logic signed [X_W+1:0]   pp1,
  input  logic signed [X_W+1:0]   pp2,
  input  logic signed [X_W+1:0]   pp3,
  input  logic signed [H_W-1:0]   h,
  output logic signed [X_W+16:0]  p
);
  logic [HM_W-1:0]            hm;
  logic                       neg;
  logic [N_G2-1:0][1:0]       sel;
  logic [N_G4-1:0]            m4;
  logic [N_G8-1:0]            m8;
  logic [N_G2-1:0][X_W+1:0]   pp;
  logic signed [X_W+16:0]     prod;

  sign_conv u_sign (.h(h), .hm(hm), .neg(neg));

  cl_gen u_cl (.hm(hm), .sel(sel), .m4(m4), .m8(m8));

  mux_unit #(.X_W(X_W)) u_mux (
    .pp1(pp1), .pp2(pp2), .pp3(pp3), .sel(sel), .m4(m4), .m8(m8), .pp(pp)
  );

  final_add #(.X_W(X_W)) u_fin (
    .pp(pp), .m4(m4), .m8(m8), .x(x), .neg(neg), .p(prod)
  );

  always_ff @(posedge clk) begin
    if (!rst_n)  p <= '0;
    else if (en) p <= prod;
  end
endmodule
