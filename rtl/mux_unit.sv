// Multiplexer unit of the VHBCSE constant multiplier.
//
// One 4-to-1 multiplexer per 2-bit group of the multiplexed coefficient
// picks the shared partial product the group asks for: 00 -> 0, 01 -> x,
// 10 -> 2x, 11 -> 3x. Where the CL generator found a horizontal common
// sub-expression, the final addition reuses the lower half and never reads
// the upper one, so the multiplexers of the redundant upper half are held at
// zero: the upper 2-bit group of a matching 4-bit group (m4), and both 2-bit
// groups of the upper nibble of a matching byte (m8). Holding them keeps
// those nets from toggling, which is where the power saving of the
// horizontal step comes from.
//
// Interface: pp1/pp2/pp3 from the PPG, sel/m4/m8 from the CL generator;
// eight X_W+2-bit signed partial products out. Purely combinational. Holding
// the unused multiplexers at zero is this design's reading of how the
// comparison result is used.
module mux_unit
  import vhbcse_pkg::N_G2, vhbcse_pkg::N_G4, vhbcse_pkg::N_G8;
#(
  parameter int unsigned X_W = vhbcse_pkg::X_W
) (
  input  logic signed [X_W+1:0]       pp1,
  input  logic signed [X_W+1:0]       pp2,
  input  logic signed [X_W+1:0]       pp3,
  input  logic [N_G2-1:0][1:0]        sel,
  input  logic [N_G4-1:0]             m4,
  input  logic [N_G8-1:0]             m8,
  output logic [N_G2-1:0][X_W+1:0]    pp
);
  for (genvar i = 0; i < N_G2; i++) begin : g_mux
    // Group i is redundant when it is the upper half of a matching nibble,
    // or lies in the upper nibble of a matching byte.
    logic idle;
    assign idle = ((i % 2 == 1) && m4[i/2]) || (((i % 4) >= 2) && m8[i/4]);

    always_comb begin
      if (idle) pp[i] = '0;
      else begin
        unique case (sel[i])
          2'b00: pp[i] = '0;
          2'b01: pp[i] = pp1;
          2'b10: pp[i] = pp2;
          2'b11: pp[i] = pp3;
        endcase
      end
    end
  end
endmodule
