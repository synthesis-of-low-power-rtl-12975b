// Control-logic (CL) generator of the VHBCSE constant multiplier.
//
// Works on the multiplexed coefficient hm[15:0] from the sign conversion:
//  * 2-bit vertical step: hm is cut into eight 2-bit groups; group i,
//    hm[2i+1:2i], is the select of multiplexer i (0, x, 2x or 3x).
//  * 4-bit horizontal step: for each of the four 4-bit groups j the upper
//    and lower 2-bit halves are compared; m4[j] is set when they are equal,
//    so the 4-bit partial product can be formed from the lower half alone.
//  * 8-bit horizontal step: likewise for the two 8-bit groups, m8[k] is set
//    when the upper and lower nibbles of byte k are equal.
// Purely combinational. The grouping and the comparisons are the
// architecture's; encoding the result as plain equality flags is this
// design's choice.
module cl_gen
  import vhbcse_pkg::*;
(
  input  logic [HM_W-1:0]      hm,
  output logic [N_G2-1:0][1:0] sel,
  output logic [N_G4-1:0]      m4,
  output logic [N_G8-1:0]      m8
);
  assign sel = hm;

  for (genvar j = 0; j < N_G4; j++) begin : g_m4
    assign m4[j] = (hm[4*j+3 -: 2] == hm[4*j+1 -: 2]);
  end

  for (genvar k = 0; k < N_G8; k++) begin : g_m8
    assign m8[k] = (hm[8*k+7 -: 4] == hm[8*k+3 -: 4]);
  end
endmodule
