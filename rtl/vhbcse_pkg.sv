// Shared widths of the VHBCSE multiplier and the hybrid-form FIR filter.
// The 16-bit sample and the 17-bit two's complement coefficient (sign bit
// h[16] plus 16 magnitude-side bits) are the widths the architecture is
// built around; the 2-, 4- and 8-bit grouping of the multiplexed coefficient
// is tied to its 16 bits, so H_W is fixed here rather than a module
// parameter. Everything else is derived.
package vhbcse_pkg;
  localparam int unsigned X_W   = 16;        // input sample width
  localparam int unsigned H_W   = 17;        // coefficient width (with sign)
  localparam int unsigned HM_W  = H_W - 1;   // multiplexed coefficient width
  localparam int unsigned N_G2  = HM_W / 2;  // 2-bit groups (mux selects)
  localparam int unsigned N_G4  = HM_W / 4;  // 4-bit groups
  localparam int unsigned N_G8  = HM_W / 8;  // 8-bit groups

  // Partial product width for a given sample width: 3x needs two extra bits.
  function automatic int unsigned pp_w(int unsigned xw);
    return xw + 2;
  endfunction

  // Product width: x (xw bits, signed) times h (H_W bits, signed).
  function automatic int unsigned prod_w(int unsigned xw);
    return xw + H_W;
  endfunction
endpackage
