// Square-root carry-select adder (SQRT CSLA).
//
// s = a + b + cin over W bits, with carry out. The word is cut into blocks
// whose sizes grow by one bit per block (2, 2, 3, 4, 5, ...; the last block
// takes what is left), so that the carry reaching a block arrives at about
// the moment the block's own sums are ready. The first block is a plain
// ripple-carry adder fed by cin. Every later block holds two ripple-carry
// adders, one assuming carry-in 0 and one assuming carry-in 1, and the real
// incoming carry selects sum and carry out of one of them. The delay grows
// with the square root of W instead of linearly.
//
// Using this adder in place of the ordinary adders of the multiplier and the
// filter is the low-power, low-area choice of the design; the 2,2,3,4,...
// block sequence is the usual square-root arrangement and is this
// implementation's choice. Purely combinational.
module sqrt_csa #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic         cout
);
  // Size of block k before truncation: 2, 2, 3, 4, ...
  function automatic int unsigned blk_size(int unsigned k);
    return (k == 0) ? 2 : k + 1;
  endfunction

  // Lowest bit of block k.
  function automatic int unsigned blk_lo(int unsigned k);
    int unsigned lo = 0;
    for (int unsigned i = 0; i < k; i++) lo += blk_size(i);
    return lo;
  endfunction

  // Number of blocks needed to cover W bits.
  function automatic int unsigned n_blocks(int unsigned w);
    int unsigned k = 0;
    while (blk_lo(k) < w) k++;
    return k;
  endfunction

  localparam int unsigned NB = n_blocks(W);

  logic [NB:0] c;   // carry into block k is c[k]
  assign c[0] = cin;

  for (genvar k = 0; k < NB; k++) begin : g_blk
    localparam int unsigned LO = blk_lo(k);
    localparam int unsigned HI = (blk_lo(k + 1) > W) ? W - 1 : blk_lo(k + 1) - 1;
    localparam int unsigned BW = HI - LO + 1;

    if (k == 0) begin : g_rca
      logic [BW:0] rc;
      assign rc[0] = c[0];
      for (genvar i = 0; i < BW; i++) begin : g_fa
        assign s[LO+i]  = a[LO+i] ^ b[LO+i] ^ rc[i];
        assign rc[i+1]  = (a[LO+i] & b[LO+i]) | (rc[i] & (a[LO+i] ^ b[LO+i]));
      end
      assign c[k+1] = rc[BW];
    end else begin : g_sel
      logic [BW-1:0] s0, s1;
      logic [BW:0]   r0, r1;
      assign r0[0] = 1'b0;
      assign r1[0] = 1'b1;
      for (genvar i = 0; i < BW; i++) begin : g_fa
        assign s0[i]   = a[LO+i] ^ b[LO+i] ^ r0[i];
        assign r0[i+1] = (a[LO+i] & b[LO+i]) | (r0[i] & (a[LO+i] ^ b[LO+i]));
        assign s1[i]   = a[LO+i] ^ b[LO+i] ^ r1[i];
        assign r1[i+1] = (a[LO+i] & b[LO+i]) | (r1[i] & (a[LO+i] ^ b[LO+i]));
      end
      assign s[HI:LO] = c[k] ? s1 : s0;
      assign c[k+1]   = c[k] ? r1[BW] : r0[BW];
    end
  end

  assign cout = c[NB];
endmodule
