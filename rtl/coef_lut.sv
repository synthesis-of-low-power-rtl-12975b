// Coefficient look-up table of the reconfigurable FIR filter.
//
// Holds one 17-bit two's complement coefficient per tap. It is written one
// word per clock (we, waddr, wdata), or all words at once (ld, ld_data) when
// the LMS unit updates the weights; if both happen in one clock the single
// word write wins for its word. Every word is read in parallel, so
// each tap multiplier sees its coefficient without a read cycle; a write
// takes effect from the next clock edge on, which is what makes the filter
// reprogrammable while it runs. Reset clears all words (an all-zero filter).
//
// Storing the coefficients in a LUT and changing them on the fly follow the
// architecture; the write ports, their priority, the parallel read and the
// reset value are this design's choices.
module coef_lut
  import vhbcse_pkg::H_W;
#(
  parameter int unsigned TAPS = 16,
  localparam int unsigned AW  = (TAPS > 1) ? $clog2(TAPS) : 1
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          we,
  input  logic [AW-1:0]                 waddr,
  input  logic signed [H_W-1:0]         wdata,
  input  logic                          ld,
  input  logic [TAPS-1:0][H_W-1:0]      ld_data,
  output logic [TAPS-1:0][H_W-1:0]      coef
);
  always_ff @(posedge clk) begin
    if (!rst_n) coef <= '0;
    else begin
      if (ld) coef <= ld_data;
      if (we && (int'(waddr) < TAPS)) coef[waddr] <= wdata;
    end
  end
endmodule
