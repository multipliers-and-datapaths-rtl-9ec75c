// booth_mux: Booth multiplexer row, forming one partial product.
//
// Given the select lines of one Booth digit, the row picks 0, X or 2X of the
// multiplicand X and inverts it when the digit is negative. The output is
// the row in one's-complement form, W+2 bits wide (W+1 magnitude bits of 2X
// plus a sign bit); the missing "+1" of a negated row is `neg`, which the
// partial-product generator places in the correction row. Purely
// combinational. The document names the Booth muxes and their place in the
// datapath; the one's-complement-plus-correction form is this design's own.
module booth_mux
  import mul_pkg::*;
#(
  parameter int unsigned W = SIG_W   // multiplicand width
) (
  input  logic [W-1:0] x,    // multiplicand
  input  booth_sel_t   sel,  // digit select from the Booth encoder
  output logic [W+1:0] row   // {sign, 0/X/2X} in one's complement
);

  logic [W:0] mag;

  always_comb begin
    unique case (1'b1)
      sel.one: mag = {1'b0, x};
      sel.two: mag = {x, 1'b0};
      default: mag = '0;
    endcase
    row = sel.neg ? ~{1'b0, mag} : {1'b0, mag};
  end

endmodule
