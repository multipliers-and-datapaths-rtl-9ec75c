// sig_round: normalisation and rounding of the significand product.
//
// The product of two normalised 53-bit significands (values in [1, 2)) lies
// in [1, 4), a 106-bit number with 104 fraction bits. If its top bit is set
// the 53 result bits are p[105:53] and the exponent must be raised by one;
// otherwise they are p[104:52]. The next bit down is the guard bit and the
// OR of all lower bits the sticky bit. Rounding is to nearest, ties to even:
// the result is incremented when guard is set and either sticky or the
// result LSB is set. An increment that carries out of the top (all ones)
// gives 2.0, which is renormalised to 1.0 with one more exponent step.
//
// The document states only that the full 106-bit product is needed for
// correct IEEE rounding and that rounding logic follows the CPA; the
// rounding mode and this normalisation scheme are this design's choices.
// Inputs that are not normalised give a defined but meaningless result.
// Purely combinational.
module sig_round
  import mul_pkg::*;
(
  input  logic [PROD_W-1:0] p,        // exact significand product
  output logic [SIG_W-1:0]  sig,      // rounded significand, hidden bit included
  output logic [1:0]        exp_inc,  // exponent adjustment, 0..2
  output logic              inexact   // some discarded bit was set
);

  logic             hi;
  logic [SIG_W-1:0] trunc;
  logic             guard, sticky, up;
  logic [SIG_W:0]   inc;

  always_comb begin
    hi     = p[PROD_W-1];
    trunc  = hi ? p[PROD_W-1 -: SIG_W] : p[PROD_W-2 -: SIG_W];
    guard  = hi ? p[SIG_W-1]           : p[SIG_W-2];
    sticky = hi ? |p[SIG_W-2:0]        : |p[SIG_W-3:0];
    up     = guard & (sticky | trunc[0]);
    inc    = {1'b0, trunc} + (SIG_W+1)'(up);
    if (inc[SIG_W]) begin
      sig     = inc[SIG_W:1];
      exp_inc = hi ? 2'd2 : 2'd1;
    end else begin
      sig     = inc[SIG_W-1:0];
      exp_inc = hi ? 2'd1 : 2'd0;
    end
    inexact = guard | sticky;
  end

endmodule
