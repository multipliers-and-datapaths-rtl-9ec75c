// cpa: carry-propagate adder for the carry-save product.
//
// Adds the sum and carry vectors held in the carry-save latches into the
// final binary product, modulo 2^W. The document gives only the function;
// the adder is written as a plain word-level sum so that synthesis can pick
// the adder architecture. Purely combinational.
module cpa #(
  parameter int unsigned W = mul_pkg::PROD_W
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] sum
);

  assign sum = a + b;

endmodule
