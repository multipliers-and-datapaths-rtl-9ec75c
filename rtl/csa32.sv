// csa32: 3-2 counter (carry-save adder row).
//
// Each bit position is a full adder: the sum vector is the XOR of the three
// inputs and the carry vector is their majority, moved one place up to its
// own weight. a + b + c equals s + c_out modulo 2^W, so a row of these
// counters is the basic step of every reduction network in the design.
// Purely combinational; the carry out of the top bit is dropped because all
// sums in the multiplier are taken modulo 2^106.
module csa32 #(
  parameter int unsigned W = mul_pkg::PROD_W
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  output logic [W-1:0] s,   // sum vector
  output logic [W-1:0] co   // carry vector, already shifted to its weight
);

  logic [W-2:0] maj;   // majority of the lower W-1 bits; the top carry leaves the word

  always_comb begin
    s   = a ^ b ^ c;
    maj = (a[W-2:0] & b[W-2:0]) | (a[W-2:0] & c[W-2:0]) | (b[W-2:0] & c[W-2:0]);
    co  = {maj, 1'b0};
  end

endmodule
